// Camera motion stabilization (CMS) engine.
// Each of the NUM_FEAT vector processing elements (VPEs) tracks one feature and
// keeps a confidence weight for it over time: a feature whose motion vector
// agrees with the last global camera motion (L1 distance <= THRESH) gains
// weight, one that disagrees (a moving object, a bad track) loses weight, and
// an untracked feature restarts at W_INIT and does not vote. The VPEs multiply
// each motion vector by its weight; a pipelined adder tree sums the weighted
// vectors and the weights, and a pipelined weighted division gives the global
// camera motion as the weighted mean, which the rest of the system uses to
// compensate the camera's translation.
// The 128 VPEs, the tree accumulator, the weighted division and the 14-cycle
// pipeline follow the document; the weight update rule, the widths and the
// division by restoring steps (2 quotient bits per stage) are this design's.
// Timing: fmv_valid with a full set of vectors in cycle t -> cm_valid/cm_x/cm_y
// in cycle t+13, i.e. the 14th cycle counting the input cycle (13 clock edges).
// One set may enter every cycle; the weights of a set use the camera motion
// last output. Quotients truncate toward zero; zero total weight gives zero.
module cms #(
  parameter int unsigned NUM_FEAT = 128,
  parameter int unsigned MV_W     = 10,
  parameter int unsigned W_W      = 4,
  parameter int unsigned THRESH   = 16,
  parameter int unsigned W_INIT   = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          fmv_valid,
  input  logic signed [MV_W-1:0]        fmv_x [NUM_FEAT],
  input  logic signed [MV_W-1:0]        fmv_y [NUM_FEAT],
  input  logic [NUM_FEAT-1:0]           fmv_ok,
  output logic                          cm_valid,
  output logic signed [MV_W-1:0]        cm_x,
  output logic signed [MV_W-1:0]        cm_y
);
  localparam int unsigned LEVELS = $clog2(NUM_FEAT);
  localparam int unsigned PROD_W = MV_W + W_W + 1;
  localparam int unsigned SUM_W  = PROD_W + LEVELS;
  localparam int unsigned WS_W   = W_W + LEVELS;
  localparam int unsigned Q_W    = MV_W;           // quotient magnitude bits
  localparam int unsigned DIV_ST = (Q_W + 1) / 2;  // 2 bits per stage
  localparam logic [W_W-1:0] W_MAX = '1;

  // ---------------- VPE cluster: confidence weights ----------------
  // Packed arrays: plain registers, one set per VPE.
  logic [NUM_FEAT-1:0][W_W-1:0]  conf;   // state, persists over frames
  logic [NUM_FEAT-1:0][W_W-1:0]  s1_w;
  logic [NUM_FEAT-1:0][MV_W-1:0] s1_x;
  logic [NUM_FEAT-1:0][MV_W-1:0] s1_y;
  logic                    s1_v;
  logic [W_W-1:0]          w_n [NUM_FEAT];

  always_comb begin
    for (int i = 0; i < NUM_FEAT; i++) begin
      logic signed [MV_W+1:0] dx, dy;
      logic [MV_W+1:0]        l1d;
      dx  = (MV_W+2)'(fmv_x[i]) - (MV_W+2)'(cm_x);
      dy  = (MV_W+2)'(fmv_y[i]) - (MV_W+2)'(cm_y);
      l1d = (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
      if (!fmv_ok[i])                     w_n[i] = W_INIT[W_W-1:0];
      else if (l1d <= (MV_W+2)'(THRESH))  w_n[i] = (conf[i] == W_MAX) ? W_MAX : conf[i] + 1'b1;
      else                                w_n[i] = (conf[i] == '0) ? '0 : conf[i] - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0;
      for (int i = 0; i < NUM_FEAT; i++) conf[i] <= W_INIT[W_W-1:0];
      s1_w <= '0;
      s1_x <= '0;
      s1_y <= '0;
    end else begin
      s1_v <= fmv_valid;
      if (fmv_valid) begin
        for (int i = 0; i < NUM_FEAT; i++) begin
          conf[i] <= w_n[i];
          s1_w[i] <= fmv_ok[i] ? w_n[i] : '0;
          s1_x[i] <= fmv_x[i];
          s1_y[i] <= fmv_y[i];
        end
      end
    end
  end

  // ---------------- products and tree accumulator ----------------
  logic [LEVELS:0][NUM_FEAT-1:0][SUM_W-1:0] tx, ty;
  logic [LEVELS:0][NUM_FEAT-1:0][WS_W-1:0]  tw;
  logic [LEVELS:0]         tv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tv <= '0;
      tx <= '0;
      ty <= '0;
      tw <= '0;
    end else begin
      tv <= {tv[LEVELS-1:0], s1_v};
      for (int i = 0; i < NUM_FEAT; i++) begin
        tx[0][i] <= SUM_W'($signed(s1_x[i]) * $signed({1'b0, s1_w[i]}));
        ty[0][i] <= SUM_W'($signed(s1_y[i]) * $signed({1'b0, s1_w[i]}));
        tw[0][i] <= WS_W'(s1_w[i]);
      end
      for (int l = 1; l <= LEVELS; l++)
        for (int i = 0; i < (NUM_FEAT >> l); i++) begin
          tx[l][i] <= SUM_W'($signed(tx[l-1][2*i]) + $signed(tx[l-1][2*i+1]));
          ty[l][i] <= SUM_W'($signed(ty[l-1][2*i]) + $signed(ty[l-1][2*i+1]));
          tw[l][i] <= tw[l-1][2*i] + tw[l-1][2*i+1];
        end
    end
  end

  // ---------------- weighted division ----------------
  // Restoring division of |sum| by the weight sum, 2 quotient bits per stage.
  typedef struct packed {
    logic             v;
    logic             neg_x, neg_y;
    logic [SUM_W-1:0] rx, ry;      // partial remainders
    logic [WS_W-1:0]  den;
    logic [Q_W-1:0]   qx, qy;
  } div_t;

  div_t d_in;
  div_t dv [DIV_ST+1];
  always_comb begin
    logic signed [SUM_W-1:0] sx, sy;
    sx = $signed(tx[LEVELS][0]);
    sy = $signed(ty[LEVELS][0]);
    d_in.v     = tv[LEVELS];
    d_in.neg_x = sx < 0;
    d_in.neg_y = sy < 0;
    d_in.rx    = sx < 0 ? SUM_W'(-sx) : SUM_W'(sx);
    d_in.ry    = sy < 0 ? SUM_W'(-sy) : SUM_W'(sy);
    d_in.den   = tw[LEVELS][0];
    d_in.qx    = '0;
    d_in.qy    = '0;
  end
  assign dv[0] = d_in;

  for (genvar k = 0; k < DIV_ST; k++) begin : g_div
    div_t nxt;
    always_comb begin
      nxt = dv[k];
      for (int j = 0; j < 2; j++) begin
        int b;
        logic [SUM_W+Q_W-1:0] dsh;
        b = int'(Q_W) - 1 - 2 * k - j;
        if (b >= 0) begin
          dsh = (SUM_W+Q_W)'(nxt.den) << b;
          if ((SUM_W+Q_W)'(nxt.rx) >= dsh) begin
            nxt.rx    = nxt.rx - SUM_W'(dsh);
            nxt.qx[b] = 1'b1;
          end
          if ((SUM_W+Q_W)'(nxt.ry) >= dsh) begin
            nxt.ry    = nxt.ry - SUM_W'(dsh);
            nxt.qy[b] = 1'b1;
          end
        end
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dv[k+1] <= '0;
      else        dv[k+1] <= nxt;
    end
  end

  // Output: apply the signs; hold the last camera motion for the VPEs.
  div_t                   last;
  logic signed [MV_W-1:0] fin_x, fin_y, hold_x, hold_y;
  assign last = dv[DIV_ST];
  always_comb begin
    if (last.den == '0) begin
      fin_x = '0;
      fin_y = '0;
    end else begin
      fin_x = last.neg_x ? -$signed(last.qx) : $signed(last.qx);
      fin_y = last.neg_y ? -$signed(last.qy) : $signed(last.qy);
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_x <= '0;
      hold_y <= '0;
    end else if (last.v) begin
      hold_x <= fin_x;
      hold_y <= fin_y;
    end
  end
  assign cm_valid = last.v;
  assign cm_x     = last.v ? fin_x : hold_x;
  assign cm_y     = last.v ? fin_y : hold_y;
endmodule
