// Attention tracking (AT) engine.
// First frame of a period (mode_detect = 1): a generalized Hough transform
// groups the matched feature points of each object. Each of the NPROC
// processors takes one matched point per cycle, scales the stored offset from
// the feature to the object's reference point by the feature's scale ratio
// (scale calculation) and casts a vote for the object centre into the voting
// bins of that object's Hough table (NOBJ tables, one per tracked object).
// After vote_end the bins are scanned and the peak of each table becomes the
// centre of that object's attention window. Following frames
// (mode_detect = 0): each camera-motion update from CMS moves the previous
// window centre by the camera motion, so windows are predicted without
// voting. A multiplexer chooses between the two sources of the centre.
// Each processor keeps its own copy of the bin counts in a small memory, so
// a memory takes one read-modify-write per cycle even when several
// processors vote the same bin; the scan adds the copies of a bin.
// The 8 processors, 4 Hough tables, voting/prediction split and camera-motion
// input follow the document; the bin size, window size, vote format, minimum
// vote count and saturating counters are this design's choices.
// Timing: a vote lands in its table 2 cycles after mfp_valid; the scan starts
// when vote_end has passed the same pipeline and takes NBINS cycles; done
// rises NBINS+3 clock edges after the edge that samples vote_end, together
// with the new windows. A prediction takes effect the cycle
// after cm_valid.
module attention_tracking
  import vvp_pkg::*;
#(
  parameter int unsigned NPROC     = 8,
  parameter int unsigned NOBJ      = 4,
  parameter int unsigned IMG_W     = 1920,
  parameter int unsigned IMG_H     = 1080,
  parameter int unsigned BIN_SHIFT = 6,
  parameter int unsigned CNT_W     = 8,
  parameter int unsigned WIN_HALF  = 128,
  parameter int unsigned MIN_VOTES = 3,
  parameter int unsigned MV_W      = 10,
  parameter int unsigned OFF_W     = 12,
  parameter int unsigned OBJ_W     = (NOBJ > 1) ? $clog2(NOBJ) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     mode_detect,
  input  logic                     frame_start,
  // matched feature points
  input  logic [NPROC-1:0]         mfp_valid,
  input  logic [OBJ_W-1:0]         mfp_obj   [NPROC],
  input  pos_t                     mfp_pos   [NPROC],
  input  logic signed [OFF_W-1:0]  mfp_dx    [NPROC],  // feature -> reference point
  input  logic signed [OFF_W-1:0]  mfp_dy    [NPROC],
  input  logic [7:0]               mfp_scale [NPROC],  // Q4.4 scale ratio
  input  logic                     vote_end,
  // camera motion
  input  logic                     cm_valid,
  input  logic signed [MV_W-1:0]   cm_x,
  input  logic signed [MV_W-1:0]   cm_y,
  // attention windows
  output logic [NOBJ-1:0]          win_valid,
  output pos_t                     win_center [NOBJ],
  output window_t                  win        [NOBJ],
  output logic                     done
);
  localparam int unsigned BX    = (IMG_W + (1 << BIN_SHIFT) - 1) >> BIN_SHIFT;
  localparam int unsigned BY    = (IMG_H + (1 << BIN_SHIFT) - 1) >> BIN_SHIFT;
  localparam int unsigned NBINS = BX * BY;
  localparam int unsigned B_W   = $clog2(NBINS);
  localparam int unsigned BX_W  = $clog2(BX);
  localparam int unsigned BY_W  = $clog2(BY);
  localparam int unsigned C_W   = XY_W + 2;     // signed working width
  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  // ---------------- voting processors ----------------
  logic             p_v   [NPROC];
  logic [OBJ_W-1:0] p_obj [NPROC];
  logic [B_W-1:0]   p_bin [NPROC];
  logic             v_n   [NPROC];
  logic [B_W-1:0]   bin_n [NPROC];

  // Scale calculation and vote address of each processor.
  always_comb begin
    for (int j = 0; j < NPROC; j++) begin
      logic signed [OFF_W+8:0] sdx, sdy;
      logic signed [C_W+8:0]   cx, cy;
      sdx = (OFF_W+9)'(mfp_dx[j]) * $signed({1'b0, mfp_scale[j]});
      sdy = (OFF_W+9)'(mfp_dy[j]) * $signed({1'b0, mfp_scale[j]});
      cx  = (C_W+9)'($signed({1'b0, mfp_pos[j].x})) + (C_W+9)'(sdx >>> 4);
      cy  = (C_W+9)'($signed({1'b0, mfp_pos[j].y})) + (C_W+9)'(sdy >>> 4);
      v_n[j]   = mode_detect && mfp_valid[j] && cx >= 0 && cy >= 0 &&
                 cx < (C_W+9)'(IMG_W) && cy < (C_W+9)'(IMG_H);
      bin_n[j] = B_W'((cy >>> BIN_SHIFT) * BX + (cx >>> BIN_SHIFT));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NPROC; j++) begin
        p_v[j]   <= 1'b0;
        p_obj[j] <= '0;
        p_bin[j] <= '0;
      end
    end else begin
      for (int j = 0; j < NPROC; j++) begin
        p_v[j]   <= v_n[j];
        p_obj[j] <= mfp_obj[j];
        p_bin[j] <= bin_n[j];
      end
    end
  end

  // ---------------- Hough tables (voting bins) ----------------
  // Every processor owns a private count memory holding the bins of all NOBJ
  // objects, so each memory sees at most one read-modify-write per cycle, and
  // several processors may vote for the same bin in the same cycle. A bin's
  // count is the sum of its NPROC private counts, saturated to CNT_W bits;
  // because each private count saturates at the same limit this equals one
  // shared saturating counter. A valid bit per entry clears a memory in one
  // cycle: an entry whose bit is low reads as zero.
  localparam int unsigned KEY_W = OBJ_W + B_W;
  localparam int unsigned NKEY  = 1 << KEY_W;
  localparam int unsigned SUM_W = CNT_W + $clog2(NPROC + 1);
  logic              s_clr;
  logic [B_W-1:0]    s_idx;
  logic [NPROC-1:0][NOBJ-1:0][CNT_W-1:0] scan_part;
  assign s_clr = frame_start && mode_detect;

  for (genvar j = 0; j < NPROC; j++) begin : g_copy
    logic [CNT_W-1:0] cnt [NKEY];
    logic [NKEY-1:0]  vld;
    logic [KEY_W-1:0] key;
    logic [CNT_W-1:0] cur;
    assign key = {p_obj[j], p_bin[j]};
    assign cur = vld[key] ? cnt[key] : '0;
    always_ff @(posedge clk)
      if (p_v[j] && cur != CNT_MAX) cnt[key] <= cur + 1'b1;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)       vld <= '0;
      else if (s_clr)   vld <= '0;
      else if (p_v[j])  vld <= vld | (NKEY'(1) << key);
    end
    for (genvar k = 0; k < NOBJ; k++) begin : g_obj
      logic [KEY_W-1:0] skey;
      assign skey = {OBJ_W'(k), s_idx};
      assign scan_part[j][k] = vld[skey] ? cnt[skey] : '0;
    end
  end

  // Count of bin s_idx in each object's table.
  logic [CNT_W-1:0] scan_cnt [NOBJ];
  always_comb begin
    for (int k = 0; k < NOBJ; k++) begin
      logic [SUM_W-1:0] sum;
      sum = '0;
      for (int j = 0; j < NPROC; j++) sum = sum + SUM_W'(scan_part[j][k]);
      scan_cnt[k] = (sum > SUM_W'(CNT_MAX)) ? CNT_MAX : sum[CNT_W-1:0];
    end
  end

  // ---------------- peak search ----------------
  logic              end_d1, end_d2, scan;
  logic [BX_W-1:0]   s_bx;
  logic [BY_W-1:0]   s_by;
  logic [CNT_W-1:0]  best_cnt [NOBJ];
  logic [BX_W-1:0]   best_bx  [NOBJ];
  logic [BY_W-1:0]   best_by  [NOBJ];
  logic              scan_last;
  assign scan_last = scan && (s_idx == B_W'(NBINS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      end_d1 <= 1'b0;
      end_d2 <= 1'b0;
      scan   <= 1'b0;
      s_idx  <= '0;
      s_bx   <= '0;
      s_by   <= '0;
      for (int k = 0; k < NOBJ; k++) begin
        best_cnt[k] <= '0;
        best_bx[k]  <= '0;
        best_by[k]  <= '0;
      end
    end else begin
      end_d1 <= vote_end && mode_detect;
      end_d2 <= end_d1;
      if (end_d2 && !scan) begin
        scan  <= 1'b1;
        s_idx <= '0;
        s_bx  <= '0;
        s_by  <= '0;
        for (int k = 0; k < NOBJ; k++) best_cnt[k] <= '0;
      end else if (scan) begin
        for (int k = 0; k < NOBJ; k++)
          if (scan_cnt[k] > best_cnt[k]) begin
            best_cnt[k] <= scan_cnt[k];
            best_bx[k]  <= s_bx;
            best_by[k]  <= s_by;
          end
        s_idx <= s_idx + 1'b1;
        if (s_bx == BX_W'(BX - 1)) begin
          s_bx <= '0;
          s_by <= s_by + 1'b1;
        end else begin
          s_bx <= s_bx + 1'b1;
        end
        if (scan_last) scan <= 1'b0;
      end
    end
  end

  // ---------------- window centre: Hough peak or previous + motion ----------------
  logic scan_done;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_done <= 1'b0;
      done      <= 1'b0;
    end else begin
      scan_done <= scan_last;
      done      <= scan_done;     // windows updated
    end
  end

  function automatic coord_t clamp_add(coord_t c, logic signed [MV_W-1:0] m, int unsigned lim);
    logic signed [C_W-1:0] s;
    s = $signed({2'b00, c}) + C_W'(m);
    if (s < 0)                     return '0;
    else if (s > C_W'(lim - 1))    return coord_t'(lim - 1);
    else                           return coord_t'(s);
  endfunction

  // Hough peak centre and motion-shifted centre of each object.
  pos_t peak_c [NOBJ];
  pos_t move_c [NOBJ];
  always_comb begin
    for (int k = 0; k < NOBJ; k++) begin
      logic [XY_W+BIN_SHIFT:0] hx, hy;
      hx = ((XY_W+BIN_SHIFT+1)'(best_bx[k]) << BIN_SHIFT) + (XY_W+BIN_SHIFT+1)'(1 << (BIN_SHIFT - 1));
      hy = ((XY_W+BIN_SHIFT+1)'(best_by[k]) << BIN_SHIFT) + (XY_W+BIN_SHIFT+1)'(1 << (BIN_SHIFT - 1));
      peak_c[k].x = (hx > (XY_W+BIN_SHIFT+1)'(IMG_W - 1)) ? coord_t'(IMG_W - 1) : coord_t'(hx);
      peak_c[k].y = (hy > (XY_W+BIN_SHIFT+1)'(IMG_H - 1)) ? coord_t'(IMG_H - 1) : coord_t'(hy);
      move_c[k].x = clamp_add(win_center[k].x, cm_x, IMG_W);
      move_c[k].y = clamp_add(win_center[k].y, cm_y, IMG_H);
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_valid <= '0;
      for (int k = 0; k < NOBJ; k++) win_center[k] <= '0;
    end else if (scan_done) begin
      for (int k = 0; k < NOBJ; k++) begin
        win_valid[k]  <= best_cnt[k] >= CNT_W'(MIN_VOTES);
        win_center[k] <= peak_c[k];
      end
    end else if (cm_valid && !mode_detect) begin
      for (int k = 0; k < NOBJ; k++) win_center[k] <= move_c[k];
    end
  end

  // Window bounds around each centre, clipped to the image.
  always_comb begin
    for (int k = 0; k < NOBJ; k++) begin
      win[k].x0 = (win_center[k].x > coord_t'(WIN_HALF)) ? win_center[k].x - coord_t'(WIN_HALF) : '0;
      win[k].y0 = (win_center[k].y > coord_t'(WIN_HALF)) ? win_center[k].y - coord_t'(WIN_HALF) : '0;
      win[k].x1 = (C_W'(win_center[k].x) + C_W'(WIN_HALF) - 1 > C_W'(IMG_W - 1)) ?
                  coord_t'(IMG_W - 1) : win_center[k].x + coord_t'(WIN_HALF - 1);
      win[k].y1 = (C_W'(win_center[k].y) + C_W'(WIN_HALF) - 1 > C_W'(IMG_H - 1)) ?
                  coord_t'(IMG_H - 1) : win_center[k].y + coord_t'(WIN_HALF - 1);
    end
  end
endmodule
