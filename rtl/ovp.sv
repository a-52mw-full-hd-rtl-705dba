// Object viewpoint prediction (OVP).
// From the estimated viewpoint theta of an object, OVP forms NVIEW pose
// candidates theta_k = theta + (k - NVIEW/2) * STEP_DEG, limited to +-80
// degrees (160 degrees in all), and builds one transformation matrix per
// candidate. All NVIEW matrices are applied in parallel to the original object
// appearance held in the ROI buffer, producing NVIEW synthesized appearances
// that are handed to SIFT feature extraction, so that features can be matched
// although the object is seen from the side.
// Matrix: M_k = [[cos(theta_k), 0], [0, 1]] about the ROI centre, an inverse
// mapping (output pixel -> source pixel) that undoes the horizontal
// foreshortening of an object turned by theta_k about its vertical axis.
// cos is taken from a 10-degree table in Q1.8: round(256*cos(10*i deg)),
// i = 0..8. Sampling is nearest-neighbour (floor).
// Five parallel matrices and the viewpoint estimate as input follow the
// document; the matrix form, the angle step, the table and the ROI size are
// this design's choices.
// Interface: roi_we writes one pixel of the original appearance. start
// (with theta) sweeps the ROI in raster order, one pixel position per cycle;
// out_valid/out_x/out_y/out_pix[k] follow 2 cycles after each position is
// generated, and done pulses with the last pixel, ROI_W*ROI_H+1 clock edges
// after the edge that samples start.
module ovp
  import vvp_pkg::*;
#(
  parameter int unsigned NVIEW    = 5,
  parameter int unsigned ROI_W    = 32,
  parameter int unsigned ROI_H    = 32,
  parameter int unsigned STEP_DEG = 20,
  parameter int unsigned RX_W     = $clog2(ROI_W),
  parameter int unsigned RY_W     = $clog2(ROI_H)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  roi_we,
  input  logic [RX_W-1:0]       roi_wx,
  input  logic [RY_W-1:0]       roi_wy,
  input  elem_t                 roi_wdata,
  input  logic                  start,
  input  logic signed [7:0]     theta,
  output logic                  busy,
  output logic signed [7:0]     view_theta [NVIEW],
  output logic                  out_valid,
  output logic [RX_W-1:0]       out_x,
  output logic [RY_W-1:0]       out_y,
  output elem_t                 out_pix    [NVIEW],
  output logic                  done
);
  localparam int signed CX = ROI_W / 2;

  function automatic logic [8:0] cos_q8(logic [3:0] i);
    case (i)
      4'd0:    return 9'd256;
      4'd1:    return 9'd252;
      4'd2:    return 9'd241;
      4'd3:    return 9'd222;
      4'd4:    return 9'd196;
      4'd5:    return 9'd165;
      4'd6:    return 9'd128;
      4'd7:    return 9'd88;
      default: return 9'd44;
    endcase
  endfunction

  // Original appearance.
  elem_t roi [ROI_H][ROI_W];
  always_ff @(posedge clk)
    if (roi_we) roi[roi_wy][roi_wx] <= roi_wdata;

  // Transformation matrix generation (latched at start).
  logic [8:0]        coef   [NVIEW];
  logic [8:0]        coef_n [NVIEW];
  logic signed [7:0] vt_n   [NVIEW];
  always_comb begin
    for (int k = 0; k < NVIEW; k++) begin
      int t, a;
      t = int'(theta) + (k - int'(NVIEW / 2)) * int'(STEP_DEG);
      if (t > 80)  t = 80;
      if (t < -80) t = -80;
      a = (t < 0) ? -t : t;
      vt_n[k]   = 8'(t);
      coef_n[k] = cos_q8(4'((a + 5) / 10));
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NVIEW; k++) begin
        coef[k]       <= 9'd256;
        view_theta[k] <= '0;
      end
    end else if (start && !busy) begin
      for (int k = 0; k < NVIEW; k++) begin
        view_theta[k] <= vt_n[k];
        coef[k]       <= coef_n[k];
      end
    end
  end

  // Raster sweep.
  logic [RX_W-1:0] gx;
  logic [RY_W-1:0] gy;
  logic            gv, g_last;
  assign g_last = gv && gx == RX_W'(ROI_W - 1) && gy == RY_W'(ROI_H - 1);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gv <= 1'b0;
      gx <= '0;
      gy <= '0;
    end else if (start && !busy) begin
      gv <= 1'b1;
      gx <= '0;
      gy <= '0;
    end else if (gv) begin
      if (g_last) gv <= 1'b0;
      if (gx == RX_W'(ROI_W - 1)) begin
        gx <= '0;
        gy <= gy + 1'b1;
      end else begin
        gx <= gx + 1'b1;
      end
    end
  end

  // Source coordinates of the NVIEW candidates (stage 1), pixel fetch (stage 2).
  logic            s1_v, s1_last;
  logic [RX_W-1:0] s1_x, s1_src [NVIEW];
  logic [RY_W-1:0] s1_y;
  logic [RX_W-1:0] src_n [NVIEW];
  always_comb begin
    for (int k = 0; k < NVIEW; k++) begin
      logic signed [RX_W+11:0] rel, src;
      rel = (RX_W+12)'($signed({1'b0, gx}) - CX) * $signed({1'b0, coef[k]});
      src = (rel >>> 8) + (RX_W+12)'(CX);
      src_n[k] = RX_W'(src);
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v    <= 1'b0;
      s1_last <= 1'b0;
      s1_x    <= '0;
      s1_y    <= '0;
      for (int k = 0; k < NVIEW; k++) s1_src[k] <= '0;
      out_valid <= 1'b0;
      done      <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      for (int k = 0; k < NVIEW; k++) out_pix[k] <= '0;
    end else begin
      s1_v    <= gv;
      s1_last <= g_last;
      s1_x    <= gx;
      s1_y    <= gy;
      for (int k = 0; k < NVIEW; k++) s1_src[k] <= src_n[k];
      out_valid <= s1_v;
      done      <= s1_last;
      out_x     <= s1_x;
      out_y     <= s1_y;
      for (int k = 0; k < NVIEW; k++) out_pix[k] <= roi[s1_y][s1_src[k]];
    end
  end
  assign busy = gv || s1_v || out_valid;
endmodule
