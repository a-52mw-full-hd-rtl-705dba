// Self-checking test of the human-centered design cluster. A detection frame
// places two objects by Hough voting; then, in prediction frames, uniform
// feature motion vectors go into CMS, whose camera motion must reach attention
// tracking and move both windows by exactly that motion (one frame also marks
// some features untracked). Finally OVP synthesizes views of a loaded ROI with
// theta = 0: the middle candidate (0 degrees, identity matrix) must reproduce
// the original, and the outer candidates (+-40 degrees) must be resampled.
module tb_hcd;
  import vvp_pkg::*;
  localparam int N = 128, NPROC = 8, NOBJ = 4, NV = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic mode_detect, frame_start, fmv_valid, cm_valid, vote_end, at_done;
  logic signed [9:0] fmv_x [N], fmv_y [N], cm_x, cm_y;
  logic [N-1:0] fmv_ok;
  logic [NPROC-1:0] mfp_valid;
  logic [1:0] mfp_obj [NPROC];
  pos_t mfp_pos [NPROC];
  logic signed [11:0] mfp_dx [NPROC], mfp_dy [NPROC];
  logic [7:0] mfp_scale [NPROC];
  logic [NOBJ-1:0] win_valid;
  pos_t win_center [NOBJ];
  window_t win [NOBJ];
  logic roi_we, ovp_start, ovp_busy, syn_valid, ovp_done;
  logic [4:0] roi_wx, roi_wy, syn_x, syn_y;
  elem_t roi_wdata;
  logic signed [7:0] theta;
  logic signed [7:0] view_theta [NV];
  elem_t syn_pix [NV];
  int checks = 0, failures = 0;
  elem_t img [32][32];
  int ecx [2], ecy [2];
  int n_same = 0, n_diff = 0, n_pix = 0;

  hcd dut (.*);

  always @(posedge clk) if (rst_n && syn_valid) begin
    n_pix++;
    checks++;
    if (syn_pix[2] != img[syn_y][syn_x]) begin failures++; $display("identity view differs at (%0d,%0d)", syn_x, syn_y); end
    if (syn_pix[0] == img[syn_y][syn_x]) n_same++; else n_diff++;
  end

  initial begin
    mode_detect = 1; frame_start = 0; fmv_valid = 0; fmv_ok = '1; vote_end = 0; mfp_valid = '0;
    roi_we = 0; ovp_start = 0; theta = '0; roi_wx = '0; roi_wy = '0; roi_wdata = '0;
    for (int i = 0; i < N; i++) begin fmv_x[i] = '0; fmv_y[i] = '0; end
    for (int j = 0; j < NPROC; j++) begin
      mfp_obj[j] = '0; mfp_pos[j] = '0; mfp_dx[j] = '0; mfp_dy[j] = '0; mfp_scale[j] = 8'h10;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    // detection: objects 0 and 1 at (500,400) and (1400,800), 4 votes each per cycle
    for (int n = 0; n < 5; n++) begin
      for (int j = 0; j < NPROC; j++) begin
        int k, dx, dy;
        k = j / 4;
        dx = $urandom_range(0, 100) - 50; dy = $urandom_range(0, 100) - 50;
        mfp_valid[j] = 1; mfp_obj[j] = 2'(k); mfp_scale[j] = 8'h10;
        mfp_dx[j] = 12'(dx); mfp_dy[j] = 12'(dy);
        mfp_pos[j] = '{x: 11'((k == 0 ? 500 : 1400) - dx), y: 11'((k == 0 ? 400 : 800) - dy)};
      end
      @(negedge clk);
    end
    mfp_valid = '0;
    vote_end = 1; @(negedge clk); vote_end = 0;
    @(posedge at_done); #1;
    ecx[0] = (500 / 64) * 64 + 32; ecy[0] = (400 / 64) * 64 + 32;
    ecx[1] = (1400 / 64) * 64 + 32; ecy[1] = (800 / 64) * 64 + 32;
    checks++;
    if (win_valid != 4'b0011) begin failures++; $display("valid windows %b", win_valid); end
    // prediction frames driven by CMS
    @(negedge clk); mode_detect = 0;
    for (int f = 0; f < 4; f++) begin
      int mx, my;
      mx = 3 * f - 4; my = 5 - f;
      @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
      for (int i = 0; i < N; i++) begin fmv_x[i] = 10'(mx); fmv_y[i] = 10'(my); end
      fmv_ok = (f == 2) ? {64'h0, {64{1'b1}}} : '1;
      fmv_valid = 1; @(negedge clk); fmv_valid = 0;
      @(posedge cm_valid); #1;
      checks++;
      if (int'(cm_x) != mx || int'(cm_y) != my) begin failures++; $display("cm (%0d,%0d) exp (%0d,%0d)", cm_x, cm_y, mx, my); end
      @(negedge clk); @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        ecx[k] += mx; ecy[k] += my;
        checks++;
        if (int'(win_center[k].x) != ecx[k] || int'(win_center[k].y) != ecy[k]) begin
          failures++; $display("frame %0d obj %0d at (%0d,%0d) exp (%0d,%0d)", f, k, win_center[k].x, win_center[k].y, ecx[k], ecy[k]);
        end
      end
    end
    // OVP
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++) begin
        img[y][x] = 8'(x * 7 + y * 3);
        @(negedge clk);
        roi_we = 1; roi_wx = 5'(x); roi_wy = 5'(y); roi_wdata = img[y][x];
      end
    @(negedge clk); roi_we = 0;
    theta = 8'sd0; ovp_start = 1; @(negedge clk); ovp_start = 0;
    @(posedge ovp_done); #1;
    @(negedge clk); @(negedge clk);
    checks += 3;
    if (n_pix != 32 * 32) begin failures++; $display("%0d pixels", n_pix); end
    if (n_diff == 0) begin failures++; $display("-40 degree view equals the original"); end
    if (view_theta[0] != -8'sd40 || view_theta[4] != 8'sd40) begin failures++; $display("angles %0d %0d", view_theta[0], view_theta[4]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
