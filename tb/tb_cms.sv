// Self-checking test of the camera motion stabilization engine. Each frame,
// 128 feature motion vectors are made of a true camera motion plus small noise
// for background features, a common foreign motion for 30 "moving object"
// features and a few untracked features. The testbench keeps its own copy of
// the confidence weights (same update rule) and checks every camera-motion
// result (weighted mean, truncated toward zero) and the latency: the result
// appears in the 14th cycle counting the input cycle (13 clock edges later). It
// also checks that after nine frames the estimate is within one pixel of the
// true motion, i.e. the moving object has been weighted out.
module tb_cms;
  localparam int N = 128, LAT = 13, NFR = 14;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fmv_valid, cm_valid;
  logic signed [9:0] fmv_x [N], fmv_y [N], cm_x, cm_y;
  logic [N-1:0] fmv_ok;
  int checks = 0, failures = 0;
  int conf [N];
  int mx = 0, my = 0;    // model's last camera motion

  cms dut (.*);

  function automatic int tdiv(int a, int b);   // truncate toward zero
    if (b == 0) return 0;
    return (a < 0) ? -((-a) / b) : a / b;
  endfunction
  function automatic int iabs(int a);
    return a < 0 ? -a : a;
  endfunction

  initial begin
    int cyc0;
    fmv_valid = 0; fmv_ok = '0;
    for (int i = 0; i < N; i++) begin fmv_x[i] = '0; fmv_y[i] = '0; conf[i] = 8; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFR; f++) begin
      int tx, ty, sx, sy, sw, ex, ey;
      tx = 2 * f;          // smooth camera drift
      ty = -f;
      if (f == NFR - 1) begin tx = -512; ty = 511; end   // extremes of the range
      sx = 0; sy = 0; sw = 0;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        int vx, vy, w, d;
        if (i < 30) begin vx = tx + 60; vy = ty - 45; end          // moving object
        else begin vx = tx + $urandom_range(0, 2) - 1; vy = ty + $urandom_range(0, 2) - 1; end
        if (vx > 511) vx = 511;
        if (vx < -512) vx = -512;
        if (vy > 511) vy = 511;
        if (vy < -512) vy = -512;
        fmv_x[i] = 10'(vx); fmv_y[i] = 10'(vy);
        fmv_ok[i] = !(i % 17 == 5 && f % 2 == 1);
        d = iabs(vx - mx) + iabs(vy - my);
        if (!fmv_ok[i]) w = 8;
        else if (d <= 16) w = (conf[i] == 15) ? 15 : conf[i] + 1;
        else w = (conf[i] == 0) ? 0 : conf[i] - 1;
        conf[i] = w;
        if (fmv_ok[i]) begin sx += w * vx; sy += w * vy; sw += w; end
      end
      ex = tdiv(sx, sw); ey = tdiv(sy, sw);
      fmv_valid = 1;
      @(posedge clk); cyc0 = $time;
      @(negedge clk); fmv_valid = 0;
      @(posedge cm_valid); #1;
      checks += 3;
      if ((($time - 1) - cyc0) / 10 != LAT) begin failures++; $display("frame %0d latency %0d", f, (($time - 1) - cyc0) / 10); end
      if (int'(cm_x) != ex || int'(cm_y) != ey) begin
        failures++; $display("frame %0d cm (%0d,%0d) exp (%0d,%0d)", f, cm_x, cm_y, ex, ey);
      end
      if (f >= 9 && f < NFR - 1 && (iabs(int'(cm_x) - tx) > 1 || iabs(int'(cm_y) - ty) > 1)) begin
        failures++; $display("frame %0d: outliers not rejected (%0d,%0d) vs (%0d,%0d)", f, cm_x, cm_y, tx, ty);
      end
      mx = ex; my = ey;
      repeat (3) @(negedge clk);
      checks++;
      if (int'(cm_x) != ex) begin failures++; $display("camera motion not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
