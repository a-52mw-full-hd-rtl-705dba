// Self-checking test of object viewpoint prediction. A random 32x32 original
// appearance is loaded; for several viewpoint estimates (including ones that
// push candidates past +-80 degrees) the testbench derives the five candidate
// angles and their cosines itself (cos rounded to 1/256, 10-degree steps) and
// checks every synthesized pixel of all five views, the pixel order, one
// pixel position per cycle and the candidate angles.
module tb_ovp;
  import vvp_pkg::*;
  localparam int W = 32, H = 32, NV = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic roi_we, start, busy, out_valid, done;
  logic [4:0] roi_wx, roi_wy, out_x, out_y;
  elem_t roi_wdata;
  logic signed [7:0] theta;
  logic signed [7:0] view_theta [NV];
  elem_t out_pix [NV];
  int checks = 0, failures = 0;
  elem_t img [H][W];
  int ex, ey, npix, cexp [NV];

  ovp dut (.*);

  int pass_theta [4] = '{0, 30, -75, 67};

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (int'(out_x) != ex || int'(out_y) != ey) begin failures++; $display("order: (%0d,%0d) exp (%0d,%0d)", out_x, out_y, ex, ey); end
    for (int k = 0; k < NV; k++) begin
      int rel, src;
      rel = (int'(out_x) - W / 2) * cexp[k];
      src = (rel >>> 8) + W / 2;
      checks++;
      if (out_pix[k] != img[out_y][src]) begin failures++; $display("view %0d pixel (%0d,%0d)", k, out_x, out_y); end
    end
    npix++;
    if (ex == W - 1) begin ex = 0; ey++; end else ex++;
  end

  initial begin
    int costab [9] = '{256, 252, 241, 222, 196, 165, 128, 88, 44};
    roi_we = 0; start = 0; theta = '0; roi_wx = '0; roi_wy = '0; roi_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        img[y][x] = 8'($urandom);
        @(negedge clk);
        roi_we = 1; roi_wx = 5'(x); roi_wy = 5'(y); roi_wdata = img[y][x];
      end
    @(negedge clk); roi_we = 0;
    foreach (pass_theta[p]) begin
      int t0, t1;
      for (int k = 0; k < NV; k++) begin
        int t, a;
        t = pass_theta[p] + (k - 2) * 20;
        if (t > 80) t = 80;
        if (t < -80) t = -80;
        a = t < 0 ? -t : t;
        cexp[k] = costab[(a + 5) / 10];
      end
      ex = 0; ey = 0; npix = 0;
      theta = 8'(pass_theta[p]); start = 1;
      @(posedge clk); t0 = $time;
      @(negedge clk); start = 0;
      @(posedge done); t1 = $time; #1;
      checks += 2;
      if (npix != W * H - 1) begin failures++; $display("pass %0d: %0d pixels before the last", p, npix); end
      if ((t1 - t0) / 10 != W * H + 1) begin failures++; $display("pass %0d: %0d cycles", p, (t1 - t0) / 10); end
      for (int k = 0; k < NV; k++) begin
        int t;
        t = pass_theta[p] + (k - 2) * 20;
        if (t > 80) t = 80;
        if (t < -80) t = -80;
        checks++;
        if (int'(view_theta[k]) != t) begin failures++; $display("view %0d angle %0d exp %0d", k, view_theta[k], t); end
      end
      @(negedge clk); @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
