// Self-checking test of attention tracking. Detection frame: 8 matched points
// per cycle are sent for 4 objects placed at known centres; each point carries
// its offset to the object centre divided by its scale, so a correct scale
// calculation puts the votes of an object in one bin; a quarter of the points
// are noise. After vote_end the testbench checks each window centre (the
// centre of the peak 64x64 bin), window bounds and validity (an object with too
// few votes gets none), and the scan time. Then, in prediction mode, camera
// motions move all windows, including clipping at the image border. A second
// detection frame checks that the tables were cleared, that counts saturate,
// and that several processors can vote the same bin in one cycle.
module tb_attention_tracking;
  import vvp_pkg::*;
  localparam int NPROC = 8, NOBJ = 4, NBINS = 30 * 17;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic mode_detect, frame_start, vote_end, cm_valid, done;
  logic [NPROC-1:0] mfp_valid;
  logic [1:0] mfp_obj [NPROC];
  pos_t mfp_pos [NPROC];
  logic signed [11:0] mfp_dx [NPROC], mfp_dy [NPROC];
  logic [7:0] mfp_scale [NPROC];
  logic signed [9:0] cm_x, cm_y;
  logic [NOBJ-1:0] win_valid;
  pos_t win_center [NOBJ];
  window_t win [NOBJ];
  int checks = 0, failures = 0;
  int ocx [NOBJ] = '{300, 1000, 1700, 900};
  int ocy [NOBJ] = '{200, 700, 1000, 100};
  int nvotes [NOBJ] = '{40, 25, 30, 2};   // object 3: too few votes
  int ecx [NOBJ], ecy [NOBJ];

  attention_tracking dut (.*);

  task automatic check_windows(string what, logic [NOBJ-1:0] ev);
    for (int k = 0; k < NOBJ; k++) begin
      checks++;
      if (win_valid[k] != ev[k]) begin failures++; $display("%s obj %0d valid %0b", what, k, win_valid[k]); end
      if (!ev[k]) continue;
      checks += 3;
      if (int'(win_center[k].x) != ecx[k] || int'(win_center[k].y) != ecy[k]) begin
        failures++; $display("%s obj %0d centre (%0d,%0d) exp (%0d,%0d)", what, k, win_center[k].x, win_center[k].y, ecx[k], ecy[k]);
      end
      if (int'(win[k].x0) != ((ecx[k] > 128) ? ecx[k] - 128 : 0) || int'(win[k].y0) != ((ecy[k] > 128) ? ecy[k] - 128 : 0))
        begin failures++; $display("%s obj %0d window low corner", what, k); end
      if (int'(win[k].x1) != ((ecx[k] + 127 > 1919) ? 1919 : ecx[k] + 127) || int'(win[k].y1) != ((ecy[k] + 127 > 1079) ? 1079 : ecy[k] + 127))
        begin failures++; $display("%s obj %0d window high corner", what, k); end
    end
  endtask

  initial begin
    int cnt [NOBJ];
    int t0, t1;
    mode_detect = 1; frame_start = 0; vote_end = 0; cm_valid = 0; cm_x = '0; cm_y = '0; mfp_valid = '0;
    for (int j = 0; j < NPROC; j++) begin
      mfp_obj[j] = '0; mfp_pos[j] = '0; mfp_dx[j] = '0; mfp_dy[j] = '0; mfp_scale[j] = 8'h10;
    end
    for (int k = 0; k < NOBJ; k++) cnt[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    // voting: round robin over objects until each has its votes
    for (int n = 0; n < 40; n++) begin
      for (int j = 0; j < NPROC; j++) begin
        int k, sc, dx, dy, px, py;
        k = (n * NPROC + j) % NOBJ;
        mfp_valid[j] = 0;
        if (j % 4 == 3) begin                       // noise point
          mfp_valid[j] = 1; mfp_obj[j] = 2'(k);
          mfp_pos[j] = '{x: 11'($urandom_range(0, 1919)), y: 11'($urandom_range(0, 1079))};
          mfp_dx[j] = 12'($urandom_range(0, 200)) - 12'd100; mfp_dy[j] = 12'($urandom_range(0, 200)) - 12'd100;
          mfp_scale[j] = 8'h10;
        end else if (cnt[k] < nvotes[k]) begin
          cnt[k]++;
          sc = 8 + (n % 4) * 8;                      // scale 0.5 .. 2.0 in Q4.4
          dx = $urandom_range(0, 160) - 80;          // offset in the model, Q0
          dy = $urandom_range(0, 160) - 80;
          px = ocx[k] - (dx * sc) / 16 + $urandom_range(0, 10) - 5;
          py = ocy[k] - (dy * sc) / 16 + $urandom_range(0, 10) - 5;
          // keep px/py so that the rounded vote stays in the same bin as the centre
          mfp_valid[j] = 1; mfp_obj[j] = 2'(k);
          mfp_pos[j] = '{x: 11'(px), y: 11'(py)};
          mfp_dx[j] = 12'(dx); mfp_dy[j] = 12'(dy); mfp_scale[j] = 8'(sc);
        end
      end
      @(negedge clk);
    end
    mfp_valid = '0;
    vote_end = 1; @(posedge clk); t0 = $time; @(negedge clk); vote_end = 0;
    @(posedge done); t1 = $time; #1;
    checks++;
    if ((t1 - t0) / 10 != NBINS + 3) begin failures++; $display("scan took %0d", (t1 - t0) / 10); end
    @(negedge clk);
    for (int k = 0; k < NOBJ; k++) begin
      ecx[k] = (ocx[k] / 64) * 64 + 32;
      ecy[k] = (ocy[k] / 64) * 64 + 32;
    end
    check_windows("detect", 4'b0111);
    // prediction frames
    mode_detect = 0;
    for (int f = 0; f < 6; f++) begin
      int mx, my;
      mx = (f < 3) ? 25 : -300;
      my = (f < 3) ? -7 : 250;
      @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
      cm_valid = 1; cm_x = 10'(mx); cm_y = 10'(my);
      @(negedge clk); cm_valid = 0;
      for (int k = 0; k < NOBJ; k++) begin
        ecx[k] = ecx[k] + mx; ecy[k] = ecy[k] + my;
        if (ecx[k] < 0) ecx[k] = 0;
        if (ecx[k] > 1919) ecx[k] = 1919;
        if (ecy[k] < 0) ecy[k] = 0;
        if (ecy[k] > 1079) ecy[k] = 1079;
      end
      check_windows($sformatf("predict %0d", f), 4'b0111);
    end
    // Second detection frame. The tables must start empty again: object 3
    // gets 2 more votes in the bin where it had 2 before, and stays below the
    // minimum. Object 1 gets about 1200 votes in bin A and 1120 in bin B,
    // 300 and 280 from each of four processors, so every count passes the
    // 8-bit limit; with saturated counts the bin earlier in raster order (B)
    // wins. Four processors vote the same bin in every cycle.
    mode_detect = 1;
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    for (int n = 0; n < 300; n++) begin
      for (int j = 0; j < NPROC; j++) begin
        mfp_valid[j] = 1; mfp_dx[j] = '0; mfp_dy[j] = '0; mfp_scale[j] = 8'h10;
        if (n == 0 && j < 2) begin
          mfp_obj[j] = 2'd3; mfp_pos[j] = '{x: 11'd900, y: 11'd100};
        end else if (j < 4) begin
          mfp_obj[j] = 2'd1; mfp_pos[j] = '{x: 11'd1500, y: 11'd900};
        end else if (n < 280) begin
          mfp_obj[j] = 2'd1; mfp_pos[j] = '{x: 11'd200, y: 11'd300};
        end else mfp_valid[j] = 0;
      end
      @(negedge clk);
    end
    mfp_valid = '0;
    vote_end = 1; @(negedge clk); vote_end = 0;
    @(posedge done); #1;
    ecx[1] = 3 * 64 + 32; ecy[1] = 4 * 64 + 32;
    check_windows("second detect", 4'b0010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
