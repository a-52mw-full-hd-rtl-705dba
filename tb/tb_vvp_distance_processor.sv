// Self-checking test of the VVP distance processor: random descriptor and
// centroid slices, one per cycle, back to back; the expected sum of 16 squared
// differences is formed in the testbench and compared one cycle later, which
// also checks the one-cycle latency.
module tb_vvp_distance_processor;
  import vvp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  seg_t vec, cen;
  logic [PSUM_W-1:0] psum;
  int checks = 0, failures = 0;

  vvp_distance_processor dut (.*);

  function automatic int ref_sum(seg_t a, seg_t b);
    int s;
    s = 0;
    for (int i = 0; i < DIMS; i++) s += (int'(a[i]) - int'(b[i])) * (int'(a[i]) - int'(b[i]));
    return s;
  endfunction

  int expq[$];
  initial begin
    in_valid = 0; vec = '0; cen = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      in_valid = (n % 7) != 3;
      for (int i = 0; i < DIMS; i++) begin
        vec[i] = (n == 0) ? 8'hFF : 8'($urandom);
        cen[i] = (n == 0) ? 8'h00 : 8'($urandom);
      end
      if (in_valid) expq.push_back(ref_sum(vec, cen));
      @(posedge clk); #1;
      if (out_valid !== in_valid) begin failures++; $display("valid mismatch n=%0d", n); end
      checks++;
      if (in_valid) begin
        int e;
        e = expq.pop_front();
        checks++;
        if (int'(psum) != e) begin failures++; $display("n=%0d psum=%0d exp=%0d", n, psum, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
