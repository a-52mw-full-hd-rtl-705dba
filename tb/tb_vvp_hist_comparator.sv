// Self-checking test of the object histogram comparator. 64 random reference
// histograms are loaded; queries are either a perturbed copy of one reference
// or random. The testbench computes every L1 distance itself and checks the
// closest reference (lowest index on ties), its distance, the
// latency (done rises NUM_REF+1 clock edges after the edge that samples
// start), and a search limited by n_ref.
module tb_vvp_hist_comparator;
  import vvp_pkg::*;
  localparam int NUM_REF = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ref_we, start, busy, done;
  logic [5:0] ref_addr, best_id;
  logic [6:0] n_ref;
  hist_t ref_data, hist;
  logic [13:0] best_dist;
  int checks = 0, failures = 0;
  hist_t refs [NUM_REF];

  vvp_hist_comparator dut (.*);

  function automatic int l1(hist_t a, hist_t b);
    int s;
    s = 0;
    for (int i = 0; i < WORDS; i++) s += (a[i] > b[i]) ? a[i] - b[i] : b[i] - a[i];
    return s;
  endfunction

  task automatic query(hist_t q, int nr);
    int bi, bd, t0, t1;
    bi = 0; bd = 1 << 30;
    for (int r = 0; r < nr; r++) if (l1(q, refs[r]) < bd) begin bd = l1(q, refs[r]); bi = r; end
    @(negedge clk);
    hist = q; n_ref = 7'(nr); start = 1;
    @(posedge clk); t0 = $time;
    @(negedge clk); start = 0;
    @(posedge done); t1 = $time;
    #1;
    checks += 3;
    if (int'(best_id) != bi) begin failures++; $display("id %0d exp %0d", best_id, bi); end
    if (int'(best_dist) != bd) begin failures++; $display("dist %0d exp %0d", best_dist, bd); end
    if ((t1 - t0) / 10 != nr + 1) begin failures++; $display("latency %0d", (t1 - t0) / 10); end
  endtask

  initial begin
    ref_we = 0; start = 0; ref_addr = '0; ref_data = '0; hist = '0; n_ref = 7'd64;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NUM_REF; r++) begin
      for (int b = 0; b < WORDS; b++) refs[r][b] = 8'($urandom_range(0, 40));
      @(negedge clk);
      ref_we = 1; ref_addr = 6'(r); ref_data = refs[r];
    end
    @(negedge clk); ref_we = 0;
    for (int n = 0; n < 30; n++) begin
      hist_t q;
      int r;
      r = $urandom_range(0, NUM_REF - 1);
      for (int b = 0; b < WORDS; b++)
        q[b] = (n % 3 == 2) ? 8'($urandom_range(0, 40)) : refs[r][b] + 8'($urandom_range(0, 2));
      query(q, (n == 7) ? 10 : NUM_REF);
    end
    query(refs[63], 64);   // exact match at the last entry
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
