// Self-checking test of one BTB stage (level 3, 8 words). The bank is modelled
// in the testbench with the same one-cycle read. Random vectors enter back to
// back with random parent nodes; for each the testbench computes both squared
// Euclidean distances itself and checks that the stage returns the nearer
// child (2p or 2p+1, ties to 2p), the tag, and the unchanged vector exactly
// LAT = 10 cycles after its first segment.
module tb_vvp_btb_stage;
  import vvp_pkg::*;
  localparam int LEVEL = 3;
  localparam int LAT = SEGS + 2;
  localparam int NV = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  seg_t in_vec, out_vec, mem_d0, mem_d1;
  logic [WORD_W-1:0] in_addr, out_addr;
  logic [21:0] in_tag, out_tag;
  logic [4:0] mem_node;
  logic [SEG_W-1:0] mem_seg;
  int checks = 0, failures = 0;

  vvp_btb_stage dut (.*);

  seg_t bank [1 << LEVEL][SEGS];
  always_ff @(posedge clk) begin
    mem_d0 <= bank[2 * (mem_node % (1 << (LEVEL - 1)))][mem_seg];
    mem_d1 <= bank[2 * (mem_node % (1 << (LEVEL - 1))) + 1][mem_seg];
  end

  seg_t vecs [NV][SEGS];
  int   par  [NV];
  int   exp_addr [NV];
  int   cyc = 0, t_in [NV];
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint d2(int v, int w);
    longint s;
    s = 0;
    for (int g = 0; g < SEGS; g++)
      for (int i = 0; i < DIMS; i++)
        s += (int'(vecs[v][g][i]) - int'(bank[w][g][i])) ** 2;
    return s;
  endfunction

  // output monitor
  int ov = 0, og = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    if (og == 0) begin
      checks += 3;
      if (int'(out_addr) != exp_addr[ov]) begin failures++; $display("vec %0d addr %0d exp %0d", ov, out_addr, exp_addr[ov]); end
      if (out_tag != 22'(ov * 7 + 1)) begin failures++; $display("vec %0d tag", ov); end
      if (cyc - t_in[ov] != LAT) begin failures++; $display("vec %0d latency %0d", ov, cyc - t_in[ov]); end
    end
    checks++;
    if (out_vec != vecs[ov][og]) begin failures++; $display("vec %0d seg %0d data", ov, og); end
    og++;
    if (og == SEGS) begin og = 0; ov++; end
  end

  initial begin
    in_valid = 0; in_vec = '0; in_addr = '0; in_tag = '0;
    for (int w = 0; w < (1 << LEVEL); w++)
      for (int g = 0; g < SEGS; g++)
        for (int i = 0; i < DIMS; i++) bank[w][g][i] = 8'($urandom);
    for (int v = 0; v < NV; v++) begin
      int p;
      p = $urandom_range(0, (1 << (LEVEL - 1)) - 1);
      par[v] = p;
      for (int g = 0; g < SEGS; g++)
        for (int i = 0; i < DIMS; i++)
          // first vectors are near one child or the other, the rest random
          vecs[v][g][i] = (v < 10) ? bank[2 * p + (v % 2)][g][i] ^ 8'(v % 3) : 8'($urandom);
      if (v == 10) for (int g = 0; g < SEGS; g++) vecs[v][g] = bank[2 * p][g]; // exact tie check not needed: distance 0
      exp_addr[v] = (d2(v, 2 * p + 1) < d2(v, 2 * p)) ? 2 * p + 1 : 2 * p;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < NV; v++) begin
      if (v == 30) begin @(negedge clk); in_valid = 0; repeat (4) @(negedge clk); end  // a gap
      for (int g = 0; g < SEGS; g++) begin
        @(negedge clk);
        in_valid = 1; in_vec = vecs[v][g]; in_addr = 6'(par[v]); in_tag = 22'(v * 7 + 1);
        if (g == 0) t_in[v] = cyc;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (ov != NV) begin failures++; $display("only %0d vectors out", ov); end
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
