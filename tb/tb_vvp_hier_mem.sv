// Self-checking test of the six-bank hierarchical memory: every word of every
// bank (2+4+...+64 = 126 words of 8 segments) is written with a value derived
// from its bank, word, segment and dimension, then each stage's read port reads
// back both children of every node, one cycle after the address, in parallel
// on all six ports.
module tb_vvp_hier_mem;
  import vvp_pkg::*;
  localparam int NODE_W = STAGES - 1;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [STAGES-1:0][NODE_W-1:0] rd_node;
  logic [STAGES-1:0][SEG_W-1:0]  rd_seg;
  seg_t [STAGES-1:0]             rd_data0, rd_data1;
  logic wr_en;
  logic [2:0] wr_stage;
  logic [WORD_W-1:0] wr_word;
  logic [SEG_W-1:0] wr_seg;
  seg_t wr_data;
  int checks = 0, failures = 0;

  vvp_hier_mem dut (.*);

  function automatic seg_t pattern(int s, int w, int g);
    seg_t r;
    for (int i = 0; i < DIMS; i++) r[i] = 8'(s * 37 + w * 11 + g * 5 + i * 3 + (w >> 2) * 101);
    return r;
  endfunction

  initial begin
    wr_en = 0; rd_node = '0; rd_seg = '0; wr_stage = 0; wr_word = 0; wr_seg = 0; wr_data = '0;
    @(negedge clk);
    for (int s = 1; s <= STAGES; s++)
      for (int w = 0; w < (1 << s); w++)
        for (int g = 0; g < SEGS; g++) begin
          wr_en = 1; wr_stage = 3'(s); wr_word = 6'(w); wr_seg = 3'(g); wr_data = pattern(s, w, g);
          @(negedge clk);
        end
    wr_en = 0;
    // read node n of every bank at once (bank s has 2^(s-1) nodes)
    for (int n = 0; n < 32; n++)
      for (int g = 0; g < SEGS; g++) begin
        for (int s = 0; s < STAGES; s++) begin
          rd_node[s] = 5'(n % (1 << s));
          rd_seg[s]  = 3'(g);
        end
        @(posedge clk); #1;
        for (int s = 0; s < STAGES; s++) begin
          int p;
          p = n % (1 << s);
          checks += 2;
          if (rd_data0[s] != pattern(s + 1, 2 * p, g)) begin failures++; $display("bank %0d node %0d seg %0d even", s+1, p, g); end
          if (rd_data1[s] != pattern(s + 1, 2 * p + 1, g)) begin failures++; $display("bank %0d node %0d seg %0d odd", s+1, p, g); end
        end
        @(negedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
