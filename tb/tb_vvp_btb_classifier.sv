// Self-checking test of the six-stage BTB classifier. A random vocabulary
// tree (126 centroid words) is loaded through the write port; random
// 128-dimension vectors are then streamed back to back, 16 dimensions per
// cycle. The testbench descends the same tree itself (at each level the
// nearer of the two children by squared Euclidean distance, ties to the even
// child) and checks the word, the tag, the 60-cycle latency and the rate of
// one word per 8 cycles.
module tb_vvp_btb_classifier;
  import vvp_pkg::*;
  localparam int NV = 40;
  localparam int LATENCY = STAGES * (SEGS + 2);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, word_valid, busy, wr_en;
  seg_t in_vec, wr_data;
  logic [21:0] in_tag, word_tag;
  logic [WORD_W-1:0] word, wr_word;
  logic [2:0] wr_stage;
  logic [SEG_W-1:0] wr_seg;
  int checks = 0, failures = 0;

  vvp_btb_classifier dut (.*);

  seg_t tree [STAGES+1][WORDS][SEGS];   // tree[level][word][seg]
  seg_t vecs [NV][SEGS];
  int   exp_word [NV];
  int   cyc = 0, t_in [NV];
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint d2(int v, int l, int w);
    longint s;
    s = 0;
    for (int g = 0; g < SEGS; g++)
      for (int i = 0; i < DIMS; i++)
        s += (int'(vecs[v][g][i]) - int'(tree[l][w][g][i])) ** 2;
    return s;
  endfunction

  int nw = 0, last_out = -1;
  always @(posedge clk) if (rst_n && word_valid) begin
    checks += 3;
    if (int'(word) != exp_word[nw]) begin failures++; $display("vec %0d word %0d exp %0d", nw, word, exp_word[nw]); end
    if (word_tag != 22'(nw + 100)) begin failures++; $display("vec %0d tag", nw); end
    if (cyc - t_in[nw] != LATENCY) begin failures++; $display("vec %0d latency %0d", nw, cyc - t_in[nw]); end
    if (last_out >= 0) begin
      checks++;
      if (cyc - last_out != SEGS) begin failures++; $display("rate: %0d cycles between words", cyc - last_out); end
    end
    last_out = cyc;
    nw++;
  end

  initial begin
    in_valid = 0; in_vec = '0; in_tag = '0; wr_en = 0; wr_data = '0; wr_word = '0; wr_stage = '0; wr_seg = '0;
    for (int l = 1; l <= STAGES; l++)
      for (int w = 0; w < (1 << l); w++)
        for (int g = 0; g < SEGS; g++)
          for (int i = 0; i < DIMS; i++) tree[l][w][g][i] = 8'($urandom);
    for (int v = 0; v < NV; v++) begin
      int node;
      for (int g = 0; g < SEGS; g++)
        for (int i = 0; i < DIMS; i++)
          vecs[v][g][i] = (v < 16) ? tree[STAGES][v * 4][g][i] ^ 8'(v & 1) : 8'($urandom);
      node = 0;
      for (int l = 1; l <= STAGES; l++)
        node = (d2(v, l, 2 * node + 1) < d2(v, l, 2 * node)) ? 2 * node + 1 : 2 * node;
      exp_word[v] = node;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 1; l <= STAGES; l++)
      for (int w = 0; w < (1 << l); w++)
        for (int g = 0; g < SEGS; g++) begin
          @(negedge clk);
          wr_en = 1; wr_stage = 3'(l); wr_word = 6'(w); wr_seg = 3'(g); wr_data = tree[l][w][g];
        end
    @(negedge clk); wr_en = 0;
    checks++;
    if (busy) begin failures++; $display("busy while empty"); end
    for (int v = 0; v < NV; v++)
      for (int g = 0; g < SEGS; g++) begin
        @(negedge clk);
        in_valid = 1; in_vec = vecs[v][g]; in_tag = 22'(v + 100);
        if (g == 0) t_in[v] = cyc;
      end
    @(negedge clk); in_valid = 0;
    checks++;
    if (!busy) begin failures++; $display("not busy with vectors inside"); end
    repeat (LATENCY + 5) @(posedge clk);
    checks += 2;
    if (nw != NV) begin failures++; $display("only %0d words", nw); end
    if (busy) begin failures++; $display("busy after drain"); end
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
