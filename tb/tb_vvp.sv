// Self-checking test of the whole visual vocabulary processor over two frames.
// A random vocabulary tree and 64 random reference histograms are loaded. In
// each frame 60 random descriptors at random positions stream in back to back;
// frame_end is raised right after the last one, while the classifier still
// holds vectors, so the comparison must wait for the pipeline to drain. The
// testbench descends the tree itself, builds the expected histogram of the
// features inside the window, plants a near copy of it among the references and
// checks every word, the vote count, the recognised object and its distance.
module tb_vvp;
  import vvp_pkg::*;
  localparam int NF = 60;
  localparam int NUM_REF = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic frame_start, frame_end, desc_valid, voc_we, ref_we, word_valid, obj_valid;
  seg_t desc_seg, voc_data;
  pos_t desc_pos;
  window_t roi;
  logic [2:0] voc_stage;
  logic [WORD_W-1:0] voc_word, word;
  logic [SEG_W-1:0] voc_seg;
  logic [5:0] ref_addr, obj_id;
  logic [6:0] n_ref;
  hist_t ref_data, hist;
  logic [15:0] n_votes;
  logic [13:0] obj_dist;
  int checks = 0, failures = 0;

  vvp dut (.*);

  seg_t tree [STAGES+1][WORDS][SEGS];
  seg_t vecs [NF][SEGS];
  int   xs [NF], ys [NF], exp_word [NF];
  hist_t refs [NUM_REF];

  function automatic longint d2(int v, int l, int w);
    longint s;
    s = 0;
    for (int g = 0; g < SEGS; g++)
      for (int i = 0; i < DIMS; i++)
        s += (int'(vecs[v][g][i]) - int'(tree[l][w][g][i])) ** 2;
    return s;
  endfunction
  function automatic int l1(hist_t a, hist_t b);
    int s;
    s = 0;
    for (int i = 0; i < WORDS; i++) s += (a[i] > b[i]) ? a[i] - b[i] : b[i] - a[i];
    return s;
  endfunction

  int nw = 0, nobj = 0;
  always @(posedge clk) if (rst_n && word_valid) begin
    checks++;
    if (int'(word) != exp_word[nw]) begin failures++; $display("feature %0d word %0d exp %0d", nw, word, exp_word[nw]); end
    nw++;
  end
  always @(posedge obj_valid) nobj++;

  task automatic run_frame(int f);
    hist_t eh;
    int ein, plant, bi, bd;
    eh = '0; ein = 0;
    for (int v = 0; v < NF; v++) begin
      int node;
      for (int g = 0; g < SEGS; g++)
        for (int i = 0; i < DIMS; i++) vecs[v][g][i] = 8'($urandom);
      xs[v] = $urandom_range(0, 1919);
      ys[v] = $urandom_range(0, 1079);
      if (v % 2 == 0) begin xs[v] = $urandom_range(600, 900); ys[v] = $urandom_range(300, 600); end
      node = 0;
      for (int l = 1; l <= STAGES; l++)
        node = (d2(v, l, 2 * node + 1) < d2(v, l, 2 * node)) ? 2 * node + 1 : 2 * node;
      exp_word[v] = node;
      if (xs[v] >= 600 && xs[v] <= 900 && ys[v] >= 300 && ys[v] <= 600) begin
        eh[node] = eh[node] + 1'b1;
        ein++;
      end
    end
    // plant a near copy of the expected histogram
    plant = (f * 23 + 5) % NUM_REF;
    refs[plant] = eh;
    refs[plant][f] = refs[plant][f] + 8'd1;
    @(negedge clk);
    ref_we = 1; ref_addr = 6'(plant); ref_data = refs[plant];
    @(negedge clk); ref_we = 0;
    bi = 0; bd = 1 << 30;
    for (int r = 0; r < NUM_REF; r++) if (l1(eh, refs[r]) < bd) begin bd = l1(eh, refs[r]); bi = r; end
    nw = 0;
    frame_start = 1; @(negedge clk); frame_start = 0;
    for (int v = 0; v < NF; v++)
      for (int g = 0; g < SEGS; g++) begin
        desc_valid = 1; desc_seg = vecs[v][g]; desc_pos = '{x: 11'(xs[v]), y: 11'(ys[v])};
        @(negedge clk);
      end
    desc_valid = 0;
    frame_end = 1; @(negedge clk); frame_end = 0;
    @(posedge obj_valid); #1;
    checks += 5;
    if (nw != NF) begin failures++; $display("frame %0d: %0d words before result", f, nw); end
    if (int'(n_votes) != ein) begin failures++; $display("frame %0d votes %0d exp %0d", f, n_votes, ein); end
    if (hist != eh) begin failures++; $display("frame %0d histogram differs", f); end
    if (int'(obj_id) != bi) begin failures++; $display("frame %0d obj %0d exp %0d", f, obj_id, bi); end
    if (int'(obj_dist) != bd) begin failures++; $display("frame %0d dist %0d exp %0d", f, obj_dist, bd); end
  endtask

  initial begin
    frame_start = 0; frame_end = 0; desc_valid = 0; desc_seg = '0; desc_pos = '0;
    voc_we = 0; voc_stage = '0; voc_word = '0; voc_seg = '0; voc_data = '0;
    ref_we = 0; ref_addr = '0; ref_data = '0; n_ref = 7'd64;
    roi = '{x0: 11'd600, y0: 11'd300, x1: 11'd900, y1: 11'd600};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 1; l <= STAGES; l++)
      for (int w = 0; w < (1 << l); w++)
        for (int g = 0; g < SEGS; g++) begin
          for (int i = 0; i < DIMS; i++) tree[l][w][g][i] = 8'($urandom);
          @(negedge clk);
          voc_we = 1; voc_stage = 3'(l); voc_word = 6'(w); voc_seg = 3'(g); voc_data = tree[l][w][g];
        end
    for (int r = 0; r < NUM_REF; r++) begin
      for (int b = 0; b < WORDS; b++) refs[r][b] = 8'($urandom_range(0, 2));
      @(negedge clk);
      voc_we = 0; ref_we = 1; ref_addr = 6'(r); ref_data = refs[r];
    end
    @(negedge clk); ref_we = 0; voc_we = 0;
    run_frame(0);
    run_frame(1);
    checks++;
    if (nobj != 2) begin failures++; $display("%0d results for 2 frames", nobj); end
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
