// Workload test: one object-level Full HD frame through the VVP at 200 MHz.
// 1500 descriptors at random positions over 1920x1080 stream in back to back
// (the descriptor count per frame is this test's choice); a 256x256 window
// selects the object. The testbench checks every visual word, the histogram,
// the recognised object, and that the whole frame (last word plus comparison)
// takes 8 cycles per descriptor + 60 cycles of tree latency + the comparison,
// far inside the 200e6/30 = 6.67M cycles available per frame at 30 fps.
module tb_vvp_fullhd_frame;
  import vvp_pkg::*;
  localparam int NF = 1500, NUM_REF = 64;
  localparam int BUDGET = 200_000_000 / 30;
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
  seg_t vec [SEGS];
  hist_t refs [NUM_REF];
  int exp_words [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint d2(int l, int w);
    longint s;
    s = 0;
    for (int g = 0; g < SEGS; g++)
      for (int i = 0; i < DIMS; i++)
        s += (int'(vec[g][i]) - int'(tree[l][w][g][i])) ** 2;
    return s;
  endfunction
  function automatic int l1(hist_t a, hist_t b);
    int s;
    s = 0;
    for (int i = 0; i < WORDS; i++) s += (a[i] > b[i]) ? a[i] - b[i] : b[i] - a[i];
    return s;
  endfunction

  always @(posedge clk) if (rst_n && word_valid) begin
    int e;
    e = exp_words.pop_front();
    checks++;
    if (int'(word) != e) begin failures++; $display("word %0d exp %0d", word, e); end
  end

  initial begin
    hist_t eh;
    int ein, bi, bd, c0, c1;
    frame_start = 0; frame_end = 0; desc_valid = 0; desc_seg = '0; desc_pos = '0;
    voc_we = 0; voc_stage = '0; voc_word = '0; voc_seg = '0; voc_data = '0;
    ref_we = 0; ref_addr = '0; ref_data = '0; n_ref = 7'd64;
    roi = '{x0: 11'd800, y0: 11'd400, x1: 11'd1055, y1: 11'd655};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 1; l <= STAGES; l++)
      for (int w = 0; w < (1 << l); w++)
        for (int g = 0; g < SEGS; g++) begin
          for (int i = 0; i < DIMS; i++) tree[l][w][g][i] = 8'($urandom);
          @(negedge clk);
          voc_we = 1; voc_stage = 3'(l); voc_word = 6'(w); voc_seg = 3'(g); voc_data = tree[l][w][g];
        end
    @(negedge clk); voc_we = 0;
    for (int r = 0; r < NUM_REF; r++) begin
      for (int b = 0; b < WORDS; b++) refs[r][b] = 8'($urandom_range(0, 3));
      ref_we = 1; ref_addr = 6'(r); ref_data = refs[r];
      @(negedge clk);
    end
    ref_we = 0;
    frame_start = 1; @(negedge clk); frame_start = 0;
    eh = '0; ein = 0;
    c0 = cyc;
    for (int v = 0; v < NF; v++) begin
      int node, x, y;
      for (int g = 0; g < SEGS; g++)
        for (int i = 0; i < DIMS; i++) vec[g][i] = 8'($urandom);
      node = 0;
      for (int l = 1; l <= STAGES; l++)
        node = (d2(l, 2 * node + 1) < d2(l, 2 * node)) ? 2 * node + 1 : 2 * node;
      exp_words.push_back(node);
      x = $urandom_range(0, 1919); y = $urandom_range(0, 1079);
      if (v % 4 == 0) begin x = $urandom_range(800, 1055); y = $urandom_range(400, 655); end
      if (x >= 800 && x <= 1055 && y >= 400 && y <= 655) begin eh[node] = eh[node] + 1'b1; ein++; end
      for (int g = 0; g < SEGS; g++) begin
        desc_valid = 1; desc_seg = vec[g]; desc_pos = '{x: 11'(x), y: 11'(y)};
        @(negedge clk);
      end
    end
    desc_valid = 0;
    refs[17] = eh;
    ref_we = 1; ref_addr = 6'd17; ref_data = eh;
    frame_end = 1;
    @(negedge clk); frame_end = 0; ref_we = 0;
    bi = 0; bd = 1 << 30;
    for (int r = 0; r < NUM_REF; r++) if (l1(eh, refs[r]) < bd) begin bd = l1(eh, refs[r]); bi = r; end
    @(posedge obj_valid); c1 = cyc; #1;
    checks += 5;
    if (exp_words.size() != 0) begin failures++; $display("%0d words missing", exp_words.size()); end
    if (hist != eh || int'(n_votes) != ein) begin failures++; $display("histogram differs (%0d votes, exp %0d)", n_votes, ein); end
    if (int'(obj_id) != bi || int'(obj_dist) != bd) begin failures++; $display("object %0d/%0d exp %0d/%0d", obj_id, obj_dist, bi, bd); end
    if (c1 - c0 > 8 * NF + 60 + NUM_REF + 8) begin failures++; $display("frame took %0d cycles", c1 - c0); end
    if (c1 - c0 > BUDGET) begin failures++; $display("over the 30 fps budget"); end
    $display("frame of %0d descriptors: %0d cycles of %0d available (%0d votes in the window)", NF, c1 - c0, BUDGET, ein);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
