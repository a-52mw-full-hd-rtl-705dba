// End-to-end test of the recognition SoC at its default sizes (30-frame
// period, 128 CMS features, 8 Hough processors and 4 tables, 64-word
// vocabulary, 64 references). It runs 32 frames, so the period wraps once:
//  - detection frames (0 and 30): the feature matcher is enabled and matched
//    points vote the object windows; the VVP must stay silent;
//  - object-level frames: uniform feature motion goes through CMS, attention
//    tracking moves the windows by the camera motion, then 16 descriptors (half
//    inside the window of object 0) are classified by the VVP, voted into the
//    histogram and compared with the database, frame_end arriving while the
//    classifier is still busy;
//  - one OVP synthesis pass.
// The testbench models the tree descent, the histogram, the L1 search and the
// window motion itself and counts each mechanism; one that never happens is a
// failure.
module tb_soc_top;
  import vvp_pkg::*;
  localparam int N = 128, NPROC = 8, NOBJ = 4, NV = 5, NUM_REF = 64, NF = 16, NFRAMES = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic frame_start, frame_end, mode_detect, fm_enable;
  logic [4:0] frame_idx;
  logic fmv_valid, cm_valid;
  logic signed [9:0] fmv_x [N], fmv_y [N], cm_x, cm_y;
  logic [N-1:0] fmv_ok;
  logic [NPROC-1:0] mfp_valid;
  logic [1:0] mfp_obj [NPROC];
  pos_t mfp_pos [NPROC];
  logic signed [11:0] mfp_dx [NPROC], mfp_dy [NPROC];
  logic [7:0] mfp_scale [NPROC];
  logic vote_end, at_done;
  logic [NOBJ-1:0] win_valid;
  window_t win [NOBJ];
  logic roi_we, ovp_start, syn_valid, ovp_done;
  logic [4:0] roi_wx, roi_wy, syn_x, syn_y;
  elem_t roi_wdata;
  logic signed [7:0] theta;
  logic signed [7:0] view_theta [NV];
  elem_t syn_pix [NV];
  logic [1:0] obj_sel;
  logic desc_valid, voc_we, ref_we, word_valid, obj_valid;
  seg_t desc_seg, voc_data;
  pos_t desc_pos;
  logic [2:0] voc_stage;
  logic [WORD_W-1:0] voc_word, word;
  logic [SEG_W-1:0] voc_seg;
  logic [5:0] ref_addr, obj_id;
  logic [6:0] n_ref;
  hist_t ref_data;
  logic [13:0] obj_dist;

  soc_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_detect = 0, n_predict = 0, n_wrap = 0, n_result = 0, n_deferred = 0, n_ovp = 0, n_outside = 0;

  seg_t tree [STAGES+1][WORDS][SEGS];
  seg_t vecs [NF][SEGS];
  hist_t refs [NUM_REF];
  int cx0, cy0;                // model centre of object 0
  int exp_words [$];
  int n_obj_pulses = 0;

  always @(posedge clk) if (rst_n && word_valid) begin
    int e;
    checks++;
    e = exp_words.pop_front();
    if (int'(word) != e) begin failures++; $display("word %0d exp %0d", word, e); end
  end
  always @(posedge obj_valid) n_obj_pulses++;

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

  task automatic detect_frame(int ox, int oy);
    for (int n = 0; n < 6; n++) begin
      for (int j = 0; j < NPROC; j++) begin
        int k, dx, dy, px, py;
        k = j % 2;                                    // objects 0 and 1
        dx = $urandom_range(0, 120) - 60; dy = $urandom_range(0, 120) - 60;
        px = (k == 0 ? ox : 1500) - dx / 2;          // scale 0.5
        py = (k == 0 ? oy : 300) - dy / 2;
        mfp_valid[j] = 1; mfp_obj[j] = 2'(k); mfp_scale[j] = 8'h08;
        mfp_dx[j] = 12'(dx); mfp_dy[j] = 12'(dy);
        mfp_pos[j] = '{x: 11'(px), y: 11'(py)};
      end
      @(negedge clk);
    end
    mfp_valid = '0;
    vote_end = 1; @(negedge clk); vote_end = 0;
    @(posedge at_done); #1;
    @(negedge clk);
    cx0 = (ox / 64) * 64 + 32;
    cy0 = (oy / 64) * 64 + 32;
    checks += 2;
    if (win_valid[1:0] != 2'b11) begin failures++; $display("detect: windows %b", win_valid); end
    if (int'(win[0].x0) != cx0 - 128 || int'(win[0].y0) != cy0 - 128) begin
      failures++; $display("detect: window (%0d,%0d) exp (%0d,%0d)", win[0].x0, win[0].y0, cx0 - 128, cy0 - 128);
    end
    n_detect++;
  endtask

  task automatic object_frame(int f);
    int mx, my, ein, plant, bi, bd, t_end, t_res;
    hist_t eh;
    // camera motion
    mx = (f % 4) - 1; my = 2 - (f % 3);
    for (int i = 0; i < N; i++) begin fmv_x[i] = 10'(mx); fmv_y[i] = 10'(my); end
    fmv_valid = 1; @(negedge clk); fmv_valid = 0;
    @(posedge cm_valid); #1;
    @(negedge clk); @(negedge clk);
    cx0 += mx; cy0 += my;
    checks += 2;
    if (int'(cm_x) != mx || int'(cm_y) != my) begin failures++; $display("frame %0d cm", f); end
    if (int'(win[0].x0) != cx0 - 128 || int'(win[0].y0) != cy0 - 128) begin
      failures++; $display("frame %0d window (%0d,%0d) exp (%0d,%0d)", f, win[0].x0, win[0].y0, cx0 - 128, cy0 - 128);
    end else n_predict++;
    // descriptors
    eh = '0; ein = 0;
    for (int v = 0; v < NF; v++) begin
      int node, x, y;
      for (int g = 0; g < SEGS; g++)
        for (int i = 0; i < DIMS; i++) vecs[v][g][i] = 8'($urandom);
      node = 0;
      for (int l = 1; l <= STAGES; l++)
        node = (d2(v, l, 2 * node + 1) < d2(v, l, 2 * node)) ? 2 * node + 1 : 2 * node;
      exp_words.push_back(node);
      if (v % 2 == 0) begin x = cx0 + $urandom_range(0, 200) - 100; y = cy0 + $urandom_range(0, 200) - 100; end
      else begin x = cx0 + 300 + $urandom_range(0, 100); y = cy0; end
      if (x >= cx0 - 128 && x <= cx0 + 127 && y >= cy0 - 128 && y <= cy0 + 127) begin
        eh[node] = eh[node] + 1'b1; ein++;
      end else n_outside++;
      for (int g = 0; g < SEGS; g++) begin
        desc_valid = 1; desc_seg = vecs[v][g]; desc_pos = '{x: 11'(x), y: 11'(y)};
        @(negedge clk);
        desc_valid = 0;
      end
    end
    // database entry for this view of the object
    plant = f % NUM_REF;
    refs[plant] = eh;
    ref_we = 1; ref_addr = 6'(plant); ref_data = eh;
    frame_end = 1; t_end = $time;
    @(negedge clk); ref_we = 0; frame_end = 0;
    bi = 0; bd = 1 << 30;
    for (int r = 0; r < NUM_REF; r++) if (l1(eh, refs[r]) < bd) begin bd = l1(eh, refs[r]); bi = r; end
    @(posedge obj_valid); t_res = $time; #1;
    checks += 2;
    if (int'(obj_id) != bi || int'(obj_dist) != bd) begin
      failures++; $display("frame %0d: object %0d/%0d exp %0d/%0d", f, obj_id, obj_dist, bi, bd);
    end
    if (exp_words.size() != 0) begin failures++; $display("frame %0d: result before all words", f); end
    if ((t_res - t_end) / 10 > NUM_REF + 3) n_deferred++;   // waited for the classifier
    n_result++;
    @(negedge clk);
  endtask

  initial begin
    frame_start = 0; frame_end = 0; fmv_valid = 0; fmv_ok = '1; vote_end = 0; mfp_valid = '0;
    for (int i = 0; i < N; i++) begin fmv_x[i] = '0; fmv_y[i] = '0; end
    for (int j = 0; j < NPROC; j++) begin
      mfp_obj[j] = '0; mfp_pos[j] = '0; mfp_dx[j] = '0; mfp_dy[j] = '0; mfp_scale[j] = 8'h10;
    end
    roi_we = 0; ovp_start = 0; theta = '0; roi_wx = '0; roi_wy = '0; roi_wdata = '0;
    obj_sel = 2'd0; desc_valid = 0; desc_seg = '0; desc_pos = '0;
    voc_we = 0; voc_stage = '0; voc_word = '0; voc_seg = '0; voc_data = '0;
    ref_we = 0; ref_addr = '0; ref_data = '0; n_ref = 7'd64;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load the vocabulary tree and the database
    for (int l = 1; l <= STAGES; l++)
      for (int w = 0; w < (1 << l); w++)
        for (int g = 0; g < SEGS; g++) begin
          for (int i = 0; i < DIMS; i++) tree[l][w][g][i] = 8'($urandom);
          @(negedge clk);
          voc_we = 1; voc_stage = 3'(l); voc_word = 6'(w); voc_seg = 3'(g); voc_data = tree[l][w][g];
        end
    @(negedge clk); voc_we = 0;
    for (int r = 0; r < NUM_REF; r++) begin
      for (int b = 0; b < WORDS; b++) refs[r][b] = 8'($urandom_range(0, 2));
      ref_we = 1; ref_addr = 6'(r); ref_data = refs[r];
      @(negedge clk);
    end
    ref_we = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      int pulses_before;
      frame_start = 1; @(negedge clk); frame_start = 0; @(negedge clk);
      checks += 2;
      if (mode_detect != (f % 30 == 0) || fm_enable != mode_detect) begin failures++; $display("frame %0d mode %b", f, mode_detect); end
      if (int'(frame_idx) != f % 30) begin failures++; $display("frame %0d index %0d", f, frame_idx); end
      if (f > 0 && f % 30 == 0) n_wrap++;
      if (mode_detect) begin
        pulses_before = n_obj_pulses;
        detect_frame((f == 0) ? 700 : 1100, (f == 0) ? 500 : 600);
        frame_end = 1; @(negedge clk); frame_end = 0;
        repeat (NUM_REF + 10) @(negedge clk);
        checks++;
        if (n_obj_pulses != pulses_before) begin failures++; $display("VVP answered in a detection frame"); end
      end else begin
        object_frame(f);
      end
      if (f == 2) begin
        for (int y = 0; y < 32; y++)
          for (int x = 0; x < 32; x++) begin
            roi_we = 1; roi_wx = 5'(x); roi_wy = 5'(y); roi_wdata = 8'(x ^ y);
            @(negedge clk);
          end
        roi_we = 0;
        theta = 8'sd70; ovp_start = 1; @(negedge clk); ovp_start = 0;
        @(posedge ovp_done); #1;
        @(negedge clk);
        checks++;
        if (view_theta[4] != 8'sd80 || view_theta[0] != 8'sd30) begin failures++; $display("OVP angles"); end
        else n_ovp++;
      end
    end
    checks += 7;
    if (n_detect != 2)             begin failures++; $display("detection frames: %0d", n_detect); end
    if (n_predict != NFRAMES - 2)  begin failures++; $display("window predictions: %0d", n_predict); end
    if (n_wrap == 0)               begin failures++; $display("period never wrapped"); end
    if (n_result != NFRAMES - 2)   begin failures++; $display("VVP results: %0d", n_result); end
    if (n_deferred == 0)           begin failures++; $display("comparison never waited for the classifier"); end
    if (n_ovp == 0)                begin failures++; $display("OVP never ran"); end
    if (n_outside == 0)            begin failures++; $display("no feature outside the window"); end
    $display("mechanisms: detect=%0d predict=%0d wrap=%0d vvp_results=%0d deferred=%0d ovp=%0d outside_roi=%0d",
             n_detect, n_predict, n_wrap, n_result, n_deferred, n_ovp, n_outside);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
