// Visual vocabulary processor (VVP): object-level recognition.
// Feature descriptors (128 dimensions, 16 per cycle) are mapped to visual words
// by the six-stage BTB classifier; each feature inside the attention window
// votes into a 64-bin histogram, so the object becomes one histogram vector.
// At the end of the frame, once the classifier is empty, the histogram is
// compared with the reference histograms of the data memory and the closest
// database object is reported. This replaces matching thousands of features
// against the database by one histogram comparison per reference.
// The classifier, ROI voting and histogram comparator follow the document;
// the frame_start/frame_end protocol and the loading ports are this design's.
// Interface: frame_start clears the histogram; desc_valid carries 8 segments
// per descriptor, desc_pos sampled with segment 0; frame_end requests the
// comparison; obj_valid pulses with obj_id/obj_dist when it is done.
module vvp
  import vvp_pkg::*;
#(
  parameter int unsigned NUM_REF = 64,
  parameter int unsigned ID_W    = $clog2(NUM_REF),
  parameter int unsigned L1_W    = BIN_W + $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  input  logic              frame_end,
  input  logic              desc_valid,
  input  seg_t              desc_seg,
  input  pos_t              desc_pos,
  input  window_t           roi,
  // vocabulary tree loading
  input  logic              voc_we,
  input  logic [2:0]        voc_stage,
  input  logic [WORD_W-1:0] voc_word,
  input  logic [SEG_W-1:0]  voc_seg,
  input  seg_t              voc_data,
  // reference database loading
  input  logic              ref_we,
  input  logic [ID_W-1:0]   ref_addr,
  input  hist_t             ref_data,
  input  logic [ID_W:0]     n_ref,
  // results
  output logic              word_valid,
  output logic [WORD_W-1:0] word,
  output hist_t             hist,
  output logic [15:0]       n_votes,
  output logic              obj_valid,
  output logic [ID_W-1:0]   obj_id,
  output logic [L1_W-1:0]   obj_dist
);
  logic cls_busy, cmp_busy;
  pos_t word_pos;

  vvp_btb_classifier #(.TAG_W($bits(pos_t))) u_btb (
    .clk, .rst_n,
    .in_valid(desc_valid), .in_vec(desc_seg), .in_tag(desc_pos),
    .word_valid, .word, .word_tag(word_pos), .busy(cls_busy),
    .wr_en(voc_we), .wr_stage(voc_stage), .wr_word(voc_word), .wr_seg(voc_seg), .wr_data(voc_data)
  );

  vvp_histogram u_hist (
    .clk, .rst_n, .clear(frame_start),
    .vote_valid(word_valid), .vote_word(word), .vote_pos(word_pos), .win(roi),
    .hist, .n_votes
  );

  // Compare once the last feature of the frame has voted.
  logic pending, cmp_start;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          pending <= 1'b0;
    else if (frame_end)                  pending <= 1'b1;
    else if (cmp_start)                  pending <= 1'b0;
  end
  assign cmp_start = pending && !cls_busy && !word_valid && !cmp_busy;

  vvp_hist_comparator #(.NUM_REF(NUM_REF), .ID_W(ID_W), .L1_W(L1_W)) u_cmp (
    .clk, .rst_n,
    .ref_we, .ref_addr, .ref_data, .n_ref,
    .start(cmp_start), .hist, .busy(cmp_busy),
    .done(obj_valid), .best_id(obj_id), .best_dist(obj_dist)
  );
endmodule
