// Binary-tree-based (BTB) classifier of the VVP.
// Six BTB stages descend a six-level binary vocabulary tree: stage s compares
// the input vector with the two children of the node chosen by stage s-1 and
// passes the vector on with the nearer child's index, so after six stages the
// vector is mapped to one of 64 visual words with 2x6 = 12 distance
// computations instead of 64. Each stage owns one bank of the hierarchical
// memory (2, 4, ..., 64 words).
// Interface: a vector is presented as 8 consecutive in_valid cycles of 16
// dimensions; in_tag (e.g. the feature position) is sampled with the first
// segment and returned with the result. word_valid pulses for one cycle with
// word/word_tag LATENCY = 6*(SEGS+2) = 60 cycles after the first segment.
// Vectors may follow back to back, one per 8 cycles. wr_* loads the tree.
// busy is high while any vector is inside.
// The stage chain and the bank sizes follow the document; the tag, busy and
// loading port are this design's choices.
module vvp_btb_classifier
  import vvp_pkg::*;
#(
  parameter int unsigned TAG_W = 2 * XY_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  seg_t                in_vec,
  input  logic [TAG_W-1:0]    in_tag,
  output logic                word_valid,
  output logic [WORD_W-1:0]   word,
  output logic [TAG_W-1:0]    word_tag,
  output logic                busy,
  input  logic                wr_en,
  input  logic [2:0]          wr_stage,
  input  logic [WORD_W-1:0]   wr_word,
  input  logic [SEG_W-1:0]    wr_seg,
  input  seg_t                wr_data
);
  localparam int unsigned NODE_W = STAGES - 1;

  logic                           v   [STAGES+1];
  seg_t                           vec [STAGES+1];
  logic [WORD_W-1:0]              adr [STAGES+1];
  logic [TAG_W-1:0]               tag [STAGES+1];
  logic [STAGES-1:0][NODE_W-1:0]  rd_node;
  logic [STAGES-1:0][SEG_W-1:0]   rd_seg;
  seg_t [STAGES-1:0]              rd_d0, rd_d1;

  assign v[0]   = in_valid;
  assign vec[0] = in_vec;
  assign adr[0] = '0;
  assign tag[0] = in_tag;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    vvp_btb_stage #(.TAG_W(TAG_W), .NODE_W(NODE_W)) u_stage (
      .clk, .rst_n,
      .in_valid (v[s]),   .in_vec (vec[s]),   .in_addr (adr[s]),   .in_tag (tag[s]),
      .mem_node (rd_node[s]), .mem_seg (rd_seg[s]),
      .mem_d0   (rd_d0[s]),   .mem_d1  (rd_d1[s]),
      .out_valid(v[s+1]), .out_vec(vec[s+1]), .out_addr(adr[s+1]), .out_tag(tag[s+1])
    );
  end

  vvp_hier_mem #(.NODE_W(NODE_W)) u_mem (
    .clk,
    .rd_node, .rd_seg, .rd_data0(rd_d0), .rd_data1(rd_d1),
    .wr_en, .wr_stage, .wr_word, .wr_seg, .wr_data
  );

  // Result: first segment leaving the last stage.
  logic [SEG_W-1:0] out_seg, in_seg;
  logic [7:0]       inflight;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_seg  <= '0;
      in_seg   <= '0;
      inflight <= '0;
    end else begin
      if (v[STAGES]) out_seg <= out_seg + 1'b1;
      if (in_valid)  in_seg  <= in_seg + 1'b1;
      inflight <= inflight + 8'(in_valid && in_seg == '0) - 8'(word_valid);
    end
  end
  assign word_valid = v[STAGES] && (out_seg == '0);
  assign word       = adr[STAGES];
  assign word_tag   = tag[STAGES];
  assign busy       = (inflight != '0);

  // The vector vanishes from the last stage's delay line without ever being
  // read: only its address and tag are used.
  logic unused_vec;
  assign unused_vec = ^vec[STAGES];
endmodule
