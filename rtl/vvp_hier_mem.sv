// Six-bank hierarchical memory of the VVP vocabulary tree.
// Bank s (s = 1..6) holds the 2^s centroid words of tree level s, so the banks
// hold 2, 4, 8, 16, 32 and 64 words, 126 in all, and each bank serves only the
// BTB stage of its level. A word is a 128-dimension centroid stored as 8
// segments of 16 dimensions. Each bank is split into an even-word and an
// odd-word array so that the two children (2p, 2p+1) of node p can be read in
// the same cycle for the two distance processors.
// The bank sizes follow the document; the even/odd split, the synchronous
// one-cycle read and the segment-wide write port used to load the tree are this
// design's choices.
// Read: stage s presents rd_node[s-1] (parent p) and rd_seg[s-1]; the slices of
// words 2p and 2p+1 appear on rd_data0/rd_data1 one clock later.
// Write: wr_stage (1..6), wr_word (0..2^s-1), wr_seg and wr_data, one segment per cycle.
module vvp_hier_mem
  import vvp_pkg::*;
#(
  parameter int unsigned NODE_W = STAGES - 1
) (
  input  logic                                clk,
  input  logic [STAGES-1:0][NODE_W-1:0]       rd_node,
  input  logic [STAGES-1:0][SEG_W-1:0]        rd_seg,
  output seg_t [STAGES-1:0]                   rd_data0,
  output seg_t [STAGES-1:0]                   rd_data1,
  input  logic                                wr_en,
  input  logic [2:0]                          wr_stage,
  input  logic [WORD_W-1:0]                   wr_word,
  input  logic [SEG_W-1:0]                    wr_seg,
  input  seg_t                                wr_data
);
  for (genvar s = 0; s < STAGES; s++) begin : g_bank
    // Bank of level s+1: 2^s nodes, each with an even and an odd child word.
    localparam int unsigned NODES = 1 << s;
    localparam int unsigned ROWS  = NODES * SEGS;
    localparam int unsigned RA_W  = (ROWS > 1) ? $clog2(ROWS) : 1;
    seg_t even_mem [ROWS];
    seg_t odd_mem  [ROWS];

    logic [RA_W-1:0] rd_row, wr_row;
    logic [WORD_W-1:0] wr_node;
    assign wr_node = wr_word >> 1;
    if (s == 0) begin : g_root
      assign rd_row = RA_W'(rd_seg[s]);
      assign wr_row = RA_W'(wr_seg);
    end else begin : g_inner
      assign rd_row = RA_W'({rd_node[s][s-1:0], rd_seg[s]});
      assign wr_row = RA_W'({wr_node[s-1:0], wr_seg});
    end

    always_ff @(posedge clk) begin
      if (wr_en && wr_stage == 3'(s + 1)) begin
        if (wr_word[0]) odd_mem[wr_row]  <= wr_data;
        else            even_mem[wr_row] <= wr_data;
      end
      rd_data0[s] <= even_mem[rd_row];
      rd_data1[s] <= odd_mem[rd_row];
    end
  end
endmodule
