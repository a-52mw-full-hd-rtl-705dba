// ROI feature voting of the VVP.
// Every classified feature whose position lies inside the attention window
// votes one count into the bin of its visual word; the 64 bins form the
// bag-of-words histogram vector that stands for the object. clear empties the
// histogram (start of a frame). Bins saturate at 2^BIN_W-1.
// Voting inside the ROI follows the document; the saturating 8-bit bins and
// the inclusive window bounds are this design's choices.
// Timing: a vote is visible on hist the cycle after vote_valid.
module vvp_histogram
  import vvp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              vote_valid,
  input  logic [WORD_W-1:0] vote_word,
  input  pos_t              vote_pos,
  input  window_t           win,
  output hist_t             hist,
  output logic [15:0]       n_votes
);
  logic in_roi;
  assign in_roi = vote_pos.x >= win.x0 && vote_pos.x <= win.x1 &&
                  vote_pos.y >= win.y0 && vote_pos.y <= win.y1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist    <= '0;
      n_votes <= '0;
    end else if (clear) begin
      hist    <= '0;
      n_votes <= '0;
    end else if (vote_valid && in_roi) begin
      if (hist[vote_word] != '1) hist[vote_word] <= hist[vote_word] + 1'b1;
      n_votes <= n_votes + 1'b1;
    end
  end
endmodule
