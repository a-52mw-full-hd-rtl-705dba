// Distance processor of one VVP stage.
// Sixteen processing elements each take one descriptor dimension and the same
// dimension of a centroid and form the squared difference; a binary adder tree
// sums the sixteen squares into the partial squared Euclidean distance of the
// current 16-dimension segment. The PE count and the adder tree follow the
// document; the single output register (latency 1 cycle, one segment accepted
// every cycle) is this design's choice.
// Interface: in_valid/vec/cen in, out_valid/psum out one cycle later.
module vvp_distance_processor
  import vvp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  seg_t              vec,
  input  seg_t              cen,
  output logic              out_valid,
  output logic [PSUM_W-1:0] psum
);
  localparam int unsigned SQ_W = 2 * ELEM_W;
  localparam int unsigned LEVELS = $clog2(DIMS);

  // Processing elements: |a-b|^2.
  logic [SQ_W-1:0] sq [DIMS];
  always_comb begin
    for (int i = 0; i < DIMS; i++) begin
      logic [ELEM_W-1:0] d;
      d = (vec[i] > cen[i]) ? vec[i] - cen[i] : cen[i] - vec[i];
      sq[i] = SQ_W'(d) * SQ_W'(d);
    end
  end

  // Tree-like adder: level l holds DIMS>>l partial sums.
  logic [PSUM_W-1:0] tree [LEVELS+1][DIMS];
  always_comb begin
    for (int l = 0; l <= LEVELS; l++)
      for (int i = 0; i < DIMS; i++)
        tree[l][i] = '0;
    for (int i = 0; i < DIMS; i++)
      tree[0][i] = PSUM_W'(sq[i]);
    for (int l = 1; l <= LEVELS; l++)
      for (int i = 0; i < (DIMS >> l); i++)
        tree[l][i] = tree[l-1][2*i] + tree[l-1][2*i+1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      psum      <= '0;
    end else begin
      out_valid <= in_valid;
      psum      <= tree[LEVELS][0];
    end
  end
endmodule
