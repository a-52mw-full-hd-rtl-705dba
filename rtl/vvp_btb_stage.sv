// One stage of the binary-tree-based (BTB) classifier of the VVP.
// A 128-dimension vector enters as 8 back-to-back segments of 16 dimensions
// together with the index p of the tree node chosen by the previous stage.
// The address generator reads the matching segment of both children of p
// (centroid 0 = word 2p, centroid 1 = word 2p+1) from this stage's memory bank;
// two distance processors form the partial squared distances, two accumulators
// add them over the 8 segments, and the MIN unit picks the nearer child. The
// vector itself goes through a delay line as long as the stage latency, so it
// leaves the stage together with the selected child address, ready for the next
// stage. Structure (address generator, two distance processors, accumulator,
// MIN, vector delay line) follows the document; ties choosing centroid 0 and
// the exact pipeline registers are this design's choice.
// Timing: segment 0 of a vector in at cycle t, segment 0 out at t+LAT with
// LAT = SEGS+2 = 10; out_addr/out_tag stay valid while the 8 segments leave.
// A new vector may start every 8 cycles (16 dimensions per cycle).
module vvp_btb_stage
  import vvp_pkg::*;
#(
  parameter int unsigned TAG_W  = 2 * XY_W,
  parameter int unsigned NODE_W = STAGES - 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  seg_t                in_vec,
  input  logic [WORD_W-1:0]   in_addr,
  input  logic [TAG_W-1:0]    in_tag,
  // bank interface
  output logic [NODE_W-1:0]   mem_node,
  output logic [SEG_W-1:0]    mem_seg,
  input  seg_t                mem_d0,
  input  seg_t                mem_d1,
  // to next stage
  output logic                out_valid,
  output seg_t                out_vec,
  output logic [WORD_W-1:0]   out_addr,
  output logic [TAG_W-1:0]    out_tag
);
  localparam int unsigned LAT = SEGS + 2;

  // Address generator: segment counter of the incoming vector.
  logic [SEG_W-1:0] seg_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        seg_cnt <= '0;
    else if (in_valid) seg_cnt <= seg_cnt + 1'b1;
  end
  assign mem_node = in_addr[NODE_W-1:0];
  assign mem_seg  = seg_cnt;

  // Stage 1: aligned with the bank's read data.
  logic              s1_valid;
  logic [SEG_W-1:0]  s1_seg;
  seg_t              s1_vec;
  logic [WORD_W-1:0] s1_addr;
  logic [TAG_W-1:0]  s1_tag;
  // Stage 2: aligned with the distance processors' output.
  logic [SEG_W-1:0]  s2_seg;
  logic [WORD_W-1:0] s2_addr;
  logic [TAG_W-1:0]  s2_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_seg   <= '0;
      s1_vec   <= '0;
      s1_addr  <= '0;
      s1_tag   <= '0;
      s2_seg   <= '0;
      s2_addr  <= '0;
      s2_tag   <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_seg   <= seg_cnt;
      s1_vec   <= in_vec;
      s1_addr  <= in_addr;
      s1_tag   <= in_tag;
      s2_seg   <= s1_seg;
      s2_addr  <= s1_addr;
      s2_tag   <= s1_tag;
    end
  end

  // Two distance processors, one per child centroid.
  logic              dp0_valid, dp1_valid;
  logic [PSUM_W-1:0] psum0, psum1;
  vvp_distance_processor u_dp0 (
    .clk, .rst_n, .in_valid(s1_valid), .vec(s1_vec), .cen(mem_d0),
    .out_valid(dp0_valid), .psum(psum0)
  );
  vvp_distance_processor u_dp1 (
    .clk, .rst_n, .in_valid(s1_valid), .vec(s1_vec), .cen(mem_d1),
    .out_valid(dp1_valid), .psum(psum1)
  );

  // Accumulators and MIN.
  logic [DIST_W-1:0] acc0, acc1, tot0, tot1;
  assign tot0 = ((s2_seg == '0) ? '0 : acc0) + DIST_W'(psum0);
  assign tot1 = ((s2_seg == '0) ? '0 : acc1) + DIST_W'(psum1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc0     <= '0;
      acc1     <= '0;
      out_addr <= '0;
      out_tag  <= '0;
    end else if (dp0_valid) begin
      acc0 <= tot0;
      acc1 <= tot1;
      if (s2_seg == SEG_W'(SEGS - 1)) begin
        out_addr <= {s2_addr[WORD_W-2:0], (tot1 < tot0)};
        out_tag  <= s2_tag;
      end
    end
  end

  // Vector delay line.
  logic  dl_valid [LAT];
  seg_t  dl_vec   [LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        dl_valid[i] <= 1'b0;
        dl_vec[i]   <= '0;
      end
    end else begin
      dl_valid[0] <= in_valid;
      dl_vec[0]   <= in_vec;
      for (int i = 1; i < LAT; i++) begin
        dl_valid[i] <= dl_valid[i-1];
        dl_vec[i]   <= dl_vec[i-1];
      end
    end
  end
  assign out_valid = dl_valid[LAT-1];
  assign out_vec   = dl_vec[LAT-1];

  // dp1 runs in lock-step with dp0.
  always_comb if (rst_n) assert (dp0_valid == dp1_valid);
endmodule
