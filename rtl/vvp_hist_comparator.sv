// Object histogram comparator of the VVP, with its data memory.
// The data memory holds one 64-bin reference histogram per database object.
// After start, one whole reference histogram is read per cycle and its L1
// distance (sum of absolute bin differences) to the query histogram is formed
// by 64 subtractors and an adder tree; the running minimum gives the
// recognised object. A query thus costs one memory access per reference,
// instead of one per feature.
// Comparing the object histogram with stored references follows the document;
// the L1 metric, the number of references and the one-reference-per-cycle
// schedule are this design's choices.
// Interface: ref_we/ref_addr/ref_data load a reference. start (one cycle,
// hist held stable until done) -> done rises n_ref+1 clock edges after the
// edge that samples start, with
// best_id/best_dist (ties keep the lower index). n_ref limits the search to the
// first n_ref references (1..NUM_REF).
module vvp_hist_comparator
  import vvp_pkg::*;
#(
  parameter int unsigned NUM_REF = 64,
  parameter int unsigned ID_W    = $clog2(NUM_REF),
  parameter int unsigned L1_W    = BIN_W + $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ref_we,
  input  logic [ID_W-1:0]   ref_addr,
  input  hist_t             ref_data,
  input  logic [ID_W:0]     n_ref,
  input  logic              start,
  input  hist_t             hist,
  output logic              busy,
  output logic              done,
  output logic [ID_W-1:0]   best_id,
  output logic [L1_W-1:0]   best_dist
);
  hist_t data_mem [NUM_REF];

  // Read side: address counter, synchronous read.
  logic            run, rd_valid;
  logic [ID_W:0]   rd_cnt;
  logic [ID_W-1:0] rd_id;
  hist_t           ref_q;
  always_ff @(posedge clk) begin
    if (ref_we) data_mem[ref_addr] <= ref_data;
    ref_q <= data_mem[rd_cnt[ID_W-1:0]];
  end

  // L1 distance of the reference being read.
  logic [L1_W-1:0] l1;
  always_comb begin
    l1 = '0;
    for (int b = 0; b < WORDS; b++) begin
      bin_t d;
      d = (hist[b] > ref_q[b]) ? hist[b] - ref_q[b] : ref_q[b] - hist[b];
      l1 += L1_W'(d);
    end
  end

  logic last_rd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= 1'b0;
      rd_cnt    <= '0;
      rd_valid  <= 1'b0;
      rd_id     <= '0;
      last_rd   <= 1'b0;
      done      <= 1'b0;
      best_id   <= '0;
      best_dist <= '1;
    end else begin
      done     <= 1'b0;
      rd_valid <= run;
      rd_id    <= rd_cnt[ID_W-1:0];
      last_rd  <= run && (rd_cnt == n_ref - 1'b1);
      if (start && !run) begin
        run       <= 1'b1;
        rd_cnt    <= '0;
        best_dist <= '1;
        best_id   <= '0;
      end else if (run) begin
        if (rd_cnt == n_ref - 1'b1) run <= 1'b0;
        rd_cnt <= rd_cnt + 1'b1;
      end
      if (rd_valid) begin
        if (l1 < best_dist) begin
          best_dist <= l1;
          best_id   <= rd_id;
        end
        if (last_rd) done <= 1'b1;
      end
    end
  end
  assign busy = run || rd_valid;
endmodule
