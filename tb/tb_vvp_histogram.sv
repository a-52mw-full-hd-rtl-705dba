// Self-checking test of the ROI histogram voter: random votes at random
// positions, some inside and some outside the window, including the window
// edges; the testbench keeps its own histogram (saturating at 255) and
// compares all 64 bins and the vote count, then checks that clear empties it.
module tb_vvp_histogram;
  import vvp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, vote_valid;
  logic [WORD_W-1:0] vote_word;
  pos_t vote_pos;
  window_t win;
  hist_t hist;
  logic [15:0] n_votes;
  int checks = 0, failures = 0;
  int model [WORDS];
  int nin;

  vvp_histogram dut (.*);

  task automatic compare(string what);
    for (int b = 0; b < WORDS; b++) begin
      checks++;
      if (int'(hist[b]) != model[b]) begin failures++; $display("%s bin %0d = %0d exp %0d", what, b, hist[b], model[b]); end
    end
    checks++;
    if (int'(n_votes) != nin) begin failures++; $display("%s votes %0d exp %0d", what, n_votes, nin); end
  endtask

  initial begin
    clear = 0; vote_valid = 0; vote_word = '0; vote_pos = '0;
    win = '{x0: 11'd100, y0: 11'd200, x1: 11'd355, y1: 11'd455};
    for (int b = 0; b < WORDS; b++) model[b] = 0;
    nin = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int x, y;
      @(negedge clk);
      vote_valid = ($urandom_range(0, 3) != 0);
      case (n % 5)
        0: begin x = 100; y = 455; end               // corner, inside
        1: begin x = 99;  y = 300; end               // just outside
        2: begin x = 356; y = 300; end               // just outside
        default: begin x = $urandom_range(0, 500); y = $urandom_range(0, 600); end
      endcase
      vote_pos = '{x: 11'(x), y: 11'(y)};
      vote_word = (n < 2000) ? 6'd5 : 6'($urandom);  // bin 5 saturates
      if (vote_valid && x >= 100 && x <= 355 && y >= 200 && y <= 455) begin
        if (model[vote_word] < 255) model[vote_word]++;
        nin++;
      end
    end
    @(negedge clk); vote_valid = 0;
    @(negedge clk);
    compare("after votes");
    checks++;
    if (hist[5] != 8'd255) begin failures++; $display("bin 5 did not saturate"); end
    clear = 1; @(negedge clk); clear = 0;
    for (int b = 0; b < WORDS; b++) model[b] = 0;
    nin = 0;
    compare("after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
