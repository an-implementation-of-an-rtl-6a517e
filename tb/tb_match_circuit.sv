// tb_match_circuit: one PLA word at n = 40. Checks that a cleared word
// matches only the all-zero input, then writes random words and checks the
// match line against the word itself, single-bit neighbours and random
// inputs; a word changes only on a clock with wr_en.
module tb_match_circuit;
  localparam int N = 40;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [N-1:0] wr_data = '0, x = '0, word;
  logic match;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  match_circuit dut (.clk, .rst_n, .wr_en, .wr_data, .x, .match);

  task automatic chk(logic exp);
    #1;
    checks++;
    if (match !== exp) begin
      failures++;
      $display("word=%h x=%h match=%b expected %b", word, x, match, exp);
    end
  endtask

  initial begin
    word = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    x = '0; chk(1'b1);
    x = 40'h1; chk(1'b0);
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      wr_en = 1; wr_data = {$urandom, $urandom};
      @(negedge clk);
      wr_en = 0; word = wr_data;
      wr_data = ~wr_data;          // no write: must not change the word
      @(negedge clk);
      x = word; chk(1'b1);
      x = word ^ (N'(1) << $urandom_range(N - 1)); chk(1'b0);
      x = {$urandom, $urandom}; chk(x == word);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
