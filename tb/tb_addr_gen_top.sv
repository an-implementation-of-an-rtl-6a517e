// tb_addr_gen_top: end-to-end test of the address generator at its default
// size (n = 40, q = 11, 43 PLA words) with a 1730-entry word list.
// The driver loads the generator and checks every registered word, 2000
// unregistered words, vectors aliasing occupied hash columns, and
// reconfiguration during operation; results must arrive 3 clocks after the
// lookup is presented.
module tb_addr_gen_top;
  import addr_gen_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  cfg_req_t     cfg;
  logic         in_valid, out_valid, done;
  logic [39:0]  in_vec;
  logic [10:0]  out_addr;
  int           checks, failures;

  always #5 clk = ~clk;

  addr_gen_top dut (.clk, .rst_n, .cfg, .in_valid, .in_vec, .out_valid, .out_addr);

  addr_gen_driver #(.K(1730), .WORD_MODE(1'b1), .NAME("list1")) drv (
    .clk, .rst_n, .cfg, .in_valid, .in_vec, .out_valid, .out_addr,
    .done, .checks, .failures
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
