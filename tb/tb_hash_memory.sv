// tb_hash_memory: fills the default 2^12 x 11 hash memory with values from a
// formula, reads every word back and checks the one-clock read latency and
// read-old-data-on-collision behaviour.
module tb_hash_memory;
  localparam int P = 12, Q = 11;
  logic clk = 0;
  logic [P-1:0] rd_addr = '0, wr_addr = '0;
  logic [Q-1:0] rd_data, wr_data = '0;
  logic wr_en = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hash_memory dut (.clk, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  function automatic logic [Q-1:0] pat(int a, int s);
    return Q'({32'(a * 32'h9E3779B1 + s * 32'h7F4A7C15), 32'((a ^ s) * 32'h85EBCA6B)});
  endfunction

  initial begin
    for (int a = 0; a < 2**P; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = P'(a); wr_data = pat(a, 1);
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < 2**P; a++) begin
      rd_addr = P'(a);
      @(posedge clk); #1;
      checks++;
      if (rd_data !== pat(a, 1)) begin
        failures++;
        if (failures < 10) $display("addr %0d: %0d expected %0d", a, rd_data, pat(a, 1));
      end
      @(negedge clk);
    end
    // write and read the same word in one clock: old data, then new data
    for (int n = 0; n < 50; n++) begin
      automatic int a = $urandom_range(2**P - 1);
      @(negedge clk); rd_addr = P'(a); wr_en = 1; wr_addr = P'(a); wr_data = pat(a, 2 + n);
      @(posedge clk); #1;
      checks++;
      if (rd_data !== pat(a, 1)) failures++;
      @(negedge clk); wr_en = 0;
      @(posedge clk); #1;
      checks++;
      if (rd_data !== pat(a, 2 + n)) failures++;
      @(negedge clk); wr_en = 1; wr_data = pat(a, 1);
      @(negedge clk); wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
