// tb_hash_network: checks the programmable XOR hash at its default size
// (n = 40, p = 12). After reset, output i must use X2 bit (i mod 28); then
// random selects are written and 200 random inputs are hashed and compared
// with y_i = x_i ^ x_(p+sel_i) computed here. Out-of-range writes must be
// ignored.
module tb_hash_network;
  localparam int N = 40, P = 12, R = N - P;
  logic clk = 0, rst_n = 0;
  logic sel_we = 0;
  logic [3:0] sel_idx = '0;
  logic [4:0] sel_val = '0;
  logic [N-1:0] x = '0;
  logic [P-1:0] y;
  int checks = 0, failures = 0;
  int sel [P];

  always #5 clk = ~clk;

  hash_network dut (.clk, .rst_n, .sel_we, .sel_idx, .sel_val, .x, .y);

  task automatic check_y();
    logic [P-1:0] e;
    for (int i = 0; i < P; i++) e[i] = x[i] ^ x[P + sel[i]];
    #1;
    checks++;
    if (y !== e) begin
      failures++;
      $display("x=%h y=%h expected %h", x, y, e);
    end
  endtask

  initial begin
    for (int i = 0; i < P; i++) sel[i] = i % R;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      x = {$urandom, $urandom};
      check_y();
    end
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      sel_we = 1;
      sel_idx = 4'($urandom_range(P - 1));
      sel_val = 5'($urandom_range(R - 1));
      sel[sel_idx] = sel_val;
      @(negedge clk);
      sel_we = 0;
      for (int m = 0; m < 5; m++) begin
        x = {$urandom, $urandom};
        check_y();
      end
    end
    // out-of-range writes leave the selects unchanged
    @(negedge clk); sel_we = 1; sel_idx = 4'd13; sel_val = 5'd3;
    @(negedge clk); sel_idx = 4'd0; sel_val = 5'd30;
    @(negedge clk); sel_we = 0;
    for (int m = 0; m < 20; m++) begin
      x = {$urandom, $urandom};
      check_y();
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
