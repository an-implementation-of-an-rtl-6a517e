// tb_reconfigurable_pla: the 43-word, n = 40, q = 11 PLA with one output
// register. Loads every word with a distinct random vector and index,
// streams lookups (stored vectors, neighbours, random vectors) one per clock
// and checks index and hit one clock later; then frees words by writing
// index 0 and rewrites a word's vector, checking the effect.
// A second, 7-word PLA (n = 4, q = 3) realizes a whole small address
// generation function on its own and is checked on all 16 inputs:
//   1: 0010  2: 0111  3: 1101  4: 0101  5: 0011  6: 1011  7: 0001
module tb_reconfigurable_pla;
  localparam int N = 40, Q = 11, W = 43;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid, out_hit;
  logic [N-1:0] x = '0, wr_vec = '0;
  logic [Q-1:0] out_addr, wr_addr = '0;
  logic vec_we = 0, addr_we = 0;
  logic [5:0] wr_word = '0;
  int checks = 0, failures = 0;
  logic [N-1:0] vec [W];
  int idx [W];
  logic [Q-1:0] exp_q [$];

  always #5 clk = ~clk;

  reconfigurable_pla dut (
    .clk, .rst_n, .in_valid, .x, .out_valid, .out_addr, .out_hit,
    .vec_we, .addr_we, .wr_word, .wr_vec, .wr_addr);

  // small PLA holding the 7-vector table
  logic       s_valid = 0, s_out_valid, s_hit, s_vec_we = 0, s_addr_we = 0;
  logic [3:0] s_x = '0, s_wr_vec = '0;
  logic [2:0] s_out, s_wr_addr = '0, s_wr_word = '0;
  localparam logic [3:0] TABLE [7] = '{4'b0010, 4'b0111, 4'b1101, 4'b0101, 4'b0011, 4'b1011, 4'b0001};

  reconfigurable_pla #(.N(4), .Q(3), .WORDS(7)) u_table (
    .clk, .rst_n, .in_valid(s_valid), .x(s_x), .out_valid(s_out_valid), .out_addr(s_out), .out_hit(s_hit),
    .vec_we(s_vec_we), .addr_we(s_addr_we), .wr_word(s_wr_word), .wr_vec(s_wr_vec), .wr_addr(s_wr_addr));

  task automatic small_table();
    for (int w = 0; w < 7; w++) begin
      @(negedge clk); s_vec_we = 1; s_addr_we = 1; s_wr_word = 3'(w); s_wr_vec = TABLE[w]; s_wr_addr = 3'(w + 1);
    end
    @(negedge clk); s_vec_we = 0; s_addr_we = 0;
    for (int a = 0; a < 16; a++) begin
      automatic logic [2:0] e = '0;
      for (int w = 0; w < 7; w++) if (TABLE[w] == 4'(a)) e = 3'(w + 1);
      @(negedge clk); s_valid = 1; s_x = 4'(a);
      @(posedge clk); #1;
      checks++;
      if (!s_out_valid || s_out !== e || s_hit !== (e != 0)) begin
        failures++;
        $display("table: input %b gave %0d, expected %0d", 4'(a), s_out, e);
      end
    end
    @(negedge clk); s_valid = 0;
  endtask

  function automatic logic [Q-1:0] model(logic [N-1:0] v);
    for (int w = 0; w < W; w++) if (vec[w] == v && idx[w] != 0) return Q'(idx[w]);
    return '0;
  endfunction

  // result must be there exactly one clock after the input
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        logic [Q-1:0] e;
        if (exp_q.size() == 0) begin failures++; end
        else begin
          e = exp_q.pop_front();
          checks++;
          if (out_addr !== e || out_hit !== (e != 0)) begin
            failures++;
            if (failures < 10) $display("got %0d/%b expected %0d", out_addr, out_hit, e);
          end
        end
      end
      if (in_valid) exp_q.push_back(model(x));
    end
  end

  task automatic look(logic [N-1:0] v);
    @(negedge clk); in_valid = 1; x = v;
  endtask

  task automatic drain();
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
  endtask

  initial begin
    for (int w = 0; w < W; w++) begin vec[w] = '0; idx[w] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    look('0);                    // cleared PLA answers 0
    drain();
    small_table();
    for (int w = 0; w < W; w++) begin
      vec[w] = {$urandom, $urandom};
      idx[w] = 1 + w * 37 % 2000;
      @(negedge clk); vec_we = 1; wr_word = 6'(w); wr_vec = vec[w];
      @(negedge clk); vec_we = 0; addr_we = 1; wr_addr = Q'(idx[w]);
      @(negedge clk); addr_we = 0;
    end
    for (int n = 0; n < 400; n++) begin
      automatic int w = $urandom_range(W - 1);
      case (n % 3)
        0: look(vec[w]);
        1: look(vec[w] ^ (N'(1) << $urandom_range(N - 1)));
        default: look({$urandom, $urandom});
      endcase
    end
    drain();
    // free every third word, rewrite word 5
    for (int w = 0; w < W; w += 3) begin
      @(negedge clk); in_valid = 0; addr_we = 1; wr_word = 6'(w); wr_addr = '0; idx[w] = 0;
    end
    @(negedge clk); addr_we = 0; vec_we = 1; wr_word = 6'd5; wr_vec = ~vec[5];
    @(negedge clk); vec_we = 0;
    look(vec[5]);
    vec[5] = ~vec[5];
    for (int w = 0; w < W; w++) look(vec[w]);
    drain();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
