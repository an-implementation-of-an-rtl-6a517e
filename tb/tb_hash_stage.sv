// tb_hash_stage: the 6-variable worked example of a hash stage.
//
// Registered vectors (x1..x6), index:
//   1: 000010  2: 010010  3: 001010  4: 001110  5: 000001  6: 111011  7: 010111
// Hash y1 = x1^x6, y2 = x2^x5, y3 = x3^x4 (X2 = x4 x5 x6). Vectors 1 and 4
// share column (y3 y2 y1) = 010; the stage keeps 1 and vector 4 is left for
// the PLA, so the stage must answer 0 for it. Hash memory contents for
// columns 0..7: 2 5 1 0 6 7 3 0. AUX memory (x4 x5 x6) for indices 0..7:
// 000 010 010 010 000 001 011 111.
// All 64 inputs are streamed back to back and every answer is checked, with
// its three-clock latency, against the vector table above.
//
// A second stage at the default size (n = 40, p = 12, q = 11) is loaded with
// 1500 random vectors and a random hash, one vector per column (the first to
// arrive), and streamed with every vector, vectors aliasing an occupied
// column, and random vectors; results are checked against the table.
module tb_hash_stage;
  localparam int N = 6, P = 3, Q = 3, R = N - P;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid, out_hit;
  logic [N-1:0] x = '0;
  logic [Q-1:0] out_addr;
  logic net_we = 0, hmem_we = 0, aux_we = 0;
  logic [1:0] net_idx = '0, net_val = '0;
  logic [P-1:0] hmem_addr = '0;
  logic [Q-1:0] hmem_data = '0, aux_addr = '0;
  logic [R-1:0] aux_data = '0;
  int checks = 0, failures = 0, cyc = 0, rejected = 0, hits = 0;

  typedef struct { logic [Q-1:0] e; int t; } pend_t;
  pend_t pend [$];

  always #5 clk = ~clk;

  // ---- default-size stage ----
  localparam int BN = 40, BP = 12, BQ = 11, BR = BN - BP, BK = 1500;
  logic            b_in_valid = 0, b_out_valid, b_out_hit;
  logic [BN-1:0]   b_x = '0;
  logic [BQ-1:0]   b_out_addr;
  logic            b_net_we = 0, b_hmem_we = 0, b_aux_we = 0;
  logic [3:0]      b_net_idx = '0;
  logic [4:0]      b_net_val = '0;
  logic [BP-1:0]   b_hmem_addr = '0;
  logic [BQ-1:0]   b_hmem_data = '0, b_aux_addr = '0;
  logic [BR-1:0]   b_aux_data = '0;
  int              b_sel [BP];
  int              b_idx_of [bit [39:0]];   // vectors the stage holds
  logic [BN-1:0]   b_vecs [$];
  int              b_rej = 0;

  hash_stage b_dut (
    .clk, .rst_n, .in_valid(b_in_valid), .x(b_x), .out_valid(b_out_valid),
    .out_addr(b_out_addr), .out_hit(b_out_hit),
    .net_we(b_net_we), .net_idx(b_net_idx), .net_val(b_net_val),
    .hmem_we(b_hmem_we), .hmem_addr(b_hmem_addr), .hmem_data(b_hmem_data),
    .aux_we(b_aux_we), .aux_addr(b_aux_addr), .aux_data(b_aux_data));

  function automatic logic [BP-1:0] b_hash(logic [BN-1:0] v);
    for (int i = 0; i < BP; i++) b_hash[i] = v[i] ^ v[BP + b_sel[i]];
  endfunction

  typedef struct { logic [BQ-1:0] e; int t; } b_pend_t;
  b_pend_t b_pend [$];
  always @(posedge clk) begin
    if (rst_n && b_out_valid) begin
      if (b_pend.size() == 0) failures++;
      else begin
        automatic b_pend_t p = b_pend.pop_front();
        checks++;
        if (b_out_addr !== p.e || b_out_hit !== (p.e != 0) || cyc - p.t != 4) begin
          failures++;
          if (failures < 10) $display("default size: got %0d, expected %0d, latency %0d", b_out_addr, p.e, cyc - p.t - 1);
        end
      end
    end
  end

  task automatic b_look(logic [BN-1:0] v);
    b_pend_t p;
    @(posedge clk);
    b_in_valid <= 1; b_x <= v;
    p.e = b_idx_of.exists(40'(v)) ? BQ'(b_idx_of[40'(v)]) : '0;
    p.t = cyc;
    b_pend.push_back(p);
  endtask

  task automatic default_size();
    logic [BQ-1:0] hm [] = new[2**BP];
    int pool [$];
    foreach (hm[c]) hm[c] = '0;
    for (int j = 0; j < BR; j++) pool.push_back(j);
    pool.shuffle();
    for (int i = 0; i < BP; i++) b_sel[i] = pool[i];
    for (int k = 1; k <= BK; k++) begin
      automatic logic [BN-1:0] v = {$urandom, $urandom};
      b_vecs.push_back(v);
      if (hm[b_hash(v)] == '0) begin
        hm[b_hash(v)] = BQ'(k);
        b_idx_of[40'(v)] = k;
      end
    end
    for (int i = 0; i < BP; i++) begin
      @(negedge clk); b_net_we = 1; b_net_idx = 4'(i); b_net_val = 5'(b_sel[i]);
    end
    @(negedge clk); b_net_we = 0;
    foreach (hm[c]) begin
      @(negedge clk); b_hmem_we = 1; b_hmem_addr = BP'(c); b_hmem_data = hm[c];
    end
    @(negedge clk); b_hmem_we = 0;
    foreach (b_vecs[i]) if (b_idx_of.exists(40'(b_vecs[i]))) begin
      @(negedge clk); b_aux_we = 1; b_aux_addr = BQ'(b_idx_of[40'(b_vecs[i])]); b_aux_data = b_vecs[i][BN-1:BP];
    end
    @(negedge clk); b_aux_we = 0;
    foreach (b_vecs[i]) b_look(b_vecs[i]);          // collided ones must give 0
    foreach (b_vecs[i]) if (b_idx_of.exists(40'(b_vecs[i]))) begin
      automatic logic [BN-1:0] v = b_vecs[i];
      automatic int b = $urandom_range(BR - 1);
      v[BP + b] = ~v[BP + b];
      for (int j = 0; j < BP; j++) if (b_sel[j] == b) v[j] = ~v[j];
      b_rej++;
      b_look(v);                                    // same column, other X2
    end
    for (int n = 0; n < 500; n++) b_look({$urandom, $urandom});
    @(posedge clk); b_in_valid <= 0;
    repeat (6) @(posedge clk);
    checks++;
    if (b_pend.size() != 0 || b_rej == 0) failures++;
  endtask
  always @(negedge clk) cyc <= cyc + 1;

  hash_stage #(.N(N), .P(P), .Q(Q)) dut (
    .clk, .rst_n, .in_valid, .x, .out_valid, .out_addr, .out_hit,
    .net_we, .net_idx, .net_val, .hmem_we, .hmem_addr, .hmem_data,
    .aux_we, .aux_addr, .aux_data);

  // x1..x6 written left to right; x1 is bit 0
  function automatic logic [5:0] v(string s);
    logic [5:0] r;
    for (int i = 0; i < 6; i++) r[i] = (s[i] == "1");
    return r;
  endfunction

  function automatic logic [Q-1:0] expected(logic [5:0] in);
    if (in == v("000010")) return 3'd1;
    if (in == v("010010")) return 3'd2;
    if (in == v("001010")) return 3'd3;
    if (in == v("000001")) return 3'd5;
    if (in == v("111011")) return 3'd6;
    if (in == v("010111")) return 3'd7;
    return 3'd0;   // includes vector 4 (001110), realized by the PLA
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (pend.size() == 0) failures++;
      else begin
        automatic pend_t p = pend.pop_front();
        checks++;
        if (out_addr !== p.e || out_hit !== (p.e != 0) || cyc - p.t != 4) begin
          failures++;
          $display("got %0d after %0d clocks, expected %0d after 3", out_addr, cyc - p.t - 1, p.e);
        end
        if (p.e != 0) hits++;
      end
    end
  end

  initial begin
    logic [Q-1:0] hm [8] = '{3'd2, 3'd5, 3'd1, 3'd0, 3'd6, 3'd7, 3'd3, 3'd0};
    logic [R-1:0] ax [8] = '{3'b000, 3'b010, 3'b010, 3'b010, 3'b000, 3'b100, 3'b110, 3'b111};
    repeat (2) @(posedge clk);
    rst_n = 1;
    // y1 <- X2 bit 2 (x6), y2 <- bit 1 (x5), y3 <- bit 0 (x4)
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); net_we = 1; net_idx = 2'(i); net_val = 2'(2 - i);
    end
    @(negedge clk); net_we = 0;
    for (int a = 0; a < 8; a++) begin
      @(negedge clk); hmem_we = 1; hmem_addr = 3'(a); hmem_data = hm[a];
      aux_we = 1; aux_addr = 3'(a); aux_data = ax[a];
    end
    @(negedge clk); hmem_we = 0; aux_we = 0;
    for (int a = 0; a < 64; a++) begin
      pend_t p;
      @(posedge clk);
      in_valid <= 1; x <= 6'(a);
      p.e = expected(6'(a)); p.t = cyc;
      pend.push_back(p);
    end
    @(posedge clk); in_valid <= 0;
    repeat (6) @(posedge clk);
    default_size();
    checks++;
    if (pend.size() != 0 || hits != 6) begin
      failures++;
      $display("%0d unanswered, %0d hits", pend.size(), hits);
    end
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
