// reconfigurable_pla: register-and-gates PLA for the left-over vectors.
//
// Holds the registered vectors that neither hash memory can realize. Each of
// the WORDS words is a match circuit (stored vector, XNOR gates, AND gate)
// with a q-bit output register holding the word's index. The encoder ANDs
// each match line with its word's index and ORs the results over all words,
// as the document's PLA does with OR gates. A word whose index register is 0
// contributes nothing, so writing index 0 frees a word; no separate valid
// bit is needed (this design's choice, as is making the output part
// writable rather than fixed). Two words must not hold the same vector with
// different indices, or their indices are ORed together.
//
// An assertion flags an input matched by more than one live word. Verilator
// notes that rst_n is used both asynchronously (flip-flops) and
// synchronously; the synchronous use is only the assertion's disable.
//
// Timing: the match and encode are combinational from the input; the result
// passes through PIPE registers (default 1) so the parent can align it with
// its memory lookups. Reset clears all words and indices.
module reconfigurable_pla #(
  parameter int unsigned N     = 40,  // vector width n
  parameter int unsigned Q     = 11,  // index width q
  parameter int unsigned WORDS = 43,  // number of PLA words
  parameter int unsigned PIPE  = 1,   // output register stages (>= 1)
  localparam int unsigned WW = addr_gen_pkg::idx_w(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // lookup
  input  logic          in_valid,
  input  logic [N-1:0]  x,
  output logic          out_valid,
  output logic [Q-1:0]  out_addr,
  output logic          out_hit,
  // configuration
  input  logic          vec_we,
  input  logic          addr_we,
  input  logic [WW-1:0] wr_word,
  input  logic [N-1:0]  wr_vec,
  input  logic [Q-1:0]  wr_addr
);

  logic [WORDS-1:0] match;
  logic [Q-1:0]     word_addr [WORDS];
  logic [Q-1:0]     enc;
  logic             any;

  for (genvar w = 0; w < WORDS; w++) begin : g_word
    match_circuit #(.N(N)) u_match (
      .clk, .rst_n,
      .wr_en  (vec_we && (32'(wr_word) == w)),
      .wr_data(wr_vec),
      .x,
      .match  (match[w])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                                 word_addr[w] <= '0;
      else if (addr_we && (32'(wr_word) == w))    word_addr[w] <= wr_addr;
    end
  end

  // OR encoder
  always_comb begin
    enc = '0;
    any = 1'b0;
    for (int unsigned w = 0; w < WORDS; w++) begin
      enc |= word_addr[w] & {Q{match[w]}};
      any |= match[w] && (word_addr[w] != '0);
    end
  end

  // a vector may be stored in at most one live word
  logic [WORDS-1:0] live_match;
  always_comb
    for (int unsigned w = 0; w < WORDS; w++) live_match[w] = match[w] && (word_addr[w] != '0);

  a_one_word: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> $onehot0(live_match))
    else $error("reconfigurable PLA: several words match the input");

  logic         v_q   [PIPE];
  logic [Q-1:0] a_q   [PIPE];
  logic         h_q   [PIPE];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < PIPE; s++) begin
        v_q[s] <= 1'b0;
        a_q[s] <= '0;
        h_q[s] <= 1'b0;
      end
    end else begin
      v_q[0] <= in_valid;
      a_q[0] <= in_valid ? enc : '0;
      h_q[0] <= in_valid & any;
      for (int unsigned s = 1; s < PIPE; s++) begin
        v_q[s] <= v_q[s-1];
        a_q[s] <= a_q[s-1];
        h_q[s] <= h_q[s-1];
      end
    end
  end

  assign out_valid = v_q[PIPE-1];
  assign out_addr  = a_q[PIPE-1];
  assign out_hit   = h_q[PIPE-1];

endmodule
