// match_circuit: one word of the reconfigurable PLA (register and gates).
//
// A register stores the n-bit word; each bit is compared with the input by
// an XNOR gate and the AND of all comparisons is the match line. This is
// the document's register-and-gates match circuit. The word is rewritten
// through wr_en / wr_data at any time, taking effect on the next clock edge.
// Reset clears the word to 0 (reset behaviour is this design's choice).
// The match output is combinational in x and the stored word.
module match_circuit #(
  parameter int unsigned N = 40    // word width n
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [N-1:0] wr_data,
  input  logic [N-1:0] x,
  output logic         match
);

  logic [N-1:0] word_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     word_q <= '0;
    else if (wr_en) word_q <= wr_data;
  end

  assign match = &(~(word_q ^ x));

endmodule
