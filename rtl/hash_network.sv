// hash_network: programmable linear hash of the address generator.
//
// The input vector X = (x_1..x_n) is split into the bound part
// X1 = (x_1..x_p) and the free part X2 = (x_{p+1}..x_n). Bit i of the hash
// Y1 is y_i = x_i XOR x_j, where x_j is one bit of X2 chosen by a per-output
// select register. This is the hash function of the document (y_i = x_i xor
// x_j, x_j in X2); because X2 is passed on unchanged, X can be recovered
// from (Y1, X2), so the AUX memory only has to hold X2.
//
// Holding the selects in registers, so that the hash can be changed together
// with the memory contents, is this design's choice; the document only says
// that the hash functions were chosen (optimised) per vector set.
// Reset loads the select of output i with X2 bit (i mod (n-p)).
//
// Bit numbering: x[0] is x_1, so X1 = x[P-1:0] and X2 = x[N-1:P].
// Interface: y is combinational in x and the selects; a select write
// (sel_we, sel_idx, sel_val) takes effect on the next clock edge.
module hash_network #(
  parameter int unsigned N = 40,   // input vector width n
  parameter int unsigned P = 12,   // hash width p (bound variables)
  localparam int unsigned R = N - P,
  localparam int unsigned IW = addr_gen_pkg::idx_w(P),
  localparam int unsigned SW = addr_gen_pkg::idx_w(R)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sel_we,
  input  logic [IW-1:0] sel_idx,   // which output bit y_i
  input  logic [SW-1:0] sel_val,   // which X2 bit x_j (0 = x_{p+1})
  input  logic [N-1:0]  x,
  output logic [P-1:0]  y
);

  logic [SW-1:0] sel_q [P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < P; i++) sel_q[i] <= SW'(i % R);
    end else if (sel_we && (32'(sel_idx) < P) && (32'(sel_val) < R)) begin
      sel_q[sel_idx] <= sel_val;
    end
  end

  logic [R-1:0] x2;
  assign x2 = x[N-1:P];

  always_comb begin
    for (int unsigned i = 0; i < P; i++) y[i] = x[i] ^ x2[sel_q[i]];
  end

endmodule
