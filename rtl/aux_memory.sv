// aux_memory: the AUX memory of one hash stage.
//
// Addressed by an index (the hash memory output), it holds the X2 part
// (n-p bits) of the registered vector with that index. The comparator
// checks the input's X2 against it to reject inputs that merely share a
// hash column with a registered vector. The document gives the shape
// (q inputs, n-p outputs) and contents; it is built here as a synchronous
// read RAM with one write port. The contents have no reset: every word that
// a hash memory word can point to must be written before use.
//
// Timing: rd_data is the word at rd_addr of the previous clock edge.
module aux_memory #(
  parameter int unsigned Q = 11,   // index width (address)
  parameter int unsigned R = 28    // X2 width n-p (data)
) (
  input  logic         clk,
  input  logic [Q-1:0] rd_addr,
  output logic [R-1:0] rd_data,
  input  logic         wr_en,
  input  logic [Q-1:0] wr_addr,
  input  logic [R-1:0] wr_data
);

  logic [R-1:0] mem [2**Q];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
