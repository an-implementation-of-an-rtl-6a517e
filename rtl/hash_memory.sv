// hash_memory: the 2^p-word hash memory of one hash stage.
//
// Each word is addressed by a hash value Y1 and holds the index of the one
// registered vector this column realizes, or 0 when the column holds none.
// The document gives the memory's shape (p inputs, q outputs) and contents;
// it is built here as a synchronous-read RAM with one write port, as an
// FPGA embedded block RAM is used. The contents have no reset: every word
// must be written before lookups are trusted.
//
// Timing: rd_data is the word at rd_addr of the previous clock edge
// (one-cycle read latency). A write to the address being read returns the
// old word.
module hash_memory #(
  parameter int unsigned P = 12,   // address width p
  parameter int unsigned Q = 11    // index width q
) (
  input  logic         clk,
  input  logic [P-1:0] rd_addr,
  output logic [Q-1:0] rd_data,
  input  logic         wr_en,
  input  logic [P-1:0] wr_addr,
  input  logic [Q-1:0] wr_data
);

  logic [Q-1:0] mem [2**P];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
