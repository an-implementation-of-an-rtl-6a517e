// comparator: validates a hash memory hit.
//
// The hash memory maps 2^(n-p) inputs onto each column, so a non-zero index
// from it is only right when the input's X2 equals the X2 stored for that
// index in the AUX memory. The comparator passes the index when they are
// equal and outputs 0 otherwise, as the document describes. Purely
// combinational.
module comparator #(
  parameter int unsigned Q = 11,   // index width
  parameter int unsigned R = 28    // X2 width
) (
  input  logic [Q-1:0] index,      // hash memory output
  input  logic [R-1:0] aux_x2,     // AUX memory output
  input  logic [R-1:0] x2,         // X2 of the input vector
  output logic [Q-1:0] addr,       // index, or 0 when not matched
  output logic         hit
);

  always_comb begin
    hit  = (index != '0) && (aux_x2 == x2);
    addr = hit ? index : '0;
  end

endmodule
