// hash_stage: one hashed sub-function of the address generator.
//
// Realizes f1(Y1, X2): the part of the address generation function whose
// registered vectors each own a hash column. The input vector is hashed by
// the hash network to Y1 (p bits); the hash memory returns the index stored
// for that column; the AUX memory returns the X2 stored for that index; the
// comparator outputs the index when it equals the input's X2, else 0.
// This is the structure of the document's hybrid-method figure; the super
// hybrid generator uses two of these with different p and q.
//
// Timing (this design's choice, built for synchronous-read memories): a
// fully pipelined lookup, one input per clock, result three clocks later.
//   cycle 0: x in, hash computed, hash memory read issued
//   cycle 1: index out of hash memory, AUX memory read issued
//   cycle 2: AUX data out, comparison; result registered
//   cycle 3: out_valid / out_addr / out_hit
// Configuration writes go straight to the hash network selects and the two
// memories and may be interleaved with lookups.
module hash_stage #(
  parameter int unsigned N = 40,   // vector width n
  parameter int unsigned P = 12,   // hash width p
  parameter int unsigned Q = 11,   // index width q of this stage
  localparam int unsigned R = N - P,
  localparam int unsigned IW = addr_gen_pkg::idx_w(P),
  localparam int unsigned SW = addr_gen_pkg::idx_w(R)
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
  input  logic          net_we,
  input  logic [IW-1:0] net_idx,
  input  logic [SW-1:0] net_val,
  input  logic          hmem_we,
  input  logic [P-1:0]  hmem_addr,
  input  logic [Q-1:0]  hmem_data,
  input  logic          aux_we,
  input  logic [Q-1:0]  aux_addr,
  input  logic [R-1:0]  aux_data
);

  logic [P-1:0] y1;
  logic [Q-1:0] index_s1;
  logic [R-1:0] aux_s2;
  logic [R-1:0] x2_s1, x2_s2;
  logic [Q-1:0] index_s2;
  logic         v_s1, v_s2;
  logic [Q-1:0] cmp_addr;
  logic         cmp_hit;

  hash_network #(.N(N), .P(P)) u_net (
    .clk, .rst_n,
    .sel_we (net_we), .sel_idx(net_idx), .sel_val(net_val),
    .x, .y(y1)
  );

  hash_memory #(.P(P), .Q(Q)) u_hmem (
    .clk,
    .rd_addr(y1), .rd_data(index_s1),
    .wr_en(hmem_we), .wr_addr(hmem_addr), .wr_data(hmem_data)
  );

  aux_memory #(.Q(Q), .R(R)) u_aux (
    .clk,
    .rd_addr(index_s1), .rd_data(aux_s2),
    .wr_en(aux_we), .wr_addr(aux_addr), .wr_data(aux_data)
  );

  comparator #(.Q(Q), .R(R)) u_cmp (
    .index(index_s2), .aux_x2(aux_s2), .x2(x2_s2),
    .addr(cmp_addr), .hit(cmp_hit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_s1      <= 1'b0;
      v_s2      <= 1'b0;
      out_valid <= 1'b0;
      x2_s1     <= '0;
      x2_s2     <= '0;
      index_s2  <= '0;
      out_addr  <= '0;
      out_hit   <= 1'b0;
    end else begin
      v_s1      <= in_valid;
      x2_s1     <= x[N-1:P];
      v_s2      <= v_s1;
      x2_s2     <= x2_s1;
      index_s2  <= index_s1;
      out_valid <= v_s2;
      out_addr  <= v_s2 ? cmp_addr : '0;
      out_hit   <= v_s2 & cmp_hit;
    end
  end

endmodule
