// addr_gen_top: super hybrid address generator.
//
// For an n-bit input X the generator outputs the index (1..k) of the
// registered vector equal to X, or 0 if X is not registered. The function is
// split into three disjoint parts whose outputs are ORed:
//   * hash stage 1 (p1 = q+1 hash bits, q-bit indices) realizes roughly 80%
//     of the vectors: one vector per hash column;
//   * hash stage 2 (p2 = q-1 hash bits, q2 = q-2 bit indices) realizes most
//     of the vectors that collided in stage 1; since its memories only hold
//     q-2 bit indices, those vectors must have indices below 2^(q-2);
//   * the reconfigurable PLA holds the few vectors left over (about 4%).
// Each hash stage uses its own hash function over its own split of X into
// X1 (bound) and X2 (free) variables. The structure and all default sizes
// (n = 40, q = 11, p1 = 12, p2 = 10, q2 = 9) are those of the document's
// worked example for a 1730-word list; the PLA size of 43 words is its
// estimate of the vectors left for the PLA in that example.
//
// Timing (this design's choice): one lookup per clock, fully pipelined; the
// result for an input accepted with in_valid appears with out_valid three
// clocks later. The PLA result is delayed to line up with the hash stages.
//
// Configuration: one write per clock on cfg (see addr_gen_pkg); a write is
// applied at the clock edge and may be interleaved with lookups. All hash
// and AUX memory words must be written before lookups are trusted, as the
// memories have no reset. Reset sets the hash selects to a default and
// clears the PLA.
//
// The assertion checks that at most one of the three parts reports a match,
// which holds whenever the contents were loaded as disjoint functions.
// Lint reports rst_n as used both asynchronously and synchronously;
// the synchronous use is only the assertions' disable condition.
module addr_gen_top
  import addr_gen_pkg::*;
#(
  parameter int unsigned N         = 40,     // vector width n
  parameter int unsigned Q         = 11,     // index width q = ceil(log2(k+1))
  parameter int unsigned P1        = Q + 1,  // hash width of stage 1
  parameter int unsigned P2        = Q - 1,  // hash width of stage 2
  parameter int unsigned Q2        = Q - 2,  // index width of stage 2
  parameter int unsigned PLA_WORDS = 43      // reconfigurable PLA words
) (
  input  logic           clk,
  input  logic           rst_n,
  input  cfg_req_t       cfg,
  input  logic           in_valid,
  input  logic [N-1:0]   in_vec,
  output logic           out_valid,
  output logic [Q-1:0]   out_addr
);

  localparam int unsigned R1  = N - P1;
  localparam int unsigned R2  = N - P2;
  localparam int unsigned IW1 = idx_w(P1);
  localparam int unsigned IW2 = idx_w(P2);
  localparam int unsigned SW1 = idx_w(R1);
  localparam int unsigned SW2 = idx_w(R2);
  localparam int unsigned WW  = idx_w(PLA_WORDS);

  function automatic logic wr(input logic valid, input cfg_target_e target, input cfg_target_e t);
    return valid && (target == t);
  endfunction

  logic          v1, v2, v3;
  logic [Q-1:0]  a1, a3;
  logic [Q2-1:0] a2;
  logic          h1, h2, h3;

  hash_stage #(.N(N), .P(P1), .Q(Q)) u_stage1 (
    .clk, .rst_n,
    .in_valid, .x(in_vec),
    .out_valid(v1), .out_addr(a1), .out_hit(h1),
    .net_we   (wr(cfg.valid, cfg.target, CFG_HASH1_NET)),
    .net_idx  (cfg.addr[IW1-1:0]),
    .net_val  (cfg.data[SW1-1:0]),
    .hmem_we  (wr(cfg.valid, cfg.target, CFG_HASH1_MEM)),
    .hmem_addr(cfg.addr[P1-1:0]),
    .hmem_data(cfg.data[Q-1:0]),
    .aux_we   (wr(cfg.valid, cfg.target, CFG_AUX1)),
    .aux_addr (cfg.addr[Q-1:0]),
    .aux_data (cfg.data[R1-1:0])
  );

  hash_stage #(.N(N), .P(P2), .Q(Q2)) u_stage2 (
    .clk, .rst_n,
    .in_valid, .x(in_vec),
    .out_valid(v2), .out_addr(a2), .out_hit(h2),
    .net_we   (wr(cfg.valid, cfg.target, CFG_HASH2_NET)),
    .net_idx  (cfg.addr[IW2-1:0]),
    .net_val  (cfg.data[SW2-1:0]),
    .hmem_we  (wr(cfg.valid, cfg.target, CFG_HASH2_MEM)),
    .hmem_addr(cfg.addr[P2-1:0]),
    .hmem_data(cfg.data[Q2-1:0]),
    .aux_we   (wr(cfg.valid, cfg.target, CFG_AUX2)),
    .aux_addr (cfg.addr[Q2-1:0]),
    .aux_data (cfg.data[R2-1:0])
  );

  reconfigurable_pla #(.N(N), .Q(Q), .WORDS(PLA_WORDS), .PIPE(3)) u_pla (
    .clk, .rst_n,
    .in_valid, .x(in_vec),
    .out_valid(v3), .out_addr(a3), .out_hit(h3),
    .vec_we (wr(cfg.valid, cfg.target, CFG_PLA_VEC)),
    .addr_we(wr(cfg.valid, cfg.target, CFG_PLA_ADDR)),
    .wr_word(cfg.addr[WW-1:0]),
    .wr_vec (cfg.data[N-1:0]),
    .wr_addr(cfg.data[Q-1:0])
  );

  // f = f1 OR f2 OR f3
  assign out_valid = v1;
  assign out_addr  = a1 | Q'(a2) | a3;

  // the three parts realize disjoint vector sets
  a_one_part: assert property (@(posedge clk) disable iff (!rst_n)
                               v1 |-> (32'(h1) + 32'(h2) + 32'(h3)) <= 1)
    else $error("address generator: more than one part matched (h1=%0b h2=%0b pla=%0b)", h1, h2, h3);
  a_in_step: assert property (@(posedge clk) disable iff (!rst_n) (v1 == v2) && (v1 == v3))
    else $error("address generator: stage valids out of step");

endmodule
