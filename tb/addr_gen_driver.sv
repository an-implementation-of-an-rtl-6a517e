// addr_gen_driver: stimulus, reference model and checker for addr_gen_top.
//
// Plays the part of the software that loads an address generator:
//   1. builds a registered vector table of K distinct n-bit vectors, either
//      random or (WORD_MODE, n = 40) words of 1..8 letters, 5 bits a letter
//      (a..z = 1..26, blank = 0 pads the word to 8 letters); random
//      vectors may use only the low VEC_BITS bits (32-bit IP addresses);
//   2. chooses random hash functions y_i = x_i ^ x_j (x_j in X2) for both
//      stages, places each vector: one vector per hash-1 column, the rest
//      into hash 2 (one per column), the remainder into the PLA, and keeps
//      the try that leaves fewest vectors for the PLA (up to TRIES tries);
//   3. gives the vectors that missed hash 1 the indices 1..L1 (they must
//      fit the q-2 bit indices of hash 2) and the others L1+1..K;
//   4. writes every hash memory and AUX memory word, both hash functions and
//      the PLA through the configuration port;
//   5. streams lookups, one per clock: every registered vector, random
//      unregistered vectors, and unregistered vectors built to land on an
//      occupied hash column of stage 1 or 2 (so only the comparator can
//      reject them); checks each result and its latency (LAT clocks);
//   6. reconfigures during operation: removes and restores a hash-1 vector
//      and a PLA vector and checks the lookups in between.
// It counts how often each mechanism happened and counts a failure for any
// that never did. The model uses its own hash and placement code; it never
// reads the design's state.
module addr_gen_driver
  import addr_gen_pkg::*;
#(
  parameter int unsigned N         = 40,
  parameter int unsigned Q         = 11,
  parameter int unsigned P1        = Q + 1,
  parameter int unsigned P2        = Q - 1,
  parameter int unsigned Q2        = Q - 2,
  parameter int unsigned PLA_WORDS = 43,
  parameter int unsigned K         = 1730,
  parameter bit          WORD_MODE = 1'b1,
  parameter int unsigned VEC_BITS  = N,      // random mode: low bits used, rest 0
  parameter int unsigned TRIES     = 256,
  parameter int unsigned NEG       = 2000,
  parameter int unsigned LAT       = 3,
  parameter string       NAME      = "run"
) (
  input  logic          clk,
  input  logic          rst_n,
  output cfg_req_t      cfg,
  output logic          in_valid,
  output logic [N-1:0]  in_vec,
  input  logic          out_valid,
  input  logic [Q-1:0]  out_addr,
  output logic          done,
  output int            checks,
  output int            failures
);

  localparam int unsigned R1 = N - P1;
  localparam int unsigned R2 = N - P2;

  typedef enum int {LOC_H1, LOC_H2, LOC_PLA} loc_e;
  typedef struct { logic [Q-1:0] exp; int issued; } pend_t;

  logic [N-1:0] vecs [];        // vector table, position 0..K-1 (unindexed)
  int unsigned  index_of [];    // assigned index per position
  loc_e         loc [];
  int unsigned  idx_by_key [bit [63:0]];
  int unsigned  sel1 [P1], sel2 [P2], best1 [P1], best2 [P2];
  logic [Q-1:0]  hmem1 [];
  logic [Q2-1:0] hmem2 [];
  int           pla_pos [$];
  pend_t        pend [$];
  int           cyc;
  int           n_h1, n_h2, n_pla, n_rej1, n_rej2, n_empty, n_reconf, n_lat;

  always @(negedge clk) cyc <= cyc + 1;

  // independent hash: y_i = x_i ^ x_{p+sel_i}
  function automatic logic [P1-1:0] hash1(logic [N-1:0] x, int unsigned s [P1]);
    for (int i = 0; i < P1; i++) hash1[i] = x[i] ^ x[P1 + s[i]];
  endfunction
  function automatic logic [P2-1:0] hash2(logic [N-1:0] x, int unsigned s [P2]);
    for (int i = 0; i < P2; i++) hash2[i] = x[i] ^ x[P2 + s[i]];
  endfunction

  function automatic logic [N-1:0] rand_vec();
    logic [N-1:0] v = '0;
    if (WORD_MODE && N == 40) begin
      int unsigned len = 1 + $urandom_range(7);
      for (int l = 0; l < 8; l++)
        if (l < len) v[l*5 +: 5] = 5'($urandom_range(26, 1));
    end else begin
      for (int b = 0; b < int'(VEC_BITS); b++) v[b] = 1'($urandom_range(1));
    end
    return v;
  endfunction

  // distinct random selects into an X2 of width r
  task automatic pick_sel(int unsigned p, int unsigned r, ref int unsigned s []);
    int unsigned pool [$];
    for (int unsigned j = 0; j < r; j++) pool.push_back(j);
    pool.shuffle();
    for (int unsigned i = 0; i < p; i++) s[i] = pool[i % r];
  endtask

  // expected answer of the whole generator for x
  function automatic logic [Q-1:0] expect_of(logic [N-1:0] x);
    bit [63:0] key = 64'(x);
    if (idx_by_key.exists(key)) return Q'(idx_by_key[key]);
    return '0;
  endfunction

  task automatic cfg_write(cfg_target_e t, int unsigned a, logic [CFG_DATA_W-1:0] d);
    @(posedge clk);
    cfg <= '{valid: 1'b1, target: t, addr: CFG_ADDR_W'(a), data: d};
    in_valid <= 1'b0;
  endtask

  task automatic issue(logic [N-1:0] x);
    pend_t e;
    @(posedge clk);
    cfg.valid <= 1'b0;
    in_valid  <= 1'b1;
    in_vec    <= x;
    e.exp = expect_of(x);
    e.issued = cyc;
    pend.push_back(e);
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(posedge clk);
      cfg.valid <= 1'b0;
      in_valid  <= 1'b0;
    end
  endtask

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (pend.size() == 0) begin
        failures <= failures + 1;
        $display("%s: unexpected result %0d", NAME, out_addr);
      end else begin
        automatic pend_t e = pend.pop_front();
        checks <= checks + 2;
        if (out_addr !== e.exp) begin
          failures <= failures + 1;
          if (failures < 10) $display("%s: got %0d expected %0d", NAME, out_addr, e.exp);
        end
        if (cyc - e.issued != int'(LAT) + 1) begin
          failures <= failures + 1;
          if (failures < 10) $display("%s: latency %0d expected %0d", NAME, cyc - e.issued - 1, LAT);
        end else n_lat++;
      end
    end
  end

  initial begin
    int unsigned best_pla, l1_cnt, next_idx;
    int unsigned col1 [], col2 [];
    int unsigned s1 [], s2 [];
    loc_e        tloc [], bloc [];
    int          found;

    cfg = '0; in_valid = 1'b0; in_vec = '0; done = 1'b0;
    checks = 0; failures = 0; cyc = 0;
    n_h1 = 0; n_h2 = 0; n_pla = 0; n_rej1 = 0; n_rej2 = 0; n_empty = 0; n_reconf = 0; n_lat = 0;

    // 1. registered vector table
    vecs = new[K];
    begin
      bit seen [bit [63:0]];
      for (int i = 0; i < int'(K); i++) begin
        logic [N-1:0] v;
        do v = rand_vec(); while (seen.exists(64'(v)) || v == '0);
        seen[64'(v)] = 1'b1;
        vecs[i] = v;
      end
    end

    // 2. placement, best of TRIES hash functions
    s1 = new[P1]; s2 = new[P2]; tloc = new[K]; bloc = new[K];
    best_pla = K + 1;
    for (int t = 0; t < int'(TRIES) && best_pla > PLA_WORDS; t++) begin
      automatic int unsigned npla = 0, nl1 = 0;
      pick_sel(P1, R1, s1);
      pick_sel(P2, R2, s2);
      for (int i = 0; i < int'(P1); i++) sel1[i] = s1[i];
      for (int i = 0; i < int'(P2); i++) sel2[i] = s2[i];
      col1 = new[2**P1]; col2 = new[2**P2];
      foreach (col1[c]) col1[c] = 0;
      foreach (col2[c]) col2[c] = 0;
      for (int i = 0; i < int'(K); i++) begin
        automatic int unsigned h = int'(hash1(vecs[i], sel1));
        if (col1[h] == 0) begin col1[h] = 1; tloc[i] = LOC_H1; end
        else begin
          automatic int unsigned g = int'(hash2(vecs[i], sel2));
          nl1++;
          if (col2[g] == 0) begin col2[g] = 1; tloc[i] = LOC_H2; end
          else begin tloc[i] = LOC_PLA; npla++; end
        end
      end
      $display("%s: try %0d: %0d vectors miss hash 1, %0d left for the PLA", NAME, t, nl1, npla);
      if (nl1 < 2**Q2 && npla < best_pla) begin
        best_pla = npla;
        best1 = sel1; best2 = sel2;
        foreach (tloc[i]) bloc[i] = tloc[i];
      end
    end
    sel1 = best1; sel2 = best2;
    loc = bloc;
    $display("%s: K=%0d vectors, PLA needs %0d of %0d words", NAME, K, best_pla, PLA_WORDS);
    if (best_pla > PLA_WORDS) begin
      failures = failures + 1;
      $display("%s: placement does not fit the PLA", NAME);
    end

    // 3. index assignment
    index_of = new[K];
    next_idx = 1;
    foreach (loc[i]) if (loc[i] != LOC_H1) begin index_of[i] = next_idx; next_idx++; end
    l1_cnt = next_idx - 1;
    foreach (loc[i]) if (loc[i] == LOC_H1) begin index_of[i] = next_idx; next_idx++; end
    foreach (vecs[i]) idx_by_key[64'(vecs[i])] = index_of[i];
    $display("%s: hash1 %0d, hash2 %0d, PLA %0d", NAME, K - l1_cnt, l1_cnt - best_pla, best_pla);

    // 4. memory images and configuration
    hmem1 = new[2**P1]; hmem2 = new[2**P2];
    foreach (hmem1[c]) hmem1[c] = '0;
    foreach (hmem2[c]) hmem2[c] = '0;
    foreach (vecs[i]) begin
      if (loc[i] == LOC_H1) hmem1[hash1(vecs[i], sel1)] = Q'(index_of[i]);
      if (loc[i] == LOC_H2) hmem2[hash2(vecs[i], sel2)] = Q2'(index_of[i]);
      if (loc[i] == LOC_PLA) pla_pos.push_back(i);
    end

    wait (rst_n);
    idle(2);
    for (int i = 0; i < int'(P1); i++) cfg_write(CFG_HASH1_NET, i, CFG_DATA_W'(sel1[i]));
    for (int i = 0; i < int'(P2); i++) cfg_write(CFG_HASH2_NET, i, CFG_DATA_W'(sel2[i]));
    foreach (hmem1[c]) cfg_write(CFG_HASH1_MEM, c, CFG_DATA_W'(hmem1[c]));
    foreach (hmem2[c]) cfg_write(CFG_HASH2_MEM, c, CFG_DATA_W'(hmem2[c]));
    for (int a = 0; a < 2**Q; a++) cfg_write(CFG_AUX1, a, '0);
    for (int a = 0; a < 2**Q2; a++) cfg_write(CFG_AUX2, a, '0);
    foreach (vecs[i]) begin
      if (loc[i] == LOC_H1) cfg_write(CFG_AUX1, index_of[i], CFG_DATA_W'(vecs[i][N-1:P1]));
      if (loc[i] == LOC_H2) cfg_write(CFG_AUX2, index_of[i], CFG_DATA_W'(vecs[i][N-1:P2]));
    end
    foreach (pla_pos[w]) begin
      cfg_write(CFG_PLA_VEC, w, CFG_DATA_W'(vecs[pla_pos[w]]));
      cfg_write(CFG_PLA_ADDR, w, CFG_DATA_W'(index_of[pla_pos[w]]));
    end

    // 5. lookups: registered vectors
    foreach (vecs[i]) begin
      issue(vecs[i]);
      case (loc[i])
        LOC_H1:  n_h1++;
        LOC_H2:  n_h2++;
        default: n_pla++;
      endcase
    end
    // random unregistered vectors
    for (int i = 0; i < int'(NEG); i++) begin
      logic [N-1:0] x;
      do x = rand_vec(); while (idx_by_key.exists(64'(x)));
      if (hmem1[hash1(x, sel1)] != '0) n_rej1++;
      if (hmem2[hash2(x, sel2)] != '0) n_rej2++;
      if (hmem1[hash1(x, sel1)] == '0 && hmem2[hash2(x, sel2)] == '0) n_empty++;
      issue(x);
    end
    // unregistered vectors aliasing an occupied column
    for (int i = 0; i < int'(K); i += 7) begin
      automatic logic [N-1:0] x = vecs[i];
      if (loc[i] == LOC_H1) begin
        automatic int unsigned b = $urandom_range(R1 - 1);
        x[P1 + b] = ~x[P1 + b];
        for (int j = 0; j < int'(P1); j++) if (sel1[j] == b) x[j] = ~x[j];
        if (!idx_by_key.exists(64'(x))) begin n_rej1++; issue(x); end
      end else if (loc[i] == LOC_H2) begin
        automatic int unsigned b = $urandom_range(R2 - 1);
        x[P2 + b] = ~x[P2 + b];
        for (int j = 0; j < int'(P2); j++) if (sel2[j] == b) x[j] = ~x[j];
        if (!idx_by_key.exists(64'(x))) begin n_rej2++; issue(x); end
      end
    end
    idle(LAT + 2);

    // 6. reconfiguration during operation
    found = 0;
    foreach (loc[i]) if (found == 0 && loc[i] == LOC_H1) begin
      automatic logic [P1-1:0] h = hash1(vecs[i], sel1);
      cfg_write(CFG_HASH1_MEM, int'(h), '0);
      idx_by_key.delete(64'(vecs[i]));
      idle(1);
      issue(vecs[i]);
      cfg_write(CFG_HASH1_MEM, int'(h), CFG_DATA_W'(index_of[i]));
      idx_by_key[64'(vecs[i])] = index_of[i];
      idle(1);
      issue(vecs[i]);
      n_reconf++;
      found = 1;
    end
    if (pla_pos.size() > 0) begin
      automatic int i = pla_pos[0];
      cfg_write(CFG_PLA_ADDR, 0, '0);
      idx_by_key.delete(64'(vecs[i]));
      issue(vecs[i]);
      cfg_write(CFG_PLA_ADDR, 0, CFG_DATA_W'(index_of[i]));
      idx_by_key[64'(vecs[i])] = index_of[i];
      issue(vecs[i]);
      n_reconf++;
    end
    idle(LAT + 3);

    if (pend.size() != 0) begin
      failures = failures + 1;
      $display("%s: %0d lookups never answered", NAME, pend.size());
    end
    $display("%s: hits hash1=%0d hash2=%0d pla=%0d, rejected stage1=%0d stage2=%0d, empty=%0d, reconfig=%0d, latency ok=%0d",
             NAME, n_h1, n_h2, n_pla, n_rej1, n_rej2, n_empty, n_reconf, n_lat);
    if (n_h1 == 0 || n_h2 == 0 || n_pla == 0 || n_rej1 == 0 || n_rej2 == 0 || n_empty == 0 || n_reconf < 2) begin
      failures = failures + 1;
      $display("%s: a mechanism was never exercised", NAME);
    end
    checks = checks + 1;
    done = 1'b1;
  end

endmodule
