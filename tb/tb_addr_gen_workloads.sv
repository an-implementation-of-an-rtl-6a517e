// tb_addr_gen_workloads: the vector sets the address generator is sized
// for, each loaded into its own generator and checked end to end:
//   rand1 : 1730 random 40-bit vectors, default generator (q = 11)
//   ip1   : 1730 random 32-bit addresses, zero-extended, default generator
//   list2 : 3366 words, generator with q = 12 (p1 = 13, p2 = 11), 78 PLA words
//   list3 : 4705 words, generator with q = 13 (p1 = 14, p2 = 12), 48 PLA words
// The 1730-word list at the default size is tb_addr_gen_top.
module tb_addr_gen_workloads;
  import addr_gen_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_req_t     cfg_r, cfg_i, cfg_2, cfg_3;
  logic         iv_r, iv_i, iv_2, iv_3, ov_r, ov_i, ov_2, ov_3;
  logic         d_r, d_i, d_2, d_3;
  logic [39:0]  x_r, x_i, x_2, x_3;
  logic [10:0]  a_r, a_i;
  logic [11:0]  a_2;
  logic [12:0]  a_3;
  int           c_r, c_i, c_2, c_3, f_r, f_i, f_2, f_3;

  addr_gen_top u_rand (.clk, .rst_n, .cfg(cfg_r), .in_valid(iv_r), .in_vec(x_r), .out_valid(ov_r), .out_addr(a_r));
  addr_gen_driver #(.K(1730), .WORD_MODE(1'b0), .NAME("rand1")) d_rand (
    .clk, .rst_n, .cfg(cfg_r), .in_valid(iv_r), .in_vec(x_r), .out_valid(ov_r), .out_addr(a_r),
    .done(d_r), .checks(c_r), .failures(f_r));

  addr_gen_top u_ip (.clk, .rst_n, .cfg(cfg_i), .in_valid(iv_i), .in_vec(x_i), .out_valid(ov_i), .out_addr(a_i));
  addr_gen_driver #(.K(1730), .WORD_MODE(1'b0), .VEC_BITS(32), .NAME("ip1")) d_ip (
    .clk, .rst_n, .cfg(cfg_i), .in_valid(iv_i), .in_vec(x_i), .out_valid(ov_i), .out_addr(a_i),
    .done(d_i), .checks(c_i), .failures(f_i));

  addr_gen_top #(.Q(12), .PLA_WORDS(78)) u_l2 (.clk, .rst_n, .cfg(cfg_2), .in_valid(iv_2), .in_vec(x_2), .out_valid(ov_2), .out_addr(a_2));
  addr_gen_driver #(.Q(12), .PLA_WORDS(78), .K(3366), .NAME("list2")) d_l2 (
    .clk, .rst_n, .cfg(cfg_2), .in_valid(iv_2), .in_vec(x_2), .out_valid(ov_2), .out_addr(a_2),
    .done(d_2), .checks(c_2), .failures(f_2));

  addr_gen_top #(.Q(13), .PLA_WORDS(48)) u_l3 (.clk, .rst_n, .cfg(cfg_3), .in_valid(iv_3), .in_vec(x_3), .out_valid(ov_3), .out_addr(a_3));
  addr_gen_driver #(.Q(13), .PLA_WORDS(48), .K(4705), .NAME("list3")) d_l3 (
    .clk, .rst_n, .cfg(cfg_3), .in_valid(iv_3), .in_vec(x_3), .out_valid(ov_3), .out_addr(a_3),
    .done(d_3), .checks(c_3), .failures(f_3));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d_r && d_i && d_2 && d_3);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c_r + c_i + c_2 + c_3, f_r + f_i + f_2 + f_3);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", c_r + c_i + c_2 + c_3, f_r + f_i + f_2 + f_3 + 1);
    $finish;
  end
endmodule
