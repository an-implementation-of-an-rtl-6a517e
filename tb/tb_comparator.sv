// tb_comparator: drives the comparator at its default size (q = 11, 28-bit
// X2) with equal, nearly equal (one bit flipped) and random X2 pairs and with
// zero and non-zero indices; the output must be the index exactly when the
// index is non-zero and the two X2 values agree.
module tb_comparator;
  localparam int Q = 11, R = 28;
  logic [Q-1:0] index, addr;
  logic [R-1:0] aux_x2, x2;
  logic hit;
  int checks = 0, failures = 0;

  comparator dut (.index, .aux_x2, .x2, .addr, .hit);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic eq;
      index  = (n % 10 == 0) ? '0 : Q'($urandom);
      x2     = R'($urandom);
      case (n % 3)
        0: aux_x2 = x2;
        1: aux_x2 = x2 ^ (R'(1) << $urandom_range(R - 1));
        default: aux_x2 = R'($urandom);
      endcase
      #1;
      eq = 1'b1;
      for (int b = 0; b < R; b++) if (aux_x2[b] != x2[b]) eq = 1'b0;
      checks++;
      if (eq && index != 0) begin
        if (addr !== index || hit !== 1'b1) failures++;
      end else begin
        if (addr !== '0 || hit !== 1'b0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
