// tb_sub_shift -- SubBytes+ShiftRows against the reference model.
// One vector from the standard's worked example (round 1 of the cipher
// example) and 500 random states.
module tb_sub_shift;
  import aes_ref_pkg::*;

  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  sub_shift dut (.state_in(din), .state_out(dout));

  task automatic expect_eq(input logic [127:0] d, input logic [127:0] exp);
    din = d;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL in=%032h out=%032h exp=%032h", d, dout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] r;
    // Start of round 1 -> after ShiftRows (FIPS-197 Appendix B).
    expect_eq(128'h193de3bea0f4e22b9ac68d2ae9f84808,
              128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int i = 0; i < 500; i++) begin
      r = rand128();
      expect_eq(r, ref_shiftrows(ref_subbytes(r)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
