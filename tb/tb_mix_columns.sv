// tb_mix_columns -- MixColumns against the reference model.
// The standard's worked example column vectors plus 500 random states.
module tb_mix_columns;
  import aes_ref_pkg::*;

  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  mix_columns dut (.state_in(din), .state_out(dout));

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
    // FIPS-197 Appendix B, round 1: after ShiftRows -> after MixColumns.
    expect_eq(128'hd4bf5d30e0b452aeb84111f11e2798e5,
              128'h046681e5e0cb199a48f8d37a2806264c);
    // Classic column test vectors.
    expect_eq({32'hdb135345, 32'hf20a225c, 32'h01010101, 32'hc6c6c6c6},
              {32'h8e4da1bc, 32'h9fdc589d, 32'h01010101, 32'hc6c6c6c6});
    for (int i = 0; i < 500; i++) begin
      r = rand128();
      expect_eq(r, ref_mixcolumns(r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
