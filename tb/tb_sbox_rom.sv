// tb_sbox_rom -- exhaustive check of the S-box ROM.
// All 256 addresses are compared with the reference S-box, which is built
// by a different method (inverse by search, affine by rotations), and four
// entries with the standard's published values.
module tb_sbox_rom;
  import aes_ref_pkg::*;

  logic [7:0] addr, data;
  int checks = 0, failures = 0;

  sbox_rom dut (.addr(addr), .data(data));

  task automatic expect_eq(input logic [7:0] a, input logic [7:0] exp);
    addr = a;
    #1;
    checks++;
    if (data !== exp) begin
      failures++;
      $display("FAIL S(%02h) = %02h, expected %02h", a, data, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_eq(8'h00, 8'h63);
    expect_eq(8'h01, 8'h7c);
    expect_eq(8'h53, 8'hed);
    expect_eq(8'hff, 8'h16);
    for (int i = 0; i < 256; i++) expect_eq(8'(i), sb(8'(i)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
