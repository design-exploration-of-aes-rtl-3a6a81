// tb_key_expander -- one key-schedule step against the reference.
// Chains ten steps from the standard's example key and compares round keys
// 1 and 10 with the published values, then compares all ten round keys of
// 100 random keys with the reference schedule.
module tb_key_expander;
  import aes_ref_pkg::*;

  logic [127:0] kin, kout;
  logic [7:0]   rc;
  int checks = 0, failures = 0;

  key_expander dut (.key_in(kin), .rcon_in(rc), .key_out(kout));

  localparam logic [7:0] RCON [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10,
                                      8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rkeys_t rk;
    logic [127:0] k;
    kin = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int r = 1; r <= 10; r++) begin
      rc = RCON[r-1];
      #1;
      if (r == 1)  check(kout, 128'ha0fafe1788542cb123a339392a6c7605, "FIPS round key 1");
      if (r == 10) check(kout, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS round key 10");
      kin = kout;
    end
    for (int i = 0; i < 100; i++) begin
      k  = rand128();
      rk = ref_expand(k);
      kin = k;
      for (int r = 1; r <= 10; r++) begin
        rc = RCON[r-1];
        #1;
        check(kout, rk[r], $sformatf("random key %0d round %0d", i, r));
        kin = kout;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
