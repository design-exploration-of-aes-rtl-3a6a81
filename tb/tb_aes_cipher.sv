// tb_aes_cipher -- block cipher timing and function.
// Checks the standard's two AES-128 example vectors, 200 random
// key/plaintext pairs against the reference model, and that every block
// takes exactly 33 clock edges from the edge that samples start to the
// edge after which done is high. Blocks are issued back to back (start
// raised again in the done cycle) and also with idle gaps.
module tb_aes_cipher;
  import aes_ref_pkg::*;

  localparam int LATENCY = 33;

  logic         clk = 0, rst_n = 0;
  logic         start = 0;
  logic [127:0] key = '0, blk_in = '0;
  logic         ready, done;
  logic [127:0] blk_out;
  int checks = 0, failures = 0;
  int cyc = 0;

  aes_cipher dut (.clk, .rst_n, .start, .key, .blk_in, .ready, .done, .blk_out);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Runs one block; start is sampled at the next edge.
  task automatic run(input logic [127:0] k, input logic [127:0] pt,
                     input logic [127:0] exp, input int gap);
    int t0;
    repeat (gap) @(negedge clk);
    @(negedge clk);
    check(ready === 1'b1, "ready before start");
    key = k; blk_in = pt; start = 1;
    @(negedge clk);
    t0 = cyc;                  // edge count including the start edge
    start = 0;
    key = '0; blk_in = '0;     // inputs must have been captured
    while (!done) @(negedge clk);
    check(cyc - t0 + 1 == LATENCY, $sformatf("latency %0d, expected %0d", cyc - t0 + 1, LATENCY));
    check(blk_out === exp, $sformatf("ct %032h expected %032h", blk_out, exp));
    // Result must persist after the done pulse.
    @(negedge clk);
    check(!done && blk_out === exp, "done is a pulse, result held");
  endtask

  initial begin
    logic [127:0] k, p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32, 2);
    for (int i = 0; i < 200; i++) begin
      k = rand128(); p = rand128();
      run(k, p, ref_encrypt(k, p), (i % 3 == 0) ? 0 : int'($urandom_range(0, 3)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
