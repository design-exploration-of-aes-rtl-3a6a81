// tb_bank_semaphore -- mutual exclusion between two requesters.
// Directed cases: grant one edge after a request on a free bank, the
// grant held while req stays high, hand-over on release, alternation when
// both wait. Then random request traffic with a cycle model of the
// expected owner, checking both grants every cycle.
module tb_bank_semaphore;
  logic clk = 0, rst_n = 0;
  logic req_a = 0, req_b = 0, gnt_a, gnt_b;
  int checks = 0, failures = 0;

  bank_semaphore dut (.clk, .rst_n, .req_a, .req_b, .gnt_a, .gnt_b);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model: 0 none, 1 A, 2 B.
  int own = 0;
  bit lastb = 0;
  bit use_model = 0;
  always @(posedge clk) if (use_model) begin
    int nx;
    nx = own;
    if (own == 1 && !req_a) nx = 0;
    if (own == 2 && !req_b) nx = 0;
    if (nx == 0) begin
      if (req_a && req_b) nx = lastb ? 1 : 2;
      else if (req_a) nx = 1;
      else if (req_b) nx = 2;
    end
    own <= nx;
    if (nx == 1) lastb <= 0;
    if (nx == 2) lastb <= 1;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!gnt_a && !gnt_b, "idle after reset");
    req_a = 1;
    @(negedge clk);
    check(gnt_a && !gnt_b, "A granted next edge");
    req_b = 1;
    repeat (3) @(negedge clk);
    check(gnt_a && !gnt_b, "A keeps the bank while requesting");
    req_a = 0;
    @(negedge clk);
    check(!gnt_a && gnt_b, "hand-over to waiting B");
    req_a = 1;
    @(negedge clk);
    req_b = 0;
    @(negedge clk);
    check(gnt_a && !gnt_b, "back to A");
    req_a = 0;
    @(negedge clk);
    check(!gnt_a && !gnt_b, "free");
    req_a = 1; req_b = 1;     // both at once; A held the bank last
    @(negedge clk);
    check(gnt_b && !gnt_a, "simultaneous: the one not last served wins (B)");
    req_b = 0;
    @(negedge clk);
    check(gnt_a, "A after B");
    // Random traffic against the model.
    req_a = 0; req_b = 0;
    repeat (3) @(negedge clk);
    own = 0;
    lastb = 0;
    use_model = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(gnt_a == (own == 1) && gnt_b == (own == 2),
            $sformatf("cycle %0d: gnt %b%b model %0d", i, gnt_a, gnt_b, own));
      check(!(gnt_a && gnt_b), "exclusive");
      if ($urandom_range(0, 3) == 0) req_a = ~req_a;
      if ($urandom_range(0, 3) == 0) req_b = ~req_b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
