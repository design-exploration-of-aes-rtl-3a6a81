// tb_mem_retrieve -- the fetch side of one lane.
// An SRAM model holds random data; the testbench grants the semaphore
// after a random delay, holds the FIFO full at random times, and records
// every push. Checks: each block arrives once, in order, with its index
// and the four words of that block (first word most significant); reads
// only while granted; no push into a full FIFO; done after n blocks; a
// second job and an empty job (n = 0) behave.
module tb_mem_retrieve;
  localparam int AW    = 8;
  localparam int IDX_W = AW - 2;

  logic clk = 0, rst_n = 0;
  logic start = 0, done;
  logic [IDX_W:0] n_blocks = '0;
  logic sem_req, sem_gnt = 0;
  logic [AW-1:0] mem_addr;
  logic mem_re;
  logic [31:0] mem_rdata;
  logic fifo_full, fifo_wr;
  logic [IDX_W+127:0] fifo_wdata;
  int checks = 0, failures = 0;
  logic [IDX_W+127:0] got [$];
  int full_pct = 0, full_waits = 0;

  mem_retrieve #(.BANK_AW(AW)) dut (
    .clk, .rst_n, .start, .n_blocks, .done, .sem_req, .sem_gnt,
    .mem_addr, .mem_re, .mem_rdata, .fifo_full, .fifo_wr, .fifo_wdata);

  sram_bank_model #(.AW(AW)) u_bank (.clk, .addr(mem_addr), .re(mem_re), .we(1'b0),
                                     .wdata('0), .rdata(mem_rdata));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Semaphore stand-in: grant 0-3 cycles after request, drop on release.
  always @(posedge clk) begin
    if (!sem_req) sem_gnt <= 0;
    else if (!sem_gnt && $urandom_range(0, 3) == 0) sem_gnt <= 1;
  end
  // FIFO stand-in: FDEPTH entries, drained at a random rate set by
  // full_pct (higher = slower consumer).
  localparam int FDEPTH = 2;
  int fcount = 0;
  always @(posedge clk) begin
    int c;
    c = fcount;
    if (fifo_wr && !fifo_full) c++;
    if (c > 0 && int'($urandom_range(0, 99)) >= full_pct) c--;
    fcount <= c;
  end
  assign fifo_full = (fcount >= FDEPTH);
  always @(negedge clk) if (fifo_full && !sem_req && !done) full_waits++;
  always @(posedge clk) begin
    if (mem_re && !sem_gnt) begin failures++; $display("FAIL read without grant"); end
    if (fifo_wr) begin
      if (fifo_full) begin failures++; $display("FAIL push while full"); end
      got.push_back(fifo_wdata);
    end
  end

  task automatic run_job(input int n);
    int guard = 0;
    got.delete();
    @(negedge clk);
    n_blocks = (IDX_W+1)'(n);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done && guard < 20000) begin @(negedge clk); guard++; end
    check(done === 1'b1, "job finished");
    check(got.size() == n, $sformatf("%0d blocks pushed, expected %0d", got.size(), n));
    for (int b = 0; b < got.size(); b++) begin
      logic [127:0] exp;
      exp = {u_bank.mem[4*b], u_bank.mem[4*b+1], u_bank.mem[4*b+2], u_bank.mem[4*b+3]};
      check(got[b] === {IDX_W'(b), exp}, $sformatf("block %0d", b));
    end
  endtask

  initial begin
    for (int i = 0; i < 2**AW; i++) u_bank.mem[i] = $urandom();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(done === 1'b1, "idle is done after reset");
    full_pct = 90;
    run_job(2**IDX_W);        // whole bank
    full_pct = 0;
    run_job(5);
    run_job(0);
    check(full_waits > 0, "waited on a full FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
