// tb_mem_store -- the write-back side of one lane.
// A FIFO model supplies tagged blocks in a shuffled index order with
// random gaps between them; the semaphore is granted after random delays. Checks: every
// block lands at word addresses 4*idx..4*idx+3, first word most
// significant; words of blocks not sent are untouched; writes happen only
// while granted; done only after n blocks; FIFO entries popped exactly
// once.
module tb_mem_store;
  localparam int AW    = 8;
  localparam int IDX_W = AW - 2;

  logic clk = 0, rst_n = 0;
  logic start = 0, done;
  logic [IDX_W:0] n_blocks = '0;
  logic sem_req, sem_gnt = 0;
  logic [AW-1:0] mem_addr;
  logic mem_we;
  logic [31:0] mem_wdata, rdata_unused;
  logic fifo_empty, fifo_rd;
  logic [IDX_W+127:0] fifo_rdata;
  int checks = 0, failures = 0;
  logic [IDX_W+127:0] q [$];
  logic [31:0] init_mem [2**AW];

  mem_store #(.BANK_AW(AW)) dut (
    .clk, .rst_n, .start, .n_blocks, .done, .sem_req, .sem_gnt,
    .mem_addr, .mem_we, .mem_wdata, .fifo_empty, .fifo_rdata, .fifo_rd);

  sram_bank_model #(.AW(AW)) u_bank (.clk, .addr(mem_addr), .re(1'b0), .we(mem_we),
                                     .wdata(mem_wdata), .rdata(rdata_unused));

  always #5 clk = ~clk;

  assign fifo_empty = (q.size() == 0);
  assign fifo_rdata = (q.size() != 0) ? q[0] : '0;

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

  always @(posedge clk) begin
    if (!sem_req) sem_gnt <= 0;
    else if (!sem_gnt && $urandom_range(0, 2) == 0) sem_gnt <= 1;
    if (mem_we && !sem_gnt) begin failures++; $display("FAIL write without grant"); end
    if (fifo_rd) begin
      if (fifo_empty) begin failures++; $display("FAIL pop while empty"); end
      else void'(q.pop_front());
    end
  end

  initial begin
    int order [$];
    logic [127:0] data [2**IDX_W];
    int n;
    for (int i = 0; i < 2**AW; i++) begin
      u_bank.mem[i] = $urandom();
      init_mem[i] = u_bank.mem[i];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    n = 40;
    for (int i = 0; i < 2**IDX_W; i++) if (i % 3 != 1) order.push_back(i);
    order.shuffle();
    while (order.size() > n) void'(order.pop_back());
    @(negedge clk);
    n_blocks = (IDX_W+1)'(n);
    start = 1;
    @(negedge clk);
    start = 0;
    foreach (order[j]) begin
      data[order[j]] = aes_ref_pkg::rand128();
      q.push_back({IDX_W'(order[j]), data[order[j]]});
      repeat ($urandom_range(0, 8)) @(negedge clk);   // gaps in the supply
    end
    begin
      int guard = 0;
      while (!done && guard < 20000) begin @(negedge clk); guard++; end
    end
    check(done === 1'b1, "job finished");
    check(q.size() == 0, "every entry popped");
    for (int b = 0; b < 2**IDX_W; b++) begin
      logic [127:0] m, exp;
      bit sent;
      sent = 0;
      foreach (order[j]) if (order[j] == b) sent = 1;
      m = {u_bank.mem[4*b], u_bank.mem[4*b+1], u_bank.mem[4*b+2], u_bank.mem[4*b+3]};
      exp = sent ? data[b] : {init_mem[4*b], init_mem[4*b+1], init_mem[4*b+2], init_mem[4*b+3]};
      check(m === exp, $sformatf("block %0d (%s)", b, sent ? "written" : "untouched"));
    end
    // done must not rise early: a job of 3 with only 2 entries supplied
    @(negedge clk);
    n_blocks = 3; start = 1;
    @(negedge clk);
    start = 0;
    q.push_back({IDX_W'(1), 128'h1}); q.push_back({IDX_W'(2), 128'h2});
    repeat (60) @(negedge clk);
    check(done === 1'b0, "not done with a block missing");
    q.push_back({IDX_W'(3), 128'h3});
    repeat (60) @(negedge clk);
    check(done === 1'b1, "done once the last block is written");
    check(u_bank.mem[15] === 32'h3, "last block written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
