// tb_async_fifo -- dual-clock FIFO with unrelated clocks.
// Writer on a 30.3 ns clock, reader on a 14.3 ns clock (then swapped
// speeds by throttling), random push/pop attempts that respect full and
// empty. Checks every popped word against a queue model, that the FIFO
// reports full after DEPTH pushes with no pops, that empty comes back
// after draining, and that nothing is lost or duplicated.
module tb_async_fifo;
  localparam int W = 40;
  localparam int D = 4;

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr = 0, rd = 0, full, empty;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int pushed = 0, popped = 0;
  int wr_pct = 50, rd_pct = 50;
  bit  run_rand = 0;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.wclk, .wrst_n, .wr, .wdata, .full,
                                          .rclk, .rrst_n, .rd, .rdata, .empty);

  always #15.15 wclk = ~wclk;
  always #7.14  rclk = ~rclk;

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

  // writer
  always @(negedge wclk) begin
    if (run_rand && wrst_n) begin
      if (!full && int'($urandom_range(0, 99)) < wr_pct) begin
        wr    = 1;
        wdata = {$urandom(), 8'($urandom())};
      end else wr = 0;
    end
  end
  always @(posedge wclk) if (wr && !full) begin model.push_back(wdata); pushed++; end

  // reader
  always @(negedge rclk) begin
    if (run_rand && rrst_n) rd = !empty && int'($urandom_range(0, 99)) < rd_pct;
  end
  always @(posedge rclk) if (rd && !empty) begin
    popped++;
    check(model.size() > 0, "pop with empty model");
    if (model.size() > 0) begin
      logic [W-1:0] e;
      e = model.pop_front();
      check(rdata === e, $sformatf("pop %0d got %h expected %h", popped, rdata, e));
    end
  end

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    repeat (3) @(posedge wclk);
    check(empty === 1'b1 && full === 1'b0, "empty and not full after reset");
    // Fill without reading.
    for (int i = 0; i < D; i++) begin
      @(negedge wclk);
      check(!full, $sformatf("not full after %0d pushes", i));
      wr = 1; wdata = W'(100 + i);
    end
    @(negedge wclk); wr = 0;
    check(full === 1'b1, "full after DEPTH pushes");
    repeat (4) @(posedge rclk);
    check(!empty, "reader sees data");
    // Drain.
    while (!empty) begin
      @(negedge rclk); rd = 1;
      @(negedge rclk); rd = 0;
    end
    repeat (4) @(posedge wclk);
    check(!full && model.size() == 0, "drained");
    // Random traffic, three rate mixes.
    run_rand = 1;
    wr_pct = 90; rd_pct = 20; repeat (600) @(posedge rclk);
    wr_pct = 30; rd_pct = 90; repeat (600) @(posedge rclk);
    wr_pct = 60; rd_pct = 60; repeat (1200) @(posedge rclk);
    run_rand = 0;
    @(negedge wclk); wr = 0;
    // Drain the rest.
    repeat (10) @(posedge rclk);
    while (!empty) begin
      @(negedge rclk); rd = 1;
      @(negedge rclk); rd = 0;
    end
    repeat (10) @(posedge rclk);
    check(model.size() == 0, $sformatf("%0d words lost", model.size()));
    check(pushed == popped && pushed > 300, $sformatf("pushed %0d popped %0d", pushed, popped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
