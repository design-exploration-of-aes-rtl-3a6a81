// tb_control_ram_if -- job control and bank port multiplexing.
// Checks: job registers latched on host_start and ignored while busy;
// lane_start pulses once, one cycle after the start; lane_base[l] =
// l * blocks; busy until every lane's store block is done, then done is
// sticky; host_cycles counts the job's cycles; each bank port carries the
// retrieve block's read or the store block's write only while that block
// holds the bank's semaphore, and read data reaches the retrieve block.
module tb_control_ram_if;
  import aes_pkg::*;
  localparam int L = 4, AW = 8, IDX_W = AW - 2, LB_W = IDX_W + 2;

  logic clk = 0, rst_n = 0;
  logic host_start = 0, host_busy, host_done;
  logic [127:0] host_key = '0, host_ctr_seed = '0;
  logic [IDX_W:0] host_blocks_per_bank = '0;
  logic [31:0] host_cycles;
  logic lane_start;
  logic [IDX_W:0] cfg_blocks;
  logic [127:0] cfg_key, cfg_ctr_seed;
  logic [L-1:0][LB_W-1:0] lane_base;
  logic [L-1:0] store_done = '1;
  logic [L-1:0] ret_req = '0, ret_gnt, ret_re = '0;
  logic [L-1:0][AW-1:0] ret_addr = '0, sto_addr = '0, bank_addr;
  logic [L-1:0][31:0] ret_rdata, sto_wdata = '0, bank_wdata, bank_rdata = '0;
  logic [L-1:0] sto_req = '0, sto_gnt, sto_we = '0, bank_re, bank_we;
  int checks = 0, failures = 0;
  int starts = 0;

  control_ram_if #(.NUM_LANES(L), .BANK_AW(AW)) dut (.*);

  always #5 clk = ~clk;
  int busy_cycles = 0;
  always @(posedge clk) begin
    if (lane_start) starts++;
    #1 if (host_busy) busy_cycles++;   // state after the edge
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!host_busy && !host_done && !lane_start, "idle after reset");
    host_key = 128'h1111; host_ctr_seed = 128'h2222; host_blocks_per_bank = 7'd13;
    host_start = 1;
    @(negedge clk);
    host_start = 0;
    host_key = 128'h9999;
    check(host_busy && lane_start, "lane_start one cycle after host_start");
    check(cfg_key == 128'h1111 && cfg_ctr_seed == 128'h2222 && cfg_blocks == 13, "job registers");
    for (int l = 0; l < L; l++)
      check(lane_base[l] == LB_W'(13 * l), $sformatf("lane_base[%0d] = %0d", l, lane_base[l]));
    store_done = '0;            // lanes react to lane_start
    @(negedge clk);
    check(!lane_start, "lane_start is a single pulse");
    // A start while busy is ignored.
    host_start = 1; host_blocks_per_bank = 7'd5;
    @(negedge clk);
    host_start = 0;
    check(cfg_blocks == 13 && cfg_key == 128'h1111, "start ignored while busy");
    // Bank muxing: lane 2 retrieve gets the bank.
    ret_req[2] = 1;
    @(negedge clk);
    check(ret_gnt[2] && !sto_gnt[2], "retrieve granted");
    ret_re[2] = 1; ret_addr[2] = 8'h5a; sto_we[2] = 1; sto_addr[2] = 8'h33;
    bank_rdata[2] = 32'hcafef00d;
    #1;
    check(bank_re[2] && !bank_we[2] && bank_addr[2] == 8'h5a, "bank follows retrieve");
    check(ret_rdata[2] == 32'hcafef00d, "read data to retrieve");
    sto_req[2] = 1;
    @(negedge clk);
    check(ret_gnt[2] && !sto_gnt[2], "store waits while retrieve holds the bank");
    ret_req[2] = 0; ret_re[2] = 0;
    @(negedge clk);
    sto_wdata[2] = 32'h12345678;
    #1;
    check(sto_gnt[2] && bank_we[2] && !bank_re[2] && bank_addr[2] == 8'h33
          && bank_wdata[2] == 32'h12345678, "bank follows store after hand-over");
    check(!bank_we[1] && !bank_re[1] && !bank_we[3], "other banks quiet");
    sto_req[2] = 0; sto_we[2] = 0;
    // Finish lanes one by one.
    repeat (5) @(negedge clk);
    store_done = 4'b0111;
    repeat (3) @(negedge clk);
    check(host_busy && !host_done, "busy until the last lane is done");
    store_done = 4'b1111;
    @(negedge clk);
    check(!host_busy && host_done, "done after all lanes");
    // Timer: one count per edge taken while busy.
    check(host_cycles == 32'(busy_cycles),
          $sformatf("timer %0d cycles, expected %0d", host_cycles, busy_cycles));
    repeat (3) @(negedge clk);
    check(host_done && host_cycles == 32'(busy_cycles), "done and timer held");
    check(starts == 1, "one lane_start per job");
    // Second job clears done.
    host_start = 1;
    @(negedge clk);
    host_start = 0;
    check(!host_done && host_busy && cfg_blocks == 5, "second job accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
