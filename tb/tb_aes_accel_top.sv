// tb_aes_accel_top -- end-to-end test of the four-lane accelerator.
// Banks are reduced to 256 words (64 blocks) to keep the run short; the
// clocks are 33 MHz (memory) and 70 MHz (cores), the rates of the target
// board. Four jobs:
//   1. encrypt 60 blocks per bank; every bank word is compared with an
//      independent CTR computation over the whole stream (bank l holds
//      stream blocks l*60 .. l*60+59), and words past block 59 must be
//      untouched;
//   2. run the same job again: the plaintext must come back (CTR mode
//      decrypts with the forward cipher);
//   3. a job of 0 blocks finishes at once;
//   4. a whole-bank job (64 blocks) with a new key, checked again.
// Rate checks: each lane's cipher starts are never closer than 33 core
// cycles, most of them exactly 33 apart once the input FIFO is primed,
// and the throughput derived from the on-board timer is at least
// 1000 Mb/s. Mechanisms counted (a failure if one never happens):
// semaphore contention between fetch and write-back on a bank, fetch
// waiting on a full input FIFO, a bank read while the lane's AES processor
// is encrypting (fetch overlapping encryption), all four processors busy
// at once, and a CTR round trip restoring the data.
module tb_aes_accel_top;
  import aes_ref_pkg::*;

  localparam int L     = 4;
  localparam int AW    = 8;
  localparam int IDX_W = AW - 2;

  logic clk_mem = 0, clk_core = 0, rst_mem_n = 0, rst_core_n = 0;
  logic host_start = 0, host_busy, host_done;
  logic [127:0] host_key = '0, host_ctr_seed = '0;
  logic [IDX_W:0] host_blocks_per_bank = '0;
  logic [31:0] host_cycles;
  logic [L-1:0][AW-1:0] bank_addr;
  logic [L-1:0] bank_re, bank_we;
  logic [L-1:0][31:0] bank_wdata, bank_rdata;
  int checks = 0, failures = 0;

  aes_accel_top #(.NUM_LANES(L), .BANK_AW(AW), .FIFO_DEPTH(4)) dut (.*);

  for (genvar l = 0; l < L; l++) begin : g_bank
    sram_bank_model #(.AW(AW)) u_bank (.clk(clk_mem), .addr(bank_addr[l]), .re(bank_re[l]),
                                       .we(bank_we[l]), .wdata(bank_wdata[l]),
                                       .rdata(bank_rdata[l]));
  end

  always #15.151 clk_mem  = ~clk_mem;    // 33 MHz
  always #7.143  clk_core = ~clk_core;   // 70 MHz

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

  // ---------------- mechanism monitors ----------------
  int n_contention = 0, n_fifo_full_wait = 0, n_overlap = 0, n_all_busy = 0;
  int n_roundtrip = 0;
  int core_cyc = 0;
  int min_gap [L];
  int gap33 [L];
  int starts [L];
  int last_start [L];

  always @(posedge clk_mem) begin
    for (int l = 0; l < L; l++)
      if (dut.ret_req[l] && dut.sto_req[l]) n_contention++;
  end

  logic [L-1:0] fifo_wait, overlap, pbusy, cstart;
  for (genvar l = 0; l < L; l++) begin : g_mon
    assign fifo_wait[l] = dut.g_lane[l].in_full && !dut.g_lane[l].ret_done
                          && !dut.ret_req[l];
    assign overlap[l]   = bank_re[l] && dut.g_lane[l].proc_busy;
    assign pbusy[l]     = dut.g_lane[l].proc_busy;
    assign cstart[l]    = dut.g_lane[l].u_proc.cipher_start;
  end

  always @(posedge clk_mem) begin
    if (|fifo_wait) n_fifo_full_wait++;
    if (|overlap)   n_overlap++;
  end

  always @(posedge clk_core) begin
    core_cyc++;
    if (&pbusy) n_all_busy++;
    for (int l = 0; l < L; l++) if (cstart[l]) begin
      if (starts[l] > 0) begin
        if (core_cyc - last_start[l] < min_gap[l]) min_gap[l] = core_cyc - last_start[l];
        if (core_cyc - last_start[l] == 33) gap33[l]++;
      end
      starts[l]++;
      last_start[l] = core_cyc;
    end
  end

  // ---------------- helpers ----------------
  logic [127:0] image [L][2**IDX_W];   // expected bank contents, block view

  function automatic logic [127:0] bank_block(input int l, input int b);
    case (l)
      0: return {g_bank[0].u_bank.mem[4*b], g_bank[0].u_bank.mem[4*b+1], g_bank[0].u_bank.mem[4*b+2], g_bank[0].u_bank.mem[4*b+3]};
      1: return {g_bank[1].u_bank.mem[4*b], g_bank[1].u_bank.mem[4*b+1], g_bank[1].u_bank.mem[4*b+2], g_bank[1].u_bank.mem[4*b+3]};
      2: return {g_bank[2].u_bank.mem[4*b], g_bank[2].u_bank.mem[4*b+1], g_bank[2].u_bank.mem[4*b+2], g_bank[2].u_bank.mem[4*b+3]};
      default: return {g_bank[3].u_bank.mem[4*b], g_bank[3].u_bank.mem[4*b+1], g_bank[3].u_bank.mem[4*b+2], g_bank[3].u_bank.mem[4*b+3]};
    endcase
  endfunction

  task automatic fill_banks();
    for (int w = 0; w < 2**AW; w++) begin
      g_bank[0].u_bank.mem[w] = $urandom();
      g_bank[1].u_bank.mem[w] = $urandom();
      g_bank[2].u_bank.mem[w] = $urandom();
      g_bank[3].u_bank.mem[w] = $urandom();
    end
    for (int l = 0; l < L; l++)
      for (int b = 0; b < 2**IDX_W; b++) image[l][b] = bank_block(l, b);
  endtask

  // Expected result of a job: CTR over the stream, block s = l*n + b.
  task automatic expect_job(input logic [127:0] key, input logic [127:0] seed, input int n);
    rkeys_t rk = ref_expand(key);
    for (int l = 0; l < L; l++)
      for (int b = 0; b < n; b++)
        image[l][b] ^= ref_encrypt_rk(rk, seed + 128'(l * n + b));
  endtask

  task automatic run_job(input logic [127:0] key, input logic [127:0] seed, input int n,
                         output int cycles);
    int guard = 0;
    @(negedge clk_mem);
    host_key = key; host_ctr_seed = seed; host_blocks_per_bank = (IDX_W+1)'(n);
    host_start = 1;
    @(negedge clk_mem);
    host_start = 0;
    host_key = '0;            // registers must hold the job's values
    while (!host_done && guard < 100000) begin @(negedge clk_mem); guard++; end
    check(host_done === 1'b1 && !host_busy, $sformatf("job of %0d blocks finished", n));
    cycles = host_cycles;
  endtask

  task automatic compare_banks(input string tag);
    int bad = 0;
    for (int l = 0; l < L; l++)
      for (int b = 0; b < 2**IDX_W; b++) begin
        checks++;
        if (bank_block(l, b) !== image[l][b]) begin
          failures++; bad++;
          if (bad < 6) $display("FAIL %s: bank %0d block %0d = %h expected %h",
                                tag, l, b, bank_block(l, b), image[l][b]);
        end
      end
  endtask

  initial begin
    logic [127:0] key, seed;
    logic [127:0] plain [L][2**IDX_W];
    int cyc;
    real mbps;
    for (int l = 0; l < L; l++) begin min_gap[l] = 1 << 30; gap33[l] = 0; starts[l] = 0; end
    // Load the banks once reset has taken hold of the memory-side logic.
    repeat (4) @(negedge clk_mem);
    fill_banks();
    plain = image;
    rst_mem_n = 1; rst_core_n = 1;
    repeat (4) @(negedge clk_mem);

    // 1. encrypt
    key  = rand128();
    seed = {rand128()} | {64'hffffffff_ffffffff, 64'h0};
    expect_job(key, seed, 60);
    run_job(key, seed, 60, cyc);
    compare_banks("encrypt");
    mbps = (4.0 * 60 * 128) / (real'(cyc) / 33.0);   // bits per microsecond
    $display("job 1: %0d memory cycles, %0.1f Mb/s", cyc, mbps);

    // 2. decrypt (same job again)
    run_job(key, seed, 60, cyc);
    image = plain;
    begin
      int ok = 1;
      for (int l = 0; l < L; l++)
        for (int b = 0; b < 2**IDX_W; b++) if (bank_block(l, b) !== plain[l][b]) ok = 0;
      if (ok) n_roundtrip++;
    end
    compare_banks("decrypt");

    // 3. empty job
    run_job(key, seed, 0, cyc);
    check(cyc < 10, $sformatf("empty job took %0d cycles", cyc));
    compare_banks("empty job");

    // 4. whole banks, new key
    for (int l = 0; l < L; l++) begin min_gap[l] = 1 << 30; gap33[l] = 0; starts[l] = 0; end
    key  = rand128();
    seed = rand128();
    expect_job(key, seed, 2**IDX_W);
    run_job(key, seed, 2**IDX_W, cyc);
    compare_banks("whole bank");
    mbps = (4.0 * (2**IDX_W) * 128) / (real'(cyc) / 33.0);
    $display("job 4: %0d memory cycles, %0.1f Mb/s", cyc, mbps);
    check(mbps >= 1000.0, $sformatf("throughput %0.1f Mb/s below 1000", mbps));
    for (int l = 0; l < L; l++) begin
      check(starts[l] == 2**IDX_W, $sformatf("lane %0d started %0d blocks", l, starts[l]));
      check(min_gap[l] >= 33, $sformatf("lane %0d blocks %0d cycles apart", l, min_gap[l]));
      check(gap33[l] >= (2**IDX_W) * 3 / 4,
            $sformatf("lane %0d: only %0d of %0d blocks back to back", l, gap33[l], starts[l]));
    end

    $display("mechanisms: contention=%0d fifo_full_wait=%0d overlap=%0d all_busy=%0d roundtrip=%0d",
             n_contention, n_fifo_full_wait, n_overlap, n_all_busy, n_roundtrip);
    check(n_contention > 0,     "semaphore contention never happened");
    check(n_fifo_full_wait > 0, "fetch never waited on a full FIFO");
    check(n_overlap > 0,        "fetch never overlapped encryption");
    check(n_all_busy > 0,       "four processors never busy together");
    check(n_roundtrip > 0,      "CTR round trip did not restore the data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
