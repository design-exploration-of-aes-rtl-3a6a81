// tb_aes_accel_bench -- benchmark run: repeated jobs at several core clock
// frequencies, each checked for correctness.
// Banks are reduced to 1024 words (256 blocks). The memory clock stays at
// 33 MHz. The core clock is set to 70, 50 and 35 MHz, and to 140 MHz,
// where the memory side becomes the limit. At each frequency five jobs run
// back to back (20 in all), alternating encryption and decryption with
// the same key and seed. Every job's result is compared with the
// reference CTR stream, and the decrypting jobs must restore the original
// data. The throughput measured with the on-board timer must be at least
// 95% of the core bound 4 x 128 bit x f_core / 33 at 70 MHz and below,
// and at 140 MHz it must beat the 70 MHz figure.
module tb_aes_accel_bench;
  import aes_ref_pkg::*;

  localparam int L      = 4;
  localparam int AW     = 10;
  localparam int IDX_W  = AW - 2;
  localparam int BLOCKS = 2**IDX_W;

  logic clk_mem = 0, clk_core = 0, rst_mem_n = 0, rst_core_n = 0;
  logic host_start = 0, host_busy, host_done;
  logic [127:0] host_key = '0, host_ctr_seed = '0;
  logic [IDX_W:0] host_blocks_per_bank = '0;
  logic [31:0] host_cycles;
  logic [L-1:0][AW-1:0] bank_addr;
  logic [L-1:0] bank_re, bank_we;
  logic [L-1:0][31:0] bank_wdata, bank_rdata;
  int checks = 0, failures = 0;
  real core_half_ns = 7.143;

  aes_accel_top #(.NUM_LANES(L), .BANK_AW(AW)) dut (.*);

  for (genvar l = 0; l < L; l++) begin : g_bank
    sram_bank_model #(.AW(AW)) u_bank (.clk(clk_mem), .addr(bank_addr[l]), .re(bank_re[l]),
                                       .we(bank_we[l]), .wdata(bank_wdata[l]),
                                       .rdata(bank_rdata[l]));
  end

  always #15.151 clk_mem = ~clk_mem;
  always #(core_half_ns) clk_core = ~clk_core;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] bank_block(input int l, input int b);
    case (l)
      0: return {g_bank[0].u_bank.mem[4*b], g_bank[0].u_bank.mem[4*b+1], g_bank[0].u_bank.mem[4*b+2], g_bank[0].u_bank.mem[4*b+3]};
      1: return {g_bank[1].u_bank.mem[4*b], g_bank[1].u_bank.mem[4*b+1], g_bank[1].u_bank.mem[4*b+2], g_bank[1].u_bank.mem[4*b+3]};
      2: return {g_bank[2].u_bank.mem[4*b], g_bank[2].u_bank.mem[4*b+1], g_bank[2].u_bank.mem[4*b+2], g_bank[2].u_bank.mem[4*b+3]};
      default: return {g_bank[3].u_bank.mem[4*b], g_bank[3].u_bank.mem[4*b+1], g_bank[3].u_bank.mem[4*b+2], g_bank[3].u_bank.mem[4*b+3]};
    endcase
  endfunction

  logic [127:0] plain  [L][BLOCKS];
  logic [127:0] cipher [L][BLOCKS];

  initial begin
    logic [127:0] key, seed;
    rkeys_t rk;
    real freqs [4] = '{70.0, 50.0, 35.0, 140.0};
    real rate70 = 0.0;
    int job = 0;
    repeat (4) @(negedge clk_mem);
    for (int w = 0; w < 2**AW; w++) begin
      g_bank[0].u_bank.mem[w] = $urandom();
      g_bank[1].u_bank.mem[w] = $urandom();
      g_bank[2].u_bank.mem[w] = $urandom();
      g_bank[3].u_bank.mem[w] = $urandom();
    end
    key  = rand128();
    seed = rand128();
    rk   = ref_expand(key);
    for (int l = 0; l < L; l++)
      for (int b = 0; b < BLOCKS; b++) begin
        plain[l][b]  = bank_block(l, b);
        cipher[l][b] = plain[l][b] ^ ref_encrypt_rk(rk, seed + 128'(l * BLOCKS + b));
      end
    rst_mem_n = 1; rst_core_n = 1;
    repeat (4) @(negedge clk_mem);

    foreach (freqs[fi]) begin
      real sum_rate, bound;
      sum_rate = 0.0;
      core_half_ns = 500.0 / freqs[fi];
      repeat (3) @(negedge clk_mem);
      for (int rep = 0; rep < 5; rep++) begin
        int guard, bad;
        real rate;
        guard = 0;
        bad = 0;
        @(negedge clk_mem);
        host_key = key; host_ctr_seed = seed; host_blocks_per_bank = (IDX_W+1)'(BLOCKS);
        host_start = 1;
        @(negedge clk_mem);
        host_start = 0;
        while (!host_done && guard < 1_000_000) begin @(negedge clk_mem); guard++; end
        check(host_done === 1'b1, $sformatf("job %0d finished", job));
        for (int l = 0; l < L; l++)
          for (int b = 0; b < BLOCKS; b++)
            if (bank_block(l, b) !== ((job % 2 == 0) ? cipher[l][b] : plain[l][b])) bad++;
        check(bad == 0, $sformatf("job %0d (%s at %0.0f MHz): %0d wrong blocks",
                                  job, (job % 2 == 0) ? "encrypt" : "decrypt", freqs[fi], bad));
        rate = (real'(L) * BLOCKS * 128) / (real'(host_cycles) / 33.0);
        sum_rate += rate;
        job++;
      end
      bound = 4.0 * 128.0 * freqs[fi] / 33.0;
      $display("core %0.0f MHz: %0.1f Mb/s average over 5 jobs (core bound %0.1f)",
               freqs[fi], sum_rate / 5.0, bound);
      if (freqs[fi] <= 70.0)
        check(sum_rate / 5.0 >= 0.95 * bound,
              $sformatf("%0.0f MHz: %0.1f Mb/s below 95%% of %0.1f", freqs[fi], sum_rate / 5.0, bound));
      if (freqs[fi] == 70.0) rate70 = sum_rate / 5.0;
      else if (freqs[fi] > 70.0)
        check(sum_rate / 5.0 > rate70, "faster core clock gives more throughput");
    end
    check(job == 20, "20 benchmark jobs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
