// tb_aes_accel_full -- the accelerator at its default size, one full job.
// Four banks of 512K x 32 bits (8 MB in all) are filled with random data
// and encrypted in one job covering every block of every bank, with the
// memory clock at 33 MHz and the cores at 70 MHz. Every word is compared
// with an independent CTR computation of the 524288-block stream, and the
// throughput derived from the on-board timer must reach 1000 Mb/s.
module tb_aes_accel_full;
  import aes_ref_pkg::*;

  localparam int L      = 4;
  localparam int AW     = 19;
  localparam int BLOCKS = 2**(AW-2);

  logic clk_mem = 0, clk_core = 0, rst_mem_n = 0, rst_core_n = 0;
  logic host_start = 0, host_busy, host_done;
  logic [127:0] host_key = '0, host_ctr_seed = '0;
  logic [AW-2:0] host_blocks_per_bank = '0;
  logic [31:0] host_cycles;
  logic [L-1:0][AW-1:0] bank_addr;
  logic [L-1:0] bank_re, bank_we;
  logic [L-1:0][31:0] bank_wdata, bank_rdata;
  int checks = 0, failures = 0;

  aes_accel_top dut (.*);

  for (genvar l = 0; l < L; l++) begin : g_bank
    sram_bank_model #(.AW(AW)) u_bank (.clk(clk_mem), .addr(bank_addr[l]), .re(bank_re[l]),
                                       .we(bank_we[l]), .wdata(bank_wdata[l]),
                                       .rdata(bank_rdata[l]));
  end

  always #15.151 clk_mem  = ~clk_mem;    // 33 MHz
  always #7.143  clk_core = ~clk_core;   // 70 MHz

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Plaintext kept as 32-bit words per bank, generated from a seed so it
  // need not be stored twice: word w of bank l is hash(l, w).
  function automatic logic [31:0] pt_word(input int l, input int w);
    logic [31:0] x = 32'(l * 32'h9e3779b9) ^ 32'(w * 32'h85ebca6b) ^ 32'h27d4eb2f;
    x ^= x >> 15; x *= 32'h2c1b3c6d; x ^= x >> 12; x *= 32'h297a2d39; x ^= x >> 15;
    return x;
  endfunction

  function automatic logic [31:0] mem_word(input int l, input int w);
    case (l)
      0: return g_bank[0].u_bank.mem[w];
      1: return g_bank[1].u_bank.mem[w];
      2: return g_bank[2].u_bank.mem[w];
      default: return g_bank[3].u_bank.mem[w];
    endcase
  endfunction

  initial begin
    logic [127:0] key, seed, ks, exp, got;
    rkeys_t rk;
    int guard = 0, bad = 0;
    real mbps;
    repeat (4) @(negedge clk_mem);
    for (int w = 0; w < 2**AW; w++) begin
      g_bank[0].u_bank.mem[w] = pt_word(0, w);
      g_bank[1].u_bank.mem[w] = pt_word(1, w);
      g_bank[2].u_bank.mem[w] = pt_word(2, w);
      g_bank[3].u_bank.mem[w] = pt_word(3, w);
    end
    rst_mem_n = 1; rst_core_n = 1;
    repeat (4) @(negedge clk_mem);

    key  = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    seed = 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff;
    host_key = key; host_ctr_seed = seed;
    host_blocks_per_bank = (AW-1)'(BLOCKS);
    host_start = 1;
    @(negedge clk_mem);
    host_start = 0;
    while (!host_done && guard < 10_000_000) begin @(negedge clk_mem); guard++; end
    check(host_done === 1'b1, "8 MB job finished");

    rk = ref_expand(key);
    for (int l = 0; l < L; l++)
      for (int b = 0; b < BLOCKS; b++) begin
        ks  = ref_encrypt_rk(rk, seed + 128'(l * BLOCKS + b));
        exp = {pt_word(l, 4*b), pt_word(l, 4*b+1), pt_word(l, 4*b+2), pt_word(l, 4*b+3)} ^ ks;
        got = {mem_word(l, 4*b), mem_word(l, 4*b+1), mem_word(l, 4*b+2), mem_word(l, 4*b+3)};
        checks++;
        if (got !== exp) begin
          failures++; bad++;
          if (bad < 6) $display("FAIL bank %0d block %0d = %h expected %h", l, b, got, exp);
        end
      end
    // The first stream block is the SP 800-38A example's first block only
    // if its plaintext matches; check the counter arithmetic instead:
    check(ref_encrypt_rk(rk, seed) == (128'h874d6191b620e3261bef6864990db6ce
                                       ^ 128'h6bc1bee22e409f96e93d7e117393172a),
          "reference key stream matches SP 800-38A");
    mbps = (real'(L) * BLOCKS * 128) / (real'(host_cycles) / 33.0);
    $display("8 MB job: %0d memory cycles = %0.3f ms, %0.1f Mb/s",
             host_cycles, real'(host_cycles) / 33.0e3, mbps);
    check(mbps >= 1000.0, $sformatf("throughput %0.1f Mb/s below 1000", mbps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
