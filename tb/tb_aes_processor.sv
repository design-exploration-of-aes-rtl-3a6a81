// tb_aes_processor -- one CTR lane between two FIFO models.
// 1. The four AES-128 CTR example blocks of NIST SP 800-38A (F.5.1,
//    counter f0f1..feff incremented per block) at idx 0..3, lane_base 0.
// 2. The same ciphertext fed back decrypts to the plaintext (CTR runs the
//    forward cipher both ways).
// 3. 60 random blocks with a random lane_base, compared with the
//    reference, with the output FIFO randomly full (back-pressure).
// 4. Rate: with input always available and the output never full, pops
//    are exactly 33 cycles apart.
module tb_aes_processor;
  import aes_ref_pkg::*;

  localparam int IDX_W = 6;
  localparam int LB_W  = 8;

  logic clk = 0, rst_n = 0;
  logic [127:0] key = '0, ctr_seed = '0;
  logic [LB_W-1:0] lane_base = '0;
  logic in_empty, in_rd, out_full = 0, out_wr, busy;
  logic [IDX_W+127:0] in_rdata, out_wdata;
  int checks = 0, failures = 0;
  int cyc = 0;

  logic [IDX_W+127:0] inq [$];
  logic [IDX_W+127:0] outq [$];
  int pop_cycles [$];
  int full_pct = 0;
  int stalls = 0;

  aes_processor #(.IDX_W(IDX_W), .LB_W(LB_W)) dut (
    .clk, .rst_n, .key, .ctr_seed, .lane_base,
    .in_empty, .in_rdata, .in_rd, .out_full, .out_wdata, .out_wr, .busy);

  always #5 clk = ~clk;

  assign in_empty = (inq.size() == 0);
  assign in_rdata = (inq.size() != 0) ? inq[0] : '0;

  always @(posedge clk) begin
    cyc++;
    if (in_rd && !in_empty) begin
      void'(inq.pop_front());
      pop_cycles.push_back(cyc);
    end
    if (out_wr) begin
      if (out_full) begin failures++; $display("FAIL push while full"); end
      outq.push_back(out_wdata);
    end
  end
  always @(negedge clk) begin
    out_full = int'($urandom_range(0, 99)) < full_pct;
    if (out_full && busy) stalls++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_out(input int n);
    int guard = 0;
    while (outq.size() < n && guard < 100000) begin @(posedge clk); guard++; end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [127:0] PT [4] = '{128'h6bc1bee22e409f96e93d7e117393172a,
                                      128'hae2d8a571e03ac9c9eb76fac45af8e51,
                                      128'h30c81c46a35ce411e5fbc1191a0a52ef,
                                      128'hf69f2445df4f9b17ad2b417be66c3710};
  localparam logic [127:0] CT [4] = '{128'h874d6191b620e3261bef6864990db6ce,
                                      128'h9806f66b7970fdff8617187bb9fffdff,
                                      128'h5ae4df3edbd5d35e5b4f09020db03eab,
                                      128'h1e031dda2fbe03d1792170a0f3009cee};

  initial begin
    logic [IDX_W+127:0] e;
    logic [127:0] d, ks;
    logic [IDX_W-1:0] ix;
    logic [127:0] exp_d [64];
    repeat (3) @(negedge clk);
    rst_n = 1;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    ctr_seed = 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff;
    // 1. encryption vectors
    @(negedge clk);
    for (int i = 0; i < 4; i++) inq.push_back({IDX_W'(i), PT[i]});
    wait_out(4);
    for (int i = 0; i < 4; i++) begin
      e = outq.pop_front();
      check(e === {IDX_W'(i), CT[i]}, $sformatf("SP800-38A block %0d: %h", i, e[127:0]));
    end
    // 4. rate (taken from the pops of part 1)
    check(pop_cycles.size() == 4, "four pops");
    for (int i = 1; i < pop_cycles.size(); i++)
      check(pop_cycles[i] - pop_cycles[i-1] == 33,
            $sformatf("block interval %0d cycles, expected 33", pop_cycles[i] - pop_cycles[i-1]));
    // 2. decryption
    @(negedge clk);
    for (int i = 0; i < 4; i++) inq.push_back({IDX_W'(i), CT[i]});
    wait_out(4);
    for (int i = 0; i < 4; i++) begin
      e = outq.pop_front();
      check(e === {IDX_W'(i), PT[i]}, $sformatf("decrypt block %0d", i));
    end
    // 3. random, with back-pressure
    key = rand128();
    ctr_seed = rand128();
    ctr_seed[127:64] = '1;           // exercise the carry through the counter
    lane_base = LB_W'($urandom());
    full_pct = 70;
    @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      d  = rand128();
      ix = IDX_W'(i);
      ks = ref_encrypt(key, ctr_seed + 128'(lane_base) + 128'(ix));
      exp_d[i] = d ^ ks;
      inq.push_back({ix, d});
    end
    wait_out(60);
    for (int i = 0; i < 60; i++) begin
      e = outq.pop_front();
      check(e === {IDX_W'(i), exp_d[i]}, $sformatf("random block %0d", i));
    end
    check(stalls > 0, "output back-pressure occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
