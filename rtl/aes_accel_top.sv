// aes_accel_top -- four-lane AES-128 counter-mode accelerator for a board
// with four independent 32-bit SRAM banks.
//
// Each bank feeds its own lane:
//
//   bank l <-> control_ram_if -> mem_retrieve -> async_fifo -> aes_processor
//                     ^                           (mem->core)        |
//                     +------ mem_store <- async_fifo <--------------+
//                                           (core->mem)
//
// The memory side (control, retrieve, store, bank ports) runs on clk_mem,
// the four AES processors on clk_core; eight FIFOs (one in, one out per
// lane) carry the blocks between the two clocks. Fetching, encryption and
// write-back overlap, so the memory works on later and earlier blocks
// while the cores encrypt. The document gives 33 MHz for the memory side
// and 70 MHz for the cores; the RTL itself works for any ratio.
//
// A job processes blocks 0 .. host_blocks_per_bank-1 of every bank in
// place. Bank l holds blocks l*n .. l*n+n-1 of one CTR stream whose
// counter starts at host_ctr_seed, so running the same job twice restores
// the data. The lane count, the bank organisation and the two clocks follow
// the document; the host register interface, FIFO depth, block tagging and
// in-place write-back are this design's choices.
//
// Ports: host_* is the host's control interface (memory clock); bank_* are
// four synchronous SRAM ports (read data one clk_mem cycle after bank_re).
// Each FIFO entry carries a block index next to the 128-bit block so the
// store block knows where to write.
module aes_accel_top
  import aes_pkg::*;
#(
  parameter int unsigned NUM_LANES  = 4,
  parameter int unsigned BANK_AW    = 19,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                                  clk_mem,
  input  logic                                  rst_mem_n,
  input  logic                                  clk_core,
  input  logic                                  rst_core_n,

  input  logic                                  host_start,
  input  block_t                                host_key,
  input  block_t                                host_ctr_seed,
  input  logic [BANK_AW-2:0]                    host_blocks_per_bank,
  output logic                                  host_busy,
  output logic                                  host_done,
  output logic [31:0]                           host_cycles,

  output logic [NUM_LANES-1:0][BANK_AW-1:0]     bank_addr,
  output logic [NUM_LANES-1:0]                  bank_re,
  output logic [NUM_LANES-1:0]                  bank_we,
  output logic [NUM_LANES-1:0][MEM_DW-1:0]      bank_wdata,
  input  logic [NUM_LANES-1:0][MEM_DW-1:0]      bank_rdata
);

  localparam int unsigned IDX_W = BANK_AW - 2;
  localparam int unsigned LB_W  = IDX_W + 2;
  localparam int unsigned CH_W  = IDX_W + 128;

  logic                                 lane_start;
  logic [IDX_W:0]                       cfg_blocks;
  block_t                               cfg_key;
  block_t                               cfg_ctr_seed;
  logic [NUM_LANES-1:0][LB_W-1:0]       lane_base;
  logic [NUM_LANES-1:0]                 store_done;

  logic [NUM_LANES-1:0]                 ret_req, ret_gnt, ret_re;
  logic [NUM_LANES-1:0][BANK_AW-1:0]    ret_addr;
  logic [NUM_LANES-1:0][MEM_DW-1:0]     ret_rdata;
  logic [NUM_LANES-1:0]                 sto_req, sto_gnt, sto_we;
  logic [NUM_LANES-1:0][BANK_AW-1:0]    sto_addr;
  logic [NUM_LANES-1:0][MEM_DW-1:0]     sto_wdata;

  control_ram_if #(
    .NUM_LANES (NUM_LANES),
    .BANK_AW   (BANK_AW)
  ) u_ctrl (
    .clk                  (clk_mem),
    .rst_n                (rst_mem_n),
    .host_start           (host_start),
    .host_key             (host_key),
    .host_ctr_seed        (host_ctr_seed),
    .host_blocks_per_bank (host_blocks_per_bank),
    .host_busy            (host_busy),
    .host_done            (host_done),
    .host_cycles          (host_cycles),
    .lane_start           (lane_start),
    .cfg_blocks           (cfg_blocks),
    .cfg_key              (cfg_key),
    .cfg_ctr_seed         (cfg_ctr_seed),
    .lane_base            (lane_base),
    .store_done           (store_done),
    .ret_req              (ret_req),
    .ret_gnt              (ret_gnt),
    .ret_addr             (ret_addr),
    .ret_re               (ret_re),
    .ret_rdata            (ret_rdata),
    .sto_req              (sto_req),
    .sto_gnt              (sto_gnt),
    .sto_addr             (sto_addr),
    .sto_we               (sto_we),
    .sto_wdata            (sto_wdata),
    .bank_addr            (bank_addr),
    .bank_re              (bank_re),
    .bank_we              (bank_we),
    .bank_wdata           (bank_wdata),
    .bank_rdata           (bank_rdata)
  );

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_lane
    logic            in_full, in_wr, in_empty, in_rd;
    logic [CH_W-1:0] in_wdata, in_rdata;
    logic            out_full, out_wr, out_empty, out_rd;
    logic [CH_W-1:0] out_wdata, out_rdata;
    logic            ret_done;
    logic            proc_busy;

    mem_retrieve #(.BANK_AW(BANK_AW)) u_retrieve (
      .clk        (clk_mem),
      .rst_n      (rst_mem_n),
      .start      (lane_start),
      .n_blocks   (cfg_blocks),
      .done       (ret_done),
      .sem_req    (ret_req[l]),
      .sem_gnt    (ret_gnt[l]),
      .mem_addr   (ret_addr[l]),
      .mem_re     (ret_re[l]),
      .mem_rdata  (ret_rdata[l]),
      .fifo_full  (in_full),
      .fifo_wr    (in_wr),
      .fifo_wdata (in_wdata)
    );

    async_fifo #(.WIDTH(CH_W), .DEPTH(FIFO_DEPTH)) u_fifo_in (
      .wclk   (clk_mem),
      .wrst_n (rst_mem_n),
      .wr     (in_wr),
      .wdata  (in_wdata),
      .full   (in_full),
      .rclk   (clk_core),
      .rrst_n (rst_core_n),
      .rd     (in_rd),
      .rdata  (in_rdata),
      .empty  (in_empty)
    );

    aes_processor #(.IDX_W(IDX_W), .LB_W(LB_W)) u_proc (
      .clk       (clk_core),
      .rst_n     (rst_core_n),
      .key       (cfg_key),
      .ctr_seed  (cfg_ctr_seed),
      .lane_base (lane_base[l]),
      .in_empty  (in_empty),
      .in_rdata  (in_rdata),
      .in_rd     (in_rd),
      .out_full  (out_full),
      .out_wdata (out_wdata),
      .out_wr    (out_wr),
      .busy      (proc_busy)
    );

    async_fifo #(.WIDTH(CH_W), .DEPTH(FIFO_DEPTH)) u_fifo_out (
      .wclk   (clk_core),
      .wrst_n (rst_core_n),
      .wr     (out_wr),
      .wdata  (out_wdata),
      .full   (out_full),
      .rclk   (clk_mem),
      .rrst_n (rst_mem_n),
      .rd     (out_rd),
      .rdata  (out_rdata),
      .empty  (out_empty)
    );

    mem_store #(.BANK_AW(BANK_AW)) u_store (
      .clk        (clk_mem),
      .rst_n      (rst_mem_n),
      .start      (lane_start),
      .n_blocks   (cfg_blocks),
      .done       (store_done[l]),
      .sem_req    (sto_req[l]),
      .sem_gnt    (sto_gnt[l]),
      .mem_addr   (sto_addr[l]),
      .mem_we     (sto_we[l]),
      .mem_wdata  (sto_wdata[l]),
      .fifo_empty (out_empty),
      .fifo_rdata (out_rdata),
      .fifo_rd    (out_rd)
    );
  end

endmodule
