// control_ram_if -- control and RAM interface (memory clock domain).
//
// Two jobs, as in the document's block of the same name:
//  * Control: on host_start (accepted only while idle) it latches the key,
//    the counter seed and the number of blocks per bank, pulses lane_start
//    to all lanes one cycle later, and finishes when every lane's store
//    block reports done. host_done then stays high until the next start.
//    host_cycles is an on-board timer: memory clock cycles from the start
//    to the end of the last job, which the host reads to measure the
//    device's own processing time.
//  * RAM interface: per bank, a bank_semaphore decides whether the lane's
//    retrieve block or its store block drives the bank's single port; the
//    owner's address, read enable, write enable and write data are
//    forwarded, and read data goes back to the retrieve block.
// The four semaphores and the bank-per-lane arrangement follow the
// document; the register set, the start/done protocol and the timer width
// are this design's choices.
//
// lane_base[l] = l * blocks_per_bank: the position of bank l's first block
// in the whole stream, used by the lanes to form their counter values.
// cfg_key, cfg_ctr_seed and lane_base change only when a job is accepted,
// while every lane is idle and every FIFO empty; the core clock domain
// reads them as quasi-static signals without synchronisation.
module control_ram_if
  import aes_pkg::*;
#(
  parameter int unsigned NUM_LANES = 4,
  parameter int unsigned BANK_AW   = 19,
  parameter int unsigned IDX_W     = BANK_AW - 2,
  parameter int unsigned LB_W      = IDX_W + 2
) (
  input  logic                                  clk,
  input  logic                                  rst_n,

  // host side
  input  logic                                  host_start,
  input  block_t                                host_key,
  input  block_t                                host_ctr_seed,
  input  logic [IDX_W:0]                        host_blocks_per_bank,
  output logic                                  host_busy,
  output logic                                  host_done,
  output logic [31:0]                           host_cycles,

  // configuration to the lanes
  output logic                                  lane_start,
  output logic [IDX_W:0]                        cfg_blocks,
  output block_t                                cfg_key,
  output block_t                                cfg_ctr_seed,
  output logic [NUM_LANES-1:0][LB_W-1:0]        lane_base,
  input  logic [NUM_LANES-1:0]                  store_done,

  // retrieve blocks
  input  logic [NUM_LANES-1:0]                  ret_req,
  output logic [NUM_LANES-1:0]                  ret_gnt,
  input  logic [NUM_LANES-1:0][BANK_AW-1:0]     ret_addr,
  input  logic [NUM_LANES-1:0]                  ret_re,
  output logic [NUM_LANES-1:0][MEM_DW-1:0]      ret_rdata,

  // store blocks
  input  logic [NUM_LANES-1:0]                  sto_req,
  output logic [NUM_LANES-1:0]                  sto_gnt,
  input  logic [NUM_LANES-1:0][BANK_AW-1:0]     sto_addr,
  input  logic [NUM_LANES-1:0]                  sto_we,
  input  logic [NUM_LANES-1:0][MEM_DW-1:0]      sto_wdata,

  // RAM bank ports
  output logic [NUM_LANES-1:0][BANK_AW-1:0]     bank_addr,
  output logic [NUM_LANES-1:0]                  bank_re,
  output logic [NUM_LANES-1:0]                  bank_we,
  output logic [NUM_LANES-1:0][MEM_DW-1:0]      bank_wdata,
  input  logic [NUM_LANES-1:0][MEM_DW-1:0]      bank_rdata
);

  typedef enum logic [1:0] {C_IDLE, C_LAUNCH, C_RUN} cstate_t;

  cstate_t state;

  assign lane_start = (state == C_LAUNCH);
  assign host_busy  = (state != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= C_IDLE;
      host_done    <= 1'b0;
      host_cycles  <= '0;
      cfg_blocks   <= '0;
      cfg_key      <= '0;
      cfg_ctr_seed <= '0;
    end else begin
      unique case (state)
        C_IDLE: if (host_start) begin
          cfg_key      <= host_key;
          cfg_ctr_seed <= host_ctr_seed;
          cfg_blocks   <= host_blocks_per_bank;
          host_done    <= 1'b0;
          host_cycles  <= '0;
          state        <= C_LAUNCH;
        end
        C_LAUNCH: begin
          host_cycles <= host_cycles + 32'd1;
          state       <= C_RUN;
        end
        C_RUN: begin
          host_cycles <= host_cycles + 32'd1;
          if (&store_done) begin
            host_done <= 1'b1;
            state     <= C_IDLE;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_lane
    assign lane_base[l] = LB_W'(l) * LB_W'(cfg_blocks);

    bank_semaphore u_sem (
      .clk   (clk),
      .rst_n (rst_n),
      .req_a (ret_req[l]),
      .req_b (sto_req[l]),
      .gnt_a (ret_gnt[l]),
      .gnt_b (sto_gnt[l])
    );

    assign bank_addr[l]  = sto_gnt[l] ? sto_addr[l] : ret_addr[l];
    assign bank_re[l]    = ret_gnt[l] && ret_re[l];
    assign bank_we[l]    = sto_gnt[l] && sto_we[l];
    assign bank_wdata[l] = sto_wdata[l];
    assign ret_rdata[l]  = bank_rdata[l];
  end

endmodule
