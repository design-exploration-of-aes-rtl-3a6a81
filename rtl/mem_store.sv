// mem_store -- memory store block of one lane (memory clock domain).
//
// Takes processed blocks {idx, data} from the lane's output FIFO and writes
// each back over the block it came from, as four 32-bit words at word
// addresses 4*idx .. 4*idx+3, most significant word first. Writing in
// place lets a job cover the whole on-board memory.
//
// Per block: wait for a FIFO entry, request the bank from the semaphore,
// and once granted pop the entry and write its four words on four
// consecutive cycles; the request drops after the last write. The job ends
// when n_blocks blocks have been written. Write-back running in parallel
// with fetching, under a semaphore, follows the document; in-place
// write-back and the burst protocol are this design's choices.
//
// Interface: start (one-cycle pulse) begins a job of n_blocks blocks; done
// stays high from the job's end until the next start (and after reset).
module mem_store
  import aes_pkg::*;
#(
  parameter int unsigned BANK_AW = 19,
  parameter int unsigned IDX_W   = BANK_AW - 2
) (
  input  logic                 clk,
  input  logic                 rst_n,

  input  logic                 start,
  input  logic [IDX_W:0]       n_blocks,
  output logic                 done,

  output logic                 sem_req,
  input  logic                 sem_gnt,
  output logic [BANK_AW-1:0]   mem_addr,
  output logic                 mem_we,
  output word_t                mem_wdata,

  input  logic                 fifo_empty,
  input  logic [IDX_W+127:0]   fifo_rdata,
  output logic                 fifo_rd
);

  typedef enum logic [1:0] {W_IDLE, W_WAIT, W_REQ, W_WRITE} wstate_t;

  wstate_t          state;
  logic [IDX_W:0]   cnt;      // blocks written
  logic [IDX_W:0]   n;
  logic [IDX_W-1:0] idx;
  block_t           data;
  logic [1:0]       beat;

  assign sem_req   = (state == W_REQ) || (state == W_WRITE);
  assign fifo_rd   = (state == W_REQ) && sem_gnt;
  assign mem_we    = (state == W_WRITE);
  assign mem_addr  = {idx, beat};
  assign mem_wdata = data[127-32*beat -: 32];
  assign done      = (state == W_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= W_IDLE;
      cnt   <= '0;
      n     <= '0;
      idx   <= '0;
      data  <= '0;
      beat  <= '0;
    end else begin
      unique case (state)
        W_IDLE: if (start) begin
          cnt   <= '0;
          n     <= n_blocks;
          state <= W_WAIT;
        end
        W_WAIT: begin
          if (cnt == n)         state <= W_IDLE;
          else if (!fifo_empty) state <= W_REQ;
        end
        W_REQ: if (sem_gnt) begin
          {idx, data} <= fifo_rdata;
          beat        <= '0;
          state       <= W_WRITE;
        end
        W_WRITE: begin
          beat <= beat + 2'd1;
          if (beat == 2'd3) begin
            cnt   <= cnt + 1'b1;
            state <= W_WAIT;
          end
        end
        default: state <= W_IDLE;
      endcase
    end
  end

  a_write_owns_bank: assert property (@(posedge clk) disable iff (!rst_n) !(mem_we && !sem_gnt))
    else $error("mem_store: write without the bank");

endmodule
