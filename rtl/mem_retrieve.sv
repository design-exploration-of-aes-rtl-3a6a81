// mem_retrieve -- memory retrieve block of one lane (memory clock domain).
//
// Fetches the blocks 0 .. n_blocks-1 of its RAM bank, in order, and pushes
// each into the lane's input FIFO as {idx, data}. A 128-bit block is four
// consecutive 32-bit words at word addresses 4*idx .. 4*idx+3, the first
// word being the most significant (AES bytes 0..3).
//
// Per block: wait until the FIFO has room, request the bank from the
// semaphore, and once granted issue four reads on consecutive cycles. The
// bank returns each word one cycle after its read; the fourth word is
// pushed into the FIFO together with the three before it in the cycle it
// arrives, and the request is dropped on the next edge. The bank is thus
// held for five cycles per block. Fetching while the AES processor works
// on earlier blocks, and sharing the bank with the store block through a
// semaphore, follow the document; the burst protocol is this design's.
//
// Interface: start (one-cycle pulse) begins a job of n_blocks blocks; done
// stays high from the job's end until the next start (and after reset).
module mem_retrieve
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
  output logic                 mem_re,
  input  word_t                mem_rdata,

  input  logic                 fifo_full,
  output logic                 fifo_wr,
  output logic [IDX_W+127:0]   fifo_wdata
);

  typedef enum logic [1:0] {R_IDLE, R_WAIT, R_REQ, R_READ} rstate_t;

  rstate_t      state;
  logic [IDX_W:0] k;        // next block to fetch
  logic [IDX_W:0] n;
  logic [2:0]   issued;     // reads issued for this block
  logic [1:0]   got;        // words received for this block
  logic         re_q;       // a read was issued last cycle
  logic [95:0]  buf_q;      // first three words of the block

  assign sem_req  = (state == R_REQ) || (state == R_READ);
  assign mem_re   = (state == R_READ) && sem_gnt && (issued < 3'd4);
  assign mem_addr = {k[IDX_W-1:0], issued[1:0]};
  assign fifo_wr  = (state == R_READ) && re_q && (got == 2'd3);
  assign fifo_wdata = {k[IDX_W-1:0], buf_q, mem_rdata};
  assign done     = (state == R_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= R_IDLE;
      k      <= '0;
      n      <= '0;
      issued <= '0;
      got    <= '0;
      re_q   <= 1'b0;
      buf_q  <= '0;
    end else begin
      re_q <= mem_re;
      unique case (state)
        R_IDLE: if (start) begin
          k     <= '0;
          n     <= n_blocks;
          state <= R_WAIT;
        end
        R_WAIT: begin
          if (k == n)          state <= R_IDLE;
          else if (!fifo_full) state <= R_REQ;
        end
        R_REQ: if (sem_gnt) begin
          issued <= '0;
          got    <= '0;
          state  <= R_READ;
        end
        R_READ: begin
          if (mem_re) issued <= issued + 3'd1;
          if (re_q) begin
            got   <= got + 2'd1;
            buf_q <= {buf_q[63:0], mem_rdata};
          end
          if (fifo_wr) begin
            k     <= k + 1'b1;
            state <= R_WAIT;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  a_push_has_room: assert property (@(posedge clk) disable iff (!rst_n) !(fifo_wr && fifo_full))
    else $error("mem_retrieve: push into a full FIFO");

endmodule
