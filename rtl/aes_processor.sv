// aes_processor -- one AES lane in counter (CTR) mode.
//
// Takes 128-bit blocks from its input FIFO, encrypts the block's counter
// value with aes_cipher and XORs the resulting key stream into the block,
// then pushes the result, tagged with the same block index, into its
// output FIFO. Because CTR mode only ever runs the forward cipher, the
// same lane both encrypts and decrypts. Counter mode, the 128-bit key and
// one cipher per lane follow the document.
//
// Counter value (this design's choice; the document only asks for a value
// that differs per block, e.g. incremented by one per block, from a seed
// that may be kept secret):
//   ctr = ctr_seed + lane_base + idx   (mod 2^128)
// where idx is the block's position in the lane's RAM bank and lane_base
// the number of blocks held by the banks before it. The four banks then
// together hold one contiguous CTR stream.
//
// Interface (all on clk, the core clock): in_* is the read side of a
// first-word fall-through FIFO, entry = {idx, data}; out_* the write side
// of the output FIFO, same layout. key, ctr_seed and lane_base are
// configuration held stable while blocks are in flight.
// Timing: a block is popped on the edge that starts the cipher; its result
// is pushed in the cycle the cipher raises done (33 cycles later) or, if
// the output FIFO is full, as soon as it is not. The next block starts on
// the push edge, so a lane sustains one block every 33 cycles.
module aes_processor
  import aes_pkg::*;
#(
  parameter int unsigned IDX_W = 17,
  parameter int unsigned LB_W  = IDX_W + 2
) (
  input  logic                   clk,
  input  logic                   rst_n,

  input  block_t                 key,
  input  block_t                 ctr_seed,
  input  logic [LB_W-1:0]        lane_base,

  input  logic                   in_empty,
  input  logic [IDX_W+127:0]     in_rdata,
  output logic                   in_rd,

  input  logic                   out_full,
  output logic [IDX_W+127:0]     out_wdata,
  output logic                   out_wr,

  output logic                   busy
);

  logic             cipher_ready;
  logic             cipher_done;
  logic             cipher_start;
  block_t           cipher_out;
  block_t           ctr;

  logic [IDX_W-1:0] cur_idx;
  block_t           cur_data;
  logic             in_flight;    // a block is inside the cipher
  logic             res_pending;  // result waits for room in the output FIFO
  logic             res_avail;

  logic [IDX_W-1:0] in_idx;
  block_t           in_data;
  assign {in_idx, in_data} = in_rdata;

  assign ctr = ctr_seed + block_t'(lane_base) + block_t'(in_idx);

  assign res_avail    = cipher_done || res_pending;
  assign out_wr       = res_avail && !out_full;
  assign out_wdata    = {cur_idx, cipher_out ^ cur_data};
  assign cipher_start = cipher_ready && !in_empty && (!res_avail || out_wr);
  assign in_rd        = cipher_start;
  assign busy         = in_flight || res_pending;

  aes_cipher u_cipher (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (cipher_start),
    .key     (key),
    .blk_in  (ctr),
    .ready   (cipher_ready),
    .done    (cipher_done),
    .blk_out (cipher_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_idx     <= '0;
      cur_data    <= '0;
      in_flight   <= 1'b0;
      res_pending <= 1'b0;
    end else begin
      res_pending <= res_avail && !out_wr;
      if (cipher_done) in_flight <= 1'b0;
      if (cipher_start) begin
        cur_idx   <= in_idx;
        cur_data  <= in_data;
        in_flight <= 1'b1;
      end
    end
  end

  a_result_kept: assert property (@(posedge clk) disable iff (!rst_n)
      !(cipher_done && res_pending))
    else $error("aes_processor: new result while the previous one is unsent");

endmodule
