// async_fifo -- dual-clock FIFO for the channels between the memory clock
// domain and the AES core clock domain.
//
// The document joins its two clock domains with eight 128-bit channels,
// each with a FIFO queue: one into and one out of each of the four AES
// processors. How the FIFO is built is this design's choice: a register
// array written on wclk and read on rclk, with binary pointers one bit
// wider than the address, passed to the other domain in Gray code through
// two-flop synchronisers. full and empty are therefore pessimistic for two
// cycles of the observing clock, never optimistic.
//
// Interface: write side (wclk) pushes wdata when wr && !full; read side
// (rclk) is first-word fall-through: rdata shows the oldest entry while
// empty is low, and rd && !empty pops it. Pushing into a full FIFO or
// popping an empty one is an error caught by the assertions below.
module async_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 4
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  typedef logic [AW:0] ptr_t;

  logic [WIDTH-1:0] mem [DEPTH];

  ptr_t wbin, wgray, rbin, rgray;
  ptr_t rgray_w1, rgray_w2;   // read pointer seen in the write domain
  ptr_t wgray_r1, wgray_r2;   // write pointer seen in the read domain

  function automatic ptr_t bin2gray(input ptr_t b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic push;
  assign push = wr && !full;

  always_ff @(posedge wclk) begin
    if (push) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (push) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // Full when the write pointer is one lap ahead of the synchronised read
  // pointer: Gray codes equal except for the two top bits.
  localparam ptr_t TOP2 = ptr_t'(3) << (AW - 1);
  assign full = (wgray == (rgray_w2 ^ TOP2));

  // ---------------- read domain ----------------
  logic pop;
  assign pop = rd && !empty;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (pop) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

  // ---------------- rules of use ----------------
  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n) !(wr && full))
    else $error("async_fifo: write while full");
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(rd && empty))
    else $error("async_fifo: read while empty");

endmodule
