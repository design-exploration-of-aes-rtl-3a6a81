// sbox_rom -- the AES substitution box as a 256 x 8 read-only memory.
//
// One look-up per cycle: data = S(addr), combinational (asynchronous read),
// so a SubBytes step through this ROM completes in the same clock cycle as
// the register it feeds. The contents are computed at elaboration by
// aes_pkg::make_sbox_table() from the GF(2^8) inverse and the affine
// transform, so no data file is needed. Keeping the S-box as a ROM, and
// instantiating one per byte lane wherever look-ups happen in parallel,
// follows the document; the asynchronous read port is this design's choice.
module sbox_rom
  import aes_pkg::*;
(
  input  byte_t addr,
  output byte_t data
);

  localparam sbox_table_t TABLE = make_sbox_table();

  assign data = TABLE[addr];

endmodule
