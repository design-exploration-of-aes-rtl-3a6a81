// sub_shift -- SubBytes merged with ShiftRows, one combinational step.
//
// Sixteen sbox_rom instances substitute all bytes of the state at once; the
// results are then permuted by ShiftRows (row r rotated left by r byte
// positions), which costs only wiring. Merging the two operators into one
// cycle and giving every byte its own S-box ROM follow the document.
//
// Interface: state_in -> state_out, purely combinational, AES byte order
// (byte i = bits [127-8i -: 8], row i%4, column i/4).
module sub_shift
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  byte_t sub [16];

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    sbox_rom u_sbox (
      .addr (state_in[127-8*i -: 8]),
      .data (sub[i])
    );
  end

  // Output byte (row r, column c) takes the substituted byte from
  // (row r, column (c + r) mod 4).
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign state_out[127-8*(4*c+r) -: 8] = sub[4*((c+r)%4) + r];
    end
  end

endmodule
