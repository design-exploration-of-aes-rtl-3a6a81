// mix_columns -- the AES MixColumns operator on all four columns.
//
// Each column (s0..s3) is multiplied by the circulant matrix
// [02 03 01 01; 01 02 03 01; 01 01 02 03; 03 01 01 02] over GF(2^8). As in
// the document's round circuit, the products are built from one xtime
// (multiply by {02}) per byte and XOR trees: {03}*s = xtime(s) ^ s.
//
// Interface: state_in -> state_out, purely combinational, AES byte order.
module mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t s [4];
    byte_t x [4];
    for (genvar r = 0; r < 4; r++) begin : g_in
      assign s[r] = state_in[127-8*(4*c+r) -: 8];
      assign x[r] = xtime(s[r]);
    end
    // out_r = 2*s_r ^ 3*s_(r+1) ^ s_(r+2) ^ s_(r+3)
    for (genvar r = 0; r < 4; r++) begin : g_out
      assign state_out[127-8*(4*c+r) -: 8] =
          x[r] ^ x[(r+1)%4] ^ s[(r+1)%4] ^ s[(r+2)%4] ^ s[(r+3)%4];
    end
  end

endmodule
