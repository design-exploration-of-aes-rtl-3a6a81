// key_expander -- one step of the AES-128 key schedule.
//
// Computes round key r from round key r-1 (words w0..w3):
//   t   = SubWord(RotWord(w3)) ^ {rcon, 00, 00, 00}
//   w0' = w0 ^ t,  w1' = w1 ^ w0',  w2' = w2 ^ w1',  w3' = w3 ^ w2'
// SubWord uses four sbox_rom instances of its own, so the key schedule
// never competes with the state's sixteen S-boxes. The cipher calls this
// once per round and keeps only the current round key, so the schedule
// runs on the fly alongside the rounds instead of being stored.
// The schedule itself is the standard one; running it on the fly with
// dedicated S-boxes is this design's choice.
//
// Interface: combinational; key_in and rcon_in -> key_out.
module key_expander
  import aes_pkg::*;
(
  input  block_t key_in,
  input  byte_t  rcon_in,
  output block_t key_out
);

  word_t w [4];
  word_t rot;
  word_t sub;
  word_t t;
  word_t n [4];

  for (genvar i = 0; i < 4; i++) begin : g_w
    assign w[i] = key_in[127-32*i -: 32];
  end

  assign rot = {w[3][23:0], w[3][31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    sbox_rom u_sbox (
      .addr (rot[31-8*i -: 8]),
      .data (sub[31-8*i -: 8])
    );
  end

  assign t    = sub ^ {rcon_in, 24'h000000};
  assign n[0] = w[0] ^ t;
  assign n[1] = w[1] ^ n[0];
  assign n[2] = w[2] ^ n[1];
  assign n[3] = w[3] ^ n[2];

  assign key_out = {n[0], n[1], n[2], n[3]};

endmodule
