// bank_semaphore -- mutual exclusion on one RAM bank between the lane's
// memory retrieve block (requester A) and memory store block (requester B).
//
// The document runs the data-fetching and the write-back blocks in parallel
// and keeps them apart with four semaphores, one per bank. Their insides
// are this design's own: a requester raises req and keeps it high for as
// long as it uses the bank; the semaphore grants the bank to one requester
// at a time, and the grant lasts until that requester drops req. When both
// wait for a free bank, the one that did not hold it last wins, so neither
// fetch nor write-back can starve. A release hands the bank straight to a
// waiting requester on the same edge.
//
// Timing: gnt_* are registered; a request on a free bank is granted on the
// next edge.
module bank_semaphore (
  input  logic clk,
  input  logic rst_n,
  input  logic req_a,
  input  logic req_b,
  output logic gnt_a,
  output logic gnt_b
);

  typedef enum logic [1:0] {OWN_NONE, OWN_A, OWN_B} owner_t;

  owner_t owner, owner_nx;
  logic   last_b;   // B was the last owner

  always_comb begin
    owner_nx = owner;
    if (owner == OWN_A && !req_a) owner_nx = OWN_NONE;
    if (owner == OWN_B && !req_b) owner_nx = OWN_NONE;
    if (owner_nx == OWN_NONE) begin
      if (req_a && req_b) owner_nx = last_b ? OWN_A : OWN_B;
      else if (req_a) owner_nx = OWN_A;
      else if (req_b) owner_nx = OWN_B;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner  <= OWN_NONE;
      last_b <= 1'b0;
    end else begin
      owner <= owner_nx;
      if (owner_nx == OWN_A) last_b <= 1'b0;
      if (owner_nx == OWN_B) last_b <= 1'b1;
    end
  end

  assign gnt_a = (owner == OWN_A);
  assign gnt_b = (owner == OWN_B);

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(gnt_a && gnt_b))
    else $error("bank_semaphore: bank granted twice");

endmodule
