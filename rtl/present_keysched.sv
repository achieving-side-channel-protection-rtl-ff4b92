// present_keysched: PRESENT-80 round-key register and key schedule.
//
// Holds the 80-bit key register k. The round key of the current round is
// its upper 64 bits, k[79:16]. On load the register takes the user key; on
// update (end of round r, r = 1..31, given on round) it is
//   1. rotated left by 61 bits,
//   2. k[79:76] passed through the PRESENT S-box,
//   3. k[19:15] xored with the 5-bit round counter r.
// One update per round, one cycle each. The key path is not masked: the
// countermeasures of this design protect the S-layer of the data path only.
// The schedule is the cipher's standard one for 80-bit keys; the key length
// is this design's choice.
module present_keysched
  import present_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  key_t       key,
  input  logic       update,
  input  logic [4:0] round,
  output state_t     round_key
);

  key_t k_q;
  key_t k_rot;
  key_t k_next;

  always_comb begin
    k_rot         = {k_q[18:0], k_q[79:19]};
    k_next        = k_rot;
    k_next[79:76] = sbox(k_rot[79:76]);
    k_next[19:15] = k_rot[19:15] ^ round;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      k_q <= '0;
    else if (load)   k_q <= key;
    else if (update) k_q <= k_next;
  end

  assign round_key = k_q[79:16];

endmodule
