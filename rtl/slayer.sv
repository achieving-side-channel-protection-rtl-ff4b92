// slayer: S-layer of 16 decomposed, maskable PRESENT S-boxes.
//
// Every S-box is split into two 4x4 reconfigurable function tables with a
// register stage between them:
//   din nibble -> R1' (rft) -> mid register -> R2' (rft) -> dout nibble
// With the tables computed by rft_config, R2'(R1'(x ^ m1)) = S(x) ^ P^-1(m1)
// for every S-box, so only the random value R1(x) ^ m2 is ever stored in the
// mid register. The S-layer itself does not know which countermeasures are
// on: that is entirely a matter of the tables loaded (identity R1 and zero
// masks give a plain S-box).
//
// Timing: R1' is combinational from din. When mid_load is high the mid
// register takes R1'(din), or, when mid_precharge is also high, the random
// word rnd (register precharge: the next real value then lands on a random
// predecessor). dout = R2'(mid) is combinational from the register.
// cfg_ce/cfg_r1_cdi/cfg_r2_cdi shift new tables in (see rft); bit 4*s+b of
// each cdi word feeds output bit b of S-box s. The mid register clears on
// reset.
module slayer
  import present_pkg::*;
#(
  parameter int unsigned NS = NSBOX
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_ce,
  input  logic [4*NS-1:0] cfg_r1_cdi,
  input  logic [4*NS-1:0] cfg_r2_cdi,
  input  logic [4*NS-1:0] din,
  input  logic          mid_load,
  input  logic          mid_precharge,
  input  logic [4*NS-1:0] rnd,
  output logic [4*NS-1:0] dout
);

  logic [4*NS-1:0] r1_out;
  logic [4*NS-1:0] mid_q;

  for (genvar s = 0; s < NS; s++) begin : g_sbox
    rft #(.N(4), .M(4)) u_r1 (
      .clk     (clk),
      .cfg_ce  (cfg_ce),
      .cfg_cdi (cfg_r1_cdi[4*s +: 4]),
      .x       (din[4*s +: 4]),
      .y       (r1_out[4*s +: 4])
    );
    rft #(.N(4), .M(4)) u_r2 (
      .clk     (clk),
      .cfg_ce  (cfg_ce),
      .cfg_cdi (cfg_r2_cdi[4*s +: 4]),
      .x       (mid_q[4*s +: 4]),
      .y       (dout[4*s +: 4])
    );
  end

  // Register stage between R1' and R2'.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        mid_q <= '0;
    else if (mid_load) mid_q <= mid_precharge ? rnd : r1_out;
  end

endmodule
