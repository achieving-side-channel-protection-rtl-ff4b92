// present_rft_top: round-based PRESENT-80 encryption core whose S-layer is
// built from dynamically reconfigurable look-up tables.
//
// Side-channel protection comes from three switchable countermeasures, all
// aimed at the S-layer (mode, sampled at start):
//   decomp     each S-box is split into a random table R1 and R2 = S o R1^-1
//              with a register between them, so only random R1(x) is stored;
//   mask       the state carries a 64-bit Boolean mask m1 and the mid
//              register a mask m2; the masked tables keep m1 invariant
//              across rounds, so the data is masked from plaintext to
//              ciphertext register;
//   precharge  before every load of the state or mid register with real
//              data, the register is loaded with fresh random data.
// rnd must supply 64 fresh random bits every cycle (the random source is
// outside this core).
//
// Data path: plaintext register -> (xor m1) -> state register -> xor round
// key -> S-layer (R1', mid register, R2') -> bit permutation -> state
// register; after round 31 the last round key and m1 are removed into the
// ciphertext register.
//
// Timing, from the start pulse (accepted when busy is low):
//   1 cycle       capture plaintext, key and mode
//   33 cycles     new masks and tables computed and shifted in (rft_config)
//   1 cycle       state <= plaintext ^ m1
//   31 rounds     2 cycles each (mid, then state), 4 with precharge
//   1 cycle       ciphertext register written, done pulses with it
// i.e. 98 cycles, or 160 with precharge, from start to done. ciphertext
// holds until the next done. The round structure, the S-box decomposition,
// the masked table formulas and the use of precharge follow the
// published countermeasure design; the cycle schedule, key length (80 bits) and interface are
// this design's choices.
module present_rft_top
  import present_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  state_t plaintext,
  input  key_t   key,
  input  mode_t  mode,
  input  state_t rnd,
  output logic   busy,
  output logic   done,
  output state_t ciphertext
);

  typedef enum logic [2:0] {IDLE, CONFIG, INIT, PRE_MID, MID, PRE_STATE, STATE, FINAL}
    ctrl_state_e;

  ctrl_state_e ctrl_q;
  mode_t       mode_q;
  logic [4:0]  round_q;
  state_t      pt_q;
  state_t      state_q;
  state_t      ct_q;

  // Reconfiguration controller
  logic   cfg_start, cfg_busy, cfg_done, cfg_ce;
  state_t m1, r1_cdi, r2_cdi;

  assign cfg_start = (ctrl_q == IDLE) && start;

  rft_config u_cfg (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (cfg_start),
    .mode       (mode),
    .rnd        (rnd),
    .busy       (cfg_busy),
    .done       (cfg_done),
    .m1         (m1),
    .cfg_ce     (cfg_ce),
    .cfg_r1_cdi (r1_cdi),
    .cfg_r2_cdi (r2_cdi)
  );

  // Round key
  state_t round_key;
  logic   key_update;

  assign key_update = (ctrl_q == STATE);

  present_keysched u_key (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (cfg_start),
    .key       (key),
    .update    (key_update),
    .round     (round_q),
    .round_key (round_key)
  );

  // S-layer and permutation
  state_t sl_in, sl_out, p_out;
  logic   mid_load, mid_pre;

  assign sl_in    = state_q ^ round_key;
  assign mid_load = (ctrl_q == PRE_MID) || (ctrl_q == MID);
  assign mid_pre  = (ctrl_q == PRE_MID);

  slayer u_sl (
    .clk           (clk),
    .rst_n         (rst_n),
    .cfg_ce        (cfg_ce),
    .cfg_r1_cdi    (r1_cdi),
    .cfg_r2_cdi    (r2_cdi),
    .din           (sl_in),
    .mid_load      (mid_load),
    .mid_precharge (mid_pre),
    .rnd           (rnd),
    .dout          (sl_out)
  );

  // Permutation layer: pure wiring, bit i to bit 16*i mod 63.
  assign p_out = perm(sl_out);

  // Control and state registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q  <= IDLE;
      mode_q  <= '0;
      round_q <= '0;
      pt_q    <= '0;
      state_q <= '0;
      ct_q    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (ctrl_q)
        IDLE: if (start) begin
          pt_q   <= plaintext;
          mode_q <= mode;
          ctrl_q <= CONFIG;
        end
        CONFIG: if (cfg_done) ctrl_q <= INIT;
        INIT: begin
          state_q <= pt_q ^ m1;
          round_q <= 5'd1;
          ctrl_q  <= mode_q.precharge ? PRE_MID : MID;
        end
        PRE_MID: ctrl_q <= MID;
        MID:     ctrl_q <= mode_q.precharge ? PRE_STATE : STATE;
        PRE_STATE: begin
          state_q <= rnd;
          ctrl_q  <= STATE;
        end
        STATE: begin
          state_q <= p_out;
          if (round_q == 5'(NROUNDS)) begin
            ctrl_q <= FINAL;
          end else begin
            round_q <= round_q + 5'd1;
            ctrl_q  <= mode_q.precharge ? PRE_MID : MID;
          end
        end
        FINAL: begin
          ct_q   <= state_q ^ round_key ^ m1;
          done   <= 1'b1;
          ctrl_q <= IDLE;
        end
        default: ctrl_q <= IDLE;
      endcase
    end
  end

  assign busy       = (ctrl_q != IDLE);
  assign ciphertext = ct_q;

  // The tables may only change while no encryption is using them.
  property p_no_reconfig_in_rounds;
    @(posedge clk) disable iff (!rst_n)
      (ctrl_q inside {INIT, PRE_MID, MID, PRE_STATE, STATE, FINAL}) |-> !cfg_ce;
  endproperty
  a_no_reconfig_in_rounds: assert property (p_no_reconfig_in_rounds);

endmodule
