// rft_config: computes and loads the S-layer's reconfigurable function tables.
//
// For each encryption it draws fresh randomness and rewrites all 32 tables
// (R1' and R2' of 16 S-boxes) through the CFGLUT shift chains:
//   m1   64-bit state mask (zero when masking is off),
//   m2   one 4-bit mask per S-box for the mid register,
//   R1   a random bijection per S-box (identity when decomposition is off),
//   R1'(k) = R1(k ^ m1_s) ^ m2_s
//   R2'(k) = S(R1^-1(k ^ m2_s)) ^ P^-1(m1)_s
// so that R2'(R1'(x ^ m1_s)) = S(x) ^ P^-1(m1)_s and, after the bit
// permutation, the state stays masked with the same m1 in every round.
// With decomposition off, R1 is the identity and m2_s = m1_s, which folds the
// whole masked S-box into R2'.
//
// Sequence after a start pulse (rnd is sampled every cycle, 64 fresh bits):
//   1 cycle   draw m1
//   1 cycle   draw m2
//  15 cycles  Fisher-Yates shuffle, steps i = 15..1, all S-boxes in parallel:
//             j = (r * (i+1)) >> 4 with r the S-box's 4 random bits, swap R1[i], R1[j]
//  16 cycles  cfg_ce high, entry k = 15..0 of every table on cfg_r1_cdi/cfg_r2_cdi
// done pulses in the cycle after the last shift, 33 cycles after start; the
// sequence is the same length in every mode. m1 holds its value until the
// next start. The formulas for R1', R2' and R2 = S o R1^-1 follow the
// published countermeasure design; the randomness source, how R1 is drawn, and the sequencing
// are this design's choices.
module rft_config
  import present_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  mode_t  mode,
  input  state_t rnd,
  output logic   busy,
  output logic   done,
  output state_t m1,
  output logic   cfg_ce,
  output state_t cfg_r1_cdi,
  output state_t cfg_r2_cdi
);

  typedef enum logic [2:0] {IDLE, DRAW_M1, DRAW_M2, SHUFFLE, LOAD} cfg_state_e;

  cfg_state_e state_q;
  mode_t      mode_q;
  logic [3:0] cnt_q;
  state_t     m1_q;
  state_t     m2_q;
  nibble_t    r1_q [NSBOX][TBL_DEPTH];
  state_t     m1_pinv;

  assign m1_pinv = perm_inv(m1_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      mode_q  <= '0;
      cnt_q   <= '0;
      m1_q    <= '0;
      m2_q    <= '0;
      done    <= 1'b0;
      for (int s = 0; s < NSBOX; s++)
        for (int k = 0; k < TBL_DEPTH; k++) r1_q[s][k] <= 4'(k);
    end else begin
      done <= 1'b0;
      unique case (state_q)
        IDLE: if (start) begin
          mode_q  <= mode;
          state_q <= DRAW_M1;
        end
        DRAW_M1: begin
          m1_q <= mode_q.mask ? rnd : '0;
          for (int s = 0; s < NSBOX; s++)
            for (int k = 0; k < TBL_DEPTH; k++) r1_q[s][k] <= 4'(k);
          state_q <= DRAW_M2;
        end
        DRAW_M2: begin
          m2_q    <= !mode_q.mask ? '0 : (mode_q.decomp ? rnd : m1_q);
          cnt_q   <= 4'd15;
          state_q <= SHUFFLE;
        end
        SHUFFLE: begin
          if (mode_q.decomp) begin
            for (int s = 0; s < NSBOX; s++) begin
              logic [7:0] prod;
              logic [3:0] j;
              prod = rnd[4*s +: 4] * ({4'd0, cnt_q} + 8'd1);
              j    = prod[7:4];
              r1_q[s][cnt_q] <= r1_q[s][j];
              r1_q[s][j]     <= r1_q[s][cnt_q];
            end
          end
          if (cnt_q == 4'd1) begin
            cnt_q   <= 4'd15;
            state_q <= LOAD;
          end else begin
            cnt_q <= cnt_q - 4'd1;
          end
        end
        LOAD: begin
          cnt_q <= cnt_q - 4'd1;
          if (cnt_q == 4'd0) begin
            done    <= 1'b1;
            state_q <= IDLE;
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  // Table entry cnt_q of every S-box, streamed while loading.
  always_comb begin
    cfg_r1_cdi = '0;
    cfg_r2_cdi = '0;
    for (int s = 0; s < NSBOX; s++) begin
      nibble_t a1, a2, r1inv, e1, e2;
      a1 = cnt_q ^ m1_q[4*s +: 4];
      a2 = cnt_q ^ m2_q[4*s +: 4];
      e1 = r1_q[s][a1] ^ m2_q[4*s +: 4];
      r1inv = '0;
      for (int k = 0; k < TBL_DEPTH; k++)
        if (r1_q[s][k] == a2) r1inv = 4'(k);
      e2 = sbox(r1inv) ^ m1_pinv[4*s +: 4];
      cfg_r1_cdi[4*s +: 4] = e1;
      cfg_r2_cdi[4*s +: 4] = e2;
    end
  end

  assign cfg_ce = (state_q == LOAD);
  assign busy   = (state_q != IDLE);
  assign m1     = m1_q;

endmodule
