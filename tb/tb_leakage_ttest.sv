// tb_leakage_ttest: simulated specific t-test of the protected PRESENT core.
//
// Mimics the leakage assessment the countermeasures are evaluated with, using
// a noise-free register power model instead of an oscilloscope: the sample
// of a clock cycle is the Hamming distance by which the state register and
// the S-layer mid register change at that edge. For each of the eight
// countermeasure combinations NTRACES encryptions of random plaintexts under
// one fixed key are run with fresh randomness, and Welch's t statistic
//   t = (mean(G1) - mean(G0)) / sqrt(var(G1)/|G1| + var(G0)/|G0|)
// is computed per sample point over the cycles of rounds 15 to 17, for the
// three groups of round-16 models:
//   64 models  S-box output bits of round 16,
//   64 models  bits of round-16 input xor round-16 output,
//   16 models  S-box 0 output of round 16 equal to a value v (one against rest).
// A mode fails when any |t| exceeds 4.5. Checked: every ciphertext; without
// countermeasures the model leaks; with masking and precharge together
// (with or without decomposition) no point exceeds 4.5. The other modes are
// reported only. This register-level model cannot show glitch or routing
// leakage, so it says nothing about combinational logic.
module tb_leakage_ttest;
  import present_pkg::*;

  localparam int NTRACES = 3000;
  localparam int WMAX    = 12;   // sample points: 3 rounds x up to 4 cycles
  localparam int NMODELS = 144;
  localparam real THRESHOLD = 4.5;

  logic   clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  state_t plaintext = '0;
  key_t   key = 80'h0123_4567_89AB_CDEF_0F1E;
  mode_t  mode = '0;
  state_t rnd = '0;
  logic   busy, done;
  state_t ciphertext;
  int checks = 0, failures = 0;

  present_rft_top dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) rnd <= {$urandom, $urandom};

  initial begin
    repeat (8 * NTRACES * 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model with round-16 intermediates ----
  localparam logic [3:0] REF_S [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                        4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};
  logic [63:0] r16_in, r16_sout, r16_out;

  function automatic logic [63:0] ref_encrypt(input logic [63:0] pt, input logic [79:0] k);
    logic [63:0] s, t;
    logic [79:0] kr;
    s  = pt;
    kr = k;
    for (int r = 1; r <= 31; r++) begin
      if (r == 16) r16_in = s;
      s = s ^ kr[79:16];
      for (int n = 0; n < 16; n++) t[4*n +: 4] = REF_S[s[4*n +: 4]];
      if (r == 16) r16_sout = t;
      for (int b = 0; b < 64; b++) s[(b == 63) ? 63 : (b * 16) % 63] = t[b];
      if (r == 16) r16_out = s;
      kr = {kr[18:0], kr[79:19]};
      kr[79:76] = REF_S[kr[79:76]];
      kr[19:15] = kr[19:15] ^ 5'(r);
    end
    return s ^ kr[79:16];
  endfunction

  // ---- statistics ----
  real sum [2][NMODELS][WMAX];
  real sq  [2][NMODELS][WMAX];
  int  cnt [2][NMODELS];
  int  sample [WMAX];
  int  nsamp;

  // Power model: the Hamming distance by which the state and mid registers
  // change at a clock edge, sampled at the following falling edge, for the
  // edges taken while the controller is in rounds 15..17.
  state_t prev_state = '0, prev_mid = '0;
  logic   was_in_window = 1'b0;
  always @(negedge clk) begin
    if (was_in_window && nsamp < WMAX) begin
      sample[nsamp] = $countones(dut.state_q ^ prev_state) + $countones(dut.u_sl.mid_q ^ prev_mid);
      nsamp++;
    end
    prev_state    = dut.state_q;
    prev_mid      = dut.u_sl.mid_q;
    was_in_window = dut.ctrl_q inside {dut.PRE_MID, dut.MID, dut.PRE_STATE, dut.STATE} &&
                    dut.round_q >= 5'd15 && dut.round_q <= 5'd17;
  end

  function automatic logic model_bit(input int m);
    if (m < 64)       return r16_sout[m];
    else if (m < 128) return r16_in[m - 64] ^ r16_out[m - 64];
    else              return r16_sout[3:0] == 4'(m - 128);
  endfunction

  real max_t [8];

  task automatic run_mode(input int md);
    logic [63:0] pt, exp_ct;
    int npts, ct_bad;
    real m0, m1v, v0, v1, t;
    foreach (sum[g, m, p]) begin sum[g][m][p] = 0.0; sq[g][m][p] = 0.0; end
    foreach (cnt[g, m]) cnt[g][m] = 0;
    ct_bad = 0;
    npts = 0;
    for (int n = 0; n < NTRACES; n++) begin
      pt = {$urandom, $urandom};
      exp_ct = ref_encrypt(pt, key);
      @(negedge clk);
      plaintext = pt;
      mode = mode_t'(md);
      start = 1'b1;
      nsamp = 0;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      if (ciphertext !== exp_ct) ct_bad++;
      npts = nsamp;
      for (int m = 0; m < NMODELS; m++) begin
        int g;
        g = int'(model_bit(m));
        cnt[g][m]++;
        for (int p = 0; p < nsamp; p++) begin
          sum[g][m][p] += real'(sample[p]);
          sq[g][m][p]  += real'(sample[p]) * real'(sample[p]);
        end
      end
    end
    checks++;
    if (ct_bad != 0) begin failures++; $display("FAIL mode %b: %0d wrong ciphertexts", md, ct_bad); end
    checks++;
    if (npts != (md[0] ? 12 : 6)) begin failures++; $display("FAIL mode %b: %0d sample points", md, npts); end
    max_t[md] = 0.0;
    for (int m = 0; m < NMODELS; m++)
      for (int p = 0; p < npts; p++) begin
        m0  = sum[0][m][p] / cnt[0][m];
        m1v = sum[1][m][p] / cnt[1][m];
        v0  = sq[0][m][p] / cnt[0][m] - m0 * m0;
        v1  = sq[1][m][p] / cnt[1][m] - m1v * m1v;
        if (v0 / cnt[0][m] + v1 / cnt[1][m] > 1.0e-12) begin
          t = (m1v - m0) / $sqrt(v0 / cnt[0][m] + v1 / cnt[1][m]);
          if (t < 0.0) t = -t;
          if (t > max_t[md]) max_t[md] = t;
        end
      end
    $display("mode decomp=%0d mask=%0d precharge=%0d: %0d traces, %0d points, max |t| = %0.2f -> %s",
             md[2], md[1], md[0], NTRACES, npts, max_t[md], (max_t[md] > THRESHOLD) ? "leaks" : "passes");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int md = 0; md < 8; md++) run_mode(md);
    checks++;
    if (max_t[0] <= THRESHOLD) begin failures++; $display("FAIL unprotected mode shows no leakage"); end
    checks++;
    if (max_t[3] > THRESHOLD) begin failures++; $display("FAIL masking+precharge leaks"); end
    checks++;
    if (max_t[7] > THRESHOLD) begin failures++; $display("FAIL all countermeasures leak"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
