// tb_present_rft_top: end-to-end test of the protected PRESENT-80 core.
//
// Encrypts the four published PRESENT-80 test vectors and random
// plaintext/key pairs in each of the eight countermeasure combinations
// (decomposition, masking, precharge on or off) and compares every
// ciphertext with an unprotected reference model written here from the
// cipher definition. Also checks the start-to-done latency (98 cycles, 160
// with precharge), that the state register holds plaintext ^ m1 after
// loading, that m1 is zero exactly when masking is off, and counts that
// each mechanism happened: table reconfiguration, R1 that is not the
// identity, mid and state precharge, masked operation. Fresh random bits
// are driven on rnd every cycle. Runs at the core's default size.
module tb_present_rft_top;
  import present_pkg::*;

  localparam int NRAND_PER_MODE = 6;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   start = 1'b0;
  state_t plaintext = '0;
  key_t   key = '0;
  mode_t  mode = '0;
  state_t rnd = '0;
  logic   busy, done;
  state_t ciphertext;

  int checks = 0;
  int failures = 0;
  int n_reconfig = 0, n_pre_mid = 0, n_pre_state = 0, n_masked = 0, n_decomp_nonid = 0;
  int n_mode_seen [8];

  present_rft_top dut (.*);

  always #5 clk = ~clk;

  // Fresh randomness every cycle.
  always @(negedge clk) rnd <= {$urandom, $urandom};

  // Watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model (plain PRESENT-80) ----
  localparam logic [3:0] REF_S [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                        4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  function automatic logic [63:0] ref_encrypt(input logic [63:0] pt, input logic [79:0] k);
    logic [63:0] s, t;
    logic [79:0] kr;
    s  = pt;
    kr = k;
    for (int r = 1; r <= 31; r++) begin
      s = s ^ kr[79:16];
      for (int n = 0; n < 16; n++) t[4*n +: 4] = REF_S[s[4*n +: 4]];
      for (int b = 0; b < 64; b++) s[(b == 63) ? 63 : (b * 16) % 63] = t[b];
      kr = {kr[18:0], kr[79:19]};
      kr[79:76] = REF_S[kr[79:76]];
      kr[19:15] = kr[19:15] ^ 5'(r);
    end
    return s ^ kr[79:16];
  endfunction

  // ---- mechanism monitors ----
  always @(posedge clk) begin
    if (rst_n && dut.u_cfg.done) n_reconfig++;
    if (dut.u_sl.mid_load && dut.u_sl.mid_precharge) n_pre_mid++;
    if (dut.ctrl_q == dut.PRE_STATE) n_pre_state++;
  end

  task automatic run_one(input logic [63:0] pt, input logic [79:0] k, input mode_t md);
    int cyc;
    logic [63:0] exp_ct;
    logic nonid;
    exp_ct = ref_encrypt(pt, k);
    @(negedge clk);
    plaintext = pt;
    key       = k;
    mode      = md;
    start     = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;  // edges after the one that sampled start
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (dut.ctrl_q == dut.INIT) begin
        @(negedge clk);
        cyc++;
        checks++;
        if (dut.state_q !== (pt ^ dut.u_cfg.m1)) begin
          failures++;
          $display("FAIL state load: %h vs %h", dut.state_q, pt ^ dut.u_cfg.m1);
        end
        checks++;
        if ((dut.u_cfg.m1 == '0) == md.mask) begin
          // with 64 random bits m1 == 0 in masked mode is practically impossible
          failures++;
          $display("FAIL m1=%h with mask=%b", dut.u_cfg.m1, md.mask);
        end
        if (md.mask) n_masked++;
        nonid = 1'b0;
        for (int s = 0; s < 16; s++)
          for (int e = 0; e < 16; e++)
            if (dut.u_cfg.r1_q[s][e] != 4'(e)) nonid = 1'b1;
        checks++;
        if (nonid != md.decomp) begin
          failures++;
          $display("FAIL R1 identity=%b with decomp=%b", !nonid, md.decomp);
        end
        if (nonid) n_decomp_nonid++;
      end
    end
    checks++;
    if (ciphertext !== exp_ct) begin
      failures++;
      $display("FAIL mode=%b pt=%h key=%h ct=%h exp=%h", md, pt, k, ciphertext, exp_ct);
    end
    checks++;
    if (cyc != (md.precharge ? 160 : 98)) begin
      failures++;
      $display("FAIL latency %0d mode=%b", cyc, md);
    end
    n_mode_seen[md]++;
  endtask

  initial begin
    foreach (n_mode_seen[i]) n_mode_seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // The published test vectors against the reference model itself.
    checks++;
    if (ref_encrypt(64'h0, 80'h0) != 64'h5579C1387B228445) begin
      failures++; $display("FAIL reference model vector 1");
    end
    checks++;
    if (ref_encrypt(64'h0, 80'hFFFF_FFFF_FFFF_FFFF_FFFF) != 64'hE72C46C0F5945049) begin
      failures++; $display("FAIL reference model vector 2");
    end
    checks++;
    if (ref_encrypt(64'hFFFF_FFFF_FFFF_FFFF, 80'h0) != 64'hA112FFC72F68417B) begin
      failures++; $display("FAIL reference model vector 3");
    end
    checks++;
    if (ref_encrypt(64'hFFFF_FFFF_FFFF_FFFF, 80'hFFFF_FFFF_FFFF_FFFF_FFFF) != 64'h3333DCD3213210D2) begin
      failures++; $display("FAIL reference model vector 4");
    end
    for (int m = 0; m < 8; m++) begin
      run_one(64'h0, 80'h0, mode_t'(m));
      run_one(64'h0, {80{1'b1}}, mode_t'(m));
      run_one({64{1'b1}}, 80'h0, mode_t'(m));
      run_one({64{1'b1}}, {80{1'b1}}, mode_t'(m));
      for (int i = 0; i < NRAND_PER_MODE; i++)
        run_one({$urandom, $urandom}, {16'($urandom), $urandom, $urandom}, mode_t'(m));
    end
    // Every mechanism must have happened.
    checks++; if (n_reconfig == 0)     begin failures++; $display("FAIL no reconfiguration"); end
    checks++; if (n_pre_mid == 0)      begin failures++; $display("FAIL no mid precharge"); end
    checks++; if (n_pre_state == 0)    begin failures++; $display("FAIL no state precharge"); end
    checks++; if (n_masked == 0)       begin failures++; $display("FAIL no masked run"); end
    checks++; if (n_decomp_nonid == 0) begin failures++; $display("FAIL no random R1"); end
    for (int m = 0; m < 8; m++) begin
      checks++;
      if (n_mode_seen[m] == 0) begin failures++; $display("FAIL mode %0d never run", m); end
    end
    $display("mechanisms: reconfig=%0d mid_precharge=%0d state_precharge=%0d masked_runs=%0d random_R1_runs=%0d",
             n_reconfig, n_pre_mid, n_pre_state, n_masked, n_decomp_nonid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
