// tb_rft_config: self-checking test of the table reconfiguration controller.
//
// For each combination of decomposition and masking (several runs each) it
// starts a reconfiguration, records the bits streamed while cfg_ce is high
// (entry 15 first), rebuilds the 32 tables and checks:
//   - done arrives 33 cycles after start and cfg_ce is high for exactly 16;
//   - every R1' is a bijection;
//   - R2'_s(R1'_s(x ^ m1_s)) = S(x) ^ P^-1(m1)_s for all x and S-boxes, with
//     the S-box and P^-1 written here independently;
//   - m1 is zero exactly when masking is off;
//   - with decomposition off R1' stores the masked input unchanged, with it
//     on at least one R1' is not of that form (a random R1 was drawn).
module tb_rft_config;
  import present_pkg::*;
  logic   clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  mode_t  mode = '0;
  state_t rnd = '0;
  logic   busy, done, cfg_ce;
  state_t m1, cfg_r1_cdi, cfg_r2_cdi;
  int checks = 0, failures = 0;

  rft_config dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) rnd <= {$urandom, $urandom};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [3:0] REF_S [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                        4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  // P(i) = 16*(i mod 4) + i/4, so P^-1(m)[i] = m[P(i)].
  function automatic state_t ref_pinv(input state_t m);
    state_t r;
    for (int i = 0; i < 64; i++) r[i] = m[16 * (i % 4) + i / 4];
    return r;
  endfunction

  logic [3:0] t1 [16][16];
  logic [3:0] t2 [16][16];

  task automatic run(input mode_t md);
    int cyc, ce_cycles, e;
    state_t pm;
    logic nonid, bij;
    logic [15:0] seen;
    @(negedge clk);
    mode = md;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    ce_cycles = 0;
    e = 15;
    while (!done) begin
      if (cfg_ce) begin
        for (int s = 0; s < 16; s++) begin
          t1[s][e] = cfg_r1_cdi[4*s +: 4];
          t2[s][e] = cfg_r2_cdi[4*s +: 4];
        end
        e--;
        ce_cycles++;
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 33) begin failures++; $display("FAIL reconfiguration took %0d cycles", cyc); end
    checks++;
    if (ce_cycles != 16) begin failures++; $display("FAIL cfg_ce high %0d cycles", ce_cycles); end
    checks++;
    if ((m1 == '0) == md.mask) begin failures++; $display("FAIL m1=%h mask=%b", m1, md.mask); end
    pm = ref_pinv(m1);
    nonid = 1'b0;
    for (int s = 0; s < 16; s++) begin
      seen = '0;
      for (int x = 0; x < 16; x++) seen[t1[s][x]] = 1'b1;
      bij = &seen;
      checks++;
      if (!bij) begin failures++; $display("FAIL R1' of S-box %0d not a bijection", s); end
      for (int x = 0; x < 16; x++) begin
        logic [3:0] xm, mid, y;
        xm  = 4'(x) ^ m1[4*s +: 4];
        mid = t1[s][xm];
        y   = t2[s][mid];
        checks++;
        if (y !== (REF_S[x] ^ pm[4*s +: 4])) begin
          failures++;
          $display("FAIL mode=%b S-box %0d x=%h: %h exp %h", md, s, x, y, REF_S[x] ^ pm[4*s +: 4]);
        end
        if (!md.decomp) begin
          checks++;
          if (mid !== xm) begin failures++; $display("FAIL R1 not identity with decomposition off"); end
        end
        if (mid !== xm) nonid = 1'b1;
      end
    end
    if (md.decomp) begin
      checks++;
      if (!nonid) begin failures++; $display("FAIL no random R1 drawn"); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++)
      for (int m = 0; m < 8; m++) run(mode_t'(m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
