// tb_slayer: self-checking test of the 16-S-box decomposed S-layer.
//
// Loads random R1' and R2' tables into all 32 function tables, then drives
// random words through R1', the mid register and R2' and checks
// dout = R2'_s(R1'_s(din_s)) per S-box one cycle after mid_load. Also checks
// that the mid register holds while mid_load is low and that precharge
// loads the random word instead (dout = R2'_s(rnd_s)).
module tb_slayer;
  import present_pkg::*;
  logic   clk = 1'b0, rst_n = 1'b0;
  logic   cfg_ce = 1'b0;
  state_t cfg_r1_cdi = '0, cfg_r2_cdi = '0, din = '0, rnd = '0;
  logic   mid_load = 1'b0, mid_precharge = 1'b0;
  state_t dout;
  int checks = 0, failures = 0;
  int n_pre = 0;

  slayer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] t1 [16][16];
  logic [3:0] t2 [16][16];

  function automatic state_t expect_out(input state_t mid);
    state_t r;
    for (int s = 0; s < 16; s++) r[4*s +: 4] = t2[s][mid[4*s +: 4]];
    return r;
  endfunction

  function automatic state_t r1_of(input state_t d);
    state_t r;
    for (int s = 0; s < 16; s++) r[4*s +: 4] = t1[s][d[4*s +: 4]];
    return r;
  endfunction

  state_t held;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      foreach (t1[s, e]) t1[s][e] = 4'($urandom);
      foreach (t2[s, e]) t2[s][e] = 4'($urandom);
      for (int e = 15; e >= 0; e--) begin
        @(negedge clk);
        cfg_ce = 1'b1;
        for (int s = 0; s < 16; s++) begin
          cfg_r1_cdi[4*s +: 4] = t1[s][e];
          cfg_r2_cdi[4*s +: 4] = t2[s][e];
        end
      end
      @(negedge clk);
      cfg_ce = 1'b0;
      for (int n = 0; n < 40; n++) begin
        din = {$urandom, $urandom};
        rnd = {$urandom, $urandom};
        mid_load = 1'b1;
        mid_precharge = (n % 3 == 0);
        @(negedge clk);
        mid_load = 1'b0;
        checks++;
        if (mid_precharge) begin
          n_pre++;
          held = rnd;
        end else begin
          held = r1_of(din);
        end
        if (dout !== expect_out(held)) begin
          failures++;
          $display("FAIL pre=%b din=%h dout=%h exp=%h", mid_precharge, din, dout, expect_out(held));
        end
        mid_precharge = 1'b0;
        // hold: new inputs, no load
        din = {$urandom, $urandom};
        rnd = {$urandom, $urandom};
        @(negedge clk);
        checks++;
        if (dout !== expect_out(held)) begin failures++; $display("FAIL mid register did not hold"); end
      end
    end
    checks++;
    if (n_pre == 0) begin failures++; $display("FAIL no precharge exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
