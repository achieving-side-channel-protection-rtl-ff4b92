// tb_present_keysched: self-checking test of the PRESENT-80 key schedule.
//
// Loads random keys and the all-zero and all-one keys, steps the schedule 31
// times, and compares all 32 round keys with a reference that rotates by
// shifting (k << 61 | k >> 19) and uses its own S-box table. Also checks that
// the register holds when neither load nor update is asserted.
module tb_present_keysched;
  import present_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, update = 1'b0;
  key_t key = '0;
  logic [4:0] round = '0;
  state_t round_key;
  int checks = 0, failures = 0;

  present_keysched dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [3:0] REF_S [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                        4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  task automatic run(input key_t k);
    key_t kr;
    kr = k;
    @(negedge clk);
    key = k;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    for (int r = 1; r <= 32; r++) begin
      checks++;
      if (round_key !== kr[79:16]) begin
        failures++;
        $display("FAIL key %h round %0d: %h exp %h", k, r, round_key, kr[79:16]);
      end
      if (r == 32) break;
      // idle cycle: must hold
      @(negedge clk);
      checks++;
      if (round_key !== kr[79:16]) begin failures++; $display("FAIL hold"); end
      round = 5'(r);
      update = 1'b1;
      @(negedge clk);
      update = 1'b0;
      kr = (kr << 61) | (kr >> 19);
      kr[79:76] = REF_S[kr[79:76]];
      kr[19:15] = kr[19:15] ^ 5'(r);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run('0);
    run('1);
    for (int n = 0; n < 8; n++) run({16'($urandom), $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
