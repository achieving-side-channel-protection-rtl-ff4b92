// tb_cfglut5: self-checking test of the reconfigurable LUT.
//
// Shifts random 32-bit tables in (bit 31 first) and reads every o6 and o5
// address, checks cdo returns the old table bit by bit, that ce low keeps the
// table, and that a 16-cycle reload replaces the 4-input (o5) half.
module tb_cfglut5;
  logic clk = 1'b0;
  logic ce = 1'b0, cdi = 1'b0;
  logic [4:0] i = '0;
  logic o6, o5, cdo;
  int checks = 0, failures = 0;

  cfglut5 #(.INIT(32'hA5C3_0F96)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_table(input logic [31:0] t);
    for (int a = 0; a < 32; a++) begin
      i = 5'(a);
      #1;
      checks++;
      if (o6 !== t[a]) begin failures++; $display("FAIL o6[%0d]", a); end
      checks++;
      if (o5 !== t[a % 16]) begin failures++; $display("FAIL o5[%0d]", a); end
    end
  endtask

  logic [31:0] tab, prev;

  initial begin
    @(negedge clk);
    check_table(32'hA5C3_0F96);
    prev = 32'hA5C3_0F96;
    for (int n = 0; n < 6; n++) begin
      tab = $urandom;
      for (int b = 31; b >= 0; b--) begin
        @(negedge clk);
        checks++;
        // cdo shows bit 31 of the current register contents
        if (cdo !== prev[31]) begin failures++; $display("FAIL cdo"); end
        ce  = 1'b1;
        cdi = tab[b];
        @(negedge clk);
        ce = 1'b0;
        prev = {prev[30:0], tab[b]};
      end
      check_table(tab);
      // ce low: table holds even with cdi toggling
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        cdi = ~cdi;
      end
      check_table(tab);
      prev = tab;
    end
    // 16-cycle reconfiguration of the 4-input function
    tab = $urandom;
    for (int b = 15; b >= 0; b--) begin
      @(negedge clk);
      ce  = 1'b1;
      cdi = tab[b];
      @(negedge clk);
      ce = 1'b0;
    end
    for (int a = 0; a < 16; a++) begin
      i = 5'(a);
      #1;
      checks++;
      if (o5 !== tab[a]) begin failures++; $display("FAIL 16-cycle o5[%0d]", a); end
      i = 5'(a + 16);
      #1;
      checks++;
      if (o6 !== prev[a]) begin failures++; $display("FAIL 16-cycle upper half[%0d]", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
