// tb_rft: self-checking test of the reconfigurable function table.
//
// Two instances: the 4x4 table of the S-layer (one CFGLUT per output, no
// multiplexers) and a 6x2 table (four CFGLUTs per output behind a two-level
// multiplexer tree). Random tables are shifted in over 16 cycles, entry 15
// first, and every input value is checked against the table. A second load
// checks that the function really is replaced.
module tb_rft;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  // 4x4
  logic        ce_a = 1'b0;
  logic [3:0]  cdi_a = '0;
  logic [3:0]  x_a = '0;
  logic [3:0]  y_a;
  // 6x2: L = 4 LUTs per output
  logic        ce_b = 1'b0;
  logic [7:0]  cdi_b = '0;
  logic [5:0]  x_b = '0;
  logic [1:0]  y_b;

  rft #(.N(4), .M(4)) dut_a (.clk(clk), .cfg_ce(ce_a), .cfg_cdi(cdi_a), .x(x_a), .y(y_a));
  rft #(.N(6), .M(2)) dut_b (.clk(clk), .cfg_ce(ce_b), .cfg_cdi(cdi_b), .x(x_b), .y(y_b));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] tab_a [16];
  logic [1:0] tab_b [64];
  int cycles;

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      foreach (tab_a[k]) tab_a[k] = 4'($urandom);
      foreach (tab_b[k]) tab_b[k] = 2'($urandom);
      cycles = 0;
      for (int e = 15; e >= 0; e--) begin
        @(negedge clk);
        ce_a = 1'b1;
        ce_b = 1'b1;
        for (int o = 0; o < 4; o++) cdi_a[o] = tab_a[e][o];
        for (int o = 0; o < 2; o++)
          for (int l = 0; l < 4; l++) cdi_b[o*4 + l] = tab_b[l*16 + e][o];
        @(posedge clk);
        cycles++;
      end
      @(negedge clk);
      ce_a = 1'b0;
      ce_b = 1'b0;
      checks++;
      if (cycles != 16) begin failures++; $display("FAIL reconfiguration took %0d cycles", cycles); end
      for (int v = 0; v < 16; v++) begin
        x_a = 4'(v);
        #1;
        checks++;
        if (y_a !== tab_a[v]) begin failures++; $display("FAIL 4x4 x=%0d y=%h exp=%h", v, y_a, tab_a[v]); end
      end
      for (int v = 0; v < 64; v++) begin
        x_b = 6'(v);
        #1;
        checks++;
        if (y_b !== tab_b[v]) begin failures++; $display("FAIL 6x2 x=%0d y=%h exp=%h", v, y_b, tab_b[v]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
