// cfglut5: 5-input dynamically reconfigurable look-up table.
//
// Generic-logic equivalent of the FPGA vendor's CFGLUT5 primitive, which the
// design uses as its basic reconfigurable element. The 32-bit truth table
// sits in a shift register: while ce is high, each rising clock edge shifts
// the table up by one place and moves cdi into bit 0, so 32 cycles replace
// the whole function (16 cycles suffice when the LUT is used as a 4-input
// table and only o5, or o6 with i[4] = 0, is read). cdo is the bit shifted
// out (bit 31) so several LUTs can be chained.
//   o6 = table[i[4:0]]            (one 5-input function)
//   o5 = table[{1'b0, i[3:0]}]    (a second 4-input function, lower half)
// Outputs are combinational from i; a new table is visible one cycle after
// the last shift. INIT is the power-up table. The pin names and the 32-cycle
// and 16-cycle reconfiguration times follow the published countermeasure design; the shift
// direction and the o5 half follow the vendor primitive's documentation.
module cfglut5 #(
  parameter logic [31:0] INIT = 32'h0000_0000
) (
  input  logic       clk,
  input  logic       ce,
  input  logic       cdi,
  input  logic [4:0] i,
  output logic       o6,
  output logic       o5,
  output logic       cdo
);

  logic [31:0] table_q = INIT;

  always_ff @(posedge clk) begin
    if (ce) table_q <= {table_q[30:0], cdi};
  end

  assign o6  = table_q[i];
  assign o5  = table_q[{1'b0, i[3:0]}];
  assign cdo = table_q[31];

endmodule
