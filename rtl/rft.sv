// rft: (N x M) reconfigurable function table.
//
// Realises an arbitrary, run-time replaceable function y = F(x) from N input
// bits to M output bits. Each output bit owns L = ceil(2^(N-4)) CFGLUT5s used
// as 4-input tables (i[4] tied low, o6 read); LUT l of output o holds the 16
// entries whose upper input bits x[N-1:4] equal l. A multiplexer tree driven
// by x[N-1:4] then selects the LUT for each output, so the table needs
// M * ceil(2^(N-4)) CFGLUTs, as in the published countermeasure design. For N = 4 (the
// PRESENT S-box case) that is one LUT per output and no multiplexers.
//
// Reconfiguration: hold cfg_ce high for 16 cycles and present on
// cfg_cdi[o*L + l] one bit per cycle of LUT l of output o, entry 15 first and
// entry 0 last; all LUTs load in parallel. The new function is valid from
// the cycle after the last shift. Lookup itself is combinational.
module rft #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 4,
  localparam int unsigned L  = (N > 4) ? (1 << (N - 4)) : 1,
  localparam int unsigned SW = (N > 4) ? (N - 4) : 1
) (
  input  logic           clk,
  input  logic           cfg_ce,
  input  logic [M*L-1:0] cfg_cdi,
  input  logic [N-1:0]   x,
  output logic [M-1:0]   y
);

  logic [3:0]      lut_in;
  logic [SW-1:0]   sel;
  logic [M*L-1:0]  lut_out;

  // Inputs below bit 4 address every LUT; narrower tables pad with zeros.
  if (N >= 4) begin : g_in_wide
    assign lut_in = x[3:0];
  end else begin : g_in_narrow
    assign lut_in = 4'(x);
  end

  if (N > 4) begin : g_sel
    assign sel = x[N-1:4];
  end else begin : g_nosel
    assign sel = '0;
  end

  for (genvar o = 0; o < M; o++) begin : g_out
    for (genvar l = 0; l < L; l++) begin : g_lut
      logic unused_o5, unused_cdo;
      cfglut5 u_lut (
        .clk (clk),
        .ce  (cfg_ce),
        .cdi (cfg_cdi[o*L + l]),
        .i   ({1'b0, lut_in}),
        .o6  (lut_out[o*L + l]),
        .o5  (unused_o5),
        .cdo (unused_cdo)
      );
    end
    // Multiplexer stages: pick the LUT that holds the addressed entry.
    assign y[o] = lut_out[o*L + int'(sel)];
  end

endmodule
