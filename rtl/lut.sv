// K-input look-up table of the FPGA fabric.
//
// The output is bit `in` of the 2^K-bit configuration table, so table bit i
// holds the function value for the input minterm i (input 0 is the least
// significant address bit). Purely combinational. The paper's architecture
// uses 6-input LUTs with 64 configuration bits each; that is the default.
module lut #(
  parameter int unsigned K = 6
) (
  input  logic [(1<<K)-1:0] cfg,  // truth table, bit i = f(minterm i)
  input  logic [K-1:0]      in,   // LUT inputs
  output logic              out   // function value
);

  always_comb out = cfg[in];

endmodule
