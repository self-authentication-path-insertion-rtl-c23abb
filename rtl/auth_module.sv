// Authentication module of a security cell.
//
// It is an ordinary M-input LUT with its own configuration table, followed by
// a hard-wired comparison with the output of the LUT it guards: `auth` is
// high whenever the two disagree. The module receives the cell inputs in a
// different order from the guarded LUT, so its table is a permuted copy of the
// LUT's table and the two bitstreams differ even though they describe the same
// function. A change to either table is seen as soon as an input pattern
// reaches a changed minterm. Purely combinational; the paper builds the
// fabric with M equal to the LUT size (6). The XOR as comparator is this
// design's reading of "hard-wired output" together with the XOR primitive the
// paper adds to its library.
module auth_module #(
  parameter int unsigned M = 6
) (
  input  logic [(1<<M)-1:0] cfg,      // authentication table (permuted copy)
  input  logic [M-1:0]      in,       // cell inputs in the module's own order
  input  logic              lut_out,  // output of the guarded LUT
  output logic              auth      // 1 = violation
);

  logic expected;

  lut #(.K(M)) u_lut (
    .cfg (cfg),
    .in  (in),
    .out (expected)
  );

  always_comb auth = expected ^ lut_out;

endmodule
