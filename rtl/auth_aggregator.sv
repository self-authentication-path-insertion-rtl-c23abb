// Authentication aggregator: the OR of NIN authentication signals.
//
// The authentication network uses it twice: inside each CLB it merges the
// signals of the CLB's security cells into CLB_authentication, and at each
// switch box it merges the CLB_authentication signals of the CLBs around that
// switch box into SB_authentication. The output is high when any input is.
// Combinational. The paper builds this from OR gates; it is written here as
// a reduction OR, which synthesis maps to a tree of OR gates.
module auth_aggregator #(
  parameter int unsigned NIN = 10
) (
  input  logic [NIN-1:0] auth_in,
  output logic           auth_out
);

  always_comb auth_out = |auth_in;

endmodule
