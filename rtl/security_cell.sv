// Security cell: a LUT and the authentication module that guards it.
//
// Both see the same K cell inputs. The LUT takes them in their natural order;
// the authentication module takes them through a configurable permutation:
// its input j is cell input perm[j]. The permutation is part of the
// connection-block configuration, so the authentication table is stored in a
// different order from the LUT table. `auth` rises while the current input
// pattern exposes a disagreement between the two tables. Combinational.
// Following the paper, the authentication module uses all K inputs (m = n);
// the m < n variant is not built.
module security_cell #(
  parameter int unsigned K  = 6,
  localparam int unsigned PW = (K > 1) ? $clog2(K) : 1
) (
  input  logic [(1<<K)-1:0] lut_cfg,   // LUT truth table
  input  logic [(1<<K)-1:0] auth_cfg,  // authentication truth table
  input  logic [K-1:0][PW-1:0] perm,   // auth input j = in[perm[j]]
  input  logic [K-1:0]      in,        // cell inputs
  output logic              out,       // LUT output, to the data path
  output logic              auth       // 1 = violation
);

  logic [K-1:0] auth_in;

  always_comb begin
    for (int j = 0; j < int'(K); j++) begin
      auth_in[j] = (int'(perm[j]) < int'(K)) ? in[perm[j]] : 1'b0;
    end
  end

  lut #(.K(K)) u_lut (
    .cfg (lut_cfg),
    .in  (in),
    .out (out)
  );

  auth_module #(.M(K)) u_auth (
    .cfg     (auth_cfg),
    .in      (auth_in),
    .lut_out (out),
    .auth    (auth)
  );

endmodule
