// Configurable logic block (CLB) built from security cells.
//
// N security cells (LUT plus authentication module) share NSRC routing
// inputs. Each cell input is picked by a configured select from the NSRC
// routing inputs followed by the N cell outputs of this CLB (local feedback),
// so select value v < NSRC picks src[v] and NSRC <= v < NSRC+N picks cell
// output v-NSRC; larger values give 0. The same selected inputs feed the
// cell's authentication module through its permutation. Each cell output is
// either the LUT output or, with ff_en set, the LUT output registered on the
// rising clock edge (flip-flop cleared by rst_n). The cells' authentication
// signals are ORed into CLB_authentication (clb_auth), combinationally.
// While rst_n is low every cell input reads 0, so a random or half-written
// configuration cannot close a combinational loop during reset.
//
// The paper gives the security cell and the OR aggregation; the input
// selection, the flip-flop with its bypass and the feedback path are the
// usual cluster organisation of the k6_N10 architecture, chosen here in their
// simplest form (one full multiplexer per cell input instead of a
// connection block plus local crossbar).
//
// The local feedback makes combinational paths from a cell output back to
// cell inputs possible. They are closed only if the configuration selects
// them, as in any FPGA; linters report them as combinational loops.
module clb
  import sa_pkg::*;
#(
  parameter int unsigned K    = LUT_K,
  parameter int unsigned N    = CLB_N,
  parameter int unsigned NSRC = 2 * CHAN_W,
  localparam int unsigned PW  = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned SW  = $clog2(NSRC + N + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [NSRC-1:0]               src,       // routing inputs
  input  logic [N-1:0][(1<<K)-1:0]      lut_cfg,   // LUT tables
  input  logic [N-1:0][(1<<K)-1:0]      auth_cfg,  // authentication tables
  input  logic [N-1:0][K-1:0][PW-1:0]   perm,      // authentication input order
  input  logic [N-1:0][K-1:0][SW-1:0]   in_sel,    // cell input selects
  input  logic [N-1:0]                  ff_en,     // 1 = registered output
  output logic [N-1:0]                  out,       // cell outputs
  output logic [N-1:0]                  cell_auth, // per-cell violation
  output logic                          clb_auth   // CLB_authentication
);

  logic [NSRC+N-1:0] pool;
  logic [N-1:0]      lut_out;
  logic [N-1:0]      ff_q;

  always_comb pool = {out, src};

  for (genvar c = 0; c < int'(N); c++) begin : g_cell
    logic [K-1:0] cin;

    always_comb begin
      for (int j = 0; j < int'(K); j++) begin
        cin[j] = (rst_n && int'(in_sel[c][j]) < int'(NSRC + N)) ? pool[in_sel[c][j]] : 1'b0;
      end
    end

    security_cell #(.K(K)) u_cell (
      .lut_cfg  (lut_cfg[c]),
      .auth_cfg (auth_cfg[c]),
      .perm     (perm[c]),
      .in       (cin),
      .out      (lut_out[c]),
      .auth     (cell_auth[c])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ff_q[c] <= 1'b0;
      else        ff_q[c] <= lut_out[c];
    end

    always_comb out[c] = ff_en[c] ? ff_q[c] : lut_out[c];
  end

  auth_aggregator #(.NIN(N)) u_agg (
    .auth_in  (cell_auth),
    .auth_out (clb_auth)
  );

endmodule
