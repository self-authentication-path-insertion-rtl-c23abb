// Obfuscation cell of a switch box: the one storage bit that drives the
// select pins of all obf_Mux multiplexers of that switch box.
//
// It is a configuration cell: writing the switch box's configuration
// (cfg_we) loads cfg_init, normally 0. After that, SB_authentication sets it
// and nothing but another configuration write clears it, so a detected
// violation keeps the switch box inverting until the fabric is reconfigured.
// Timing: the cell is a clocked flip-flop; it samples sb_auth at each rising
// clock edge, so obfuscation starts one cycle after the violation is seen.
// A clocked cell instead of a level-sensitive latch is this design's choice.
// rst_n is the power-on clear.
module obf_latch (
  input  logic clk,
  input  logic rst_n,     // power-on reset, clears the cell
  input  logic cfg_we,    // configuration write of this cell
  input  logic cfg_init,  // value written by the configuration
  input  logic sb_auth,   // SB_authentication
  output logic obf        // select of the obf_Mux multiplexers
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       obf <= 1'b0;
    else if (cfg_we)  obf <= cfg_init;
    else if (sb_auth) obf <= 1'b1;
  end

endmodule
