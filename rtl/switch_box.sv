// Obfuscating switch box.
//
// Unidirectional routing: on each of the four sides (N, E, S, W) H = W/2
// tracks enter and H tracks leave, 2W outputs in all. Output track i of side
// s is a 4:1 multiplexer with two configuration bits that picks incoming
// track i of side s+1, s+2 or s+3 (mod 4), or the CLB output pin
// opin[(s*H + i) mod N]. Each multiplexer is followed by an obf_Mux, and all
// obf_Mux selects come from the switch box's single obfuscation cell
// (obf_latch). That cell is loaded by configuration, set by SB_authentication
// and then holds, so the switch box drives inverted data on every output from
// the clock edge after a violation until the next configuration write.
//
// Following the paper: mux-based unidirectional switch box, a 4:1 mux with
// two configuration cells per output, an inverter and 2:1 mux per output, and
// one shared storage cell. The track pattern (same track index, the
// "disjoint" pattern) and the place of the CLB output pin on the fourth mux
// input are this design's choices. The data path is combinational. While
// rst_n is low every multiplexer selects the CLB pin, so that no routing loop
// can be closed before the configuration is valid (also this design's choice,
// in the spirit of the global hold an FPGA applies during configuration).
module switch_box
  import sa_pkg::*;
#(
  parameter int unsigned W = CHAN_W,
  parameter int unsigned N = CLB_N,
  localparam int unsigned H = W / 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [NUM_SIDES-1:0][H-1:0] in,      // incoming tracks per side
  input  logic [N-1:0]                opin,    // CLB output pins
  input  sb_sel_e [NUM_SIDES-1:0][H-1:0] sel,  // mux configuration
  input  logic                        cfg_obf_we,   // write obfuscation cell
  input  logic                        cfg_obf_init, // value written
  input  logic                        sb_auth,      // SB_authentication
  output logic [NUM_SIDES-1:0][H-1:0] out,     // outgoing tracks per side
  output logic                        obf      // obfuscation active
);

  logic [NUM_SIDES-1:0][H-1:0] routed;

  always_comb begin
    for (int s = 0; s < int'(NUM_SIDES); s++) begin
      for (int i = 0; i < int'(H); i++) begin
        unique case (rst_n ? sel[s][i] : SBSEL_OPIN)
          SBSEL_SIDE1: routed[s][i] = in[(s + 1) % NUM_SIDES][i];
          SBSEL_SIDE2: routed[s][i] = in[(s + 2) % NUM_SIDES][i];
          SBSEL_SIDE3: routed[s][i] = in[(s + 3) % NUM_SIDES][i];
          default:     routed[s][i] = opin[(s * H + i) % N];
        endcase
      end
    end
  end

  obf_latch u_obf (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_we   (cfg_obf_we),
    .cfg_init (cfg_obf_init),
    .sb_auth  (sb_auth),
    .obf      (obf)
  );

  obf_mux #(.WIDTH(NUM_SIDES * H)) u_obf_mux (
    .d   (routed),
    .obf (obf),
    .q   (out)
  );

endmodule
