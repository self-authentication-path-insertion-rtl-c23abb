// Obfuscation multiplexer (obf_Mux) on one switch-box output.
//
// An inverter and a 2:1 multiplexer: with `obf` low the routed value passes
// unchanged, with `obf` high its complement is driven onto the channel.
// Combinational; it is the only element of the security path that sits on
// the data path. WIDTH lets one instance serve several outputs that share a
// select.
module obf_mux #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] d,    // routed (true) data
  input  logic             obf,  // select: 0 = true data, 1 = inverted data
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] d_n;

  always_comb begin
    d_n = ~d;
    q   = obf ? d_n : d;
  end

endmodule
