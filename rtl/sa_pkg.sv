// Shared types and constants of the self-authenticating FPGA fabric.
//
// The fabric is built from 6-input LUTs (64 configuration bits each) grouped
// ten to a cluster, the k6_N10 organisation. Routing channels are
// unidirectional; a switch box has four sides and, on each side, CHAN_W/2
// tracks entering and CHAN_W/2 tracks leaving. The channel width CHAN_W is a
// choice of this design, the LUT size and cluster size follow the source
// architecture.
package sa_pkg;

  localparam int unsigned LUT_K  = 6;   // LUT inputs (64 configuration bits)
  localparam int unsigned CLB_N  = 10;  // security cells per CLB
  localparam int unsigned CHAN_W = 8;   // tracks per channel, half per direction

  // Sides of a switch box, in the order used for all side-indexed buses.
  typedef enum logic [1:0] {
    SIDE_N = 2'd0,
    SIDE_E = 2'd1,
    SIDE_S = 2'd2,
    SIDE_W = 2'd3
  } side_e;

  localparam int unsigned NUM_SIDES = 4;

  // Source select of a switch-box output mux: the three other sides' incoming
  // tracks of the same index (in rotating order), or the local CLB output.
  typedef enum logic [1:0] {
    SBSEL_SIDE1 = 2'd0,  // side (s+1) mod 4
    SBSEL_SIDE2 = 2'd1,  // side (s+2) mod 4, the opposite side
    SBSEL_SIDE3 = 2'd2,  // side (s+3) mod 4
    SBSEL_OPIN  = 2'd3   // CLB output pin
  } sb_sel_e;

endpackage
