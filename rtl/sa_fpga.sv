// Self-authenticating FPGA fabric (top level).
//
// An NX x NY array of tiles. Each tile holds a CLB of N security cells and a
// switch box at the tile's north-east corner. Every LUT has an
// authentication module with its own, differently ordered, configuration
// table; a LUT whose table has been altered (or whose authentication table
// has) disagrees with it for some input pattern. The authentication path runs
// beside the data path: cell violations are ORed into CLB_authentication,
// the CLB_authentication signals of the (up to four) CLBs around a switch box
// are ORed into SB_authentication, and SB_authentication sets the switch
// box's obfuscation cell. From the next clock edge on, that switch box drives
// the complement of every routed value, so the fault spreads through the
// routing to the outputs, and it stays that way until the configuration
// cell is rewritten. No key is involved and no error output is needed: the
// circuit locks itself.
//
// Routing: each switch box has H = W/2 incoming and H outgoing unidirectional
// tracks per side. Outgoing east tracks of tile (x,y) are the incoming west
// tracks of tile (x+1,y), outgoing north tracks are the incoming south
// tracks of tile (x,y+1), and so on. At the array edge incoming tracks come
// from the io_*_in ports and outgoing tracks leave on the io_*_out ports.
// The CLB of a tile takes its inputs from the 2W tracks entering its switch
// box, and its outputs drive the switch box's fourth multiplexer input.
//
// Configuration: a word port. Writing cfg_wdata with cfg_we high stores it
// in word cfg_word of tile cfg_tile (tile index y*NX + x) at the rising clock
// edge. A tile's words, from bit 0 of word 0 upwards, hold for each cell c in
// turn: LUT table (2^K bits), authentication table (2^K), permutation (K
// fields of PW bits), input selects (K fields of SW bits), flip-flop enable
// (1). After the N cells come the switch-box multiplexer selects, 2 bits per
// output track, side-major (side s, track i at index s*H+i). Unused bits of
// the last of these words are ignored. The last word, TILE_WORDS-1, holds
// only the obfuscation cell's initial value in bit 0; writing it reloads the
// cell. Reset (rst_n low) clears all configuration and sets every switch-box
// select to the CLB-pin input, so an unconfigured fabric has no routing loop.
//
// Following the paper: security cells, OR aggregation per CLB and per
// switch box, obfuscation multiplexers on every switch-box output with one
// shared storage cell per switch box that stays set until reconfiguration,
// 6-input LUTs in clusters of 10. This design's own choices: the tile
// arrangement with length-1 wires, the channel width, the configuration port
// and layout, and the clocked obfuscation cell.
//
// A configured fabric is a real FPGA: routing and local feedback can close
// combinational loops; linters report these structural loops. The
// configuration decides whether any is closed.
module sa_fpga
  import sa_pkg::*;
#(
  parameter int unsigned NX = 11,
  parameter int unsigned NY = 11,
  parameter int unsigned K  = LUT_K,
  parameter int unsigned N  = CLB_N,
  parameter int unsigned W  = CHAN_W,
  localparam int unsigned H          = W / 2,
  localparam int unsigned NSRC       = 2 * W,
  localparam int unsigned PW         = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned SW         = $clog2(NSRC + N + 1),
  localparam int unsigned CELL_BITS  = 2 * (1 << K) + K * PW + K * SW + 1,
  localparam int unsigned SB_OFF     = N * CELL_BITS,
  localparam int unsigned MAIN_BITS  = SB_OFF + 2 * NUM_SIDES * H,
  localparam int unsigned MAIN_WORDS = (MAIN_BITS + 31) / 32,
  localparam int unsigned TILE_WORDS = MAIN_WORDS + 1,
  localparam int unsigned NTILES     = NX * NY,
  localparam int unsigned TAW        = (NTILES > 1) ? $clog2(NTILES) : 1,
  localparam int unsigned WAW        = $clog2(TILE_WORDS)
) (
  input  logic clk,
  input  logic rst_n,
  // configuration port
  input  logic            cfg_we,
  input  logic [TAW-1:0]  cfg_tile,
  input  logic [WAW-1:0]  cfg_word,
  input  logic [31:0]     cfg_wdata,
  // edge I/O: one group of H tracks per tile along each edge
  input  logic [NY-1:0][H-1:0] io_w_in,
  input  logic [NY-1:0][H-1:0] io_e_in,
  input  logic [NX-1:0][H-1:0] io_s_in,
  input  logic [NX-1:0][H-1:0] io_n_in,
  output logic [NY-1:0][H-1:0] io_w_out,
  output logic [NY-1:0][H-1:0] io_e_out,
  output logic [NX-1:0][H-1:0] io_s_out,
  output logic [NX-1:0][H-1:0] io_n_out,
  // authentication path, for observation
  output logic [NY-1:0][NX-1:0] clb_auth,  // CLB_authentication per tile
  output logic [NY-1:0][NX-1:0] sb_auth,   // SB_authentication per tile
  output logic [NY-1:0][NX-1:0] sb_obf,    // obfuscation cell per tile
  output logic                  locked     // some switch box is obfuscating
);

  // Reset image of the main words: zero except the switch-box selects, which
  // point at the CLB pin (SBSEL_OPIN = 2'b11).
  function automatic logic [MAIN_WORDS*32-1:0] reset_image();
    logic [MAIN_WORDS*32-1:0] v = '0;
    for (int b = 0; b < int'(2 * NUM_SIDES * H); b++) v[SB_OFF + b] = 1'b1;
    return v;
  endfunction

  localparam logic [MAIN_WORDS*32-1:0] RESET_IMAGE = reset_image();

  // Incoming and outgoing tracks of every switch box.
  logic [NUM_SIDES-1:0][H-1:0] sb_in  [NY][NX];
  logic [NUM_SIDES-1:0][H-1:0] sb_out [NY][NX];

  for (genvar y = 0; y < int'(NY); y++) begin : g_row
    for (genvar x = 0; x < int'(NX); x++) begin : g_col
      localparam int unsigned TID = y * NX + x;

      // ---------------- configuration storage ----------------
      logic [MAIN_WORDS*32-1:0] cfg_main;
      logic                     obf_we;

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          cfg_main <= RESET_IMAGE;
        end else if (cfg_we && cfg_tile == TAW'(TID) && int'(cfg_word) < int'(MAIN_WORDS)) begin
          cfg_main[cfg_word*32 +: 32] <= cfg_wdata;
        end
      end

      always_comb obf_we = cfg_we && cfg_tile == TAW'(TID) && int'(cfg_word) == int'(MAIN_WORDS);

      // ---------------- configuration fields ----------------
      logic [N-1:0][(1<<K)-1:0]    lut_cfg;
      logic [N-1:0][(1<<K)-1:0]    auth_cfg;
      logic [N-1:0][K-1:0][PW-1:0] perm;
      logic [N-1:0][K-1:0][SW-1:0] in_sel;
      logic [N-1:0]                ff_en;
      sb_sel_e [NUM_SIDES-1:0][H-1:0] sel;

      for (genvar c = 0; c < int'(N); c++) begin : g_fields
        localparam int unsigned B = c * CELL_BITS;
        assign lut_cfg[c]  = cfg_main[B +: (1 << K)];
        assign auth_cfg[c] = cfg_main[B + (1 << K) +: (1 << K)];
        assign perm[c]     = cfg_main[B + 2 * (1 << K) +: K * PW];
        assign in_sel[c]   = cfg_main[B + 2 * (1 << K) + K * PW +: K * SW];
        assign ff_en[c]    = cfg_main[B + 2 * (1 << K) + K * PW + K * SW];
      end

      for (genvar t = 0; t < int'(NUM_SIDES * H); t++) begin : g_sel
        assign sel[t / H][t % H] = sb_sel_e'(cfg_main[SB_OFF + 2 * t +: 2]);
      end

      // ---------------- CLB ----------------
      logic [N-1:0] clb_out;
      logic [N-1:0] cell_auth;

      clb #(.K(K), .N(N), .NSRC(NSRC)) u_clb (
        .clk       (clk),
        .rst_n     (rst_n),
        .src       (sb_in[y][x]),
        .lut_cfg   (lut_cfg),
        .auth_cfg  (auth_cfg),
        .perm      (perm),
        .in_sel    (in_sel),
        .ff_en     (ff_en),
        .out       (clb_out),
        .cell_auth (cell_auth),
        .clb_auth  (clb_auth[y][x])
      );

      // ---------------- SB_authentication ----------------
      // The switch box sits at the corner shared by tiles (x,y), (x+1,y),
      // (x,y+1) and (x+1,y+1); CLBs outside the array count as silent.
      logic [3:0] nb_auth;
      assign nb_auth[0] = clb_auth[y][x];
      if (x + 1 < int'(NX)) begin : g_e
        assign nb_auth[1] = clb_auth[y][x+1];
      end else begin : g_e0
        assign nb_auth[1] = 1'b0;
      end
      if (y + 1 < int'(NY)) begin : g_n
        assign nb_auth[2] = clb_auth[y+1][x];
      end else begin : g_n0
        assign nb_auth[2] = 1'b0;
      end
      if (x + 1 < int'(NX) && y + 1 < int'(NY)) begin : g_ne
        assign nb_auth[3] = clb_auth[y+1][x+1];
      end else begin : g_ne0
        assign nb_auth[3] = 1'b0;
      end

      auth_aggregator #(.NIN(4)) u_sb_agg (
        .auth_in  (nb_auth),
        .auth_out (sb_auth[y][x])
      );

      // ---------------- switch box ----------------
      switch_box #(.W(W), .N(N)) u_sb (
        .clk          (clk),
        .rst_n        (rst_n),
        .in           (sb_in[y][x]),
        .opin         (clb_out),
        .sel          (sel),
        .cfg_obf_we   (obf_we),
        .cfg_obf_init (cfg_wdata[0]),
        .sb_auth      (sb_auth[y][x]),
        .out          (sb_out[y][x]),
        .obf          (sb_obf[y][x])
      );

      // ---------------- channel wiring ----------------
      if (x == 0) begin : g_win
        assign sb_in[y][x][SIDE_W] = io_w_in[y];
        assign io_w_out[y]         = sb_out[y][x][SIDE_W];
      end else begin : g_wnb
        assign sb_in[y][x][SIDE_W] = sb_out[y][x-1][SIDE_E];
      end
      if (x == int'(NX) - 1) begin : g_ein
        assign sb_in[y][x][SIDE_E] = io_e_in[y];
        assign io_e_out[y]         = sb_out[y][x][SIDE_E];
      end else begin : g_enb
        assign sb_in[y][x][SIDE_E] = sb_out[y][x+1][SIDE_W];
      end
      if (y == 0) begin : g_sin
        assign sb_in[y][x][SIDE_S] = io_s_in[x];
        assign io_s_out[x]         = sb_out[y][x][SIDE_S];
      end else begin : g_snb
        assign sb_in[y][x][SIDE_S] = sb_out[y-1][x][SIDE_N];
      end
      if (y == int'(NY) - 1) begin : g_nin
        assign sb_in[y][x][SIDE_N] = io_n_in[x];
        assign io_n_out[x]         = sb_out[y][x][SIDE_N];
      end else begin : g_nnb
        assign sb_in[y][x][SIDE_N] = sb_out[y+1][x][SIDE_S];
      end
    end
  end

  always_comb locked = |sb_obf;

endmodule
