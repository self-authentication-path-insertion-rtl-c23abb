// End-to-end testbench of sa_fpga at its default size (11 x 11 tiles,
// 6-input LUTs, 10 cells per CLB, 8 tracks per channel).
//
// A full bitstream is loaded (every word of every tile). It maps a small
// circuit: tile (0,0) adds a = io_w_in[0] and b = io_s_in[0] (4 bits,
// carry through local feedback), tile (1,0) XORs the sum with
// k = io_s_in[1] into four registered cells, and tiles (2..NX-1, 0) route
// the result straight east to io_e_out[0]. Every LUT has the matching
// authentication table under a random input permutation.
//
// Scenarios, each counted as a mechanism:
//  - normal operation: y = ((a+b) mod 16) ^ k one cycle later, no lock;
//  - dormant tamper: a LUT bit that no input pattern reaches is flipped at
//    run time; nothing is detected and outputs stay correct;
//  - LUT tamper: a reachable LUT bit is flipped; outputs stay correct until
//    the flipped minterm is hit, then CLB_authentication and
//    SB_authentication rise, the switch box locks on the next edge, and from
//    then on every output deviates, for any input, until reconfiguration;
//  - authentication-table tamper: same, starting from the other table;
//  - reconfiguration: rewriting the good word and the obfuscation cell
//    unlocks the fabric and outputs are correct again.
// Outputs are compared with a model that evaluates the loaded tables,
// inverts the adder outputs while switch box (0,0) is locked, and, while
// nothing is tampered, with plain arithmetic.
module tb_sa_fpga;
  import sa_pkg::*;
  import sa_tb_pkg::*;

  localparam int NX = 11, NY = 11, K = 6, N = 10, W = 8, H = W / 2;
  localparam int NSRC = 2 * W, PW = 3, SW = 5;
  localparam int CELL_BITS = 2 * 64 + K * PW + K * SW + 1;
  localparam int SB_OFF = N * CELL_BITS;
  localparam int MAIN_BITS = SB_OFF + 2 * 4 * H;
  localparam int MAIN_WORDS = (MAIN_BITS + 31) / 32;
  localparam int NT = NX * NY;
  localparam int SRC_S = 2 * H, SRC_W = 3 * H;  // routing-input index bases

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [6:0] cfg_tile = '0;
  logic [5:0] cfg_word = '0;
  logic [31:0] cfg_wdata = '0;
  logic [NY-1:0][H-1:0] io_w_in = '0, io_e_in = '0, io_w_out, io_e_out;
  logic [NX-1:0][H-1:0] io_s_in = '0, io_n_in = '0, io_s_out, io_n_out;
  logic [NY-1:0][NX-1:0] clb_auth, sb_auth, sb_obf;
  logic locked;

  int checks = 0, failures = 0;
  int n_normal = 0, n_dormant = 0, n_detect = 0, n_sbauth = 0, n_lock = 0;
  int n_deviate = 0, n_sticky = 0, n_unlock = 0, n_auth_tamper = 0, n_hd = 0;
  int cycles = 0;

  logic [MAIN_WORDS*32-1:0] img [NT];
  logic [63:0] tbl [N];   // LUT tables of tile 0 as loaded
  logic [63:0] atbl [N];  // authentication tables of tile 0 as loaded
  int sels [N][K];        // input selects of tile 0
  int perms [N][MAXK];
  logic [3:0] y_exp;
  logic model_obf;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  sa_fpga dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_tile(cfg_tile), .cfg_word(cfg_word),
    .cfg_wdata(cfg_wdata), .io_w_in(io_w_in), .io_e_in(io_e_in), .io_s_in(io_s_in),
    .io_n_in(io_n_in), .io_w_out(io_w_out), .io_e_out(io_e_out), .io_s_out(io_s_out),
    .io_n_out(io_n_out), .clb_auth(clb_auth), .sb_auth(sb_auth), .sb_obf(sb_obf),
    .locked(locked)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycles, what);
    end
  endtask

  // ---------------- bitstream construction ----------------
  task automatic set_cell(int t, int c, logic [63:0] table_v, int sel[K], logic ff);
    int perm[MAXK];
    int b = c * CELL_BITS;
    logic [63:0] a;
    rand_perm(K, perm);
    a = auth_table(table_v, K, perm);
    img[t][b +: 64] = table_v;
    img[t][b + 64 +: 64] = a;
    for (int j = 0; j < K; j++) img[t][b + 128 + j * PW +: PW] = PW'(perm[j]);
    for (int j = 0; j < K; j++) img[t][b + 128 + K * PW + j * SW +: SW] = SW'(sel[j]);
    img[t][b + 128 + K * PW + K * SW] = ff;
    if (t == 0) begin
      tbl[c] = table_v; atbl[c] = a;
      for (int j = 0; j < K; j++) sels[c][j] = sel[j];
      perms[c] = perm;
    end
  endtask

  task automatic set_sb(int t, int side, int track, int v);
    img[t][SB_OFF + 2 * (side * H + track) +: 2] = 2'(v);
  endtask

  task automatic write_word(int t, int w, logic [31:0] d);
    #1;
    cfg_we = 1; cfg_tile = 7'(t); cfg_word = 6'(w); cfg_wdata = d;
    @(posedge clk);
    #1 cfg_we = 0;
  endtask

  task automatic write_tile(int t);
    for (int w = 0; w < MAIN_WORDS; w++) write_word(t, w, img[t][w * 32 +: 32]);
    write_word(t, MAIN_WORDS, 32'd0);
  endtask

  // table of a function of the low inputs, given as a truth-table builder
  function automatic logic [63:0] tbl_fn(int kind);
    logic [63:0] r = '0;
    for (int i = 0; i < 64; i++) begin
      logic x0 = i[0], x1 = i[1], x2 = i[2], x3 = i[3], x4 = i[4];
      case (kind)
        0: r[i] = (x2 & x3) | ((x2 ^ x3) & x0 & x1);             // carry into bit 2
        1: r[i] = x0 ^ x1;                                          // s0
        2: r[i] = x2 ^ x3 ^ (x0 & x1);                              // s1
        3: r[i] = x0 ^ x1 ^ x2;                                     // s2
        4: r[i] = x3 ^ x4 ^ ((x0 & x1) | ((x0 ^ x1) & x2));         // s3
        default: r[i] = x0 ^ x1;                                    // XOR stage
      endcase
    end
    return r;
  endfunction

  // ---------------- reference model ----------------
  function automatic int idx0(int c, logic [3:0] a, logic [3:0] b, logic c2);
    int r = 0;
    for (int j = 0; j < K; j++) begin
      int s = sels[c][j];
      logic v = (s >= SRC_W && s < SRC_W + 4) ? a[s - SRC_W] :
                (s >= SRC_S && s < SRC_S + 4) ? b[s - SRC_S] :
                (s == NSRC) ? c2 : 1'b0;
      r |= int'(v) << j;
    end
    return r;
  endfunction

  function automatic logic [3:0] sum_model(logic [3:0] a, logic [3:0] b);
    logic c2 = tbl[0][idx0(0, a, b, 1'b0)];
    logic [3:0] s;
    for (int i = 0; i < 4; i++) s[i] = tbl[4 + i][idx0(4 + i, a, b, c2)];
    return s;
  endfunction

  function automatic logic auth_model(logic [3:0] a, logic [3:0] b);
    logic c2 = tbl[0][idx0(0, a, b, 1'b0)];
    logic v = 1'b0;
    foreach (tbl[c]) if (c == 0 || (c >= 4 && c <= 7)) begin
      int i = idx0(c, a, b, c2);
      if (atbl[c][perm_addr(i, K, perms[c])] != tbl[c][i]) v = 1'b1;
    end
    return v;
  endfunction

  // One cycle: drive inputs, check the output registered on the last edge,
  // predict the next one. Returns 1 if the applied vector activates a tamper.
  task automatic step(logic [3:0] a, logic [3:0] b, logic [3:0] k, bit arith_ok, output logic act);
    logic [3:0] s;
    #1;
    io_w_in[0] = a; io_s_in[0] = b; io_s_in[1] = k;
    #1;
    act = auth_model(a, b);
    chk(clb_auth[0][0] == act, "CLB_authentication");
    chk(sb_auth[0][0] == act, "SB_authentication");
    chk(locked == model_obf && sb_obf[0][0] == model_obf, "lock state");
    chk((sb_obf & ~(NY*NX)'(1)) == '0, "only switch box (0,0) may lock");
    s = sum_model(a, b);
    if (model_obf) s = ~s;
    y_exp = s ^ k;
    if (arith_ok) chk(y_exp == ((a + b) ^ k), "model vs arithmetic");
    @(posedge clk);
    if (act) model_obf = 1'b1;
    #1;
    chk(io_e_out[0] == y_exp, $sformatf("output %h exp %h", io_e_out[0], y_exp));
    if (io_e_out[0] != ((a + b) ^ k)) begin
      n_deviate++;
      n_hd += $countones(io_e_out[0] ^ ((a + b) ^ k));
    end
  endtask

  int sel_tmp[K];
  logic [3:0] a, b, k;
  logic act;

  initial begin
    // ---- bitstream ----
    for (int t = 0; t < NT; t++) begin
      img[t] = '0;
      for (int s = 0; s < 4; s++) for (int i = 0; i < H; i++) set_sb(t, s, i, int'(SBSEL_OPIN));
    end
    // tile (0,0): adder
    sel_tmp = '{SRC_W + 0, SRC_S + 0, SRC_W + 1, SRC_S + 1, SRC_W + 0, SRC_W + 0};
    set_cell(0, 0, tbl_fn(0), sel_tmp, 1'b0);
    sel_tmp = '{SRC_W + 0, SRC_S + 0, SRC_W + 0, SRC_W + 0, SRC_W + 0, SRC_W + 0};
    set_cell(0, 4, tbl_fn(1), sel_tmp, 1'b0);
    sel_tmp = '{SRC_W + 0, SRC_S + 0, SRC_W + 1, SRC_S + 1, SRC_W + 0, SRC_W + 0};
    set_cell(0, 5, tbl_fn(2), sel_tmp, 1'b0);
    sel_tmp = '{SRC_W + 2, SRC_S + 2, NSRC, SRC_W + 0, SRC_W + 0, SRC_W + 0};
    set_cell(0, 6, tbl_fn(3), sel_tmp, 1'b0);
    sel_tmp = '{SRC_W + 2, SRC_S + 2, NSRC, SRC_W + 3, SRC_S + 3, SRC_W + 0};
    set_cell(0, 7, tbl_fn(4), sel_tmp, 1'b0);
    // tile (1,0): registered XOR with k
    for (int i = 0; i < 4; i++) begin
      sel_tmp = '{SRC_W + i, SRC_S + i, SRC_W + i, SRC_W + i, SRC_W + i, SRC_W + i};
      set_cell(1, 4 + i, tbl_fn(5), sel_tmp, 1'b1);
    end
    // tiles (2..NX-1, 0): pass west to east
    for (int x = 2; x < NX; x++) for (int i = 0; i < H; i++) set_sb(x, int'(SIDE_E), i, int'(SBSEL_SIDE2));

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    model_obf = 1'b0;
    for (int t = 0; t < NT; t++) write_tile(t);
    chk(locked == 1'b0, "no lock after configuration");

    // ---- normal operation ----
    for (int r = 0; r < 300; r++) begin
      a = 4'($urandom); b = 4'($urandom); k = 4'($urandom);
      step(a, b, k, 1'b1, act);
      chk(!act, "no violation in normal operation");
      n_normal++;
    end

    // ---- dormant tamper: cell 4 wires inputs 2..5 to the same signal as
    // input 0, so minterm 6 (x0 = 0, x2 = 1) can never be addressed ----
    begin
      int pos = 4 * CELL_BITS + 6;  // minterm 6: x0=0, x1=1, x2=1: unreachable
      img[0][pos] = ~img[0][pos];
      tbl[4][6] = ~tbl[4][6];
      write_word(0, pos / 32, img[0][(pos / 32) * 32 +: 32]);
      for (int r = 0; r < 300; r++) begin
        a = 4'($urandom); b = 4'($urandom); k = 4'($urandom);
        step(a, b, k, 1'b1, act);
        chk(!act && !locked, "dormant tamper stays silent");
        n_dormant++;
      end
      img[0][pos] = ~img[0][pos];
      tbl[4][6] = ~tbl[4][6];
      write_word(0, pos / 32, img[0][(pos / 32) * 32 +: 32]);
    end

    // ---- LUT tamper, then authentication-table tamper ----
    for (int sc = 0; sc < 2; sc++) begin
      int c = (sc == 0) ? 5 : 6;
      int m, pos;
      logic [3:0] ta, tb;
      // pick a reachable minterm through a random activating vector
      ta = 4'($urandom); tb = 4'($urandom);
      m = idx0(c, ta, tb, tbl[0][idx0(0, ta, tb, 1'b0)]);
      if (sc == 0) begin
        pos = c * CELL_BITS + m;
        tbl[c][m] = ~tbl[c][m];
      end else begin
        pos = c * CELL_BITS + 64 + perm_addr(m, K, perms[c]);
        atbl[c][perm_addr(m, K, perms[c])] = ~atbl[c][perm_addr(m, K, perms[c])];
      end
      img[0][pos] = ~img[0][pos];
      write_word(0, pos / 32, img[0][(pos / 32) * 32 +: 32]);
      // run until the tamper is activated
      begin
        int guard = 0;
        act = 1'b0;
        while (!act && guard < 2000) begin
          a = 4'($urandom); b = 4'($urandom); k = 4'($urandom);
          if (guard == 1999) begin a = ta; b = tb; end
          step(a, b, k, 1'b0, act);
          if (!act) chk(io_e_out[0] == ((a + b) ^ k), "correct before activation");
          guard++;
        end
      end
      chk(act, "tamper activated");
      n_detect++;
      if (sc == 1) n_auth_tamper++;
      if (sb_auth[0][0]) n_sbauth++;
      chk(locked, "locked after activation");
      if (locked) n_lock++;
      // locked: every output deviates, also for non-activating vectors
      for (int r = 0; r < 200; r++) begin
        a = 4'($urandom); b = 4'($urandom); k = 4'($urandom);
        step(a, b, k, 1'b0, act);
        chk(io_e_out[0] != ((a + b) ^ k), "output deviates while locked");
        chk(locked, "lock is sticky");
        if (!act && locked) n_sticky++;
      end
      // reconfiguration: good word back, obfuscation cell rewritten
      img[0][pos] = ~img[0][pos];
      if (sc == 0) tbl[c][m] = ~tbl[c][m];
      else atbl[c][perm_addr(m, K, perms[c])] = ~atbl[c][perm_addr(m, K, perms[c])];
      write_word(0, pos / 32, img[0][(pos / 32) * 32 +: 32]);
      write_word(0, MAIN_WORDS, 32'd0);
      model_obf = 1'b0;
      #1 chk(!locked, "unlocked by reconfiguration");
      if (!locked) n_unlock++;
      for (int r = 0; r < 100; r++) begin
        a = 4'($urandom); b = 4'($urandom); k = 4'($urandom);
        step(a, b, k, 1'b1, act);
      end
    end

    $display("mechanisms: normal=%0d dormant=%0d detect=%0d sb_auth=%0d lock=%0d sticky=%0d deviate=%0d unlock=%0d auth_table_tamper=%0d",
             n_normal, n_dormant, n_detect, n_sbauth, n_lock, n_sticky, n_deviate, n_unlock, n_auth_tamper);
    if (n_deviate > 0) $display("mean Hamming distance of deviating outputs: %0d.%02d of 4 bits",
                                n_hd / n_deviate, (n_hd * 100 / n_deviate) % 100);
    chk(n_normal > 0 && n_dormant > 0 && n_detect == 2 && n_sbauth == 2 && n_lock == 2 &&
        n_sticky > 0 && n_deviate > 0 && n_unlock == 2 && n_auth_tamper == 1, "every mechanism exercised");
    $display("cycles: %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
