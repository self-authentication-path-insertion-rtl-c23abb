// Self-checking testbench of clb with the default sizes (6-input LUTs, 10
// cells, 16 routing inputs). Cells 0-7 take random routing inputs, cell 8
// takes the outputs of cells 0-5 through local feedback, cell 9 takes
// routing inputs and registers its output. Authentication tables are the
// permuted copies of the LUT tables, so clb_auth must stay low. Then one
// LUT bit of a random cell is flipped: the output and clb_auth must react
// exactly when that cell's inputs reach the flipped minterm.
module tb_clb;
  import sa_tb_pkg::*;
  localparam int K = 6, N = 10, NSRC = 16, PW = 3, SW = 5;
  logic clk = 0, rst_n = 0;
  logic [NSRC-1:0] src;
  logic [N-1:0][63:0] lut_cfg, auth_cfg;
  logic [N-1:0][K-1:0][PW-1:0] perm;
  logic [N-1:0][K-1:0][SW-1:0] in_sel;
  logic [N-1:0] ff_en, out, cell_auth;
  logic clb_auth;
  int checks = 0, failures = 0;
  logic [N-1:0][63:0] good;
  logic [N-1:0] comb_m;
  logic ff9_m;
  int hits = 0;

  always #5 clk = ~clk;

  clb #(.K(K), .N(N), .NSRC(NSRC)) dut (
    .clk(clk), .rst_n(rst_n), .src(src), .lut_cfg(lut_cfg), .auth_cfg(auth_cfg),
    .perm(perm), .in_sel(in_sel), .ff_en(ff_en), .out(out), .cell_auth(cell_auth),
    .clb_auth(clb_auth)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cell_index(int c, logic [NSRC-1:0] s, logic [N-1:0] o);
    int idx = 0;
    for (int j = 0; j < K; j++) begin
      int v = int'(in_sel[c][j]);
      logic b = (v < NSRC) ? s[v] : o[v - NSRC];
      idx |= int'(b) << j;
    end
    return idx;
  endfunction

  // Combinational outputs of the model, given the registered value of cell 9.
  function automatic logic [N-1:0] model_comb(logic [NSRC-1:0] s, logic q9);
    logic [N-1:0] o = '0;
    for (int c = 0; c < 8; c++) o[c] = lut_cfg[c][cell_index(c, s, o)];
    o[8] = lut_cfg[8][cell_index(8, s, o)];
    o[9] = q9;
    return o;
  endfunction

  initial begin
    int perm_i[MAXK];
    int tc, tb_bit;
    for (int c = 0; c < N; c++) begin
      good[c] = {$urandom, $urandom};
      rand_perm(K, perm_i);
      for (int j = 0; j < K; j++) perm[c][j] = PW'(perm_i[j]);
      auth_cfg[c] = auth_table(good[c], K, perm_i);
      for (int j = 0; j < K; j++)
        in_sel[c][j] = (c == 8) ? SW'(NSRC + j) : SW'($urandom_range(NSRC - 1, 0));
    end
    lut_cfg = good;
    ff_en = 10'b10_0000_0000;
    src = '0;
    ff9_m = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      if (phase == 1) begin
        tc = int'($urandom_range(7, 0));
        tb_bit = int'($urandom_range(63, 0));
        lut_cfg[tc][tb_bit] = ~lut_cfg[tc][tb_bit];
      end
      for (int r = 0; r < 3000; r++) begin
        logic [N-1:0] o;
        logic hit;
        #1;
        src = NSRC'($urandom);
        #1;
        o = model_comb(src, ff9_m);
        hit = (phase == 1) && (cell_index(tc, src, o) == tb_bit);
        if (hit) hits++;
        checks += 2;
        if (out !== o) begin failures++; $display("FAIL out=%b exp=%b", out, o); end
        if (clb_auth !== hit) begin failures++; $display("FAIL clb_auth=%b exp=%b", clb_auth, hit); end
        if (phase == 0) begin
          checks++;
          if (cell_auth !== '0) begin failures++; $display("FAIL cell_auth=%b", cell_auth); end
        end
        @(posedge clk);
        ff9_m = lut_cfg[9][cell_index(9, src, o)];
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL tamper never activated"); end
    $display("tamper activations: %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
