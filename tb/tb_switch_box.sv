// Self-checking testbench of switch_box: random multiplexer selects and
// track values, outputs compared with a reference routing model. Then
// SB_authentication is pulsed: from the next clock edge every output must be
// the complement of the routed value, also after SB_authentication falls,
// until a configuration write clears the obfuscation cell.
module tb_switch_box;
  import sa_pkg::*;
  localparam int W = 8, N = 10, H = W / 2;
  logic clk = 0, rst_n = 0;
  logic [NUM_SIDES-1:0][H-1:0] in, out;
  logic [N-1:0] opin;
  sb_sel_e [NUM_SIDES-1:0][H-1:0] sel;
  logic cfg_obf_we = 0, cfg_obf_init = 0, sb_auth = 0, obf;
  int checks = 0, failures = 0;
  logic exp_obf;

  always #5 clk = ~clk;

  switch_box #(.W(W), .N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in(in), .opin(opin), .sel(sel),
    .cfg_obf_we(cfg_obf_we), .cfg_obf_init(cfg_obf_init), .sb_auth(sb_auth),
    .out(out), .obf(obf)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NUM_SIDES-1:0][H-1:0] model(logic inv);
    logic [NUM_SIDES-1:0][H-1:0] m;
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < H; i++) begin
        case (int'(sel[s][i]))
          0: m[s][i] = in[(s + 1) % 4][i];
          1: m[s][i] = in[(s + 2) % 4][i];
          2: m[s][i] = in[(s + 3) % 4][i];
          default: m[s][i] = opin[(s * H + i) % N];
        endcase
        m[s][i] = m[s][i] ^ inv;
      end
    return m;
  endfunction

  task automatic randomize_inputs();
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < H; i++) sel[s][i] = sb_sel_e'($urandom_range(3, 0));
    in = (NUM_SIDES*H)'($urandom);
    opin = N'($urandom);
  endtask

  task automatic chk_vectors(int n, logic inv, string what);
    for (int r = 0; r < n; r++) begin
      #1;
      randomize_inputs();
      #1;
      checks += 2;
      if (out !== model(inv)) begin failures++; $display("FAIL %s out=%h exp=%h", what, out, model(inv)); end
      if (obf !== inv) begin failures++; $display("FAIL %s obf=%b", what, obf); end
      @(posedge clk);
    end
  endtask

  initial begin
    randomize_inputs();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk_vectors(300, 1'b0, "normal");
    #1;
    sb_auth = 1;
    #1;
    checks++;
    if (obf !== 1'b0) begin failures++; $display("FAIL obf before edge"); end
    @(posedge clk);
    #1;
    sb_auth = 0;
    chk_vectors(300, 1'b1, "obfuscated");
    #1;
    cfg_obf_we = 1; cfg_obf_init = 0;
    @(posedge clk);
    #1;
    cfg_obf_we = 0;
    chk_vectors(100, 1'b0, "after reconfiguration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
