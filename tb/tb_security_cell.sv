// Self-checking testbench of security_cell: random table and permutation.
// Untampered, the cell must compute the table and never flag. A flipped LUT
// bit must change the output and raise auth exactly on the flipped minterm;
// a flipped authentication bit must raise auth only on the minterm that
// reads it, without touching the output.
module tb_security_cell;
  import sa_tb_pkg::*;
  localparam int K = 6;
  localparam int PW = 3;
  logic clk = 0;
  logic [63:0] lut_cfg, auth_cfg;
  logic [K-1:0][PW-1:0] perm_v;
  logic [K-1:0] in;
  logic out, auth;
  int checks = 0, failures = 0;
  int perm[MAXK];
  logic [63:0] t, a;

  always #5 clk = ~clk;

  security_cell #(.K(K)) dut (
    .lut_cfg(lut_cfg), .auth_cfg(auth_cfg), .perm(perm_v), .in(in), .out(out), .auth(auth)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%0d got=%b exp=%b", what, in, got, exp);
    end
  endtask

  initial begin
    for (int r = 0; r < 10; r++) begin
      int fb;
      t = {$urandom, $urandom};
      rand_perm(K, perm);
      for (int j = 0; j < K; j++) perm_v[j] = PW'(perm[j]);
      a = auth_table(t, K, perm);
      lut_cfg = t; auth_cfg = a;
      for (int i = 0; i < 64; i++) begin
        in = K'(i);
        @(posedge clk);
        chk(out, t[i], "out");
        chk(auth, 1'b0, "auth clean");
      end
      fb = int'($urandom_range(63, 0));
      lut_cfg[fb] = ~lut_cfg[fb];
      for (int i = 0; i < 64; i++) begin
        in = K'(i);
        @(posedge clk);
        chk(out, (i == fb) ? ~t[i] : t[i], "out lut tampered");
        chk(auth, i == fb, "auth lut tampered");
      end
      lut_cfg = t;
      fb = int'($urandom_range(63, 0));
      auth_cfg[fb] = ~auth_cfg[fb];
      for (int i = 0; i < 64; i++) begin
        in = K'(i);
        @(posedge clk);
        chk(out, t[i], "out auth tampered");
        chk(auth, perm_addr(i, K, perm) == fb, "auth auth tampered");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
