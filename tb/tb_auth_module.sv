// Self-checking testbench of auth_module: the authentication table is the
// permuted copy of a random LUT table. With matching tables the module must
// stay silent for every input; with the LUT output inverted it must flag
// every input; with one authentication bit flipped it must flag exactly the
// one input pattern that reads that bit.
module tb_auth_module;
  import sa_tb_pkg::*;
  localparam int M = 6;
  logic clk = 0;
  logic [63:0] cfg;
  logic [M-1:0] in;
  logic lut_out, auth;
  int checks = 0, failures = 0;
  int perm[MAXK];
  logic [63:0] t, a;

  always #5 clk = ~clk;

  auth_module #(.M(M)) dut (.cfg(cfg), .in(in), .lut_out(lut_out), .auth(auth));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic exp, string what);
    checks++;
    if (auth !== exp) begin
      failures++;
      $display("FAIL %s in=%0d auth=%b exp=%b", what, in, auth, exp);
    end
  endtask

  initial begin
    for (int r = 0; r < 10; r++) begin
      t = {$urandom, $urandom};
      rand_perm(M, perm);
      a = auth_table(t, M, perm);
      // matching tables, and inverted LUT output
      cfg = a;
      for (int i = 0; i < 64; i++) begin
        in = M'(perm_addr(i, M, perm));
        lut_out = t[i];
        @(posedge clk); chk(1'b0, "match");
        lut_out = ~t[i];
        @(posedge clk); chk(1'b1, "lut inverted");
      end
      // one authentication bit flipped
      begin
        int fb = int'($urandom_range(63, 0));
        cfg = a;
        cfg[fb] = ~cfg[fb];
        for (int i = 0; i < 64; i++) begin
          in = M'(perm_addr(i, M, perm));
          lut_out = t[i];
          @(posedge clk); chk(perm_addr(i, M, perm) == fb, "auth bit flipped");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
