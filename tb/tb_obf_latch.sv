// Self-checking testbench of obf_latch against a reference model of the
// cell (reset clears, configuration write loads, SB_authentication sets,
// nothing else clears), under a directed sequence and random stimulus. The
// directed part checks the one-cycle delay from SB_authentication to
// obfuscation and that the cell holds after SB_authentication falls.
module tb_obf_latch;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_init = 0, sb_auth = 0, obf;
  logic model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  obf_latch dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_init(cfg_init), .sb_auth(sb_auth), .obf(obf)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic exp, string what);
    checks++;
    if (obf !== exp) begin failures++; $display("FAIL %s obf=%b exp=%b", what, obf, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 chk(1'b0, "reset");
    rst_n = 1;
    @(posedge clk); #1 chk(1'b0, "idle");
    sb_auth = 1;
    #1 chk(1'b0, "before edge");
    @(posedge clk); #1 chk(1'b1, "set");
    sb_auth = 0;
    repeat (5) begin @(posedge clk); #1 chk(1'b1, "hold"); end
    cfg_we = 1; cfg_init = 0;
    @(posedge clk); #1 chk(1'b0, "reconfigured");
    cfg_we = 0;
    @(posedge clk); #1 chk(1'b0, "stays clear");
    // random
    model = obf;
    for (int r = 0; r < 1000; r++) begin
      cfg_we = ($urandom_range(7, 0) == 0);
      cfg_init = 1'($urandom);
      sb_auth = ($urandom_range(15, 0) == 0);
      @(posedge clk);
      model = cfg_we ? cfg_init : (model | sb_auth);
      #1 chk(model, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
