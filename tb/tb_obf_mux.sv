// Self-checking testbench of obf_mux: random words with the select low
// (true data) and high (inverted data).
module tb_obf_mux;
  localparam int WD = 16;
  logic clk = 0;
  logic [WD-1:0] d, q;
  logic obf;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  obf_mux #(.WIDTH(WD)) dut (.d(d), .obf(obf), .q(q));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 500; r++) begin
      logic [WD-1:0] exp;
      d = WD'($urandom);
      obf = r[0];
      exp = obf ? (d ^ {WD{1'b1}}) : d;
      @(posedge clk);
      checks++;
      if (q !== exp) begin failures++; $display("FAIL d=%h obf=%b q=%h", d, obf, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
