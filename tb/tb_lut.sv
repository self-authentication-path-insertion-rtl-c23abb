// Self-checking testbench of lut: random 6-input tables, every input
// pattern, output compared with a shift of the table.
module tb_lut;
  localparam int K = 6;
  logic clk = 0;
  logic [(1<<K)-1:0] cfg;
  logic [K-1:0] in;
  logic out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lut #(.K(K)) dut (.cfg(cfg), .in(in), .out(out));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      cfg = {$urandom, $urandom};
      if (t == 0) cfg = 64'h8000_0000_0000_0001;
      for (int i = 0; i < (1 << K); i++) begin
        in = K'(i);
        @(posedge clk);
        checks++;
        if (out !== 1'((cfg >> i) & 64'd1)) begin
          failures++;
          $display("FAIL cfg=%h in=%0d out=%b", cfg, i, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
