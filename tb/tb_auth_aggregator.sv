// Self-checking testbench of auth_aggregator: the CLB size (10 inputs) and
// the switch-box size (4 inputs); all-zero, every single one-hot input and
// random patterns, compared with a reduction OR.
module tb_auth_aggregator;
  logic clk = 0;
  logic [9:0] a10;
  logic [3:0] a4;
  logic o10, o4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  auth_aggregator #(.NIN(10)) dut10 (.auth_in(a10), .auth_out(o10));
  auth_aggregator #(.NIN(4))  dut4  (.auth_in(a4),  .auth_out(o4));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [9:0] v10, logic [3:0] v4);
    a10 = v10; a4 = v4;
    @(posedge clk);
    checks += 2;
    if (o10 !== (v10 != 0)) begin failures++; $display("FAIL 10: %b -> %b", v10, o10); end
    if (o4  !== (v4  != 0)) begin failures++; $display("FAIL 4: %b -> %b", v4, o4); end
  endtask

  initial begin
    apply('0, '0);
    for (int i = 0; i < 10; i++) apply(10'(1) << i, 4'(1) << (i % 4));
    for (int r = 0; r < 200; r++) apply(10'($urandom), 4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
