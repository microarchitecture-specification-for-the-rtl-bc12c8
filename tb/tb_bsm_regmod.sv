// tb_bsm_regmod: random reads and writes of the register file against a
// shadow array; checks the common read bus (zero when rreg is low), every
// parallel output, that a write needs both wreg and a select, and reset.
module tb_bsm_regmod;
  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] rs = '0;
  logic rreg = 1'b0, wreg = 1'b0;
  logic [3:0] in_b = '0, out_b;
  logic [3:0] r [16];
  logic [3:0] shadow [16];
  int checks = 0, failures = 0;

  bsm_regmod dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) shadow[i] = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 16; i++) check(r[i] == 0, "reset clears");
    for (int n = 0; n < 2000; n++) begin
      automatic int a = $urandom_range(0, 15);
      automatic int op = $urandom_range(0, 3);
      @(negedge clk);
      rs = 16'(1) << a;
      in_b = 4'($urandom);
      wreg = (op == 0 || op == 1);
      rreg = (op == 2);
      if (op == 3) begin rs = '0; wreg = 1; end   // no select: nothing written
      #1;
      if (rreg) check(out_b == shadow[a], $sformatf("read r%0d", a));
      else      check(out_b == 0, "read bus idle");
      @(posedge clk);
      if (wreg && rs != 0) shadow[a] = in_b;
      #1;
      for (int i = 0; i < 16; i++)
        check(r[i] == shadow[i], $sformatf("parallel output r%0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
