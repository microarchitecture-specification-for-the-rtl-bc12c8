// tb_bsm_ammod: self-checking test of the adder/multiplier.
//
// Issues random adds (8-bit unsigned, and 7-bit two's complement read from
// the low bits) and 6x6 multiplies, compares obus with the arithmetic
// result, and checks the latency from the command cycle to done: 7 cycles
// for an add and 8 + popcount(x[5:0]) for a multiply (one cycle per add
// pulse and per shift of the S0/S1/S2 controller, plus load and done).
// Also checks that a command is ignored while an operation runs and that
// add and mult together start nothing.
module tb_bsm_ammod;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] xbus = '0, ybus = '0;
  logic add = 1'b0, mult = 1'b0;
  logic [11:0] obus;
  logic done, idle;
  int checks = 0, failures = 0, cycle = 0;

  bsm_ammod dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit is_add, input logic [7:0] x, input logic [7:0] y,
                     input bit poke);
    int t0, lat, exp_lat;
    logic [11:0] exp;
    @(negedge clk);
    xbus = x; ybus = y; add = is_add; mult = !is_add;
    @(negedge clk);
    t0 = cycle;
    add = 0; mult = 0;
    if (poke) begin
      // a second command while busy must be ignored
      @(negedge clk); xbus = ~x; ybus = ~y; add = 1;
      @(negedge clk); add = 0;
    end
    while (!done) @(negedge clk);
    lat = cycle - t0 + 1;
    if (is_add) begin
      exp = 12'({1'b0, x} + {1'b0, y});
      exp_lat = 7;
    end else begin
      exp = 12'(x[5:0]) * 12'(y[5:0]);
      exp_lat = 8 + $countones(x[5:0]);
    end
    check(obus == exp, $sformatf("%s %0d,%0d: got %0d exp %0d",
                                 is_add ? "add" : "mult", x, y, obus, exp));
    check(lat == exp_lat, $sformatf("latency %0d exp %0d", lat, exp_lat));
    check(idle, "idle again once done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(idle && !done, "idle after reset");
    run(1, 8'd255, 8'd255, 0);
    run(0, 8'd63, 8'd63, 0);
    run(0, 8'd0, 8'd45, 0);
    run(1, 8'hF9, 8'h05, 0);  // -7 + 5 = -2 in 7-bit two's complement
    check(obus[6:0] == 7'h7E, "signed add");
    for (int i = 0; i < 300; i++)
      run(i[0], 8'($urandom), 8'($urandom), i % 7 == 3);
    // add and mult together start nothing
    @(negedge clk); add = 1; mult = 1; xbus = 1; ybus = 1;
    @(negedge clk); add = 0; mult = 0;
    repeat (10) @(negedge clk);
    check(done && obus != 12'd2, "add+mult together is no command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
