// tb_bsm_bimod: bus arbitration tests.
//   - free bus: outreq -> reqout next cycle, outenab for exactly 3 cycles,
//     wstrb in the second, 5 cycles from outreq to outenab falling
//   - busy bus or reqin high: no request until both are low
//   - reqin rising in the cycle after reqout: abort, then retry
//   - busy_drive follows reqout
module tb_bsm_bimod;
  logic clk = 1'b0, rst = 1'b1;
  logic outreq = 1'b0, reqin = 1'b0, busy = 1'b0;
  logic reqout, busy_drive, outenab, wstrb;
  int checks = 0, failures = 0, cycle = 0;
  int n_abort = 0, n_wait = 0, n_write = 0;

  bsm_bimod dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  always @(negedge clk) if (!rst) check(busy_drive == reqout, "busy driven by reqout");

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One write: returns cycles from outreq to the end of outenab.
  task automatic one_write(input int busy_cycles, input int reqin_cycles,
                           input bit abort_once, output int len);
    int t0, oe, strobe_at;
    @(negedge clk);
    outreq = 1;
    t0 = cycle;
    busy = (busy_cycles > 0);
    reqin = (reqin_cycles > 0);
    fork
      begin
        repeat (busy_cycles) @(negedge clk);
        busy = 0;
      end
      begin
        repeat (reqin_cycles) @(negedge clk);
        reqin = 0;
      end
    join
    if (busy_cycles > 0 || reqin_cycles > 0) begin
      check(!reqout, "no request while bus busy or reqin");
      n_wait++;
    end
    if (abort_once) begin
      while (!reqout) @(negedge clk);
      reqin = 1;                     // simultaneous higher-priority request
      @(negedge clk);
      reqin = 0;
      check(!reqout && !outenab, "aborted");
      n_abort++;
    end
    while (!outenab) @(negedge clk);
    outreq = 0;
    oe = 0; strobe_at = 0;
    while (outenab) begin
      oe++;
      check(reqout, "reqout held during write");
      if (wstrb) strobe_at = oe;
      @(negedge clk);
    end
    check(oe == 3, $sformatf("outenab %0d cycles", oe));
    check(strobe_at == 2, "strobe in second cycle");
    check(!reqout, "released");
    len = cycle - t0;
    n_write++;
  endtask

  initial begin
    int len;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!reqout && !outenab && !wstrb, "quiet after reset");
    one_write(0, 0, 0, len);
    check(len == 5, $sformatf("free-bus write takes 5 cycles, took %0d", len));
    one_write(4, 0, 0, len);
    check(len == 9, $sformatf("write after 4 busy cycles takes 9, took %0d", len));
    one_write(0, 3, 0, len);
    one_write(0, 0, 1, len);
    for (int i = 0; i < 50; i++)
      one_write($urandom_range(0, 3), $urandom_range(0, 2), i % 3 == 0, len);
    check(n_abort > 0 && n_wait > 0 && n_write > 0, "all cases ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
