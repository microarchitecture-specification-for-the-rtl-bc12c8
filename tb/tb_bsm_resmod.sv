// tb_bsm_resmod: the result writer against a simple bus-interface model
// (outenab three cycles after a random wait, wstrb in the second cycle).
// Checks the eight writes in order:
// W1..W4 to (unit = id, register = 0..3) on awtwr, then E1..E4 to
// (unit = 0..3, register = id) on adelwr; that outreq is held until
// outenab; that resdone rises after the eighth write and is cleared by go.
module tb_bsm_resmod;
  import bsm_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic go = 1'b0, compdone = 1'b0;
  logic [3:0] id = 4'd9;
  logic outenab = 1'b0, wstrb = 1'b0, outreq;
  logic rrd;
  logic [3:0] rraddr, regaddr, unitaddr;
  logic awtwr, adelwr, resdone;
  int checks = 0, failures = 0, cycle = 0;
  int nw;

  bsm_resmod dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus interface model
  initial begin
    forever begin
      @(negedge clk);
      if (outreq && !rst) begin
        repeat ($urandom_range(1, 4)) begin
          @(negedge clk);
          check(outreq, "outreq held until granted");
        end
        outenab = 1;
        @(negedge clk); wstrb = 1;
        @(negedge clk); wstrb = 0;
        @(negedge clk); outenab = 0;
      end
    end
  end

  // strobe monitor
  always @(posedge clk) if (!rst && (awtwr || adelwr)) begin
    automatic bit del = nw >= 4;
    automatic int i = nw % 4;
    check(rrd, "register read held during write");
    check(adelwr == del && awtwr == !del, $sformatf("strobe routing, write %0d", nw));
    check(rraddr == (del ? e_addr(2'(i)) : w_addr(2'(i))), $sformatf("read address, write %0d", nw));
    check(unitaddr == (del ? 4'(i) : id), $sformatf("unit address, write %0d", nw));
    check(regaddr == (del ? id : 4'(i)), $sformatf("register address, write %0d", nw));
    nw++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int rep = 0; rep < 20; rep++) begin
      id = 4'($urandom);
      nw = 0;
      @(negedge clk); go = 1;
      @(negedge clk); go = 0;
      check(!resdone, "go clears done");
      repeat (3) @(negedge clk);
      check(!outreq && !rrd, "idle before compdone");
      compdone = 1;
      @(negedge clk); compdone = 0;
      while (!resdone) @(negedge clk);
      check(nw == 8, $sformatf("eight writes, saw %0d", nw));
      repeat (5) @(negedge clk);
      check(resdone && !outreq, "done held, quiet");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
