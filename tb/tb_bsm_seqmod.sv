// tb_bsm_seqmod: the computation sequencer with a register array and an
// arithmetic model of the adder/multiplier (result after a random 2-9
// cycles, done held until the next command).
// Checks the operation order (one multiply, then multiply/add/add for each
// weight, then multiply/add for each error term), the operands presented
// with each command, the weights and error terms written back against the
// reference update, a single compdone pulse at the end, and that no
// register is read outside an issue cycle.
module tb_bsm_seqmod;
  import bsm_pkg::*;
  logic clk = 1'b0, rst = 1'b1, go = 1'b0;
  logic [3:0] oj, eta, xin, idata;
  logic [3:0] saddr, sdata;
  logic srd, swr;
  logic [5:0] xbus;
  logic [3:0] ybus;
  logic mult, add;
  logic [11:0] obus = '0;
  logic am_done = 1'b0;
  logic compdone;
  logic [3:0] regs [16];
  int checks = 0, failures = 0, cycle = 0;
  string ops;
  int n_compdone;

  bsm_seqmod dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  assign oj    = regs[REG_OJ];
  assign eta   = regs[REG_ETA];
  assign xin   = regs[REG_XIN];
  assign idata = srd ? regs[saddr] : 4'd0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // register file writes
  always @(posedge clk) if (swr) regs[saddr] <= sdata;
  always @(posedge clk) if (compdone) n_compdone++;
  always @(posedge clk) if (srd) check(mult || add, "reads only in an issue cycle");

  // adder/multiplier model
  initial begin
    forever begin
      @(posedge clk);
      if (mult || add) begin
        logic [11:0] res;
        check(!(mult && add), "one command at a time");
        res = mult ? 12'(xbus) * 12'(ybus) : 12'(xbus) + 12'(ybus);
        ops = {ops, mult ? "M" : "A"};
        #1 am_done = 0;
        repeat ($urandom_range(2, 9)) @(posedge clk);
        #1 obus = res; am_done = 1;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w[4], e[4], l, r1, r2;
    bit neg;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int it = 0; it < 60; it++) begin
      for (int i = 0; i < 16; i++) regs[i] = 4'($urandom);
      for (int i = 0; i < 4; i++) w[i] = regs[w_addr(2'(i))];
      if (it == 0) regs[REG_XIN] = 4'd8;
      if (it == 1) regs[REG_XIN] = 4'd7;
      neg = regs[REG_XIN][3];
      l  = oj * (15 - oj);
      r1 = ((l * eta) >> 4) & 63;
      for (int i = 0; i < 4; i++) begin
        r2 = ((r1 * regs[o_addr(2'(i))]) >> 4) & 63;
        w[i] = (w[i] + (neg ? -r2 : r2)) & 15;
      end
      for (int i = 0; i < 4; i++) begin
        r2 = ((l * w[i]) >> 4) & 63;
        e[i] = (neg ? -r2 : r2) & 15;
      end
      ops = "";
      n_compdone = 0;
      @(negedge clk); go = 1;
      @(negedge clk); go = 0;
      while (n_compdone == 0) @(negedge clk);
      repeat (12) @(negedge clk);
      check(n_compdone == 1, "one compdone pulse");
      check(ops == "MMAAMAAMAAMAAMAMAMAMA", {"operation order ", ops});
      for (int i = 0; i < 4; i++) begin
        check(regs[w_addr(2'(i))] == 4'(w[i]), $sformatf("it %0d W%0d=%0d exp %0d", it, i+1, regs[w_addr(2'(i))], w[i]));
        check(regs[e_addr(2'(i))] == 4'(e[i]), $sformatf("it %0d E%0d=%0d exp %0d", it, i+1, regs[e_addr(2'(i))], e[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
