// tb_bsm_top: end-to-end test of the BSM at its default sizes.
//
// Plays the host and the neighbouring processing nodes: programs the unit
// address, eta and initial weights, writes inputs, Oj and X over the bus
// interfaces, pulses go and collects the eight result writes from the bus.
// Every write is compared with a reference model of the update
//   R1 = (Oj*(15-Oj)*eta)>>4, R2 = (R1*Oi)>>4, Wi += (X<0 ? -R2 : R2)
//   Ei = (X<0 ? -R : R) with R = (Oj*(15-Oj)*Wi_new)>>4   (all mod 16)
// and the register file is read back by the host. The bus model makes the
// chip wait for a busy bus and lose a simultaneous request (abort), and
// checks that each bus write cycle lasts three cycles with the strobe in the
// second. Each mechanism is counted; one that never happens is a failure.
module tb_bsm_top;
  import bsm_pkg::*;

  localparam int ITER = 40;

  logic clk = 1'b0, rst = 1'b1;
  logic go = 1'b0, done;
  logic cs = 1'b0, rd = 1'b0, wr = 1'b0;
  logic [3:0] a_data_i = '0, a_raddr_i = '0, a_caddr_i = '0;
  logic [3:0] a_data_o, a_raddr_o, a_caddr_o;
  logic a_data_oe, a_raddr_oe, a_caddr_oe, awtwr, adelwr;
  logic axwren = 1'b0, avalwren = 1'b0, bwren = 1'b0;
  logic [3:0] b_data = '0, b_caddr = '0;
  logic reqin = 1'b0, reqout, busy_drive;
  logic ext_busy = 1'b0;
  logic busy_in;

  int checks = 0, failures = 0;
  int n_wt = 0, n_del = 0, n_abort = 0, n_busywait = 0, n_xneg = 0, n_xpos = 0;
  int n_mult = 0, n_add = 0, n_other_unit = 0, n_host_rd = 0, n_wrap = 0;
  int cycle = 0;

  assign busy_in = busy_drive | ext_busy;

  bsm_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------- reference model ----------------
  function automatic int lut(input int oj);
    return oj * (15 - oj);
  endfunction

  // ---------------- bus side ----------------
  typedef struct { logic [3:0] caddr, raddr, data; bit del; } wr_t;
  wr_t got [$];
  int  oe_len = 0, strobe_pos = 0;
  bit  abort_next = 0, busy_next = 0;

  always @(posedge clk) if (!rst) begin
    if (a_raddr_oe) begin
      oe_len <= oe_len + 1;
      if (awtwr || adelwr) begin
        strobe_pos <= oe_len + 1;
        got.push_back('{a_caddr_o, a_raddr_o, a_data_o, adelwr});
        check(a_data_oe && a_caddr_oe, "buffers enabled during strobe");
        check(!(awtwr && adelwr), "one strobe at a time");
      end
    end else if (oe_len != 0) begin
      check(oe_len == 3, $sformatf("write cycle of %0d cycles", oe_len));
      check(strobe_pos == 2, "strobe in second cycle");
      oe_len <= 0;
    end
    if (dut.am_mult) n_mult++;
    if (dut.am_add) n_add++;
  end

  // Competing bus users: abort a request once, hold busy once.
  always @(negedge clk) begin
    reqin    <= 1'b0;
    if (!rst && dut.u_bi.state == dut.u_bi.B_ARB && abort_next) begin
      reqin <= 1'b1;     // higher-priority chip asked in the same cycle
      abort_next = 0;
      n_abort++;
    end
    if (!rst && dut.outreq && !reqout && busy_next) begin
      ext_busy <= 1'b1;
      busy_next = 0;
      n_busywait++;
      fork begin repeat (4) @(negedge clk); ext_busy <= 1'b0; end join_none
    end
  end

  // ---------------- host and node tasks ----------------
  task automatic host_write(input logic [3:0] addr, input logic [3:0] data);
    @(negedge clk); cs = 1; wr = 1; a_raddr_i = addr; a_data_i = data;
    @(negedge clk); cs = 0; wr = 0;
  endtask
  task automatic host_read(input logic [3:0] addr, output logic [3:0] data);
    @(negedge clk); cs = 1; rd = 1; a_raddr_i = addr;
    #1; data = a_data_o;
    check(a_data_oe, "host read drives a_data");
    n_host_rd++;
    @(negedge clk); cs = 0; rd = 0;
  endtask
  task automatic val_write(input logic [3:0] caddr, input logic [3:0] raddr,
                           input logic [3:0] data);
    @(negedge clk); avalwren = 1; a_caddr_i = caddr; a_raddr_i = raddr; a_data_i = data;
    @(negedge clk); avalwren = 0;
  endtask
  task automatic oj_write(input logic [3:0] caddr, input logic [3:0] data);
    @(negedge clk); bwren = 1; b_caddr = caddr; b_data = data;
    @(negedge clk); bwren = 0;
  endtask
  task automatic x_write(input logic [3:0] data);
    @(negedge clk); axwren = 1; a_caddr_i = 4'hF; a_raddr_i = 4'h3; a_data_i = data;
    @(negedge clk); axwren = 0;
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int w[4], o[4], e[4];
  logic [3:0] id, eta, oj, x, rv;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    id  = 4'd5;
    host_write(REG_ID, id);
    for (int it = 0; it < ITER; it++) begin
      int r1, r2, l, t0;
      bit neg;
      if (it == 0 || it % 10 == 7) begin
        eta = 4'($urandom_range(1, 15));
        host_write(REG_ETA, eta);
      end
      if (it == 0) for (int i = 0; i < 4; i++) begin
        w[i] = $urandom_range(0, 15);
        host_write(w_addr(2'(i)), 4'(w[i]));
      end
      for (int i = 0; i < 4; i++) begin
        o[i] = $urandom_range(0, 15);
        val_write(id, o_addr(2'(i)), 4'(o[i]));
      end
      // a write for another unit must be ignored
      val_write(id ^ 4'd3, o_addr(2'd0), 4'(o[0] ^ 1));
      n_other_unit++;
      oj = 4'($urandom_range(0, 15));
      if (it < 2) oj = 4'd7;
      oj_write(id, oj);
      oj_write(id ^ 4'd1, ~oj);       // other unit, ignored
      x  = 4'($urandom_range(0, 15));
      if (it == 0) x = 4'd3;
      if (it == 1) x = 4'd12;
      abort_next = (it % 4 == 1);
      busy_next  = (it % 4 == 2);
      got.delete();
      // go, then X arrives a few cycles later
      @(negedge clk); go = 1;
      @(negedge clk); go = 0;
      t0 = cycle;
      check(!done, "done falls after go");
      x_write(x);
      // reference
      neg = x[3];
      if (neg) n_xneg++; else n_xpos++;
      l  = lut(oj);
      r1 = ((l * eta) >> 4) & 63;
      for (int i = 0; i < 4; i++) begin
        int nw;
        r2 = ((r1 * o[i]) >> 4) & 63;
        nw = w[i] + (neg ? -r2 : r2);
        if (nw < 0 || nw > 15) n_wrap++;
        w[i] = nw & 15;
      end
      for (int i = 0; i < 4; i++) begin
        r2 = ((l * w[i]) >> 4) & 63;
        e[i] = (neg ? -r2 : r2) & 15;
      end
      wait (done);
      check(got.size() == 8, $sformatf("eight result writes, got %0d", got.size()));
      if (got.size() == 8) begin
        for (int i = 0; i < 4; i++) begin
          check(!got[i].del && got[i].caddr == id && got[i].raddr == 4'(i) &&
                got[i].data == 4'(w[i]),
                $sformatf("it %0d weight %0d: got c%0d r%0d d%0d exp %0d", it, i,
                          got[i].caddr, got[i].raddr, got[i].data, w[i]));
          check(got[4+i].del && got[4+i].caddr == 4'(i) && got[4+i].raddr == id &&
                got[4+i].data == 4'(e[i]),
                $sformatf("it %0d error %0d: got c%0d r%0d d%0d exp %0d", it, i,
                          got[4+i].caddr, got[4+i].raddr, got[4+i].data, e[i]));
          n_wt++; n_del++;
        end
      end
      $display("iteration %0d: %0d cycles from go to done", it, cycle - t0);
      for (int i = 0; i < 4; i++) begin
        host_read(w_addr(2'(i)), rv);
        check(rv == 4'(w[i]), "weight register read back");
        host_read(e_addr(2'(i)), rv);
        check(rv == 4'(e[i]), "error register read back");
      end
      host_read(REG_OJ, rv);
      check(rv == oj, "Oj written only for matching unit");
      host_read(o_addr(2'd0), rv);
      check(rv == 4'(o[0]), "input written only for matching unit");
    end
    // every mechanism must have happened
    check(n_abort > 0,      "abort on simultaneous request happened");
    check(n_busywait > 0,   "wait for busy bus happened");
    check(n_xneg > 0,       "negative X correction happened");
    check(n_xpos > 0,       "positive X correction happened");
    check(n_mult > 0,       "multiplies happened");
    check(n_add > 0,        "adds happened");
    check(n_other_unit > 0, "writes for other units happened");
    check(n_wrap > 0,       "weight wrap-around happened");
    check(n_mult == ITER * 9 && n_add == ITER * 12, "9 multiplies and 12 adds per update");
    $display("mechanisms: weight writes %0d, error writes %0d, aborts %0d, busy waits %0d, X<0 %0d, X>=0 %0d, mult %0d, add %0d, foreign writes %0d, wraps %0d, host reads %0d",
             n_wt, n_del, n_abort, n_busywait, n_xneg, n_xpos, n_mult, n_add, n_other_unit, n_wrap, n_host_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
