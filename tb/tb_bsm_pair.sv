// tb_bsm_pair: two BSMs sharing one system bus.
//
// Chip 0 has the higher priority: its reqout, ORed with its reqin, is chip
// 1's reqin (the daisy chain), and both pull the wired busy line. Both get
// the same go, finish their computations at nearly the same time and then
// compete for the bus. The test checks that the two chips never drive the
// bus together, that each delivers its eight results (against the reference
// update), and counts the arbitration events: chip 1 waiting for the busy
// bus, and chip 1 losing a request made in the same cycle as chip 0's.
module tb_bsm_pair;
  import bsm_pkg::*;

  localparam int ITER = 12;

  logic clk = 1'b0, rst = 1'b1, go = 1'b0;
  logic cs [2], rd = 1'b0, wr = 1'b0;
  logic done [2];
  logic [3:0] tb_data = '0, tb_raddr = '0, tb_caddr = '0;
  logic [3:0] bus_data, bus_raddr, bus_caddr;
  logic [3:0] d_o [2], ra_o [2], ca_o [2];
  logic d_oe [2], ra_oe [2], ca_oe [2], awtwr [2], adelwr [2];
  logic avalwren = 1'b0, bwren = 1'b0, axwren [2];
  logic [3:0] b_data = '0, b_caddr = '0;
  logic reqin [2], reqout [2], busy_drive [2], busy;
  int checks = 0, failures = 0, cycle = 0;
  int n_abort = 0, n_busywait = 0, n_writes [2];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // wired bus
  assign bus_data  = d_oe[0]  ? d_o[0]  : d_oe[1]  ? d_o[1]  : tb_data;
  assign bus_raddr = ra_oe[0] ? ra_o[0] : ra_oe[1] ? ra_o[1] : tb_raddr;
  assign bus_caddr = ca_oe[0] ? ca_o[0] : ca_oe[1] ? ca_o[1] : tb_caddr;
  assign busy      = busy_drive[0] | busy_drive[1];
  assign reqin[0]  = 1'b0;
  assign reqin[1]  = reqout[0] | reqin[0];

  for (genvar c = 0; c < 2; c++) begin : g_chip
    bsm_top u (
      .clk, .rst, .go, .done(done[c]), .cs(cs[c]), .rd, .wr,
      .a_data_i(bus_data), .a_data_o(d_o[c]), .a_data_oe(d_oe[c]),
      .a_raddr_i(bus_raddr), .a_raddr_o(ra_o[c]), .a_raddr_oe(ra_oe[c]),
      .a_caddr_i(bus_caddr), .a_caddr_o(ca_o[c]), .a_caddr_oe(ca_oe[c]),
      .awtwr(awtwr[c]), .adelwr(adelwr[c]), .axwren(axwren[c]), .avalwren,
      .b_data, .b_caddr, .bwren,
      .reqin(reqin[c]), .reqout(reqout[c]), .busy_in(busy), .busy_drive(busy_drive[c])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  typedef struct { logic [3:0] caddr, raddr, data; bit del; } wr_t;
  wr_t got [2][$];

  always @(posedge clk) if (!rst) begin
    check(!(ra_oe[0] && ra_oe[1]), "never two drivers on the bus");
    for (int c = 0; c < 2; c++)
      if (awtwr[c] || adelwr[c]) got[c].push_back('{bus_caddr, bus_raddr, bus_data, adelwr[c]});
    // chip 1 arbitrating while chip 0 requests in the same cycle
    if (g_chip[1].u.u_bi.state == g_chip[1].u.u_bi.B_ARB && reqin[1]) n_abort++;
    if (g_chip[1].u.outreq && busy && !reqout[1]) n_busywait++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(input int c, input logic [3:0] addr, input logic [3:0] data);
    @(negedge clk); cs[c] = 1; wr = 1; tb_raddr = addr; tb_data = data;
    @(negedge clk); cs[c] = 0; wr = 0;
  endtask
  task automatic val_write(input logic [3:0] caddr, input logic [3:0] raddr, input logic [3:0] data);
    @(negedge clk); avalwren = 1; tb_caddr = caddr; tb_raddr = raddr; tb_data = data;
    @(negedge clk); avalwren = 0;
  endtask
  task automatic oj_write(input logic [3:0] caddr, input logic [3:0] data);
    @(negedge clk); bwren = 1; b_caddr = caddr; b_data = data;
    @(negedge clk); bwren = 0;
  endtask
  task automatic x_write(input int c, input logic [3:0] data);
    @(negedge clk); axwren[c] = 1; tb_data = data;
    @(negedge clk); axwren[c] = 0;
  endtask

  initial begin
    int w[2][4], o[2][4], e[2][4], eta[2], oj[2], x[2];
    logic [3:0] id [2];
    cs[0] = 0; cs[1] = 0; axwren[0] = 0; axwren[1] = 0;
    id[0] = 4'd1; id[1] = 4'd2;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 2; c++) begin
      host_write(c, REG_ID, id[c]);
      eta[c] = $urandom_range(1, 15);
      host_write(c, REG_ETA, 4'(eta[c]));
      for (int i = 0; i < 4; i++) begin
        w[c][i] = $urandom_range(0, 15);
        host_write(c, w_addr(2'(i)), 4'(w[c][i]));
      end
    end
    for (int it = 0; it < ITER; it++) begin
      for (int c = 0; c < 2; c++) begin
        for (int i = 0; i < 4; i++) begin
          o[c][i] = $urandom_range(0, 15);
          val_write(id[c], o_addr(2'(i)), 4'(o[c][i]));
        end
        oj[c] = $urandom_range(0, 15);
        oj_write(id[c], 4'(oj[c]));
        x[c] = $urandom_range(0, 15);
        x_write(c, 4'(x[c]));
        // reference update
        begin
          int l, r1, r2;
          automatic bit neg = x[c][3];
          l  = oj[c] * (15 - oj[c]);
          r1 = ((l * eta[c]) >> 4) & 63;
          for (int i = 0; i < 4; i++) begin
            r2 = ((r1 * o[c][i]) >> 4) & 63;
            w[c][i] = (w[c][i] + (neg ? -r2 : r2)) & 15;
          end
          for (int i = 0; i < 4; i++) begin
            r2 = ((l * w[c][i]) >> 4) & 63;
            e[c][i] = (neg ? -r2 : r2) & 15;
          end
        end
      end
      got[0].delete(); got[1].delete();
      @(negedge clk); go = 1;
      @(negedge clk); go = 0;
      wait (done[0] && done[1]);
      for (int c = 0; c < 2; c++) begin
        check(got[c].size() == 8, $sformatf("chip %0d: eight writes, got %0d", c, got[c].size()));
        if (got[c].size() == 8)
          for (int i = 0; i < 4; i++) begin
            check(!got[c][i].del && got[c][i].caddr == id[c] && got[c][i].raddr == 4'(i) &&
                  got[c][i].data == 4'(w[c][i]), $sformatf("chip %0d weight %0d", c, i));
            check(got[c][4+i].del && got[c][4+i].caddr == 4'(i) && got[c][4+i].raddr == id[c] &&
                  got[c][4+i].data == 4'(e[c][i]), $sformatf("chip %0d error %0d", c, i));
          end
        n_writes[c] += got[c].size();
      end
    end
    check(n_abort > 0, "chip 1 lost a simultaneous request");
    check(n_busywait > 0, "chip 1 waited for a busy bus");
    $display("writes %0d/%0d, chip-1 aborts %0d, chip-1 busy-wait cycles %0d",
             n_writes[0], n_writes[1], n_abort, n_busywait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
