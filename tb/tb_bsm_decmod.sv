// tb_bsm_decmod: random request mixes against an independent model of the
// decoder's priority order (result read, sequencer, host, X write, input
// write with unit match, Oj write with unit match; bus writes blocked while
// this chip strobes its own writes). Checks selects, strobes, write data
// and the host-read flag.
module tb_bsm_decmod;
  logic [3:0] id, a_raddr, a_caddr, a_data, b_caddr, b_data, saddr, sdata, rraddr;
  logic cs, rd, wr, axwren, avalwren, awtwr, adelwr, bwren, srd, swr, rrd;
  logic [15:0] rs;
  logic rreg, wreg, host_rd;
  logic [3:0] in_b;
  int checks = 0, failures = 0;
  int n_case [7];

  bsm_decmod dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int who;
      logic [3:0] e_addr, e_data;
      logic e_rd, e_wr, e_host;
      id = 4'($urandom); a_raddr = 4'($urandom); a_data = 4'($urandom);
      b_data = 4'($urandom); saddr = 4'($urandom); sdata = 4'($urandom);
      rraddr = 4'($urandom);
      a_caddr = ($urandom_range(0, 1) != 0) ? id : 4'($urandom);
      b_caddr = ($urandom_range(0, 1) != 0) ? id : 4'($urandom);
      // sparse random requests
      rrd = ($urandom_range(0, 7) == 0);
      srd = ($urandom_range(0, 7) == 0);
      swr = !srd && ($urandom_range(0, 7) == 0);
      cs  = ($urandom_range(0, 5) == 0);
      rd  = ($urandom_range(0, 1) == 0);
      wr  = !rd && ($urandom_range(0, 1) == 0);
      axwren   = ($urandom_range(0, 5) == 0);
      avalwren = ($urandom_range(0, 3) == 0);
      bwren    = ($urandom_range(0, 3) == 0);
      awtwr    = ($urandom_range(0, 9) == 0);
      adelwr   = !awtwr && ($urandom_range(0, 9) == 0);
      // model
      e_addr = 0; e_data = 0; e_rd = 0; e_wr = 0; e_host = 0; who = 0;
      if (rrd) begin who = 1; e_addr = rraddr; e_rd = 1; end
      else if (srd | swr) begin who = 2; e_addr = saddr; e_rd = srd; e_wr = swr; e_data = sdata; end
      else if (cs & (rd | wr)) begin who = 3; e_addr = a_raddr; e_rd = rd; e_wr = wr; e_data = a_data; e_host = rd; end
      else if (!(awtwr | adelwr) && axwren) begin who = 4; e_addr = 4'd11; e_wr = 1; e_data = a_data; end
      else if (!(awtwr | adelwr) && avalwren && a_caddr == id) begin who = 5; e_addr = a_raddr; e_wr = 1; e_data = a_data; end
      else if (!(awtwr | adelwr) && bwren && b_caddr == id) begin who = 6; e_addr = 4'd10; e_wr = 1; e_data = b_data; end
      n_case[who]++;
      #1;
      checks++;
      if (rreg != e_rd || wreg != e_wr || host_rd != e_host ||
          rs != ((e_rd | e_wr) ? (16'd1 << e_addr) : 16'd0) ||
          (e_wr && in_b != e_data)) begin
        failures++;
        $display("FAIL: case %0d rs=%h rreg=%b wreg=%b in=%h", who, rs, rreg, wreg, in_b);
      end
    end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (n_case[i] == 0) begin failures++; $display("FAIL: case %0d never hit", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
