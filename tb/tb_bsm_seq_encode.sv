// tb_bsm_seq_encode: checks the encode logic against the address table:
// Oj -> 1010, eta -> 1001, Oi -> 0000/0010/0100/0110, Wi -> 0001/0011/0101/
// 0111 (read or write), Ei -> 1100..1111 (write), for each counter value,
// plus the request priorities and the all-quiet case.
module tb_bsm_seq_encode;
  logic oj_rd, eta_rd, oi_rd, wi_rd, wi_wr, ei_wr;
  logic [1:0] cnt;
  logic [3:0] saddr;
  logic srd, swr;
  int checks = 0, failures = 0;

  bsm_seq_encode dut (.*);

  task automatic expect_(input logic [5:0] req, input logic [1:0] c,
                         input logic [3:0] a, input logic r, input logic w);
    {oj_rd, eta_rd, oi_rd, wi_rd, wi_wr, ei_wr} = req;
    cnt = c;
    #1;
    checks++;
    if (saddr != a || srd != r || swr != w) begin
      failures++;
      $display("FAIL: req=%b cnt=%0d -> %b %b %b, exp %b %b %b", req, c, saddr, srd, swr, a, r, w);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] oi_tab [4] = '{4'b0000, 4'b0010, 4'b0100, 4'b0110};
    logic [3:0] wi_tab [4] = '{4'b0001, 4'b0011, 4'b0101, 4'b0111};
    logic [3:0] ei_tab [4] = '{4'b1100, 4'b1101, 4'b1110, 4'b1111};
    for (int c = 0; c < 4; c++) begin
      expect_(6'b100000, 2'(c), 4'b1010, 1, 0);
      expect_(6'b010000, 2'(c), 4'b1001, 1, 0);
      expect_(6'b001000, 2'(c), oi_tab[c], 1, 0);
      expect_(6'b000100, 2'(c), wi_tab[c], 1, 0);
      expect_(6'b000010, 2'(c), wi_tab[c], 0, 1);
      expect_(6'b000001, 2'(c), ei_tab[c], 0, 1);
      expect_(6'b000000, 2'(c), 4'b0000, 0, 0);
      expect_(6'b100100, 2'(c), wi_tab[c], 1, 0);   // OJWI step: Wi on the bus
      expect_(6'b000110, 2'(c), wi_tab[c], 0, 1);   // WI step at done: write
      expect_(6'b110000, 2'(c), 4'b1010, 1, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
