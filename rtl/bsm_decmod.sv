// bsm_decmod: register-access decoder of the BSM (DecMOD).
//
// Every access to the register file passes through this block. It picks one
// requester, decodes that requester's 4-bit register address into the
// sixteen one-hot select lines rs, raises rreg or wreg, and steers the
// matching write data onto in_b. Requesters, highest priority first:
//   1. result module read     (rrd, rraddr)
//   2. sequencer read/write   (srd/swr, saddr, sdata)
//   3. host read/write        (cs with rd or wr, a_raddr, a_data)
//   4. X write from a BPN     (axwren, a_data) -> Xin, addresses ignored
//   5. input-value write      (avalwren, a_raddr, a_data) when a_caddr = id
//   6. output write on "b"    (bwren, b_data) -> Oj, when b_caddr = id
// Bus writes (4-6) are ignored while this BSM drives its own awtwr or adelwr
// strobe. Unit addresses are compared with the unit address register id by
// an XOR array. host_rd tells the top to drive the read data onto a_data.
//
// The requesters and signals are the document's; it gives no priority (it
// states there is no provision for simultaneous accesses), so the order
// above, the unit-address match for bus writes and the blocking during own
// writes are this design's choices. Purely combinational.
module bsm_decmod
  import bsm_pkg::*;
(
  input  logic [3:0]  id,
  // host
  input  logic        cs,
  input  logic        rd,
  input  logic        wr,
  // "a" interface
  input  logic [3:0]  a_raddr,
  input  logic [3:0]  a_caddr,
  input  logic [3:0]  a_data,
  input  logic        axwren,
  input  logic        avalwren,
  input  logic        awtwr,
  input  logic        adelwr,
  // "b" interface
  input  logic [3:0]  b_caddr,
  input  logic [3:0]  b_data,
  input  logic        bwren,
  // sequencer
  input  logic [3:0]  saddr,
  input  logic        srd,
  input  logic        swr,
  input  logic [3:0]  sdata,
  // result module
  input  logic [3:0]  rraddr,
  input  logic        rrd,
  // register file
  output logic [15:0] rs,
  output logic        rreg,
  output logic        wreg,
  output logic [3:0]  in_b,
  output logic        host_rd
);

  logic [3:0] addr;
  logic       a_match, b_match, own_wr;

  // XOR array: all four bits equal.
  assign a_match = ~|(a_caddr ^ id);
  assign b_match = ~|(b_caddr ^ id);
  assign own_wr  = awtwr || adelwr;

  always_comb begin
    addr    = '0;
    rreg    = 1'b0;
    wreg    = 1'b0;
    in_b    = '0;
    host_rd = 1'b0;
    if (rrd) begin
      addr = rraddr; rreg = 1'b1;
    end else if (srd || swr) begin
      addr = saddr; rreg = srd; wreg = swr; in_b = sdata;
    end else if (cs && (rd || wr)) begin
      addr = a_raddr; rreg = rd; wreg = wr && !rd; in_b = a_data; host_rd = rd;
    end else if (!own_wr && axwren) begin
      addr = REG_XIN; wreg = 1'b1; in_b = a_data;
    end else if (!own_wr && avalwren && a_match) begin
      addr = a_raddr; wreg = 1'b1; in_b = a_data;
    end else if (!own_wr && bwren && b_match) begin
      addr = REG_OJ; wreg = 1'b1; in_b = b_data;
    end
    rs = (rreg || wreg) ? (16'd1 << addr) : '0;
  end

endmodule
