// bsm_top: the Back-propagation State Machine (BSM) chip.
//
// The BSM sits next to a processing node (PN) in a layered neural network
// and, once per training step, updates the PN's four input weights and
// sends an error term for each input down to the level below:
//   delta = Oj(1-Oj) * eta * sign(X)
//   Wi   <- Wi + delta * Oi                        (written to the local PN)
//   Ei    = Oj(1-Oj) * sign(X) * Wi                (written to lower node i)
// All values are 4 bits wide; X (the error from the level above) is used
// only for its sign.
//
// Blocks: register file (bsm_regmod), access decoder (bsm_decmod),
// computation sequencer (bsm_seqmod with its Oj(1-Oj) table and encode
// logic), shift-and-add adder/multiplier (bsm_ammod, 6-bit xbus and 4-bit
// ybus used, upper bits tied low), result writer (bsm_resmod) and bus
// arbiter (bsm_bimod).
//
// Interface: the host loads the unit address (register 8), eta (9) and the
// weights with cs/wr over a_raddr/a_data; processing nodes write the inputs
// (avalwren, unit address on a_caddr), the PN output Oj (bwren on the "b"
// interface) and X (axwren). A rising edge on go starts the computation; done
// falls with go and rises after the last of the eight result writes. The
// bidirectional pins of the "a" interface appear as separate input, output
// and output-enable signals; busy appears as the line's level (busy_in) and
// this chip's open-drain pull (busy_drive). One clock stands for the
// document's two-phase clock; reset is synchronous and active high.
module bsm_top
  import bsm_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  // host
  input  logic          go,
  output logic          done,
  input  logic          cs,
  input  logic          rd,
  input  logic          wr,
  // "a" interface
  input  logic [DW-1:0] a_data_i,
  output logic [DW-1:0] a_data_o,
  output logic          a_data_oe,
  input  logic [DW-1:0] a_raddr_i,
  output logic [DW-1:0] a_raddr_o,
  output logic          a_raddr_oe,
  input  logic [DW-1:0] a_caddr_i,
  output logic [DW-1:0] a_caddr_o,
  output logic          a_caddr_oe,
  output logic          awtwr,
  output logic          adelwr,
  input  logic          axwren,
  input  logic          avalwren,
  // "b" interface (register address b_raddr is a don't-care for the BSM)
  input  logic [DW-1:0] b_data,
  input  logic [DW-1:0] b_caddr,
  input  logic          bwren,
  // bus access control
  input  logic          reqin,
  output logic          reqout,
  input  logic          busy_in,
  output logic          busy_drive
);

  // register file
  logic [NREG-1:0] rs;
  logic            rreg, wreg, host_rd;
  logic [DW-1:0]   in_b, out_b;
  logic [DW-1:0]   r [NREG];
  // sequencer
  logic [3:0]      saddr, sdata;
  logic            srd, swr, compdone;
  logic [TW-1:0]   s_xbus;
  logic [3:0]      s_ybus;
  logic            am_add, am_mult, am_done, am_idle;
  logic [11:0]     obus;
  // result module and bus interface
  logic            rrd, outreq, outenab, wstrb;
  logic [3:0]      rraddr, regaddr, unitaddr;

  bsm_regmod #(.DW(DW), .NREG(NREG)) u_reg (
    .clk, .rst, .rs, .rreg, .wreg, .in_b, .out_b, .r
  );

  bsm_decmod u_dec (
    .id(r[REG_ID]), .cs, .rd, .wr,
    .a_raddr(a_raddr_i), .a_caddr(a_caddr_i), .a_data(a_data_i),
    .axwren, .avalwren, .awtwr, .adelwr,
    .b_caddr, .b_data, .bwren,
    .saddr, .srd, .swr, .sdata,
    .rraddr, .rrd,
    .rs, .rreg, .wreg, .in_b, .host_rd
  );

  bsm_seqmod u_seq (
    .clk, .rst, .go,
    .oj(r[REG_OJ]), .eta(r[REG_ETA]), .xin(r[REG_XIN]), .idata(out_b),
    .saddr, .srd, .swr, .sdata,
    .xbus(s_xbus), .ybus(s_ybus), .mult(am_mult), .add(am_add),
    .obus, .am_done, .compdone
  );

  bsm_ammod #(.XW(8), .YW(8), .OW(12)) u_am (
    .clk, .rst,
    .xbus({2'b00, s_xbus}), .ybus({4'b0000, s_ybus}),
    .add(am_add), .mult(am_mult), .obus, .done(am_done), .idle(am_idle)
  );

  bsm_resmod u_res (
    .clk, .rst, .go, .compdone, .id(r[REG_ID]),
    .outenab, .wstrb, .outreq, .rrd, .rraddr,
    .regaddr, .unitaddr, .awtwr, .adelwr, .resdone(done)
  );

  bsm_bimod u_bi (
    .clk, .rst, .outreq, .reqin, .busy(busy_in),
    .reqout, .busy_drive, .outenab, .wstrb
  );

  // Output buffers of the "a" interface.
  assign a_data_o   = out_b;
  assign a_data_oe  = outenab || host_rd;
  assign a_raddr_o  = regaddr;
  assign a_raddr_oe = outenab;
  assign a_caddr_o  = unitaddr;
  assign a_caddr_oe = outenab;

  // The sequencer never starts an operation while the unit is busy.
  a_am_free: assert property (@(posedge clk) disable iff (rst)
    (am_add || am_mult) |-> (am_idle || am_done));

endmodule
