// bsm_ammod: adder/multiplier of the BSM (AmMOD).
//
// Adds two 8-bit unsigned (or 7-bit two's complement) values, or multiplies
// two 6-bit unsigned values into a 12-bit product, with one 8-bit adder and
// a 13-bit accumulator (areg) that shifts right.
//
// Add: xbus goes into areg[11:4], ybus into yreg[7:0]; one parallel add puts
// the 9-bit sum into areg[12:4]; four right shifts move it down to areg[8:0].
// Multiply: xbus[5:0] goes into areg[5:0] and ybus into yreg[7:2]; six times,
// if areg[0] is set yreg is added into areg[12:4], then areg shifts right.
// The product ends in areg[11:0]. The finished areg[11:0] is copied to oreg,
// which drives obus.
//
// A three-state Mealy controller (S0/S1/S2) issues one action per cycle:
// pa (parallel add), ps (shift right and count) or d (done). A counter of
// shifts raises k after 4 shifts (add) or 6 shifts (multiply).
//   S0: a or m -> pa, go S1;  otherwise -> ps, go S2
//   S1: -> ps, go S2
//   S2: k -> d, go S0;  multiply with m and not k -> pa, go S1;  else -> ps
//
// Interface: add or mult is sampled in a cycle where the unit is idle or
// done; the operands on xbus/ybus are taken in that same cycle. Asserting
// both, or neither, starts nothing. done rises with obus valid and stays
// high until the next command; idle is high while no operation runs.
// Latency from the command cycle to done: 7 cycles for an add, 8 plus the
// number of ones in xbus[5:0] for a multiply.
//
// Datapath, bit placement, the S0/S1/S2 controller and the shift counts are
// the document's. One clock edge per step (instead of the ph1/ph2 pair) and
// a counter that simply compares with 4 or 6 are this design's choices, as
// is loading areg straight from xbus: the document's separate xreg holds
// nothing that areg does not.
module bsm_ammod #(
  parameter int XW = 8,   // xbus width
  parameter int YW = 8,   // ybus width (= adder width)
  parameter int OW = 12   // obus width (= product width)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [XW-1:0] xbus,
  input  logic [YW-1:0] ybus,
  input  logic          add,
  input  logic          mult,
  output logic [OW-1:0] obus,
  output logic          done,
  output logic          idle
);

  localparam int AW     = OW + 1;      // accumulator width
  localparam int MW     = OW / 2;      // multiply operand width
  localparam int ASH    = OW - YW;     // shifts after an add
  localparam int YOFF   = MW - ASH;    // yreg offset of the multiplicand
  localparam int CW     = $clog2(MW + 1);

  typedef enum logic [1:0] {S0, S1, S2} am_state_e;

  am_state_e       state;
  logic [YW-1:0]   yreg;
  logic [AW-1:0]   areg;
  logic [OW-1:0]   oreg;
  logic [CW-1:0]   cnt;
  logic            n_q, a_q;        // operation pending; it is an add
  logic            done_q;
  logic            k, m, start;
  logic            pa, ps, d;
  logic [YW:0]     sum;

  assign m     = areg[0];
  assign k     = (cnt == CW'(a_q ? ASH : MW));
  assign idle  = (state == S0) && !n_q;
  assign start = (idle || done_q) && (add ^ mult);
  assign sum   = {1'b0, areg[OW-1 -: YW]} + {1'b0, yreg};

  // Controller outputs (valid only while an operation is pending).
  always_comb begin
    pa = 1'b0; ps = 1'b0; d = 1'b0;
    if (n_q) begin
      unique case (state)
        S0: if (a_q || m) pa = 1'b1; else ps = 1'b1;
        S1: ps = 1'b1;
        S2: if (k) d = 1'b1;
            else if (!a_q && m) pa = 1'b1;
            else ps = 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S0;
      yreg   <= '0;
      areg   <= '0;
      oreg   <= '0;
      cnt    <= '0;
      n_q    <= 1'b0;
      a_q    <= 1'b0;
      done_q <= 1'b0;
    end else if (start) begin
      n_q    <= 1'b1;
      a_q    <= add;
      done_q <= 1'b0;
      cnt    <= '0;
      state  <= S0;
      if (add) begin
        yreg <= ybus;
        areg <= AW'({xbus, {ASH{1'b0}}});
      end else begin
        yreg <= YW'({ybus[MW-1:0], {YOFF{1'b0}}});
        areg <= AW'(xbus[MW-1:0]);
      end
    end else begin
      if (pa) begin
        areg[AW-1 -: YW+1] <= sum;
        state <= S1;
      end
      if (ps) begin
        areg  <= areg >> 1;
        cnt   <= cnt + 1'b1;
        state <= S2;
      end
      if (d) begin
        oreg   <= areg[OW-1:0];
        done_q <= 1'b1;
        n_q    <= 1'b0;
        state  <= S0;
      end
    end
  end

  assign obus = oreg;
  assign done = done_q;

  // The controller performs exactly one action per busy cycle.
  a_one_action: assert property (@(posedge clk) disable iff (rst)
    n_q |-> $onehot({pa, ps, d}));

endmodule
