// bsm_resmod: result output module of the BSM (ResMOD).
//
// When the sequencer pulses compdone, this block makes eight writes on the
// system bus through the bus interface (BiMOD):
//   writes 0-3: weight Wi to the local processing node. Unit address = own
//               id, register address = i (0..3).
//   writes 4-7: error term Ei to lower-level node i. Unit address = i (0..3),
//               register address = own id.
// For each write it reads the source register (rrd, rraddr; the data appears
// on the register file's read bus, which the top drives onto a_data), raises
// outreq until the bus interface answers with outenab, and waits for outenab
// to fall. The bus interface's write strobe is routed to awtwr for weights
// and to adelwr for error terms. After the eighth write resdone (done_1)
// rises; the next go clears it and returns the machine to idle.
//
// The write order, addresses, strobe routing and done behaviour are the
// document's. The state encoding and the 3-bit write index are this design's.
module bsm_resmod
  import bsm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       go,
  input  logic       compdone,
  input  logic [3:0] id,
  // bus interface
  input  logic       outenab,
  input  logic       wstrb,
  output logic       outreq,
  // register file
  output logic       rrd,
  output logic [3:0] rraddr,
  // system bus
  output logic [3:0] regaddr,
  output logic [3:0] unitaddr,
  output logic       awtwr,
  output logic       adelwr,
  output logic       resdone
);

  typedef enum logic [1:0] {R_IDLE, R_REQ, R_XFER} res_state_e;

  res_state_e state;
  logic [2:0] idx;
  logic       err_phase;
  logic [1:0] sub;

  assign err_phase = idx[2];
  assign sub       = idx[1:0];

  assign outreq   = (state == R_REQ);
  assign rrd      = (state != R_IDLE);
  assign rraddr   = err_phase ? e_addr(sub) : w_addr(sub);
  // 2:1 address multiplexers
  assign regaddr  = err_phase ? id : {2'b00, sub};
  assign unitaddr = err_phase ? {2'b00, sub} : id;
  // 1:2 strobe selector
  assign awtwr    = wstrb && !err_phase;
  assign adelwr   = wstrb &&  err_phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= R_IDLE;
      idx     <= '0;
      resdone <= 1'b0;
    end else if (go) begin
      state   <= R_IDLE;
      resdone <= 1'b0;
    end else begin
      unique case (state)
        R_IDLE: if (compdone) begin
          state <= R_REQ;
          idx   <= '0;
        end
        R_REQ:  if (outenab) state <= R_XFER;
        R_XFER: if (!outenab) begin
          if (idx == 3'd7) begin
            state   <= R_IDLE;
            resdone <= 1'b1;
          end else begin
            idx   <= idx + 1'b1;
            state <= R_REQ;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
