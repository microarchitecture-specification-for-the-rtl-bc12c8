// bsm_bimod: bus interface module of the BSM (BiMOD).
//
// Arbitrates for the shared system bus with a daisy-chained request and a
// wired busy line, then runs one three-cycle write cycle:
//   IDLE: outreq with busy and reqin both low -> ARB
//   ARB : reqout is high (and with it the busy drive). If reqin is now high,
//         a higher-priority chip asked at the same time: abort to IDLE and
//         try again later (outreq stays high). Otherwise -> W1.
//   W1, W2, W3: outenab high (address and data buffers on), reqout still
//         high; wstrb is high in W2, the second cycle. Then -> IDLE.
// reqout drives the open-drain busy pull-down, so busy_drive = reqout.
// All signals are active high; busy is the line as seen after the pad's
// inverter.
//
// The protocol (conditions to request, abort one cycle later, three-cycle
// write with the strobe in the second cycle, busy driven by reqout) is the
// document's. The state names and coding are this design's.
module bsm_bimod (
  input  logic clk,
  input  logic rst,
  input  logic outreq,
  input  logic reqin,
  input  logic busy,
  output logic reqout,
  output logic busy_drive,
  output logic outenab,
  output logic wstrb
);

  typedef enum logic [2:0] {B_IDLE, B_ARB, B_W1, B_W2, B_W3} bi_state_e;

  bi_state_e state;

  always_ff @(posedge clk) begin
    if (rst) state <= B_IDLE;
    else begin
      unique case (state)
        B_IDLE: if (outreq && !busy && !reqin) state <= B_ARB;
        B_ARB:  state <= reqin ? B_IDLE : B_W1;
        B_W1:   state <= B_W2;
        B_W2:   state <= B_W3;
        B_W3:   state <= B_IDLE;
        default: state <= B_IDLE;
      endcase
    end
  end

  assign reqout     = (state != B_IDLE);
  assign busy_drive = reqout;
  assign outenab    = (state == B_W1) || (state == B_W2) || (state == B_W3);
  assign wstrb      = (state == B_W2);

  // Once granted, the write cycle lasts exactly three cycles.
  a_three_cycles: assert property (@(posedge clk) disable iff (rst)
    $rose(outenab) |-> outenab [*3] ##1 !outenab);

endmodule
