// bsm_seqmod: computation sequencer of the BSM (SeqMOD).
//
// After go it drives the adder/multiplier through the back-propagation
// update for the four inputs of the local processing node:
//   OJETA  R1 = Oj(1-Oj) * eta                 (multiply)
//   per i = 1..4:
//     OI   R2 = R1 * Oi                        (multiply)
//     XI   R3 = R2, or -R2 when X < 0          (add: ~R2 + 1 or R2 + 0)
//     WI   Wi = Wi + R3                        (add, result written back)
//   per i = 1..4:
//     OJWI R2 = Oj(1-Oj) * Wi                  (multiply, new weight)
//     EI   Ei = R2, or -R2 when X < 0          (add, result written)
// and then pulses compdone. A 2-bit counter picks i; the encode logic turns
// the step's reads and writes into register addresses for the decoder.
//
// X enters only through its sign bit (Xin[3]), which sets the direction of
// the correction. It is latched at the end of the OJETA and of each OJWI
// step (the steps whose control equations read X), so X may arrive after go.
// Oj, eta and Xin come straight from the register file's parallel outputs;
// Oi and Wi are read over the common read bus (idata). The write data sdata
// is the low nibble of the adder result, wired through without a register:
// the unit holds its result until the next command.
//
// Timing: an operation is issued with a one-cycle pulse on mult or add, one
// cycle after go or after the rising edge of the unit's done (dpulse). On
// dpulse the result is stored (temporary register or register file) and the
// next step is entered. Multiply results keep product bits [9:4]; add results
// keep bits [5:0] (temporaries) or [3:0] (weights and errors).
//
// The steps, their order, the control equations (which values are read and
// written in which step) and the temporary registers R1-R3 are the
// document's. The state codes, the go edge detect and the choice of product
// bits are this design's.
module bsm_seqmod
  import bsm_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          go,
  // register file
  input  logic [3:0]    oj,       // parallel output of the Oj register
  input  logic [3:0]    eta,      // parallel output of the eta register
  input  logic [3:0]    xin,      // parallel output of the Xin register
  input  logic [3:0]    idata,    // common read bus
  output logic [3:0]    saddr,
  output logic          srd,
  output logic          swr,
  output logic [3:0]    sdata,
  // adder/multiplier
  output logic [5:0]    xbus,
  output logic [3:0]    ybus,
  output logic          mult,
  output logic          add,
  input  logic [11:0]   obus,
  input  logic          am_done,
  // result module
  output logic          compdone
);

  seq_state_e  state;
  logic [1:0]  cnt;
  logic [5:0]  r1, r2, r3;
  logic        compl;        // latched sign of X
  logic        done_d, dpulse, pulse, go_d, go_rise;
  logic [5:0]  lut;
  logic [5:0]  res6;
  logic        oj_rd, eta_rd, oi_rd, wi_rd, wi_wr, ei_wr;

  bsm_oj_lut u_lut (.oj(oj), .lut(lut));

  assign dpulse  = am_done && !done_d;
  assign go_rise = go && !go_d;

  // Result bits kept from the adder/multiplier.
  assign res6 = (state == SEQ_OJETA || state == SEQ_OI || state == SEQ_OJWI)
              ? obus[9:4] : obus[5:0];

  // Control logic: reads only in the cycle an operation is issued (so bus
  // writes from other nodes reach the register file between operations),
  // writes on the done pulse.
  always_comb begin
    oj_rd  = pulse && ((state == SEQ_OJETA) || (state == SEQ_OJWI));
    eta_rd = pulse && (state == SEQ_OJETA);
    oi_rd  = pulse && (state == SEQ_OI);
    wi_rd  = pulse && ((state == SEQ_WI) || (state == SEQ_OJWI));
    wi_wr  = (state == SEQ_WI) && dpulse;
    ei_wr  = (state == SEQ_EI) && dpulse;
  end

  bsm_seq_encode u_enc (
    .oj_rd, .eta_rd, .oi_rd, .wi_rd, .wi_wr, .ei_wr, .cnt,
    .saddr, .srd, .swr
  );
  assign sdata = obus[3:0];

  // Operand busses.
  always_comb begin
    xbus = '0;
    ybus = '0;
    unique case (state)
      SEQ_OJETA: begin xbus = lut; ybus = eta;   end
      SEQ_OI:    begin xbus = r1;  ybus = idata; end
      SEQ_XI,
      SEQ_EI:    begin xbus = compl ? ~r2 : r2; ybus = {3'b000, compl}; end
      SEQ_WI:    begin xbus = r3;  ybus = idata; end
      SEQ_OJWI:  begin xbus = lut; ybus = idata; end
      default:   ;
    endcase
  end

  assign mult = pulse && (state == SEQ_OJETA || state == SEQ_OI || state == SEQ_OJWI);
  assign add  = pulse && (state == SEQ_XI || state == SEQ_WI || state == SEQ_EI);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= SEQ_IDLE;
      cnt      <= '0;
      r1       <= '0;
      r2       <= '0;
      r3       <= '0;
      compl    <= 1'b0;
      done_d   <= 1'b0;
      go_d     <= 1'b0;
      pulse    <= 1'b0;
      compdone <= 1'b0;
    end else begin
      done_d   <= am_done;
      go_d     <= go;
      compdone <= 1'b0;
      pulse    <= 1'b0;
      unique case (state)
        SEQ_IDLE: if (go_rise) begin
          state <= SEQ_OJETA;
          cnt   <= '0;
          pulse <= 1'b1;
        end
        SEQ_OJETA: if (dpulse) begin r1 <= res6; compl <= xin[3]; state <= SEQ_OI; pulse <= 1'b1; end
        SEQ_OI:    if (dpulse) begin r2 <= res6; state <= SEQ_XI; pulse <= 1'b1; end
        SEQ_XI:    if (dpulse) begin r3 <= res6; state <= SEQ_WI; pulse <= 1'b1; end
        SEQ_WI:    if (dpulse) begin
          cnt   <= cnt + 1'b1;
          state <= (cnt == 2'd3) ? SEQ_OJWI : SEQ_OI;
          pulse <= 1'b1;
        end
        SEQ_OJWI:  if (dpulse) begin r2 <= res6; compl <= xin[3]; state <= SEQ_EI; pulse <= 1'b1; end
        SEQ_EI:    if (dpulse) begin
          cnt <= cnt + 1'b1;
          if (cnt == 2'd3) begin
            state    <= SEQ_IDLE;
            compdone <= 1'b1;
          end else begin
            state <= SEQ_OJWI;
            pulse <= 1'b1;
          end
        end
        default: state <= SEQ_IDLE;
      endcase
    end
  end

endmodule
