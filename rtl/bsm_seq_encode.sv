// bsm_seq_encode: encode logic of the sequencer.
//
// Turns the one-hot read/write requests of the sequencer's control logic
// (Oj, eta, Oi, Wi reads; Wi, Ei writes) and the 2-bit weight counter into
// one 4-bit register address plus read and write strobes for the decoder.
// Oi, Wi and Ei requests pick register i = cnt+1 of their kind. Purely
// combinational.
//
// The address table is the document's. For Wi writes its printed table marks
// a read; this block issues a write, as the control equations (WiWR) say.
module bsm_seq_encode
  import bsm_pkg::*;
(
  input  logic       oj_rd,
  input  logic       eta_rd,
  input  logic       oi_rd,
  input  logic       wi_rd,
  input  logic       wi_wr,
  input  logic       ei_wr,
  input  logic [1:0] cnt,
  output logic [3:0] saddr,
  output logic       srd,
  output logic       swr
);
  always_comb begin
    saddr = '0;
    srd   = 1'b0;
    swr   = 1'b0;
    // Writes come only with the done pulse and win; Oj and eta also have
    // their own parallel paths, so a pending Oi or Wi read comes first.
    if (ei_wr)       begin saddr = e_addr(cnt); swr = 1'b1; end
    else if (wi_wr)  begin saddr = w_addr(cnt); swr = 1'b1; end
    else if (oi_rd)  begin saddr = o_addr(cnt); srd = 1'b1; end
    else if (wi_rd)  begin saddr = w_addr(cnt); srd = 1'b1; end
    else if (oj_rd)  begin saddr = REG_OJ;      srd = 1'b1; end
    else if (eta_rd) begin saddr = REG_ETA;     srd = 1'b1; end
  end
endmodule
