// bsm_regmod: register file of the BSM (RegMOD).
//
// Sixteen 4-bit registers, each chosen by its own select line rs[i]. With
// wreg high the selected register loads in_b at the clock edge; with rreg
// high the selected register drives the common read bus out_b (zero
// otherwise). Every register also drives its own parallel output r[i], which
// the sequencer and the result module read without a bus cycle.
//
// Timing: writes take effect at the rising clock edge; out_b and r[] are
// combinational from the stored values. Reset clears every register.
//
// The organisation (select lines, rreg/wreg, common and parallel outputs) is
// the document's. The two-phase latches become edge-triggered flops here, and
// the reset clears the register file: both are this design's choices.
module bsm_regmod #(
  parameter int DW   = 4,
  parameter int NREG = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [NREG-1:0]     rs,
  input  logic                rreg,
  input  logic                wreg,
  input  logic [DW-1:0]       in_b,
  output logic [DW-1:0]       out_b,
  output logic [DW-1:0]       r [NREG]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREG; i++) r[i] <= '0;
    end else if (wreg) begin
      for (int i = 0; i < NREG; i++)
        if (rs[i]) r[i] <= in_b;
    end
  end

  always_comb begin
    out_b = '0;
    if (rreg)
      for (int i = 0; i < NREG; i++)
        if (rs[i]) out_b |= r[i];
  end

  // At most one register is selected for any access.
  a_onehot_select: assert property (@(posedge clk) disable iff (rst)
    (rreg || wreg) |-> $onehot0(rs));

endmodule
