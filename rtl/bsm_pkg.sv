// bsm_pkg: types and constants shared by the Back-propagation State Machine
// (BSM) modules.
//
// The BSM works on 4-bit values throughout. Its sixteen 4-bit registers are
// addressed by the 4-bit register numbers below; the map is the sequencer's
// encode table (input values and weights interleaved in 0-7, unit address,
// eta, output, X and the four error terms in 8-15). The sequence states are
// the seven computation steps of the sequencer; their binary codes are this
// design's choice.
package bsm_pkg;

  localparam int DW   = 4;   // data and address bus width
  localparam int NREG = 16;  // registers in the register file
  localparam int TW   = 6;   // width of the sequencer temporaries and of Oj(1-Oj)

  typedef enum logic [3:0] {
    REG_O1  = 4'b0000, REG_W1 = 4'b0001,
    REG_O2  = 4'b0010, REG_W2 = 4'b0011,
    REG_O3  = 4'b0100, REG_W3 = 4'b0101,
    REG_O4  = 4'b0110, REG_W4 = 4'b0111,
    REG_ID  = 4'b1000,  // unit address of this BSM
    REG_ETA = 4'b1001,  // learning rate eta
    REG_OJ  = 4'b1010,  // output of the local processing node
    REG_XIN = 4'b1011,  // error term X from the level above
    REG_E1  = 4'b1100, REG_E2 = 4'b1101,
    REG_E3  = 4'b1110, REG_E4 = 4'b1111
  } reg_addr_e;

  // Address of input value O(i+1), weight W(i+1) and error E(i+1), i = 0..3.
  function automatic logic [3:0] o_addr(input logic [1:0] i);
    return {1'b0, i, 1'b0};
  endfunction
  function automatic logic [3:0] w_addr(input logic [1:0] i);
    return {1'b0, i, 1'b1};
  endfunction
  function automatic logic [3:0] e_addr(input logic [1:0] i);
    return {2'b11, i};
  endfunction

  // Computation steps of the sequencer.
  typedef enum logic [2:0] {
    SEQ_IDLE  = 3'd0,  // waiting for go
    SEQ_OJETA = 3'd1,  // R1 = Oj(1-Oj) * eta
    SEQ_OI    = 3'd2,  // R2 = R1 * Oi
    SEQ_XI    = 3'd3,  // R3 = +/-R2, sign from X
    SEQ_WI    = 3'd4,  // Wi = Wi + R3
    SEQ_OJWI  = 3'd5,  // R2 = Oj(1-Oj) * Wi
    SEQ_EI    = 3'd6   // Ei = +/-R2, sign from X
  } seq_state_e;

endpackage
