// bsm_oj_lut: the Oj(1-Oj) lookup table of the sequencer.
//
// Oj is a 4-bit unsigned fraction; 1-Oj is taken as its bitwise complement
// (15-Oj). The table returns the 6-bit product Oj*(15-Oj), the derivative of
// the sigmoid used by back-propagation. It is purely combinational, ready
// whenever the Oj register is read. The largest entry is 7*8 = 56.
//
// Function and widths (4 in, 6 out) follow the document. Its printed table
// gives 28 for Oj = 13 and Oj = 2, where the product is 26; this table
// computes the product.
module bsm_oj_lut (
  input  logic [3:0] oj,
  output logic [5:0] lut
);
  logic [3:0] one_minus;
  logic [7:0] prod;
  always_comb begin
    one_minus = ~oj;
    prod = 8'(oj) * 8'(one_minus);
    lut  = prod[5:0];
  end
endmodule
