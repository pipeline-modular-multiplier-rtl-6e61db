// and_blk: row of AND gates that multiplies a W-bit residue by one bit of the
// multiplier B.
//
// y = a when b = 1 and y = 0 when b = 0. In the pipeline it forms R_0 = A & b_0
// in the first stage and r_i & b_i ahead of each modular adder. Combinational.
// The block and its function are the document's (And1..And4).
module and_blk #(
  parameter int unsigned W = pmm_pkg::PMM_W
) (
  input  logic [W-1:0] a,  // residue
  input  logic         b,  // multiplier bit
  output logic [W-1:0] y   // a & b
);
  assign y = a & {W{b}};
endmodule
