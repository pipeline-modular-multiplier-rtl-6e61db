// prf: partial remainder former, one conditional subtraction of the modulus.
//
// Given a value x with 0 <= x < 2P it returns x mod P. A binary adder forms
// x + ~P + 1 (that is x - P, with ~P the inverse code of the modulus and the
// "+1" injected as the adder's carry-in). Its carry out of the top bit, T, is
// 1 exactly when x >= P; the sign output Sn is its complement. A multiplexer
// made of two AND-gate rows and an OR row passes the adder's sum when T = 1
// and passes x unchanged when Sn = 1.
//
// In the pipeline the block is used two ways. As a stage's own former its
// input is the previous partial remainder shifted left one bit (2*r_{i-1}),
// giving r_i = 2*r_{i-1} mod P; the shift is plain wiring outside this module.
// Inside the modular adder its input is the unshifted sum R_{i-1} + r_i.
//
// Interface: x is W+1 bits wide, p_inv is the W-bit inverse code of P, r is
// the W-bit result; t and sn expose the adder's carry and sign outputs.
// Purely combinational. Adder, carry/sign outputs and AND-OR multiplexer
// follow the document's remainder former; the carry-in of 1 is wired inside
// the module rather than brought in as a port.
module prf #(
  parameter int unsigned W = pmm_pkg::PMM_W
) (
  input  logic [W:0]   x,      // value to reduce, 0 <= x < 2P
  input  logic [W-1:0] p_inv,  // inverse code of the modulus, ~P
  output logic [W-1:0] r,      // x mod P
  output logic         t,      // adder carry: 1 when x >= P
  output logic         sn      // adder sign: 1 when x < P
);
  logic [W:0] sum;

  // W+1-bit adder: x + {1, ~P} + 1 = x - P + 2^(W+1); carry out = (x >= P).
  always_comb begin
    {t, sum} = {1'b0, x} + {1'b0, 1'b1, p_inv} + (W + 2)'(1);
    sn = ~t;
  end

  // Multiplexer: And1 gates the difference with T, And2 gates x with Sn, OR
  // merges them. Either result is below P and fits in W bits, so the top bit
  // of the adder's sum is never used (it is 0 whenever T = 1).
  assign r = (sum[W-1:0] & {W{t}}) | (x[W-1:0] & {W{sn}});
endmodule
