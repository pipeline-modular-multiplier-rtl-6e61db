// addmp: adder modulo P.
//
// Adds a gated partial remainder r_i and the previous intermediate remainder
// R_{i-1}, both already reduced below P, and returns (R_{i-1} + r_i) mod P.
// A plain binary adder (Add1) forms the W+1-bit sum, which is below 2P, and a
// partial remainder former (prf) subtracts P once if the sum reaches P.
//
// Interface: r_in and rem_in are W-bit residues below P, p_inv is the W-bit
// inverse code of P, rem_out is the W-bit result. Purely combinational.
// The structure (adder followed by a remainder former) is the document's.
module addmp #(
  parameter int unsigned W = pmm_pkg::PMM_W
) (
  input  logic [W-1:0] r_in,    // r_i & b_i, below P
  input  logic [W-1:0] rem_in,  // R_{i-1}, below P
  input  logic [W-1:0] p_inv,   // inverse code of the modulus, ~P
  output logic [W-1:0] rem_out  // R_i = (R_{i-1} + r_i) mod P
);
  logic [W:0] sum;
  logic       t_unused, sn_unused;

  assign sum = {1'b0, r_in} + {1'b0, rem_in};

  prf #(.W(W)) u_prf (
    .x    (sum),
    .p_inv(p_inv),
    .r    (rem_out),
    .t    (t_unused),
    .sn   (sn_unused)
  );
endmodule
