// pmm_pkg: shared constants of the pipelined modular multiplier.
//
// The default sizes are those of the four-stage example design: a 4-bit
// multiplier B (one pipeline stage per bit of B) and 5-bit buses for the
// multiplicand A, the modulus P and every remainder, as in the example's
// timing diagram (P[4:0], A[4:0], B[3:0], R0..R3[4:0]).
package pmm_pkg;
  // Width of A, P and of every partial / intermediate remainder.
  parameter int unsigned PMM_W  = 5;
  // Width of the multiplier B, which is also the number of pipeline stages.
  parameter int unsigned PMM_NB = 4;
endpackage
