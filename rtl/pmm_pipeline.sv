// pmm_pipeline: pipelined modular multiplier, R = (A * B) mod P, scanning the
// multiplier B from its least significant bit.
//
// The product is built as a sum of the terms A * 2^i * b_i, each reduced
// modulo P as it is made, so no value ever leaves the W-bit range of the
// modulus and nothing has to be precomputed:
//   R_0 = A & b_0                       r_1 = 2A      mod P
//   R_i = (R_{i-1} + (r_i & b_i)) mod P r_{i+1} = 2r_i mod P
// and R_{NB-1} = (A * B) mod P. Each step is one pipeline stage, so there are
// as many stages as B has bits (NB). Stage 1 holds an AND row and a partial
// remainder former (prf); stages 2..NB-1 hold an AND row, a prf and a modular
// adder (addmp); the last stage holds only an AND row and an addmp. Between
// stages sit buffer registers: RegB.k carries the bits of B not yet used
// (it shrinks by one bit per stage), Regr.k the partial remainder r_k,
// RegR.(k-1) the intermediate remainder R_(k-1), RegP.k the modulus. Each
// operand set carries its own modulus, so consecutive sets may use different
// moduli. The last stage writes RegR, the result register.
//
// Timing: the input registers RegA, RegB and RegP take a new operand set on
// the falling edge of clk; every buffer register loads on the rising edge.
// A set captured on a falling edge is in RegR.0 after the next rising edge
// and its result is in RegR NB rising edges after that capture, so K sets
// take NB + K - 1 clock periods and one result leaves per cycle. There is no
// stall: the pipeline advances on every cycle.
//
// Interface: in_valid/a/b/p present an operand set (sampled on the falling
// edge); out_valid/r give the result; stage_rem[k] is the content of RegR.k,
// so stage_rem[NB-1] equals r. Operands must satisfy 1 <= P and A < P.
//
// Follows the document: the stage structure, the register set, the bit order
// of B, the two-edge clocking of the input and buffer registers and the
// example sizes. Own choices: the valid bit that travels with each set, the
// asynchronous active-low reset that clears every register, and NB as a
// parameter of a generated pipeline rather than a fixed four stages.
module pmm_pipeline #(
  parameter int unsigned W  = pmm_pkg::PMM_W,   // width of A, P, remainders
  parameter int unsigned NB = pmm_pkg::PMM_NB   // width of B = number of stages
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [W-1:0]          a,          // multiplicand, A < P
  input  logic [NB-1:0]         b,          // multiplier
  input  logic [W-1:0]          p,          // modulus, P >= 1
  output logic                  out_valid,
  output logic [W-1:0]          r,          // (A * B) mod P
  output logic [NB-1:0][W-1:0]  stage_rem   // RegR.0 .. RegR.(NB-1)
);
  if (NB < 2) begin : g_bad_nb
    $error("pmm_pipeline: NB must be at least 2");
  end

  // Input registers RegA, RegB, RegP (and the set's valid bit).
  logic [W-1:0]  a_q, p_q;
  logic [NB-1:0] b_q;
  logic          v_q;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      p_q <= '0;
      v_q <= 1'b0;
    end else begin
      a_q <= a;
      b_q <= b;
      p_q <= p;
      v_q <= in_valid;
    end
  end

  // Buffer registers. Index 0 of rr/pp/vv is the input register (r_0 = A).
  logic [W-1:0]  rr [NB];     // rr[k]  = Regr.k  (partial remainder r_k)
  logic [W-1:0]  pp [NB];     // pp[k]  = RegP.k  (modulus)
  logic [W-1:0]  rem_q [NB];  // rem_q[k] = RegR.k (R_k); rem_q[NB-1] = RegR
  logic [NB:0]   vv;          // vv[k]  = valid of the stage-k registers
  logic [NB-1:0] bb;          // bb[k]  = bit b_k as held in RegB.k

  assign rr[0] = a_q;
  assign pp[0] = p_q;
  assign vv[0] = v_q;
  assign bb[0] = b_q[0];

  // RegB.k keeps only the bits b_k..b_{NB-1} that have not been used yet.
  for (genvar k = 1; k < NB; k++) begin : g_regb
    logic [NB-1-k:0] q;
    if (k == 1) begin : g_src
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) q <= '0;
        else        q <= b_q[NB-1:1];
    end else begin : g_src
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) q <= '0;
        else        q <= g_regb[k-1].q[NB-k:1];
    end
    assign bb[k] = q[0];
  end

  // Combinational logic of the stages.
  logic [W-1:0] r_d   [NB];   // r_d[k]   = new r_k   (k >= 1), from PRF.k
  logic [W-1:0] rem_d [NB];   // rem_d[k] = new R_k, written to RegR.k
  logic [W-1:0] gated [NB];   // gated[k] = r_k & b_k (And(k+1))

  for (genvar k = 0; k < NB; k++) begin : g_stage
    and_blk #(.W(W)) u_and (.a(rr[k]), .b(bb[k]), .y(gated[k]));

    if (k == 0) begin : g_rem
      // Stage 1: R_0 = A & b_0.
      assign rem_d[0] = gated[0];
      assign r_d[0]   = '0;      // r_0 is A itself; no former for it
    end else begin : g_rem
      logic t_unused, sn_unused;
      // PRF.k in stage k: r_k = 2 r_{k-1} mod P.
      prf #(.W(W)) u_prf (
        .x    ({rr[k-1], 1'b0}),
        .p_inv(~pp[k-1]),
        .r    (r_d[k]),
        .t    (t_unused),
        .sn   (sn_unused)
      );
      // AddMP.k in stage k+1: R_k = (R_{k-1} + (r_k & b_k)) mod P.
      addmp #(.W(W)) u_addmp (
        .r_in   (gated[k]),
        .rem_in (rem_q[k-1]),
        .p_inv  (~pp[k]),
        .rem_out(rem_d[k])
      );
    end
  end

  // All buffer registers of the stages, loaded on the rising edge.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < NB; k++) begin
        rr[k] <= '0;
        pp[k] <= '0;
      end
      for (int k = 0; k < NB; k++) rem_q[k] <= '0;
      vv[NB:1] <= '0;
    end else begin
      for (int k = 1; k < NB; k++) begin
        rr[k] <= r_d[k];
        pp[k] <= pp[k-1];
      end
      for (int k = 0; k < NB; k++) rem_q[k] <= rem_d[k];
      vv[NB:1] <= vv[NB-1:0];
    end
  end

  assign r         = rem_q[NB-1];
  assign out_valid = vv[NB];
  for (genvar k = 0; k < NB; k++) begin : g_out
    assign stage_rem[k] = rem_q[k];
  end
endmodule
