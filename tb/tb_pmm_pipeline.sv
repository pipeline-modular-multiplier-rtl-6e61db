// tb_pmm_pipeline: end-to-end test of the pipelined modular multiplier at its
// default size (W = 5, NB = 4 stages).
//
// Phase 1 replays the worked example of four operand sets (14,13,15),
// (11,9,15), (10,11,15), (4,7,15) and compares RegR.0..RegR.3 after each of
// the clock pulses CP1..CP7 with the table of intermediate remainders
// R_ij, which also checks the pipeline timing: the first result after
// N = 4 pulses and all four after N + K - 1 = 7.
// Phase 2 streams every legal operand set (1 <= P <= 31, A < P, any B) with
// random idle cycles and a modulus that changes from set to set, and checks
// every result against (A * B) % P and its arrival exactly NB cycles after
// its set was sampled.
// Phase 3 asserts reset with the pipeline full and checks it empties.
// Mechanism counters (from an independent model of the recurrences): PRF
// subtraction taken / not taken, AddMP subtraction taken / not taken, bit b_i
// of 0 and 1, idle cycles, modulus changes between consecutive sets. Each
// must occur at least once.
module tb_pmm_pipeline;
  localparam int unsigned W  = pmm_pkg::PMM_W;
  localparam int unsigned NB = pmm_pkg::PMM_NB;
  localparam int MAX_CYCLES  = 40000;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic                 in_valid;
  logic [W-1:0]         a, p, r;
  logic [NB-1:0]        b;
  logic                 out_valid;
  logic [NB-1:0][W-1:0] stage_rem;

  int checks = 0, failures = 0;
  int cycle = 0;

  // Mechanism counters.
  int n_prf_sub = 0, n_prf_keep = 0, n_add_sub = 0, n_add_keep = 0;
  int n_bit0 = 0, n_bit1 = 0, n_idle = 0, n_pchange = 0;

  pmm_pipeline dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .p(p),
    .out_valid(out_valid), .r(r), .stage_rem(stage_rem)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // Independent model of the LSB-first recurrence; counts the mechanisms.
  function automatic int model(input int av, input int bv, input int pv);
    int rem, rr, s;
    rem = ((bv & 1) != 0) ? av : 0;
    rr  = av;
    if ((bv & 1) != 0) n_bit1++; else n_bit0++;
    for (int i = 1; i < int'(NB); i++) begin
      if (2 * rr >= pv) begin n_prf_sub++; rr = 2 * rr - pv; end
      else begin n_prf_keep++; rr = 2 * rr; end
      if (((bv >> i) & 1) != 0) n_bit1++; else n_bit0++;
      s = rem + ((((bv >> i) & 1) != 0) ? rr : 0);
      if (s >= pv) begin n_add_sub++; rem = s - pv; end
      else begin n_add_keep++; rem = s; end
    end
    return rem;
  endfunction

  // Worked example: operand sets and the remainders after CP1..CP7
  // (-1 where the table has no entry).
  int ex_a[4] = '{14, 11, 10, 4};
  int ex_b[4] = '{13, 9, 11, 7};
  int ex_p[4] = '{15, 15, 15, 15};
  int ex_r[7][4] = '{
    '{14, -1, -1, -1},
    '{11, 14, -1, -1},
    '{10, 11, 10, -1},
    '{ 4,  0, 11,  2},
    '{-1, 12,  0,  9},
    '{-1, -1, 13,  5},
    '{-1, -1, -1, 13}
  };

  // Scoreboard for phase 2: expected result and cycle, per sampled set.
  int exp_q[$];
  int due_q[$];

  initial begin
    int pa, first_result_cp, last_result_cp, prev_p;
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0; p = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- Phase 1: worked example ----
    first_result_cp = -1; last_result_cp = -1;
    @(posedge clk);
    for (int cp = 0; cp < 7; cp++) begin
      #1;
      if (cp < 4) begin
        in_valid = 1'b1; a = W'(ex_a[cp]); b = NB'(ex_b[cp]); p = W'(ex_p[cp]);
      end else begin
        in_valid = 1'b0; a = '0; b = '0; p = '0;
      end
      @(posedge clk);   // clock pulse CP(cp+1)
      #1;
      for (int s = 0; s < 4; s++)
        if (ex_r[cp][s] >= 0)
          check(int'(stage_rem[s]) == ex_r[cp][s],
                $sformatf("CP%0d stage %0d: R=%0d, table %0d", cp + 1, s + 1,
                          stage_rem[s], ex_r[cp][s]));
      if (out_valid) begin
        if (first_result_cp < 0) first_result_cp = cp + 1;
        last_result_cp = cp + 1;
      end
    end
    check(first_result_cp == 4, $sformatf("first result after CP%0d, expected CP4", first_result_cp));
    check(last_result_cp == 7, $sformatf("last result after CP%0d, expected CP7 (N+K-1)", last_result_cp));
    $display("worked example: 4 sets in %0d clock periods (sequential: %0d)", last_result_cp, NB * 4);

    // ---- Phase 2: every legal operand set, streamed ----
    repeat (NB + 1) @(posedge clk);
    prev_p = -1;
    pa = 0;
    for (int pv = 1; pv < (1 << W); pv++) begin
      for (int av = 0; av < pv; av++) begin
        for (int bv = 0; bv < (1 << NB); bv++) begin
          // random idle cycles between sets
          while ($urandom_range(3) == 0) begin
            #1 in_valid = 1'b0; a = W'($urandom); b = NB'($urandom); p = W'($urandom);
            n_idle++;
            @(posedge clk);
            #1 step_check();
          end
          #1;
          in_valid = 1'b1; a = W'(av); b = NB'(bv);
          // alternate the modulus between sets to exercise RegP.k
          pa = ((av + bv) % 3 == 0 && pv > 1) ? pv - 1 : pv;
          if (av >= pa) pa = pv;
          p = W'(pa);
          if (prev_p >= 0 && prev_p != pa) n_pchange++;
          prev_p = pa;
          exp_q.push_back(model(av, bv, pa));
          due_q.push_back(cycle + NB);
          // reference check of the model itself against the % operator
          check(exp_q[$] == (av * bv) % pa, "reference model disagrees with %");
          @(posedge clk);
          #1 step_check();
        end
      end
    end
    #1 in_valid = 1'b0;
    repeat (NB + 2) begin
      @(posedge clk);
      #1 step_check();
    end
    check(exp_q.size() == 0, $sformatf("%0d results never arrived", exp_q.size()));

    // ---- Phase 3: reset with the pipeline full ----
    for (int i = 0; i < int'(NB); i++) begin
      #1 in_valid = 1'b1; a = 5; b = '1; p = 7;
      @(posedge clk);
    end
    #1 rst_n = 1'b0;
    #1;
    check(out_valid == 1'b0 && stage_rem == '0, "reset did not clear the pipeline");
    in_valid = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (NB + 1) begin
      @(posedge clk);
      #1 check(out_valid == 1'b0, "output valid after reset without input");
    end

    // ---- Mechanism coverage ----
    $display("PRF subtract %0d / keep %0d, AddMP subtract %0d / keep %0d",
             n_prf_sub, n_prf_keep, n_add_sub, n_add_keep);
    $display("bit b_i = 0: %0d, = 1: %0d, idle cycles %0d, modulus changes %0d",
             n_bit0, n_bit1, n_idle, n_pchange);
    check(n_prf_sub > 0,  "PRF subtraction never taken");
    check(n_prf_keep > 0, "PRF pass-through never taken");
    check(n_add_sub > 0,  "AddMP subtraction never taken");
    check(n_add_keep > 0, "AddMP pass-through never taken");
    check(n_bit0 > 0 && n_bit1 > 0, "multiplier bit values not both seen");
    check(n_idle > 0,     "no idle cycle");
    check(n_pchange > 0,  "modulus never changed between sets");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Called 1 ns after each rising edge in phase 2: a result must be present
  // exactly when one is due, and must match.
  task automatic step_check();
    bit due;
    due = (due_q.size() > 0) && (due_q[0] == cycle);
    check(out_valid == due, $sformatf("out_valid=%0d, result due=%0d", out_valid, due));
    if (due) begin
      check(int'(r) == exp_q[0], $sformatf("result %0d, expected %0d", r, exp_q[0]));
      void'(exp_q.pop_front());
      void'(due_q.pop_front());
    end
  endtask
endmodule
