// tb_pmm_pipeline_wide: the pipelined modular multiplier generated at a
// cryptographic-style width, W = 32 bit operands and a 32-bit multiplier
// (32 stages).
//
// Streams 20000 random operand sets (1 <= P < 2^32, A < P, any B) plus corner
// cases (P = 1, P = 2^32 - 1, A = P - 1, B = 0 and all ones) back to back with
// occasional idle cycles. Every result is compared with (A * B) % P computed
// in 64-bit arithmetic and must arrive exactly NB cycles after its set was
// sampled, one result per clock. Operands are masked to W and NB bits,
// so the widths may be changed (W, NB up to 32).
module tb_pmm_pipeline_wide;
  localparam int unsigned W  = 32;
  localparam int unsigned NB = 32;
  localparam int N_RANDOM    = 20000;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic                 in_valid;
  logic [W-1:0]         a, p, r;
  logic [NB-1:0]        b;
  logic                 out_valid;
  logic [NB-1:0][W-1:0] stage_rem;

  int checks = 0, failures = 0;
  int cycle = 0;
  longint unsigned exp_q[$];
  int due_q[$];

  pmm_pipeline #(.W(W), .NB(NB)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .p(p),
    .out_valid(out_valid), .r(r), .stage_rem(stage_rem)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (2 * N_RANDOM + 1000) @(posedge clk);
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

  task automatic step_check();
    bit due;
    due = (due_q.size() > 0) && (due_q[0] == cycle);
    check(out_valid == due, $sformatf("out_valid=%0d, result due=%0d", out_valid, due));
    if (due) begin
      check(longint'(r) == exp_q[0], $sformatf("result %0d, expected %0d", r, exp_q[0]));
      void'(exp_q.pop_front());
      void'(due_q.pop_front());
    end
  endtask

  // Operands are cut to the instance's widths and made legal (P >= 1, A < P),
  // so the bench stays valid if W or NB is changed.
  localparam longint unsigned PMASK = (64'd1 << W) - 1;
  localparam longint unsigned BMASK = (64'd1 << NB) - 1;

  task automatic send(input longint unsigned av, input longint unsigned bv,
                      input longint unsigned pv);
    pv = pv & PMASK;
    if (pv == 0) pv = 1;
    av = (av & PMASK) % pv;
    bv = bv & BMASK;
    #1;
    in_valid = 1'b1; a = W'(av); b = NB'(bv); p = W'(pv);
    exp_q.push_back((av * bv) % pv);
    due_q.push_back(cycle + NB);
    @(posedge clk);
    #1 step_check();
  endtask

  initial begin
    longint unsigned pv, av, bv;
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0; p = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);

    // corner cases
    send(0, 64'hFFFF_FFFF, 1);
    send(64'hFFFF_FFFD, 64'hFFFF_FFFF, 64'hFFFF_FFFE);
    send(64'hFFFF_FFFE, 64'hFFFF_FFFF, 64'hFFFF_FFFF);
    send(64'hFFFF_FFFE, 0, 64'hFFFF_FFFF);
    send(1, 64'h8000_0000, 3);
    send(64'h8000_0000, 64'h8000_0000, 64'h8000_0001);

    for (int n = 0; n < N_RANDOM; n++) begin
      if ($urandom_range(7) == 0) begin
        #1 in_valid = 1'b0;
        @(posedge clk);
        #1 step_check();
      end
      pv = {32'd0, $urandom};
      if ($urandom_range(3) == 0) pv = pv >> $urandom_range(31);
      if (pv == 0) pv = 1;
      av = {32'd0, $urandom} % pv;
      bv = {32'd0, $urandom};
      send(av, bv, pv);
    end
    #1 in_valid = 1'b0;
    repeat (NB + 2) begin
      @(posedge clk);
      #1 step_check();
    end
    check(exp_q.size() == 0, $sformatf("%0d results never arrived", exp_q.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
