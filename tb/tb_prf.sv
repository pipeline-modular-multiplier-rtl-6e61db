// tb_prf: exhaustive check of the partial remainder former at W = 5.
//
// For every modulus P in 1..31 and every input x in 0..2P-1 the result must be
// x mod P, the carry t must be 1 exactly when x >= P and sn its complement.
// The expected values come from the % operator. Combinational block: each
// vector is applied, 1 ns allowed to settle, then compared.
module tb_prf;
  localparam int unsigned W = 5;

  logic [W:0]   x;
  logic [W-1:0] p_inv, r;
  logic         t, sn;
  int checks = 0, failures = 0;

  prf #(.W(W)) dut (.x(x), .p_inv(p_inv), .r(r), .t(t), .sn(sn));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 1; p < (1 << W); p++) begin
      for (int xv = 0; xv < 2 * p; xv++) begin
        x     = (W + 1)'(xv);
        p_inv = ~W'(p);
        #1;
        checks++;
        if (r !== W'(xv % p) || t !== (xv >= p) || sn !== (xv < p)) begin
          failures++;
          if (failures < 10)
            $display("FAIL x=%0d P=%0d: r=%0d t=%0d sn=%0d", xv, p, r, t, sn);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
