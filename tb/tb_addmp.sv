// tb_addmp: exhaustive check of the adder modulo P at W = 5.
//
// For every modulus P in 1..31 and every pair of residues r, R below P the
// output must equal (r + R) mod P, computed here with the % operator.
module tb_addmp;
  localparam int unsigned W = 5;

  logic [W-1:0] r_in, rem_in, p_inv, rem_out;
  int checks = 0, failures = 0;

  addmp #(.W(W)) dut (.r_in(r_in), .rem_in(rem_in), .p_inv(p_inv), .rem_out(rem_out));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 1; p < (1 << W); p++) begin
      for (int i = 0; i < p; i++) begin
        for (int j = 0; j < p; j++) begin
          r_in   = W'(i);
          rem_in = W'(j);
          p_inv  = ~W'(p);
          #1;
          checks++;
          if (rem_out !== W'((i + j) % p)) begin
            failures++;
            if (failures < 10)
              $display("FAIL r=%0d R=%0d P=%0d: got %0d", i, j, p, rem_out);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
