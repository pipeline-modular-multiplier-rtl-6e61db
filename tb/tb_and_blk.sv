// tb_and_blk: exhaustive check of the AND row at W = 5: y must be a when
// b = 1 and 0 when b = 0, for every a.
module tb_and_blk;
  localparam int unsigned W = 5;

  logic [W-1:0] a, y;
  logic         b;
  int checks = 0, failures = 0;

  and_blk #(.W(W)) dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int bv = 0; bv < 2; bv++) begin
      for (int av = 0; av < (1 << W); av++) begin
        a = W'(av);
        b = bv[0];
        #1;
        checks++;
        if (y !== (bv == 1 ? W'(av) : W'(0))) begin
          failures++;
          $display("FAIL a=%0d b=%0d: y=%0d", av, bv, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
