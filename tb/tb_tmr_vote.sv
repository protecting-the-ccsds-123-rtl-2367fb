// tb_tmr_vote: exhaustive check of the 2-of-3 voter at W = 3 against a
// per-bit majority and disagreement computed in the testbench.
module tb_tmr_vote;
  logic [2:0] a, b, c, y;
  logic       mismatch;
  int checks = 0, failures = 0;

  tmr_vote #(.W(3)) dut (.a, .b, .c, .y, .mismatch);

  initial begin
    for (int i = 0; i < 512; i++) begin
      logic [2:0] exp_y;
      {a, b, c} = 9'(i);
      #1;
      for (int k = 0; k < 3; k++) exp_y[k] = (int'(a[k]) + int'(b[k]) + int'(c[k])) >= 2;
      checks += 2;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL: vote %b %b %b -> %b, expected %b", a, b, c, y, exp_y);
      end
      if (mismatch !== !(a == b && b == c)) begin
        failures++;
        $display("FAIL: mismatch %b %b %b -> %b", a, b, c, mismatch);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
