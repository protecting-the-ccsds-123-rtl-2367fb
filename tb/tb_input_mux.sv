// tb_input_mux: random stimulus; outputs compared with the selection rule
// computed in the testbench (source by sel_golden, ready only to the
// selected source, nothing passes while hold is high).
module tb_input_mux;
  import selfcheck_pkg::*;
  logic      sel_golden, hold, img_valid, img_ready, gold_valid, gold_ready;
  logic      core_valid, core_ready;
  core_cfg_t img_cfg, gold_cfg, core_cfg;
  sample_t   img_sample, gold_sample, core_sample;
  int checks = 0, failures = 0;

  input_mux dut (.*);

  initial begin
    for (int i = 0; i < 400; i++) begin
      sel_golden = 1'($urandom);
      hold       = ($urandom_range(0, 3) == 0);
      img_valid  = 1'($urandom);
      gold_valid = 1'($urandom);
      core_ready = 1'($urandom);
      img_cfg    = {$urandom, $urandom, $urandom};
      gold_cfg   = {$urandom, $urandom, $urandom};
      img_sample = 16'($urandom);
      gold_sample = 16'($urandom);
      #1;
      checks++;
      if (core_cfg    !== (sel_golden ? gold_cfg : img_cfg) ||
          core_valid  !== (!hold && (sel_golden ? gold_valid : img_valid)) ||
          (core_valid && core_sample !== (sel_golden ? gold_sample : img_sample)) ||
          img_ready   !== (core_ready && !hold && !sel_golden) ||
          gold_ready  !== (core_ready && !hold && sel_golden)) begin
        failures++;
        $display("FAIL: sel=%b hold=%b", sel_golden, hold);
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
