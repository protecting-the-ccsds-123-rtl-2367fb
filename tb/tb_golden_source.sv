// tb_golden_source: the generator's stream, taken with random back-pressure,
// must equal the pattern formula in band-interleaved-by-pixel order, with
// `last` only on the final sample, the configured geometry on cfg and one
// sample per cycle when ready stays high.
module tb_golden_source;
  import selfcheck_pkg::*;
  import tb_ref_pkg::*;
  localparam int NX = 5, NY = 4, NZ = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic      rst, start, ready, valid, last, busy;
  sample_t   sample;
  core_cfg_t cfg;
  int checks = 0, failures = 0;

  golden_source #(.NX(NX), .NY(NY), .NZ(NZ), .ABS_ERR(3), .REL_ERR(9)) dut (
    .clk, .rst, .start, .ready, .valid, .sample, .last, .busy, .cfg);

  task automatic run(bit stalls);
    logic [15:0] smp[$];
    int i = 0, cyc = 0, bad = 0, lastbad = 0;
    golden_samples(NX, NY, NZ, smp);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (busy && cyc < 10000) begin
      ready = stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
      #1;
      if (valid && ready) begin
        if (sample !== smp[i]) bad++;
        if (last !== (i == smp.size() - 1)) lastbad++;
        i++;
      end
      @(negedge clk);
      cyc++;
    end
    checks += 3;
    if (bad != 0)          begin failures++; $display("FAIL: %0d wrong samples", bad); end
    if (lastbad != 0)      begin failures++; $display("FAIL: last flag wrong %0d times", lastbad); end
    if (i != NX * NY * NZ) begin failures++; $display("FAIL: %0d samples", i); end
    if (!stalls) begin
      checks++;
      if (cyc != NX * NY * NZ) begin failures++; $display("FAIL: %0d cycles without stalls", cyc); end
    end
  endtask

  initial begin
    rst = 1; start = 0; ready = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    checks++;
    if (cfg.nx != NX || cfg.ny != NY || cfg.nz != NZ || cfg.max_abs_err != 3 || cfg.max_rel_err != 9) begin
      failures++;
      $display("FAIL: cfg");
    end
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
