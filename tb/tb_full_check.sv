// tb_full_check: method A checker with a reference memory. Random reference
// streams are loaded into ref_mem; back-to-back and gapped streams must
// pass; a change in any frame, an early end or a missing end flag must fail.
module tb_full_check;
  import selfcheck_pkg::*;
  localparam int AW = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic          rst, start, finished, failed, active, we;
  frame_beat_t   beat;
  logic [31:0]   exp_words;
  logic [AW-1:0] rd_addr, waddr;
  frame_t        rd_data, wdata;
  int checks = 0, failures = 0;

  full_check #(.ADDR_W(AW)) dut (.clk, .rst, .start, .out_beat(beat), .exp_words,
                                 .rd_addr, .rd_data, .finished, .failed, .active);
  ref_mem #(.DEPTH(64)) u_mem (.clk, .we, .waddr, .wdata, .raddr(rd_addr), .rdata(rd_data));

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  frame_t fr [64];

  // mode 0 good, 1 one frame changed at position pos, 2 early end, 3 no end flag
  task automatic run(int n, int mode, int pos, bit gaps);
    exp_words = 32'(n);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int i = 0; i < n; i++) begin
      if (gaps && $urandom_range(0, 1) == 0) begin beat = '0; @(negedge clk); end
      beat.valid = 1;
      beat.data  = fr[i];
      beat.last  = (i == n - 1) && mode != 3;
      if (mode == 1 && i == pos) beat.data[pos % 64] = ~beat.data[pos % 64];
      if (mode == 2 && i == n - 2) begin
        beat.last = 1;
        @(negedge clk);
        break;
      end
      @(negedge clk);
    end
    beat = '0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    rst = 1; start = 0; beat = '0; we = 0; waddr = '0; wdata = '0;
    foreach (fr[i]) fr[i] = {$urandom, $urandom};
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = fr[i];
    end
    @(negedge clk);
    we = 0;
    rst = 0;
    run(40, 0, 0, 0);
    expect_true(finished && !failed && !active, "back-to-back good stream passes");
    run(40, 0, 0, 1);
    expect_true(finished && !failed, "gapped good stream passes");
    run(40, 1, 0, 0);
    expect_true(finished && failed, "first frame changed");
    run(40, 1, 17, 1);
    expect_true(finished && failed, "middle frame changed");
    run(40, 1, 39, 0);
    expect_true(finished && failed, "last frame changed");
    run(40, 2, 0, 0);
    expect_true(!finished && failed, "early end");
    run(40, 3, 0, 0);
    expect_true(finished && failed, "missing end flag");
    run(64, 0, 0, 1);
    expect_true(finished && !failed, "full memory depth passes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
