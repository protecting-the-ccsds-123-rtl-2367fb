// tb_ref_mem: writes random words, reads them back through the registered
// read port (one cycle of latency), and checks read-before-write on a
// same-address collision.
module tb_ref_mem;
  import selfcheck_pkg::*;
  localparam int D = 32, AW = 5;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  frame_t        wdata, rdata;
  frame_t        shadow [D];
  int checks = 0, failures = 0;

  ref_mem #(.DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = {$urandom, $urandom}; shadow[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int r = 0; r < 3 * D; r++) begin
      int a = $urandom_range(0, D - 1);
      raddr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== shadow[a]) begin
        failures++;
        $display("FAIL: read %0d got %h expected %h", a, rdata, shadow[a]);
      end
    end
    // collision: old word is returned, new word next time
    raddr = 5'd7; waddr = 5'd7; we = 1; wdata = ~shadow[7];
    @(negedge clk);
    we = 0;
    checks++;
    if (rdata !== shadow[7]) begin failures++; $display("FAIL: collision old word"); end
    @(negedge clk);
    checks++;
    if (rdata !== ~shadow[7]) begin failures++; $display("FAIL: collision new word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
