// ref_mem: reference memory of the full-output check.
//
// Holds the compressed test pattern, one 64-bit frame per word, as it must
// come out of a fault-free compressor. It is written once through the write
// port (from the ground-computed reference) and read by full_check through a
// registered read port: rdata shows the word at the raddr of the previous
// cycle. A write and a read of the same address in one cycle return the old
// word. DEPTH defaults to 8192 words of 64 bits, which is 16 block RAMs of
// 512 x 72, the block-RAM difference reported between the full-output and
// the last-frame variants of the design; the depth is this design's reading
// of that figure. The memory itself is not triplicated: on the target FPGA
// block RAM is protected by its built-in ECC.
module ref_mem
  import selfcheck_pkg::*;
#(
  parameter int unsigned DEPTH  = 8192,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  frame_t            wdata,
  input  logic [ADDR_W-1:0] raddr,
  output frame_t            rdata
);
  frame_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
