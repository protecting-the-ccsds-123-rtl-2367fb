// tmr_vote: bitwise two-out-of-three majority voter.
//
// The critical parts of the self-check (timer and comparators) are built
// three times; every output of the three copies passes through one of these
// voters. y is the majority of a, b and c bit by bit, so a single faulty copy
// cannot change it. mismatch is high whenever the copies disagree, which the
// control treats like a failed check and answers with a reconfiguration
// request. Triplication of timer and comparators is from the published
// design; the voter circuit itself and the mismatch flag are the usual TMR
// construction. Purely combinational.
module tmr_vote #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         mismatch
);
  always_comb begin
    y        = (a & b) | (a & c) | (b & c);
    mismatch = (a != b) || (a != c);
  end
endmodule
