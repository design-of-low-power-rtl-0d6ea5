// cldc: carry length detection circuit of the variable-latency adder.
//
// A carry can only travel a long way through the carry-select chain if every
// bit it crosses propagates it, i.e. a[i] ^ b[i] = 1.  The circuit watches a
// window of operand bits in the middle of the adder (bits 31 to 37 of the
// 64-bit adder, as in the source description) and raises long_op when all of
// them propagate:
//   long_op = (a31 ^ b31) & (a32 ^ b32) & ... & (a37 ^ b37).
// Operations for which long_op is low are guaranteed to settle within one
// (shortened) clock period; those for which it is high get two.
//
// th_adj is the detection-threshold adjust input used to tolerate ageing
// (NBTI): when it is high the window is shortened by TH_SHRINK bits from its
// low end, so that more operations are classed as long.  The source keeps this
// input low; how it shifts the threshold is this design's choice.
//
// Interface: a, b, th_adj -> long_op.  Purely combinational.
module cldc #(
  parameter int unsigned WIDTH     = 64,
  parameter int unsigned DET_LO    = 31,
  parameter int unsigned DET_HI    = 37,
  parameter int unsigned TH_SHRINK = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             th_adj,
  output logic             long_op
);

  logic [DET_HI:DET_LO] prop;
  logic                 lower_ok;

  assign prop     = a[DET_HI:DET_LO] ^ b[DET_HI:DET_LO];
  // the lowest TH_SHRINK window bits only count while th_adj is low
  assign lower_ok = th_adj | (&prop[DET_LO+TH_SHRINK-1:DET_LO]);
  assign long_op  = lower_ok & (&prop[DET_HI:DET_LO+TH_SHRINK]);

endmodule
