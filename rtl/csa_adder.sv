// csa_adder: combinational carry-select adder (CSA).
//
// The operands are split into carry-select stages (CSS) of BLOCK_W bits.  The
// lowest stage is a plain ripple-carry adder fed by cin.  Every higher stage
// holds two ripple-carry adders, one computing its sum for an incoming carry
// of 0 and one for 1; a multiplexer picked by the carry out of the stage below
// chooses the result.  The critical path therefore starts at the first bit of
// a stage, runs through the stage, and then through the chain of carry
// multiplexers of the stages above it; how far it actually propagates depends
// on the operands, which is what the carry length detection circuit exploits.
//
// The 64-bit width follows the source description.  The stage width (8 bits)
// is this design's choice.
//
// Interface: a, b, cin -> sum, cout.  Purely combinational, no clock.
module csa_adder #(
  parameter int unsigned WIDTH   = 64,
  parameter int unsigned BLOCK_W = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NBLK = (WIDTH + BLOCK_W - 1) / BLOCK_W;

  // carry into each stage; carry[NBLK] is the final carry out
  logic [NBLK:0] carry;

  assign carry[0] = cin;

  for (genvar g = 0; g < NBLK; g++) begin : g_css
    localparam int unsigned LO = g * BLOCK_W;
    localparam int unsigned HI = ((g + 1) * BLOCK_W > WIDTH) ? WIDTH - 1 : (g + 1) * BLOCK_W - 1;
    localparam int unsigned BW = HI - LO + 1;

    logic [BW-1:0] s0, s1;
    logic          c0, c1;

    // two ripple-carry adders: assumed carry-in 0 and 1
    always_comb begin
      logic r0, r1;
      r0 = 1'b0;
      r1 = 1'b1;
      for (int i = 0; i < int'(BW); i++) begin
        s0[i] = a[LO+i] ^ b[LO+i] ^ r0;
        r0    = (a[LO+i] & b[LO+i]) | (r0 & (a[LO+i] ^ b[LO+i]));
        s1[i] = a[LO+i] ^ b[LO+i] ^ r1;
        r1    = (a[LO+i] & b[LO+i]) | (r1 & (a[LO+i] ^ b[LO+i]));
      end
      c0 = r0;
      c1 = r1;
    end

    // carry-select multiplexer
    assign sum[HI:LO]  = carry[g] ? s1 : s0;
    assign carry[g+1]  = carry[g] ? c1 : c0;
  end

  assign cout = carry[NBLK];

endmodule
