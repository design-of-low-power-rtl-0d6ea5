// vl_adder: variable-latency carry-select adder (VL-CSA).
//
// The adder is clocked at a period that covers the common, short carry
// chains but not the rare worst case.  A carry length detection circuit
// (cldc) looks at the operands; when it flags a long operation, the capture
// edge of the destination register is suppressed for one cycle (the gated
// clock of the source description), so the result is taken one cycle later,
// when even the longest carry chain has settled.  Throughput stays at one
// operation per cycle for short operations.
//
// Here the gated capture edge is a capture enable: the user presents an
// operation with op_valid and holds a, b and cin steady until capture is high,
// then loads sum into its own register on that clock edge.
//   short operation: capture is high in the first cycle  (latency 1 cycle)
//   long  operation: capture is low in the first cycle and high in the
//                    second                               (latency 2 cycles)
// long_op is the raw detection output, held_q marks the extra cycle.
// Asynchronous active-low reset is this design's choice.
module vl_adder #(
  parameter int unsigned WIDTH   = 64,
  parameter int unsigned BLOCK_W = 8,
  parameter int unsigned DET_LO  = 31,
  parameter int unsigned DET_HI  = 37
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             op_valid,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             th_adj,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             long_op,
  output logic             capture
);

  logic held_q;

  csa_adder #(.WIDTH(WIDTH), .BLOCK_W(BLOCK_W)) u_csa (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .sum  (sum),
    .cout (cout)
  );

  cldc #(.WIDTH(WIDTH), .DET_LO(DET_LO), .DET_HI(DET_HI)) u_cldc (
    .a       (a),
    .b       (b),
    .th_adj  (th_adj),
    .long_op (long_op)
  );

  // capture at once for a short operation, one cycle later for a long one
  assign capture = op_valid & (~long_op | held_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) held_q <= 1'b0;
    else        held_q <= op_valid & long_op & ~held_q;
  end

  // operands must not change while a long operation is being stretched
  property p_hold_stable;
    @(posedge clk) disable iff (!rst_n)
      held_q |-> (op_valid && $stable(a) && $stable(b) && $stable(cin));
  endproperty
  a_hold_stable: assert property (p_hold_stable)
    else $error("vl_adder: operands changed during a long operation");

endmodule
