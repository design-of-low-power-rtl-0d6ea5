// hb_decimator: half-band FIR decimator by 2 built on one VL adder.
//
// A half-band low-pass has every second coefficient equal to zero apart from
// the centre one (0.5), and its coefficients are symmetric.  The filter keeps
// the last TAPS input samples in a delay line and, after every second input,
// forms one output
//   y = sum_n COEF[n] * x[n]            (x[0] = newest sample)
// visiting only the non-zero taps.  For each symmetric pair at odd distance
// from the centre the two samples are first added (pre-add); the pre-sum is
// then multiplied by the common coefficient without a multiplier, by adding
// (or, for a negative coefficient, subtracting) the pre-sum shifted left by s
// into the accumulator for every set bit s of |COEF|.  The centre tap is
// handled the same way without a pre-add.  Every one of these additions goes
// through a 64-bit variable-latency adder (vl_adder) and so takes one clock,
// or two when the adder flags a long carry chain.  Skipping the zero
// coefficients and the zero coefficient bits is what keeps the adder count
// low; using a single time-shared adder for it is this design's choice.
//
// The default (45 taps, 23 non-zero coefficients, 600 Hz -> 300 Hz) is the
// source's second half-band filter; the first one is the same module with an
// 11-tap coefficient set.  Coefficient values, the Q1.15 format, truncation
// of the result (arithmetic shift right by 15, no rounding or saturation) and
// the output phase (after the 2nd, 4th, ... input) are this design's choices.
// COEF values must lie in -32767 .. 32767.
//
// Cycle count per output, from the edge that accepts the 2nd input of a pair
// to out_valid: 1 + NPAIR pre-adds + one addition per set bit of |COEF| over
// the pairs and the centre, plus one clock per stretched addition and one per
// zero coefficient among the odd-distance taps.  The input is accepted in
// S_IDLE only.
//
// Interface: in_valid/in_ready and out_valid/out_ready handshakes, signed
// DATA_W-bit samples both ways.  vl_stall is high in each cycle the adder is
// stretched for a long operation.
module hb_decimator
  import decim_pkg::*;
#(
  parameter int unsigned TAPS      = HB2_TAPS,
  parameter coef_t       COEF [TAPS] = HB2_COEF,
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned ADD_WIDTH = ADD_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     th_adj,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic signed [DATA_W-1:0] out_data,
  output logic                     vl_stall
);

  localparam int unsigned CENTER = (TAPS - 1) / 2;
  localparam int unsigned NPAIR  = (CENTER + 1) / 2;
  localparam int unsigned PW     = (NPAIR > 1) ? $clog2(NPAIR) : 1;
  localparam int unsigned PRE_W  = DATA_W + 1;
  localparam int unsigned MAG_W  = COEF_W - 1;
  localparam int unsigned BW     = $clog2(MAG_W);

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_MAC, S_OUT} state_e;

  state_e                     state_q;
  logic                       phase_q;
  logic [PW-1:0]              pair_q;
  logic                       ctr_q;      // current term is the centre tap
  logic signed [DATA_W-1:0]   line_q [TAPS];
  logic signed [PRE_W-1:0]    pre_q;      // pre-sum of the current term
  logic [MAG_W-1:0]           mask_q;     // coefficient bits still to add
  logic                       neg_q;      // coefficient is negative
  logic [ADD_WIDTH-1:0]       acc_q;

  int unsigned                tap;        // lower tap of the current pair
  logic [BW-1:0]              bit_sel;    // lowest set bit of mask_q
  logic [ADD_WIDTH-1:0]       partial;    // pre_q << bit_sel
  logic                       op_valid, op_cin;
  logic [ADD_WIDTH-1:0]       op_a, op_b, add_sum;
  logic                       add_cout, add_long, add_capture;
  logic [MAG_W-1:0]           mask_next;
  logic                       term_done;

  function automatic logic [MAG_W-1:0] magnitude(coef_t c);
    coef_t m;
    m = (c < 0) ? -c : c;
    return m[MAG_W-1:0];
  endfunction

  assign tap = CENTER - 1 - 2 * int'(pair_q);

  // priority encoder: lowest set bit of the remaining coefficient bits
  always_comb begin
    bit_sel = '0;
    for (int i = int'(MAG_W) - 1; i >= 0; i--)
      if (mask_q[i]) bit_sel = BW'(i);
  end

  assign partial   = ADD_WIDTH'(pre_q) << bit_sel;
  assign mask_next = mask_q & ~(MAG_W'(1) << bit_sel);

  always_comb begin
    op_valid = 1'b0;
    op_a     = '0;
    op_b     = '0;
    op_cin   = 1'b0;
    unique case (state_q)
      S_PRE: begin
        op_valid = 1'b1;
        op_a     = ADD_WIDTH'(line_q[tap]);
        op_b     = ADD_WIDTH'(line_q[TAPS-1-tap]);
      end
      S_MAC: begin
        // add, or subtract (a + ~b + 1) for a negative coefficient
        op_valid = (mask_q != '0);
        op_a     = acc_q;
        op_b     = neg_q ? ~partial : partial;
        op_cin   = neg_q;
      end
      default: ;
    endcase
  end

  // the current term is finished after its last coefficient bit (or at once
  // for a zero coefficient)
  assign term_done = (mask_q == '0) || (add_capture && mask_next == '0);

  vl_adder #(.WIDTH(ADD_WIDTH)) u_add (
    .clk      (clk),
    .rst_n    (rst_n),
    .op_valid (op_valid),
    .a        (op_a),
    .b        (op_b),
    .cin      (op_cin),
    .th_adj   (th_adj),
    .sum      (add_sum),
    .cout     (add_cout),
    .long_op  (add_long),
    .capture  (add_capture)
  );

  assign vl_stall  = op_valid & ~add_capture;
  assign in_ready  = (state_q == S_IDLE);
  assign out_valid = (state_q == S_OUT);
  assign out_data  = DATA_W'(acc_q >> COEF_FRAC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      phase_q <= 1'b0;
      pair_q  <= '0;
      ctr_q   <= 1'b0;
      pre_q   <= '0;
      mask_q  <= '0;
      neg_q   <= 1'b0;
      acc_q   <= '0;
      for (int i = 0; i < int'(TAPS); i++) line_q[i] <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (in_valid) begin
            line_q[0] <= in_data;
            for (int i = 1; i < int'(TAPS); i++) line_q[i] <= line_q[i-1];
            phase_q <= ~phase_q;
            if (phase_q) begin
              acc_q   <= '0;
              pair_q  <= '0;
              ctr_q   <= 1'b0;
              state_q <= S_PRE;
            end
          end
        end
        S_PRE: begin
          if (add_capture) begin
            pre_q   <= add_sum[PRE_W-1:0];
            mask_q  <= magnitude(COEF[tap]);
            neg_q   <= COEF[tap][COEF_W-1];
            state_q <= S_MAC;
          end
        end
        S_MAC: begin
          if (add_capture) begin
            acc_q  <= add_sum;
            mask_q <= mask_next;
          end
          if (term_done) begin
            if (ctr_q) begin
              state_q <= S_OUT;
            end else if (pair_q == PW'(NPAIR - 1)) begin
              // centre tap: no pre-add, the sample itself is the pre-sum
              ctr_q  <= 1'b1;
              pre_q  <= PRE_W'(line_q[CENTER]);
              mask_q <= magnitude(COEF[CENTER]);
              neg_q  <= COEF[CENTER][COEF_W-1];
            end else begin
              pair_q  <= pair_q + 1'b1;
              state_q <= S_PRE;
            end
          end
        end
        S_OUT: begin
          if (out_ready) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
