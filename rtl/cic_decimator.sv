// cic_decimator: cascaded integrator-comb decimator built on one VL adder.
//
// Transfer function H(z) = ((1 - z^-(R*M)) / (1 - z^-1))^N, with the comb
// section moved behind the rate change so that it runs at the low rate and
// needs only M delay words per stage.  Order N = 3, rate change R = 16 and
// differential delay M = 1 follow the source description (19.2 kHz in,
// 1.2 kHz out).
//
// The sample rates are tiny next to the system clock, so all additions are
// done one after another on a single 64-bit variable-latency adder
// (vl_adder), which is this design's choice of schedule:
//   every input   : I1 += x, I2 += I1, I3 += I2           (N additions)
//   every R-th in : C1 = I3 - D1, C2 = C1 - D2, C3 = C2 - D3, then output C3
// Each addition takes one clock, or two when the adder flags a long carry
// chain.  The integrators use wrap-around (modulo 2^REG_W) arithmetic, with
// REG_W = IN_W + N*log2(R*M) bits, so the output is exact despite overflow of
// the integrators.  Output m is produced after input sample R*m + R-1
// (counting from 0 after reset) and equals sum_k h[k] x[R*m + R-1 - k].
//
// Interface: in_valid/in_ready handshake for signed IN_W-bit input samples,
// out_valid/out_ready handshake for signed REG_W-bit outputs.  vl_stall is
// high in each cycle the adder is stretched for a long operation.  th_adj
// goes to the adder's carry length detector.
module cic_decimator
  import decim_pkg::*;
#(
  parameter int unsigned IN_W  = 2,
  parameter int unsigned N     = 3,
  parameter int unsigned R     = 16,
  parameter int unsigned M     = 1,
  parameter int unsigned ADD_WIDTH = ADD_W,
  parameter int unsigned REG_W = IN_W + N * $clog2(R * M)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    th_adj,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [REG_W-1:0] out_data,
  output logic                    vl_stall
);

  typedef enum logic [1:0] {S_IDLE, S_INTEG, S_COMB, S_OUT} state_e;

  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned CW = (R > 1) ? $clog2(R) : 1;

  state_e                  state_q;
  logic [SW-1:0]           stage_q;
  logic [CW-1:0]           cnt_q;
  logic signed [IN_W-1:0]  x_q;
  logic signed [REG_W-1:0] integ_q [N];
  logic signed [REG_W-1:0] dly_q   [N][M];
  logic signed [REG_W-1:0] comb_q;

  logic                    op_valid;
  logic [ADD_WIDTH-1:0]    op_a, op_b, add_sum;
  logic                    op_cin, add_cout, add_long, add_capture;
  logic signed [REG_W-1:0] result;

  // operand selection for the single shared adder
  always_comb begin
    op_valid = 1'b0;
    op_a     = '0;
    op_b     = '0;
    op_cin   = 1'b0;
    unique case (state_q)
      S_INTEG: begin
        op_valid = 1'b1;
        op_a     = ADD_WIDTH'(integ_q[stage_q]);
        if (stage_q == 0) op_b = ADD_WIDTH'(x_q);
        else              op_b = ADD_WIDTH'(integ_q[stage_q-1]);
      end
      S_COMB: begin
        // subtraction: a + ~b + 1
        op_valid = 1'b1;
        op_a     = (stage_q == 0) ? ADD_WIDTH'(integ_q[N-1]) : ADD_WIDTH'(comb_q);
        op_b     = ~ADD_WIDTH'(dly_q[stage_q][M-1]);
        op_cin   = 1'b1;
      end
      default: ;
    endcase
  end

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

  assign result   = add_sum[REG_W-1:0];
  assign vl_stall = op_valid & ~add_capture;
  assign in_ready = (state_q == S_IDLE);
  assign out_valid = (state_q == S_OUT);
  assign out_data  = comb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      stage_q <= '0;
      cnt_q   <= '0;
      x_q     <= '0;
      comb_q  <= '0;
      for (int k = 0; k < int'(N); k++) begin
        integ_q[k] <= '0;
        for (int j = 0; j < int'(M); j++) dly_q[k][j] <= '0;
      end
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (in_valid) begin
            x_q     <= in_data;
            stage_q <= '0;
            state_q <= S_INTEG;
          end
        end
        S_INTEG: begin
          if (add_capture) begin
            integ_q[stage_q] <= result;
            if (stage_q == SW'(N - 1)) begin
              stage_q <= '0;
              if (cnt_q == CW'(R - 1)) begin
                cnt_q   <= '0;
                state_q <= S_COMB;
              end else begin
                cnt_q   <= cnt_q + 1'b1;
                state_q <= S_IDLE;
              end
            end else begin
              stage_q <= stage_q + 1'b1;
            end
          end
        end
        S_COMB: begin
          if (add_capture) begin
            comb_q <= result;
            // shift this comb stage's delay line with its input
            dly_q[stage_q][0] <= (stage_q == 0) ? integ_q[N-1] : comb_q;
            for (int j = 1; j < int'(M); j++) dly_q[stage_q][j] <= dly_q[stage_q][j-1];
            if (stage_q == SW'(N - 1)) state_q <= S_OUT;
            else                       stage_q <= stage_q + 1'b1;
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
