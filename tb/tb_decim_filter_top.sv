// tb_decim_filter_top: end-to-end test of the decimation filter at its default
// parameters (CIC 3/16/1, half-band 11 taps, half-band 45 taps, 64 : 1).
//
// A first-order sigma-delta modulator written in this testbench turns a
// slow sine plus a DC offset into the +/-1 bit stream.  A reference model
// built from direct convolutions (CIC impulse response computed by
// repeated box convolution, then each half-band filter with its coefficient
// set, >>> 15 and 16-bit truncation after each) predicts every output word.
//
// Checked: every output value, that it stays in the range of the test
// signal and swings with the sine, one output per 64 accepted input bits, and
// that each mechanism happened: long-operation stretches in every stage,
// stretches while th_adj is high, every rate change (CIC, HB1, HB2 outputs),
// input back-pressure (in_ready low) and output back-pressure (out_ready low).
module tb_decim_filter_top;
  import decim_pkg::*;

  localparam int R = 16, N = 3, HLEN = N * (R - 1) + 1;
  localparam int NOUT = 120;

  logic        clk = 1'b0, rst_n = 1'b0, th_adj = 1'b0;
  logic        in_valid = 1'b0, in_ready, sd_bit = 1'b0, out_valid, out_ready = 1'b0;
  logic signed [15:0] out_data;
  logic [2:0]  vl_stall;

  int checks = 0, failures = 0;
  int h [HLEN];
  int xs [$], cic_ref [$], hb1_ref [$];
  int n_out = 0, n_in = 0;
  int n_stall [3] = '{0, 0, 0};
  int n_stall_adj = 0, n_cic = 0, n_hb1 = 0, n_in_bp = 0, n_out_bp = 0;
  real phase = 0.0, integ = 0.0;
  int  min_out = 32767, max_out = -32768;

  decim_filter_top dut (
    .clk(clk), .rst_n(rst_n), .th_adj(th_adj), .in_valid(in_valid), .in_ready(in_ready),
    .sd_bit(sd_bit), .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data),
    .vl_stall(vl_stall)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t [HLEN];
    for (int i = 0; i < HLEN; i++) h[i] = (i == 0) ? 1 : 0;
    for (int s = 0; s < N; s++) begin
      for (int i = 0; i < HLEN; i++) begin
        t[i] = 0;
        for (int k = 0; k < R; k++) if (i - k >= 0) t[i] += h[i - k];
      end
      h = t;
    end
  end

  // reference stage models, evaluated as soon as enough input is known
  function automatic int hb_ref(input int x [$], input int m, input bit sel);
    longint             acc;
    logic signed [15:0] t;
    int                 taps;
    acc  = 0;
    taps = sel ? HB2_TAPS : HB1_TAPS;
    for (int n = 0; n < taps; n++)
      if (2 * m + 1 - n >= 0)
        acc += (sel ? longint'(HB2_COEF[n]) : longint'(HB1_COEF[n % HB1_TAPS])) * longint'(x[2 * m + 1 - n]);
    t = 16'(acc >>> COEF_FRAC);
    return int'(t);
  endfunction

  // sigma-delta modulator: 1st order, input 0.3 + 0.5 sin
  task automatic next_bit();
    real u;
    u      = 0.3 + 0.5 * $sin(phase);
    phase += 2.0 * 3.14159265358979 / 700.0;
    integ += u - (sd_bit ? 1.0 : -1.0);
    sd_bit = (integ >= 0.0);
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 3; k++) if (vl_stall[k]) n_stall[k]++;
    if (|vl_stall && th_adj) n_stall_adj++;
    if (in_valid && !in_ready) n_in_bp++;
    if (out_valid && !out_ready) n_out_bp++;
    if (dut.u_cic.out_valid && dut.u_cic.out_ready) n_cic++;
    if (dut.u_hb1.out_valid && dut.u_hb1.out_ready) n_hb1++;
    if (in_valid && in_ready) begin
      xs.push_back(sd_bit ? 1 : -1);
      n_in++;
      // extend the CIC and HB1 reference streams
      if (xs.size() % R == 0) begin
        int acc, base;
        acc  = 0;
        base = xs.size() - 1;
        for (int k = 0; k < HLEN; k++) if (base - k >= 0) acc += h[k] * xs[base - k];
        cic_ref.push_back(acc);
        if (cic_ref.size() % 2 == 0) hb1_ref.push_back(hb_ref(cic_ref, cic_ref.size() / 2 - 1, 0));
      end
    end
    if (out_valid && out_ready) begin
      int exp_v;
      exp_v = hb_ref(hb1_ref, n_out, 1);
      checks++;
      if (int'(out_data) != exp_v) begin
        failures++;
        $display("FAIL output %0d got %0d exp %0d", n_out, out_data, exp_v);
      end
      checks++;
      if (n_in < 64 * (n_out + 1) || hb1_ref.size() != 2 * (n_out + 1)) begin
        failures++;
        $display("FAIL output %0d after %0d inputs", n_out, n_in);
      end
      // the band-limited output must follow 4096 * (0.3 + 0.5 sin): well
      // inside [-1100, 3600] once the filters have settled
      if (n_out >= 8) begin
        checks++;
        if (out_data < -16'sd1100 || out_data > 16'sd3600) begin
          failures++;
          $display("FAIL output %0d = %0d outside the expected signal range", n_out, out_data);
        end
        if (int'(out_data) < min_out) min_out = int'(out_data);
        if (int'(out_data) > max_out) max_out = int'(out_data);
      end
      n_out++;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) next_bit();
      in_valid  <= 1'b1;
      out_ready <= ($urandom % 4 != 0);
      th_adj    <= (n_out >= NOUT / 2) && (n_out < NOUT / 2 + 4);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    next_bit();
    wait (n_out == NOUT);
    @(posedge clk);
    // the chain must produce exactly one output per 64 inputs
    checks++;
    if (n_cic != n_in / 16 || n_hb1 < n_cic / 2 - 1) begin
      failures++;
      $display("FAIL rate: inputs %0d cic %0d hb1 %0d", n_in, n_cic, n_hb1);
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_stall[k] == 0) begin failures++; $display("FAIL stage %0d never stretched", k); end
    end
    checks++; if (n_stall_adj == 0) begin failures++; $display("FAIL no stretch with th_adj"); end
    checks++; if (n_cic == 0 || n_hb1 == 0) begin failures++; $display("FAIL no rate change"); end
    checks++; if (n_in_bp == 0) begin failures++; $display("FAIL no input back-pressure"); end
    checks++; if (n_out_bp == 0) begin failures++; $display("FAIL no output back-pressure"); end
    checks++;
    if (max_out - min_out < 2000) begin
      failures++;
      $display("FAIL output swing %0d..%0d too small for the test sine", min_out, max_out);
    end
    $display("inputs=%0d cic=%0d hb1=%0d out=%0d stretches=%0d/%0d/%0d adj=%0d in_bp=%0d out_bp=%0d",
             n_in, n_cic, n_hb1, n_out, n_stall[0], n_stall[1], n_stall[2], n_stall_adj,
             n_in_bp, n_out_bp);
    $display("output range %0d..%0d", min_out, max_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
