// tb_cic_decimator: checks the CIC decimator (N=3, R=16, M=1, 2-bit input)
// against a direct convolution with the impulse response of
// ((1 - z^-16) / (1 - z^-1))^3, i.e. the 46 coefficients of
// (1 + z^-1 + ... + z^-15)^3 computed here by repeated convolution.
// Output m must equal sum_k h[k] x[16m + 15 - k].  Inputs take every value of
// the 2-bit range, input gaps and output back-pressure are random, and the
// latency from the last input of a block to out_valid must be 7 cycles plus
// one per stretched (long) addition.
module tb_cic_decimator;
  localparam int IN_W = 2, N = 3, R = 16, M = 1;
  localparam int REG_W = IN_W + N * $clog2(R * M);
  localparam int HLEN = N * (R * M - 1) + 1;
  localparam int NOUT = 200;

  logic                    clk = 1'b0, rst_n = 1'b0, th_adj = 1'b0;
  logic                    in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, vl_stall;
  logic signed [IN_W-1:0]  in_data = '0;
  logic signed [REG_W-1:0] out_data;

  int checks = 0, failures = 0;
  int h [HLEN];
  int xs [$];
  int n_out = 0, n_stall = 0, cycle = 0, last_accept = 0, stalls_since = 0;

  cic_decimator #(.IN_W(IN_W), .N(N), .R(R), .M(M)) dut (
    .clk(clk), .rst_n(rst_n), .th_adj(th_adj), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data),
    .vl_stall(vl_stall)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // impulse response by convolving a box of R*M ones with itself N times
  initial begin
    int t [HLEN];
    for (int i = 0; i < HLEN; i++) h[i] = (i == 0) ? 1 : 0;
    for (int s = 0; s < N; s++) begin
      for (int i = 0; i < HLEN; i++) begin
        t[i] = 0;
        for (int k = 0; k < R * M; k++) if (i - k >= 0) t[i] += h[i - k];
      end
      h = t;
    end
  end

  // stimulus
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && vl_stall) begin n_stall++; stalls_since <= stalls_since + 1; end
    if (in_valid && in_ready) begin
      xs.push_back(int'(in_data));
      last_accept  <= cycle;
      stalls_since <= 0;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (!in_valid || in_ready) begin
        in_valid <= ($urandom % 4 != 0);
        in_data  <= IN_W'($urandom);
      end
      out_ready <= ($urandom % 3 != 0);
      th_adj    <= ($urandom % 16 == 0);
    end
  end

  // checker: out_valid rises after the last input of each block
  logic out_valid_d = 1'b0;
  always @(posedge clk) begin
    out_valid_d <= out_valid & ~out_ready;
    if (rst_n && out_valid && !out_valid_d) begin
      int acc, base, lat;
      base = R * n_out + R - 1;
      acc  = 0;
      for (int k = 0; k < HLEN; k++) if (base - k >= 0) acc += h[k] * xs[base - k];
      checks++;
      if (xs.size() != base + 1) begin
        failures++;
        $display("FAIL output %0d after %0d inputs", n_out, xs.size());
      end
      if (int'(out_data) != acc) begin
        failures++;
        $display("FAIL output %0d got %0d exp %0d", n_out, out_data, acc);
      end
      lat = cycle - last_accept;
      checks++;
      if (lat != 2 * N + 1 + stalls_since) begin
        failures++;
        $display("FAIL latency %0d exp %0d", lat, 2 * N + 1 + stalls_since);
      end
    end
    if (rst_n && out_valid && out_ready) n_out++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_out == NOUT);
    @(posedge clk);
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL no long operation happened"); end
    $display("stalls=%0d outputs=%0d", n_stall, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
