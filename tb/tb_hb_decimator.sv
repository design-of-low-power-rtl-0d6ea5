// tb_hb_decimator: checks the half-band decimator in both configurations of
// the filter chain: the default 45-tap filter and the 11-tap one.  Each output
// is compared with a direct convolution over all taps (zeros included) of the
// inputs seen so far, shifted right by 15 and truncated to 16 bits:
// output m = (sum_n COEF[n] x[2m + 1 - n]) >>> 15.  The latency from the
// accepting edge of the 2nd input of a pair to out_valid must be
// 1 + (number of pairs) + (number of set bits over the non-zero coefficient
// magnitudes) cycles, plus one per stretched (long) addition.
module tb_hb_decimator;
  import decim_pkg::*;

  localparam int DATA_W = 16;
  localparam int NOUT   = 150;

  logic clk = 1'b0, rst_n = 1'b0, th_adj = 1'b0;
  int   checks = 0, failures = 0;
  int   done_cnt = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) th_adj <= ($urandom % 16 == 0);

  for (genvar cfg = 0; cfg < 2; cfg++) begin : g_cfg
    localparam int    TAPS = (cfg == 0) ? HB2_TAPS : HB1_TAPS;
    localparam coef_t C [TAPS] = (cfg == 0) ? HB2_COEF : HB1_COEF;
    localparam int    NPAIR = ((TAPS - 1) / 2 + 1) / 2;
    localparam int    CTR   = (TAPS - 1) / 2;
    int               base_lat;   // clocks per output without stretches

    logic                     in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, vl_stall;
    logic signed [DATA_W-1:0] in_data = '0, out_data;
    int                       xs [$];
    int                       n_out = 0, n_stall = 0, cycle = 0, last_accept = 0, stalls_since = 0;
    logic                     out_valid_d = 1'b0;

    // 1 accept + one pre-add per pair + one addition per set coefficient bit
    // (a zero coefficient still costs one clock)
    initial begin
      base_lat = 1 + NPAIR;
      for (int p = 0; p <= NPAIR; p++) begin
        int c, k;
        k = (p == NPAIR) ? CTR : CTR - 1 - 2 * p;
        c = int'(C[k]);
        if (c < 0) c = -c;
        base_lat += (c == 0) ? 1 : $countones(c);
      end
    end

    hb_decimator #(.TAPS(TAPS), .COEF(C), .DATA_W(DATA_W)) dut (
      .clk(clk), .rst_n(rst_n), .th_adj(th_adj), .in_valid(in_valid), .in_ready(in_ready),
      .in_data(in_data), .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data),
      .vl_stall(vl_stall)
    );

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
          // full range mostly, small values sometimes
          in_data  <= ($urandom % 4 == 0) ? DATA_W'(int'($urandom % 64) - 32)
                                          : DATA_W'(int'($urandom % 32768) - 16384);
        end
        out_ready <= ($urandom % 3 != 0);
      end
    end

    always @(posedge clk) begin
      out_valid_d <= out_valid & ~out_ready;
      if (rst_n && out_valid && !out_valid_d) begin
        longint acc;
        int     base, lat;
        logic signed [DATA_W-1:0] exp_v;
        base = 2 * n_out + 1;
        acc  = 0;
        for (int n = 0; n < TAPS; n++)
          if (base - n >= 0) acc += longint'(C[n]) * longint'(xs[base - n]);
        exp_v = DATA_W'(acc >>> COEF_FRAC);
        checks++;
        if (xs.size() != base + 1 || out_data !== exp_v) begin
          failures++;
          $display("FAIL taps=%0d output %0d got %0d exp %0d (inputs %0d)",
                   TAPS, n_out, out_data, exp_v, xs.size());
        end
        lat = cycle - last_accept;
        checks++;
        if (lat != base_lat + stalls_since) begin
          failures++;
          $display("FAIL taps=%0d latency %0d exp %0d", TAPS, lat, base_lat + stalls_since);
        end
      end
      if (rst_n && out_valid && out_ready) n_out++;
    end

    initial begin
      wait (n_out == NOUT);
      checks++;
      if (n_stall == 0) begin failures++; $display("FAIL taps=%0d no long operation", TAPS); end
      $display("taps=%0d stalls=%0d outputs=%0d", TAPS, n_stall, n_out);
      done_cnt++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_cnt == 2);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
