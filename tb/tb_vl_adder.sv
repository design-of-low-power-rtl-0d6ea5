// tb_vl_adder: checks the variable-latency adder as its user sees it.  Each
// operation is held until capture; the sum seen at capture must equal a+b+cin
// and the latency must be 1 cycle for short and 2 cycles for long operations,
// the class being worked out in the testbench from the operand bits 31..37.
// Idle cycles, back-to-back long operations and th_adj are mixed in.
module tb_vl_adder;
  localparam int unsigned W = 64;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         op_valid = 1'b0, cin = 1'b0, th_adj = 1'b0;
  logic [W-1:0] a = '0, b = '0, sum;
  logic         cout, long_op, capture;
  int           checks = 0, failures = 0, n_long = 0, n_short = 0;

  vl_adder #(.WIDTH(W)) dut (
    .clk(clk), .rst_n(rst_n), .op_valid(op_valid), .a(a), .b(b), .cin(cin),
    .th_adj(th_adj), .sum(sum), .cout(cout), .long_op(long_op), .capture(capture)
  );

  always #5 clk = ~clk;

  function automatic logic is_long(logic [W-1:0] x, logic [W-1:0] y, logic adj);
    logic r;
    r = 1'b1;
    for (int i = (adj ? 32 : 31); i <= 37; i++) if (x[i] == y[i]) r = 1'b0;
    return r;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      logic [W:0] ref_v;
      int         lat, exp_lat;
      @(negedge clk);
      a      = {$urandom, $urandom};
      b      = {$urandom, $urandom};
      cin    = 1'($urandom);
      th_adj = ($urandom % 8 == 0);
      if ($urandom % 2 == 0) b[37:31] = ~a[37:31];
      op_valid = 1'b1;
      ref_v    = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
      exp_lat  = is_long(a, b, th_adj) ? 2 : 1;
      lat      = 1;
      #1;
      while (!capture) begin
        @(negedge clk);
        lat++;
        if (lat > 4) break;
      end
      checks += 2;
      if ({cout, sum} !== ref_v) begin
        failures++;
        $display("FAIL sum a=%h b=%h got %h exp %h", a, b, sum, ref_v);
      end
      if (lat != exp_lat) begin
        failures++;
        $display("FAIL latency a=%h b=%h got %0d exp %0d", a, b, lat, exp_lat);
      end
      if (exp_lat == 2) n_long++; else n_short++;
      @(posedge clk);
      if ($urandom % 4 == 0) begin
        @(negedge clk);
        op_valid = 1'b0;
        @(posedge clk);
      end
    end
    checks++;
    if (n_long < 100 || n_short < 100) begin
      failures++;
      $display("FAIL coverage long=%0d short=%0d", n_long, n_short);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
