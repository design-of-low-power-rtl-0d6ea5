// tb_cldc: checks the carry length detector.  The expected flag is worked
// out bit by bit: long when every operand bit pair in the window 31..37
// differs, or, with th_adj high, every pair in 32..37.  Random operands
// rarely hit the window, so half the vectors are built to propagate in it,
// with one random bit of the window sometimes broken.
module tb_cldc;
  localparam int unsigned W = 64;

  logic [W-1:0] a, b;
  logic         th_adj, long_op;
  int           checks = 0, failures = 0, n_long = 0;

  cldc #(.WIDTH(W), .DET_LO(31), .DET_HI(37)) dut (.a(a), .b(b), .th_adj(th_adj), .long_op(long_op));

  function automatic logic expect_long(logic [W-1:0] x, logic [W-1:0] y, logic adj);
    logic r;
    r = 1'b1;
    for (int i = (adj ? 32 : 31); i <= 37; i++) if (x[i] == y[i]) r = 1'b0;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      a      = {$urandom, $urandom};
      b      = {$urandom, $urandom};
      th_adj = 1'($urandom);
      if (i % 2 == 1) begin
        b[37:31] = ~a[37:31];
        if ($urandom % 3 == 0) b[31 + ($urandom % 7)] ^= 1'b1;
      end
      #1;
      checks++;
      if (long_op) n_long++;
      if (long_op !== expect_long(a, b, th_adj)) begin
        failures++;
        $display("FAIL a=%h b=%h adj=%0d got %0d", a, b, th_adj, long_op);
      end
    end
    // the adjust input must turn a bit-31 mismatch into a long operation
    a = 64'h0000_003F_8000_0000; b = 64'h0;
    th_adj = 1'b0; #1; checks++; if (long_op !== 1'b1) failures++;
    a[31] = 1'b0;  #1; checks++; if (long_op !== 1'b0) failures++;
    th_adj = 1'b1; #1; checks++; if (long_op !== 1'b1) failures++;
    checks++;
    if (n_long < 100) begin failures++; $display("FAIL too few long operations seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
