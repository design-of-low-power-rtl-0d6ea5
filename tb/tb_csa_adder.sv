// tb_csa_adder: checks the 64-bit carry-select adder against the language's
// own addition, for directed corner cases (carries crossing every stage
// boundary, all-ones operands) and random operands with random carry-in.
// Combinational block: values are applied and compared after a #1 delay.
module tb_csa_adder;
  localparam int unsigned W = 64;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0, failures = 0;

  csa_adder #(.WIDTH(W), .BLOCK_W(8)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] ref_v;
    a = ta; b = tb_; cin = tc;
    #1;
    ref_v = {1'b0, ta} + {1'b0, tb_} + {{W{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== ref_v) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0d got %h/%0d exp %h", ta, tb_, tc, sum, cout, ref_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0, 1'b0);
    check('1, '0, 1'b1);              // carry through every stage
    check('1, '1, 1'b1);
    check({W{1'b1}}, 64'd1, 1'b0);
    for (int s = 0; s < W; s += 8) begin
      check(64'hFF << s, 64'h1 << s, 1'b0);      // carry out of one stage
      check((64'h1 << s) - 1, 64'h0, 1'b1);      // carry-in ripples to s
    end
    for (int i = 0; i < 5000; i++)
      check({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    // propagate-heavy operands (b close to ~a)
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] r;
      r = {$urandom, $urandom};
      check(r, ~r ^ (64'h1 << ($urandom % W)), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
