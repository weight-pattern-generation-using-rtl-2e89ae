// Self-checking testbench for full_adder: applies all eight input
// combinations and compares sum and carry with the two bits of the integer
// a + b + cin. Also counts the rows where a = ~b and checks that the carry
// passes through unchanged there, the rule the pattern generator relies on.
module tb_full_adder;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;
  int carry_pass_rows = 0;

  full_adder dut (.a_i(a), .b_i(b), .cin_i(cin), .s_o(s), .cout_o(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int row = 0; row < 8; row++) begin
      int total;
      {cin, a, b} = 3'(row);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if (s !== total[0]) begin
        failures++;
        $display("FAIL sum: a=%0b b=%0b cin=%0b s=%0b", a, b, cin, s);
      end
      checks++;
      if (cout !== total[1]) begin
        failures++;
        $display("FAIL carry: a=%0b b=%0b cin=%0b cout=%0b", a, b, cin, cout);
      end
      if (a == !b) begin
        carry_pass_rows++;
        checks++;
        if (cout !== cin) begin
          failures++;
          $display("FAIL carry pass-through: a=%0b b=%0b cin=%0b", a, b, cin);
        end
      end
    end
    checks++;
    if (carry_pass_rows != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
