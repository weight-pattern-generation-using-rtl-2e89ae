// Self-checking testbench for precomp_acc_cell.
//
// A bit-level reference model keeps its own A and B registers: on each
// rising edge, unless forced, B takes v and A takes the low bit of
// A + B + cin; the expected carry-out is the high bit of that sum. Forced
// configurations set A = 1, B = 0 (set) or A = 0, B = 1 (reset) at once,
// without waiting for a clock. The test first walks every free-running
// (A, B, cin) combination, then drives random stimulus, changing set/reset
// between clock edges to exercise their asynchronous action.
module tb_precomp_acc_cell;
  logic clk = 1'b0;
  logic set, reset, v, cin;
  logic a, b, cout;
  logic a_m, b_m;
  int checks = 0, failures = 0;
  int n_set = 0, n_reset = 0, n_free = 0, n_async = 0, n_pass_carry1 = 0;

  precomp_acc_cell dut (
    .clk(clk), .set_i(set), .reset_i(reset), .v_i(v), .cin_i(cin),
    .a_o(a), .b_o(b), .cout_o(cout)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model of the registers.
  always @(posedge clk) begin
    logic [1:0] sum;
    sum = 2'(a_m) + 2'(b_m) + 2'(cin);
    if (set)        begin a_m <= 1'b1; b_m <= 1'b0; end
    else if (reset) begin a_m <= 1'b0; b_m <= 1'b1; end
    else            begin a_m <= sum[0]; b_m <= v; end
  end

  task automatic apply_force(input logic s_n, input logic r_n);
    set = s_n; reset = r_n;
    if (s_n)      begin a_m = 1'b1; b_m = 1'b0; end
    else if (r_n) begin a_m = 1'b0; b_m = 1'b1; end
  endtask

  task automatic compare(input string what);
    logic [1:0] sum;
    sum = 2'(a_m) + 2'(b_m) + 2'(cin);
    checks += 3;
    if (a !== a_m || b !== b_m || cout !== sum[1]) begin
      failures++;
      $display("FAIL %s: set=%0b reset=%0b cin=%0b a=%0b/%0b b=%0b/%0b cout=%0b/%0b",
               what, set, reset, cin, a, a_m, b, b_m, cout, sum[1]);
    end
    if (set ^ reset) begin
      checks++;
      if (cout !== cin) begin
        failures++;
        $display("FAIL forced cell does not pass carry");
      end
      if (cin) n_pass_carry1++;
    end
  endtask

  initial begin
    v = 1'b0; cin = 1'b0;
    apply_force(1'b0, 1'b1);
    #1;
    compare("initial reset");
    // Every (A, B, cin) combination in the free configuration.
    for (int combo = 0; combo < 8; combo++) begin
      @(negedge clk);
      apply_force(combo[2], !combo[2]);   // preset A
      v = combo[1];
      #1;
      apply_force(1'b0, 1'b0);
      @(posedge clk);                     // B <= v
      @(negedge clk);
      cin = combo[0];
      #1;
      compare("free combination");
      n_free++;
      @(posedge clk);
      @(negedge clk);
      #1;
      compare("free accumulate");
    end
    // Random stimulus.
    for (int n = 0; n < 3000; n++) begin
      int cfg;
      @(negedge clk);
      cfg = int'($urandom_range(0, 5));
      v   = 1'($urandom);
      cin = 1'($urandom);
      case (cfg)
        0:       begin apply_force(1'b1, 1'b0); n_set++;   end
        1:       begin apply_force(1'b0, 1'b1); n_reset++; end
        default: begin apply_force(1'b0, 1'b0); n_free++;  end
      endcase
      #1;
      compare("after configuration");
      // Asynchronous force in the middle of the low clock phase.
      if (cfg == 5) begin
        logic sn;
        sn = 1'($urandom);
        apply_force(sn, !sn);
        #1;
        compare("asynchronous force");
        n_async++;
        apply_force(1'b0, 1'b0);
      end
      @(posedge clk);
      #1;
      compare("after clock");
    end
    checks++;
    if (n_set == 0 || n_reset == 0 || n_free == 0 || n_async == 0 || n_pass_carry1 == 0) begin
      failures++;
      $display("FAIL a configuration never occurred");
    end
    $display("set=%0d reset=%0d free=%0d async=%0d carry-passed=%0d",
             n_set, n_reset, n_free, n_async, n_pass_carry1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
