// End-to-end self-checking testbench for weight_pattern_gen at its default
// width.
//
// Reference model: the model keeps K-bit A and B registers. Forced bits take
// A = 1, B = 0 (weight 1) or A = 0, B = 1 (weight 0) immediately. On a clock
// edge the free bits of A and B are packed into F-bit integers, added with
// the carry-in as plain integers, and the sum is unpacked back into the free
// bits of A; the free bits of B take v. The expected carry-out is bit F of
// that sum. This word-level model knows nothing of the cell structure, so it
// checks independently that forced bits pass the carry across themselves.
//
// Phases:
//   1. plain accumulator (no bit forced): s(t+1) = s(t) + v, one pattern per
//      clock, checked against integer addition;
//   2. for a series of random weight assignments with the lowest free bit of
//      v set and cin = 0: the free bits step through all 2^F states in 2^F
//      clocks, so over that period each weight-1 bit is 1 on every pattern,
//      each weight-0 bit on none, and each weight-0.5 bit on exactly half;
//   3. random v, cin and weight assignments, changed between clock edges,
//      including set/reset applied asynchronously.
// Every pattern and carry-out is compared with the model. The mechanisms are
// counted and each must occur: weight-1 bits, weight-0 bits, weight-0.5 bits,
// a carry passed across a forced bit into a free bit, a carry out of the top
// bit, an asynchronous force.
module tb_weight_pattern_gen;
  localparam int unsigned K = 8;

  logic         clk = 1'b0;
  logic [K-1:0] set, reset, v;
  logic         cin;
  logic [K-1:0] pattern;
  logic         cout;

  logic [K-1:0] a_m, b_m;
  int checks = 0, failures = 0;
  int n_w1 = 0, n_w0 = 0, n_whalf = 0, n_skip = 0, n_cout = 0, n_async = 0;
  int n_plain = 0, n_period = 0;

  weight_pattern_gen dut (
    .clk(clk), .set_i(set), .reset_i(reset), .v_i(v), .cin_i(cin),
    .pattern_o(pattern), .cout_o(cout)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- word-level reference model -------------------------------------
  function automatic int unsigned pack_free(input logic [K-1:0] x, input logic [K-1:0] free);
    int unsigned r = 0, p = 0;
    for (int i = 0; i < K; i++)
      if (free[i]) begin
        r |= int'(x[i]) << p;
        p++;
      end
    return r;
  endfunction

  function automatic logic [K-1:0] unpack_free(input int unsigned r, input logic [K-1:0] x,
                                               input logic [K-1:0] free);
    logic [K-1:0] y = x;
    int unsigned p = 0;
    for (int i = 0; i < K; i++)
      if (free[i]) begin
        y[i] = r[p];
        p++;
      end
    return y;
  endfunction

  function automatic int unsigned model_sum();
    logic [K-1:0] free = ~(set | reset);
    return pack_free(a_m, free) + pack_free(b_m, free) + int'(cin);
  endfunction

  function automatic logic model_cout();
    logic [K-1:0] free = ~(set | reset);
    int unsigned n = unsigned'($countones(free));
    int unsigned s = model_sum();
    return s[n];
  endfunction

  always @(posedge clk) begin
    logic [K-1:0] free;
    free = ~(set | reset);
    a_m <= (unpack_free(model_sum(), a_m, free) & free) | set;
    b_m <= (v & free) | reset;
  end

  // Counts carries that reach a free bit across one or more forced bits.
  function automatic int carry_skips();
    logic [K-1:0] free = ~(set | reset);
    int unsigned pa = pack_free(a_m, free), pb = pack_free(b_m, free);
    int cnt = 0, p = 0, last = -1;
    for (int i = 0; i < K; i++)
      if (free[i]) begin
        if (p > 0 && last != i - 1) begin
          int unsigned m = (1 << p) - 1;
          int unsigned lo = (pa & m) + (pb & m) + int'(cin);
          if (lo[p]) cnt++;
        end
        last = i;
        p++;
      end
    return cnt;
  endfunction

  task automatic set_config(input logic [K-1:0] s_n, input logic [K-1:0] r_n);
    set = s_n; reset = r_n;
    a_m = (a_m & ~(s_n | r_n)) | s_n;
    b_m = (b_m & ~(s_n | r_n)) | r_n;
  endtask

  // Random weight assignment: each bit 1/4 weight 1, 1/4 weight 0, 1/2 free.
  task automatic random_config(output logic [K-1:0] s_n, output logic [K-1:0] r_n);
    s_n = '0; r_n = '0;
    for (int i = 0; i < K; i++)
      case ($urandom_range(0, 3))
        0: s_n[i] = 1'b1;
        1: r_n[i] = 1'b1;
        default: ;
      endcase
  endtask

  task automatic compare(input string what);
    logic c = model_cout();
    checks += 2;
    if (pattern !== a_m || cout !== c) begin
      failures++;
      $display("FAIL %s: set=%b reset=%b v=%b cin=%b pattern=%b expected %b cout=%b expected %b",
               what, set, reset, v, cin, pattern, a_m, cout, c);
    end
    n_w1    += $countones(set);
    n_w0    += $countones(reset);
    n_whalf += $countones(~(set | reset));
    n_skip  += carry_skips();
    if (c) n_cout++;
  endtask

  initial begin
    logic [K-1:0] s_n, r_n;
    v = '0; cin = 1'b0;
    set_config('0, '1);
    #1;
    compare("initial reset");

    // ---- phase 1: plain accumulator -----------------------------------
    @(negedge clk);
    v = K'($urandom);
    set_config('0, '0);           // A = 0, B = all ones
    @(posedge clk);               // A = all ones, B = v
    @(negedge clk);
    #1;
    compare("plain start");
    for (int n = 0; n < 300; n++) begin
      logic [K-1:0] prev_s;
      prev_s = pattern;
      @(posedge clk);
      #1;
      compare("plain accumulate");
      checks++;
      if (pattern !== K'(prev_s + v)) begin
        failures++;
        $display("FAIL s(t+1) != s(t) + v: %0d + %0d -> %0d", prev_s, v, pattern);
      end
      n_plain++;
    end

    // ---- phase 2: weights over one full period ------------------------
    for (int trial = 0; trial < 40; trial++) begin
      logic [K-1:0] free;
      int ones[K];
      int unsigned f, period;
      @(negedge clk);
      random_config(s_n, r_n);
      if (trial == 0) begin s_n = '0; r_n = '0; end
      free = ~(s_n | r_n);
      f = unsigned'($countones(free));
      period = 1 << f;
      cin = 1'b0;
      v = K'($urandom);
      for (int i = 0; i < K; i++)       // lowest free bit of v set
        if (free[i]) begin v[i] = 1'b1; break; end
      set_config(s_n, r_n);
      @(posedge clk);                   // B <= v
      @(negedge clk);
      #1;
      compare("period start");
      foreach (ones[i]) ones[i] = 0;
      for (int unsigned n = 0; n < period; n++) begin
        for (int i = 0; i < K; i++) ones[i] += int'(pattern[i]);
        @(posedge clk);
        #1;
        compare("period step");
      end
      for (int i = 0; i < K; i++) begin
        int expected;
        expected = s_n[i] ? int'(period) : (r_n[i] ? 0 : int'(period / 2));
        checks++;
        if (ones[i] != expected) begin
          failures++;
          $display("FAIL weight of bit %0d: %0d ones in %0d patterns, expected %0d",
                   i, ones[i], period, expected);
        end
      end
      n_period++;
    end

    // ---- phase 3: random stimulus -------------------------------------
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      v   = K'($urandom);
      cin = 1'($urandom);
      if ($urandom_range(0, 7) == 0) begin
        random_config(s_n, r_n);
        set_config(s_n, r_n);
      end
      #1;
      compare("random configuration");
      if ($urandom_range(0, 15) == 0) begin
        random_config(s_n, r_n);
        #2;
        set_config(s_n, r_n);          // asynchronous force mid-phase
        #1;
        compare("asynchronous force");
        n_async++;
      end
      @(posedge clk);
      #1;
      compare("random step");
    end

    checks++;
    if (n_w1 == 0 || n_w0 == 0 || n_whalf == 0 || n_skip == 0 || n_cout == 0 ||
        n_async == 0 || n_plain == 0 || n_period == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("weight-1 bit-patterns=%0d weight-0=%0d weight-0.5=%0d carry skips=%0d carry-outs=%0d async forces=%0d plain steps=%0d full periods=%0d",
             n_w1, n_w0, n_whalf, n_skip, n_cout, n_async, n_plain, n_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
