// par_lfsr_tb: self-checking testbench of par_lfsr at its default size
// (N = 6, polynomial 1 + X^3 + X^6), also the end-to-end test of the design.
//
// It checks, against a reference that tracks the output bit stream
// s[t] = s[t-3] ^ s[t-6] rather than the register:
//   1. seed 6'b001011 appears on q one edge after load (one-cycle latency);
//   2. the nine published states 001011, 010110, 101101, 011010, 110100,
//      101000, 010001, 100010, 000101 follow, one per clock, and then repeat;
//   3. for every one of the 64 seeds, 20 clocks of states and the period
//      (9 for every non-zero seed, since 1 + X^3 + X^6 divides X^9 + 1 and is
//      irreducible; 1 for the all-zero seed, which locks);
//   4. a load in the middle of a run overrides the shift, and a load held high
//      for several edges keeps reloading.
// It counts each mechanism (load, shift, a feedback 1 entering the LSB, the
// sequence wrapping to its seed) and fails if one never happened.
// Inputs change on the falling edge; outputs are sampled after the rising one.

module par_lfsr_tb;

  localparam int N = 6;
  localparam int H = N / 2;

  logic         clk;
  initial clk = 1'b0;
  logic         load = 1'b0;
  logic [N-1:0] r = '0;
  logic [N-1:0] q;

  int checks = 0;
  int failures = 0;
  int n_load = 0, n_shift = 0, n_fb_one = 0, n_wrap = 0;

  par_lfsr dut (.clk(clk), .load(load), .r(r), .q(q));

  always #5 clk = ~clk;

  // Reference: bit stream, newest bit is q[0], bit entered i clocks ago is q[i].
  bit stream [$];

  function automatic void ref_seed(input logic [N-1:0] seed);
    stream.delete();
    for (int i = N - 1; i >= 0; i--) stream.push_back(seed[i]);
  endfunction

  function automatic void ref_step();
    int len;
    len = stream.size();
    stream.push_back(stream[len - H] ^ stream[len - N]);
  endfunction

  function automatic logic [N-1:0] ref_q();
    logic [N-1:0] v;
    int len;
    len = stream.size();
    for (int i = 0; i < N; i++) v[i] = stream[len - 1 - i];
    return v;
  endfunction

  task automatic check(input logic [N-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b at %0t", what, q, exp, $time);
    end
  endtask

  // Load a seed: one edge with load high.
  task automatic do_load(input logic [N-1:0] seed);
    @(negedge clk);
    load = 1'b1;
    r    = seed;
    @(posedge clk);
    #1;
    n_load++;
    ref_seed(seed);
    check(ref_q(), "load");
    @(negedge clk);
    load = 1'b0;
    r    = '0;
  endtask

  // One shift edge.
  task automatic do_shift(input string what);
    logic [N-1:0] prev;
    prev = q;
    @(posedge clk);
    #1;
    n_shift++;
    if ((prev[H-1] ^ prev[N-1]) == 1'b1) n_fb_one++;
    ref_step();
    check(ref_q(), what);
  endtask

  localparam logic [N-1:0] PUBLISHED [9] = '{
    6'b001011, 6'b010110, 6'b101101, 6'b011010, 6'b110100,
    6'b101000, 6'b010001, 6'b100010, 6'b000101
  };

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int period;
    logic [N-1:0] seed;

    // 1, 2: the published seed and sequence.
    do_load(6'b001011);
    check(PUBLISHED[0], "published state 0");
    for (int k = 1; k <= 18; k++) begin
      do_shift("published run (model)");
      check(PUBLISHED[k % 9], $sformatf("published state %0d", k % 9));
      if (q == PUBLISHED[0]) n_wrap++;
    end

    // 3: every seed, states and period.
    for (int s = 0; s < (1 << N); s++) begin
      seed = N'(s);
      do_load(seed);
      period = 0;
      for (int k = 1; k <= 20; k++) begin
        do_shift($sformatf("seed %b step %0d", seed, k));
        if (period == 0 && q == seed) begin
          period = k;
          n_wrap++;
        end
      end
      checks++;
      if (period != ((s == 0) ? 1 : 9)) begin
        failures++;
        $display("FAIL seed %b period %0d", seed, period);
      end
    end

    // 4: a load in mid-run overrides the shift.
    do_load(6'b100001);
    repeat (4) do_shift("before mid-run load");
    do_load(6'b011110);
    repeat (3) do_shift("after mid-run load");

    // load held high for three edges keeps reloading.
    @(negedge clk);
    load = 1'b1;
    for (int k = 0; k < 3; k++) begin
      r = N'($urandom);
      seed = r;
      @(posedge clk);
      #1;
      n_load++;
      check(seed, "held load");
      @(negedge clk);
    end
    load = 1'b0;
    ref_seed(seed);
    repeat (5) do_shift("after held load");

    // Every mechanism must have been exercised.
    checks += 4;
    if (n_load == 0)   begin failures++; $display("FAIL no load");   end
    if (n_shift == 0)  begin failures++; $display("FAIL no shift");  end
    if (n_fb_one == 0) begin failures++; $display("FAIL no feedback one"); end
    if (n_wrap == 0)   begin failures++; $display("FAIL no wrap");   end
    $display("loads=%0d shifts=%0d feedback_ones=%0d wraps=%0d",
             n_load, n_shift, n_fb_one, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
