// par_lfsr_check: checker used by par_lfsr_sweep_tb. It instantiates one
// par_lfsr of width N and tap TAP and, after `start`, loads SEEDS random
// non-zero seeds, runs each for STEPS clocks and compares every state with a
// reference that keeps the output bit stream s[t] = s[t-TAP] ^ s[t-N]
// (q[i] is the bit that entered i clocks ago). It reports its check and
// failure counts and raises `done` when finished. For even N with the
// middle tap it also checks that the state is back at its seed after 3N/2
// clocks: X^N + X^(N/2) + 1 divides X^(3N/2) + 1, so every state's period
// divides 3N/2. Inputs change on the
// falling edge of clk; q is sampled just after the rising edge.

module par_lfsr_check #(
  parameter int unsigned N     = 8,
  parameter int unsigned TAP   = N / 2,
  parameter int unsigned SEEDS = 8,
  parameter int unsigned STEPS = 100
) (
  input  logic clk,
  input  logic start,
  output int   checks,
  output int   failures,
  output int   fb_ones,
  output logic done
);

  logic         load = 1'b0;
  logic [N-1:0] r = '0;
  logic [N-1:0] q;

  par_lfsr #(.N(N), .TAP(TAP)) dut (.clk(clk), .load(load), .r(r), .q(q));

  bit stream [$];

  function automatic logic [N-1:0] ref_q();
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = stream[stream.size() - 1 - i];
    return v;
  endfunction

  function automatic logic [N-1:0] rand_seed();
    logic [N-1:0] v;
    do begin
      for (int i = 0; i < N; i += 32) v = (v << 32) | N'($urandom);
    end while (v == '0);
    return v;
  endfunction

  task automatic compare(input string what);
    checks++;
    if (q !== ref_q()) begin
      failures++;
      $display("FAIL N=%0d TAP=%0d %s: q=%h expected %h", N, TAP, what, q, ref_q());
    end
  endtask

  initial begin
    logic [N-1:0] seed;
    int len;
    checks = 0;
    failures = 0;
    fb_ones = 0;
    done = 1'b0;
    wait (start);
    for (int s = 0; s < SEEDS; s++) begin
      seed = rand_seed();
      @(negedge clk);
      load = 1'b1;
      r = seed;
      @(posedge clk);
      #1;
      stream.delete();
      for (int i = N - 1; i >= 0; i--) stream.push_back(seed[i]);
      compare("load");
      @(negedge clk);
      load = 1'b0;
      for (int k = 0; k < STEPS; k++) begin
        if (q[TAP-1] ^ q[N-1]) fb_ones++;
        @(posedge clk);
        #1;
        len = stream.size();
        stream.push_back(stream[len - TAP] ^ stream[len - N]);
        compare($sformatf("seed %h step %0d", seed, k + 1));
        if (N % 2 == 0 && TAP == N / 2 && k + 1 == 3 * N / 2) begin
          checks++;
          if (q !== seed) begin
            failures++;
            $display("FAIL N=%0d seed %h not back after %0d clocks", N, seed, k + 1);
          end
        end
      end
    end
    done = 1'b1;
  end

endmodule
