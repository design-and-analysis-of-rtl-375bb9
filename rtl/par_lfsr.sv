// par_lfsr: N-bit parallel-output LFSR pseudo-random generator.
//
// The register is a plain Fibonacci shift register of N D flip-flops whose
// whole contents are the output, so one new N-bit word appears on every
// clock instead of one bit. Bits move from the LSB towards the MSB on each
// rising edge; the LSB takes the XOR of flip-flop TAP and flip-flop N
// (flip-flop k is q[k-1]), i.e. the characteristic polynomial is
// 1 + X^TAP + X^N, with TAP = N/2 by default (the two-term form
// 1 + X^(N/2) + X^N). A single two-input XOR is the only logic besides the
// load multiplexer in front of each flip-flop.
//
// Interface:  clk   rising-edge clock, every flip-flop clocked every cycle
//             load  synchronous seed load: when high at an edge, q <= r
//             r     N-bit seed
//             q     N-bit parallel output (register contents)
// Timing:     a seed loaded at edge k is on q after edge k; each later edge
//             with load low gives the next state. No latency beyond one
//             register stage, one state per clock.
//
// Following the published circuit there is no reset: q is undefined until
// the first load, and the all-zero seed locks the register at zero. N = 6,
// the ports, the shift direction and the tap placement are the published
// ones. This design's own choices: the load is synchronous (the published
// schematic has plain D flip-flops behind a multiplexer, the text only says
// the seed is given to Q while load is high), the TAP parameter, its
// floor(N/2) default for odd N, and the load assertion. With N = 6 and seed
// 6'b001011 the register runs through 9 states before repeating; in general
// every state recurs after 3N/2 clocks.

module par_lfsr #(
  parameter int unsigned N   = 6,
  parameter int unsigned TAP = N / 2
) (
  input  logic         clk,
  input  logic         load,
  input  logic [N-1:0] r,
  output logic [N-1:0] q
);

  if (N < 2) begin : g_bad_n
    $error("par_lfsr: N must be at least 2");
  end
  if (TAP < 1 || TAP >= N) begin : g_bad_tap
    $error("par_lfsr: TAP must lie in 1 .. N-1");
  end

  // Feedback bit: XOR of flip-flop TAP and flip-flop N.
  logic feedback;
  assign feedback = q[TAP-1] ^ q[N-1];

  always_ff @(posedge clk) begin
    if (load) q <= r;
    else      q <= {q[N-2:0], feedback};
  end

  // A load must be visible on q after the next edge.
  a_load : assert property (@(posedge clk) load |=> q == $past(r))
    else $error("par_lfsr: seed not loaded");

endmodule
