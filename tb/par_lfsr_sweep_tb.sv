// par_lfsr_sweep_tb: runs par_lfsr at other register lengths than the
// default N = 6, each against an independent bit-stream reference
// (par_lfsr_check): even lengths 4, 8, 16, 32 and 64 with the middle tap
// N/2, odd length 5 (tap floor(5/2) = 2), and N = 7 with an explicit tap 3.
// Each width runs 8 random non-zero seeds for 100 clocks; for the even
// widths the state must be back at its seed after 3N/2 clocks. It fails if a width
// never fed a 1 back into the LSB.

module par_lfsr_sweep_tb;

  localparam int NW = 7;

  logic clk;
  initial clk = 1'b0;
  logic start = 1'b0;
  always #5 clk = ~clk;

  int   c [NW];
  int   f [NW];
  int   o [NW];
  logic d [NW];

  par_lfsr_check #(.N(4))           u4  (.clk, .start, .checks(c[0]), .failures(f[0]), .fb_ones(o[0]), .done(d[0]));
  par_lfsr_check #(.N(5))           u5  (.clk, .start, .checks(c[1]), .failures(f[1]), .fb_ones(o[1]), .done(d[1]));
  par_lfsr_check #(.N(7), .TAP(3))  u7  (.clk, .start, .checks(c[2]), .failures(f[2]), .fb_ones(o[2]), .done(d[2]));
  par_lfsr_check #(.N(8))           u8  (.clk, .start, .checks(c[3]), .failures(f[3]), .fb_ones(o[3]), .done(d[3]));
  par_lfsr_check #(.N(16))          u16 (.clk, .start, .checks(c[4]), .failures(f[4]), .fb_ones(o[4]), .done(d[4]));
  par_lfsr_check #(.N(32))          u32 (.clk, .start, .checks(c[5]), .failures(f[5]), .fb_ones(o[5]), .done(d[5]));
  par_lfsr_check #(.N(64))          u64 (.clk, .start, .checks(c[6]), .failures(f[6]), .fb_ones(o[6]), .done(d[6]));

  int checks = 0;
  int failures = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin : main
    repeat (2) @(posedge clk);
    start = 1'b1;
    for (int i = 0; i < NW; i++) wait (d[i]);
    for (int i = 0; i < NW; i++) begin
      checks += c[i] + 1;
      failures += f[i];
      if (o[i] == 0) begin
        failures++;
        $display("FAIL width %0d never fed back a 1", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
