// dpwm_tb: self-checking test of the N-bit counter-comparator DPWM.
//
// For duty values 0..2^N (random order) it checks that each switching period
// lasts 2^N clocks, that the output is high for exactly `duty` clocks at the
// start of the period, and that the terminal count pulses once per period.
// A duty applied while `tc` is high must govern the next period.
module dpwm_tb;
  localparam int unsigned N = 5;
  localparam int unsigned P = 1 << N;

  logic clk = 0, rst_n = 0;
  logic [N:0] duty_in = '0;
  logic pwm, tc;
  logic [N-1:0] count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dpwm #(.N(N)) dut (.clk, .rst_n, .duty_in, .pwm, .tc, .count);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int high, tcs, d;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // wait for the end of the first period
    do @(negedge clk); while (!tc);
    for (int r = 0; r < 4 * (P + 1); r++) begin
      d = (r < P + 1) ? r : $urandom_range(0, P);
      duty_in = (N+1)'(d);        // set while tc is high: takes effect next period
      high = 0; tcs = 0;
      for (int c = 0; c < P; c++) begin
        @(negedge clk);
        check(pwm == (c < d), $sformatf("duty %0d clock %0d pwm=%0b", d, c, pwm));
        high += pwm;
        tcs  += tc;
        duty_in = (N+1)'($urandom_range(0, P)); // must be ignored away from tc
      end
      check(high == d, $sformatf("duty %0d: on for %0d clocks", d, high));
      check(tcs == 1 && tc, $sformatf("duty %0d: one terminal count at the period end", d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
