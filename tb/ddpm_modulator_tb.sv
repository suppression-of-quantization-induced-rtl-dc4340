// ddpm_modulator_tb: self-checking test of the M-bit dyadic pulse modulator.
//
// For every M-bit input m it runs whole frames of 2^M steps (steps arrive
// with random gaps) and checks, step by step, the output against the dyadic
// basis signals: bit i of m contributes a one at the counter values c with
// c mod 2^(M-i) == 2^(M-i-1). It also checks that each frame holds exactly m
// ones and that the counter advances only on `step`. A second instance with
// M = 4 checks the frame of the document's worked example (m = 5).
module ddpm_modulator_tb;
  localparam int unsigned M = 6;

  logic clk = 0, rst_n = 0, step = 0;
  logic [M-1:0] m = '0, count;
  logic dither;
  int checks = 0, failures = 0;

  logic [3:0] m4 = 4'd5, count4;
  logic dither4;

  always #5 clk = ~clk;

  ddpm_modulator #(.M(M)) dut (.clk, .rst_n, .step, .m, .dither, .count);
  ddpm_modulator #(.M(4)) dut4 (.clk, .rst_n, .step, .m(m4), .dither(dither4), .count(count4));

  function automatic bit expected(int unsigned mm, int unsigned c, int unsigned w);
    bit r = 0;
    for (int i = 0; i < w; i++)
      if (mm[i] && (c % (1 << (w - i)) == (1 << (w - i - 1)))) r = 1;
    return r;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000 * 20) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ones;
  int ones4;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(count == 0, "counter resets to zero");
    for (int mm = 0; mm < (1 << M); mm++) begin
      m <= M'(mm);
      ones = 0;
      for (int s = 0; s < (1 << M); s++) begin
        @(negedge clk);
        check(dither == expected(mm, count, M),
              $sformatf("m=%0d count=%0d dither=%0b", mm, count, dither));
        ones += dither;
        // random idle cycles: the counter must hold
        repeat ($urandom_range(0, 2)) begin
          @(posedge clk);
          #1 check(count == M'(s), "counter holds without step");
        end
        step <= 1;
        @(posedge clk);
        step <= 0;
        #1;
      end
      check(ones == mm, $sformatf("frame of m=%0d holds %0d ones", mm, ones));
    end
    // M = 4, m = 5: ones exactly where the 2^2 and 2^0 basis signals fire.
    ones4 = 0;
    while (count4 != 0) begin
      step <= 1; @(posedge clk); step <= 0; #1;
    end
    for (int s = 0; s < 16; s++) begin
      @(negedge clk);
      check(dither4 == ((s % 4 == 2) || (s == 8)), $sformatf("M=4 m=5 step %0d", s));
      ones4 += dither4;
      step <= 1; @(posedge clk); step <= 0; #1;
    end
    check(ones4 == 5, "M=4 m=5 frame holds 5 ones");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
