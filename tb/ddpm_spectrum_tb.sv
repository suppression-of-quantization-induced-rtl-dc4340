// ddpm_spectrum_tb: spectral envelope of all 4096 patterns of a 12-bit DDPM.
//
// A 12-bit dyadic pulse modulator is stepped through one frame of 4096
// steps for each single-bit input m = 2^i, giving the twelve basis
// signals. For 64 random m the testbench checks that the hardware pattern is
// exactly the sum of the basis signals of m's set bits (the basis signals
// never overlap) and holds m ones.
// From the basis signals it computes the DFT F_i(k), and for every harmonic k
// of the frame the envelope S(k) = max over all m of |sum b_i F_i(k)| / 4096.
// A Gray-code walk visits all 4096 m. Expected, and checked:
//  - S(2^h) = 2^h / 4096 for h = 0..11: the dominant components sit at the
//    powers of two and grow 6 dB per octave (20 dB per decade);
//  - more generally S(k) = 2^z / 4096 at every harmonic k below 2048, where
//    2^z is the largest power of two dividing k (so S = 1/4096, -72.2 dB, at
//    every odd harmonic);
//  - after a first-order low-pass with its corner at the frame frequency
//    divided by sqrt(3), the largest AC component stays at least 76 dB below
//    DC (-78 dB at the first harmonic, about -77 dB at the highest ones).
module ddpm_spectrum_tb;
  localparam int M = 12;
  localparam int L = 1 << M;

  logic clk = 0, rst_n = 0, step = 0;
  logic [M-1:0] m = '0, count;
  logic dither;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ddpm_modulator #(.M(M)) dut (.clk, .rst_n, .step, .m, .dither, .count);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit  basis [M][L];
  real cs [L], sn [L];
  real fre [M][L/2], fim [M][L/2];
  real env [L/2];

  // Record one frame of the pattern for `mm`, starting at count 0.
  task automatic frame(input int mm, output bit pat [L]);
    m = M'(mm);
    for (int s = 0; s < L; s++) begin
      @(negedge clk);
      check(count == M'(s), "counter position");
      pat[s] = dither;
      step = 1; @(negedge clk); step = 0;
    end
  endtask

  bit pat [L];
  int low, ones, mm, gray, prev_gray, bitpos;
  real re, im, mag, pi2, worst_other, worst_filt, filt, db;
  initial begin
    pi2 = 2.0 * 3.14159265358979323846;
    for (int n = 0; n < L; n++) begin
      cs[n] = $cos(pi2 * n / L);
      sn[n] = $sin(pi2 * n / L);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < M; i++) begin
      frame(1 << i, pat);
      ones = 0;
      for (int s = 0; s < L; s++) begin basis[i][s] = pat[s]; ones += pat[s]; end
      check(ones == (1 << i), $sformatf("basis signal %0d holds %0d ones", i, ones));
    end
    for (int t = 0; t < 64; t++) begin
      mm = $urandom_range(0, L - 1);
      frame(mm, pat);
      ones = 0;
      for (int s = 0; s < L; s++) begin
        automatic bit sum = 0;
        for (int i = 0; i < M; i++) if (mm[i]) sum |= basis[i][s];
        ones += pat[s];
        check(pat[s] == sum, $sformatf("m=%0d step %0d is the sum of its basis signals", mm, s));
      end
      check(ones == mm, $sformatf("m=%0d pattern holds %0d ones", mm, ones));
    end
    // DFT of the basis signals (only their ones contribute)
    for (int i = 0; i < M; i++)
      for (int k = 0; k < L / 2; k++) begin
        re = 0.0; im = 0.0;
        for (int s = 0; s < L; s++)
          if (basis[i][s]) begin
            re += cs[(s * k) % L];
            im -= sn[(s * k) % L];
          end
        fre[i][k] = re; fim[i][k] = im;
      end
    // envelope over all m, walking m in Gray-code order
    for (int k = 0; k < L / 2; k++) begin
      re = 0.0; im = 0.0; env[k] = 0.0; prev_gray = 0;
      for (int j = 1; j < L; j++) begin
        gray = j ^ (j >> 1);
        bitpos = $clog2((gray ^ prev_gray) + 1) - 1;
        if (gray[bitpos]) begin re += fre[bitpos][k]; im += fim[bitpos][k]; end
        else              begin re -= fre[bitpos][k]; im -= fim[bitpos][k]; end
        mag = $sqrt(re * re + im * im) / L;
        if (mag > env[k]) env[k] = mag;
        prev_gray = gray;
      end
    end
    check(env[0] > 0.9997 && env[0] < 0.99976, "DC envelope (4095/4096)");
    worst_other = 0.0; worst_filt = 0.0;
    for (int k = 1; k < L / 2; k++) begin
      filt = env[k] / $sqrt(1.0 + 3.0 * k * k);
      if (filt > worst_filt) worst_filt = filt;
      low = k & -k;
      check(env[k] > (low * 0.999999) / L && env[k] < (low * 1.000001) / L,
            $sformatf("S(%0d) = %g, expected %g", k, env[k], real'(low) / L));
      if (k % 2 == 1 && env[k] > worst_other) worst_other = env[k];
    end
    for (int h = 0; h < M - 1; h++) begin
      db = 20.0 * $log10(env[1 << h]);
      $display("S(2^%0d) = %7.2f dB", h, db);
    end
    $display("largest odd-harmonic component: %.2f dB", 20.0 * $log10(worst_other));
    $display("largest filtered AC component: %.2f dB (-6(M+1) = %0d dB)",
             20.0 * $log10(worst_filt), -6 * (M + 1));
        check(20.0 * $log10(worst_filt) < -76.0, "filtered AC at least 76 dB below DC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
