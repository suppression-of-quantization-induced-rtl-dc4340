// dither_n4_sweep_tb: 4-bit DPWM with 5 bits of dithering, thermometric
// against DDPWM, over every 9-bit duty word.
//
// Two 9-bit modulators (N = 4, M = 5) run side by side, one in thermometric
// mode and one in DDPWM mode, each driving its own behavioural buck (10 V in,
// no load, 16 clocks of 625 ns per 100 kHz switching period). Both receive
// the same word u = 0..511. For each u, after 800 periods of settling, the
// testbench records:
//  - one 512-clock frame of each PWM waveform, and from it the magnitude of
//    the frame harmonics j = 1..31 (frequencies f_s*j/32, all below the
//    switching frequency), normalized to the frame length. The envelope of
//    each harmonic over all u is kept;
//  - the peak-to-peak of the per-period mean output voltage over two frames
//    (the low-frequency ripple) and the mean output.
// Expected values, worked out from the two dithering rules:
//  - DDPWM: the "+1" clock of each period forms a 5-bit dyadic pattern, so
//    its envelope at harmonic j is exactly 2^z / 512, where 2^z is the largest
//    power of two dividing j: -54.2 dB at j = 1;
//  - thermometric: the first harmonic peaks at m = 16 with
//    1 / (512 sin(pi/32)), -34.0 dB, so DDPWM is 20.2 dB lower there;
//  - mean output u/512 * 10 V within 5 mV in both modes;
//  - worst-case thermometric ripple at least 3 times the worst-case DDPWM
//    ripple, and words with m = 0 free of dithering ripple in both modes.
module dither_n4_sweep_tb;
  import ddpwm_pkg::*;
  localparam int N = 4, M = 5;
  localparam int P = 1 << N;            // clocks per switching period
  localparam int F = 1 << M;            // periods per dithering frame
  localparam int W = P * F;             // clocks per frame
  localparam int SETTLE = 800;
  localparam int WATCHDOG = 16_000_000;

  logic clk = 0, rst_n = 0;
  logic [N+M-1:0] u = '0;
  logic [N+M-1:0] u_q [2];
  logic [N:0] duty [2];
  logic pwm [2], tick [2];
  logic [11:0] vo_code [2], vin_code [2];
  real vo [2];
  real vin_v = 10.0, i_load = 0.0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_path
    ddpwm_modulator #(.N(N), .M(M)) u_mod (
      .clk, .rst_n, .u_in(u), .mode(g == 0 ? MODE_THERM : MODE_DDPM), .k_bits(3'(M)),
      .pwm(pwm[g]), .period_tick(tick[g]), .u_q(u_q[g]), .duty(duty[g]));
    buck_model #(.SUB(4), .TCLK(625e-9)) u_buck (
      .clk, .c_hs(pwm[g]), .c_ls(!pwm[g]), .vin(vin_v), .i_load,
      .vo(vo[g]), .vo_code(vo_code[g]), .vin_code(vin_code[g]));
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real cs [W], sn [W];
  real env [2][F];
  bit  wave [2][W];
  real psum [2], mn [2], mx [2], tot [2], worst [2], rip0 [2];
  real re, im, mag, expect_v, lsb_ratio, th1;
  int  low, worst_u [2];

  initial begin
    for (int t = 0; t < W; t++) begin
      cs[t] = $cos(2.0 * 3.14159265358979323846 * t / W);
      sn[t] = $sin(2.0 * 3.14159265358979323846 * t / W);
    end
    for (int g = 0; g < 2; g++) begin
      worst[g] = 0.0; rip0[g] = 0.0; worst_u[g] = 0;
      for (int j = 0; j < F; j++) env[g][j] = 0.0;
    end
    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int uu = 0; uu < (1 << (N + M)); uu++) begin
      u = (N+M)'(uu);
      repeat (SETTLE * P) @(negedge clk);
      // align to the start of a switching period
      while (!tick[0]) @(negedge clk);
      for (int g = 0; g < 2; g++) begin
        mn[g] = 1.0e9; mx[g] = -1.0e9; tot[g] = 0.0;
      end
      for (int per = 0; per < 2 * F; per++) begin
        psum[0] = 0.0; psum[1] = 0.0;
        for (int c = 0; c < P; c++) begin
          @(negedge clk);
          for (int g = 0; g < 2; g++) begin
            if (per < F) wave[g][per * P + c] = pwm[g];
            psum[g] += vo[g];
          end
        end
        for (int g = 0; g < 2; g++) begin
          psum[g] /= P;
          tot[g] += psum[g];
          if (psum[g] < mn[g]) mn[g] = psum[g];
          if (psum[g] > mx[g]) mx[g] = psum[g];
        end
      end
      expect_v = real'(uu) / 512.0 * vin_v;
      for (int g = 0; g < 2; g++) begin
        tot[g] /= 2 * F;
        check(tot[g] - expect_v < 0.005 && expect_v - tot[g] < 0.005,
              $sformatf("u=%0d path %0d: mean %.4f V, expected %.4f V", uu, g, tot[g], expect_v));
        if (mx[g] - mn[g] > worst[g]) begin worst[g] = mx[g] - mn[g]; worst_u[g] = uu; end
        if (uu % F == 0 && mx[g] - mn[g] > rip0[g]) rip0[g] = mx[g] - mn[g];
        for (int j = 1; j < F; j++) begin
          re = 0.0; im = 0.0;
          for (int t = 0; t < W; t++)
            if (wave[g][t]) begin
              re += cs[(t * j) % W];
              im -= sn[(t * j) % W];
            end
          mag = $sqrt(re * re + im * im) / W;
          if (mag > env[g][j]) env[g][j] = mag;
        end
      end
    end
    $display("   j   thermometric (dB)   DDPWM (dB)");
    for (int j = 1; j < F; j++)
      $display("  %2d   %8.2f            %8.2f", j,
               20.0 * $log10(env[0][j]), 20.0 * $log10(env[1][j]));
    for (int j = 1; j < F; j++) begin
      low = j & -j;
      check(env[1][j] > low * 0.999999 / W && env[1][j] < low * 1.000001 / W,
            $sformatf("DDPWM envelope at j=%0d: %g, expected %g", j, env[1][j], real'(low) / W));
    end
    th1 = 1.0 / (W * $sin(3.14159265358979323846 / F));
    check(env[0][1] > th1 * 0.999999 && env[0][1] < th1 * 1.000001,
          $sformatf("thermometric envelope at j=1: %g, expected %g", env[0][1], th1));
    lsb_ratio = 20.0 * $log10(env[0][1] / env[1][1]);
    $display("lowest harmonic: DDPWM %.1f dB below thermometric dithering", lsb_ratio);
    check(lsb_ratio > 15.5, "DDPWM lowest harmonic at least 15.5 dB below thermometric");
    $display("worst-case ripple: thermometric %.3f mV (u=%0d), DDPWM %.3f mV (u=%0d), ratio %.1f",
             worst[0] * 1e3, worst_u[0], worst[1] * 1e3, worst_u[1], worst[0] / worst[1]);
    $display("normalized to the input voltage: %.2e and %.2e", worst[0] / vin_v, worst[1] / vin_v);
    check(worst[0] > 3.0 * worst[1], "DDPWM ripple at least 3x below thermometric dithering");
    check(rip0[0] < 0.1 * worst[0] && rip0[1] < 0.1 * worst[0],
          $sformatf("no dithering ripple at m = 0 (%.3f / %.3f mV)", rip0[0] * 1e3, rip0[1] * 1e3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
