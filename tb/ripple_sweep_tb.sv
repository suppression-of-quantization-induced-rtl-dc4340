// ripple_sweep_tb: open-loop dithering ripple, DDPWM against thermometric
// dithering.
//
// With the loop open, the modulator input holds n = 16 in its 5 MSBs (50 %
// duty for m = 0) and sweeps the 5 dither bits m from 0 to 31 (k = 5), once
// with thermometric dithering and once with the DDPWM, driving the
// behavioural buck at no load. For each m, after 600 periods of settling,
// the peak-to-peak of the per-period mean output voltage over two 32-period
// frames (the low-frequency ripple, without the switching ripple) and the
// mean output are measured.
// Checks: both modes give the same mean output, (16*32 + m)/1024 * 10 V
// within 5 mV; the worst-case thermometric ripple is at least 3 times the
// worst-case DDPWM ripple; m = 0 gives no dithering ripple (below 2 mV) in either mode.
module ripple_sweep_tb;
  localparam int WATCHDOG = 6_000_000;
  import ddpwm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [15:0] bus_addr = '0;
  logic bus_write = 0, bus_read = 0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic bus_rdvalid;
  logic adc_start, adc_ch, adc_done;
  logic [11:0] adc_data, vo_code, vin_code;
  logic c_hs, c_ls;
  real vo, vin_v = 10.0, i_load = 0.0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ddpwm_controller_top dut (
    .clk, .rst_n, .bus_addr, .bus_write, .bus_wdata, .bus_read, .bus_rdata, .bus_rdvalid,
    .adc_start, .adc_ch, .adc_done, .adc_data, .c_hs, .c_ls);

  buck_model #(.SUB(4)) u_buck (
    .clk, .c_hs, .c_ls, .vin(vin_v), .i_load, .vo, .vo_code, .vin_code);

  adc_model #(.LATENCY(6)) u_adc (
    .clk, .start(adc_start), .ch(adc_ch), .ain0(vo_code), .ain1(vin_code),
    .done(adc_done), .data(adc_data));

  localparam int P = 32;

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

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    bus_addr = 16'(a); bus_wdata = d; bus_write = 1;
    @(negedge clk);
    bus_write = 0;
  endtask

  // Observe `periods` periods: bins of the output samples at N_ADC bits,
  // p-p of the per-period mean output voltage, and its mean.
  task automatic observe(input int periods, input int nadc,
                         output int nbins, output real pp, output real mean);
    int lo, hi, b;
    real s, mn, mx, tot;
    lo = 1 << 12; hi = -1; mn = 1.0e9; mx = -1.0e9; tot = 0.0;
    for (int j = 0; j < periods; j++) begin
      s = 0.0;
      for (int c = 0; c < P; c++) begin
        @(negedge clk);
        s += vo;
        if (adc_done && !adc_ch) begin
          b = int'(adc_data) >> (12 - nadc);
          if (b < lo) lo = b;
          if (b > hi) hi = b;
        end
      end
      s = s / P;
      tot += s;
      if (s < mn) mn = s;
      if (s > mx) mx = s;
    end
    nbins = hi - lo + 1;
    pp    = mx - mn;
    mean  = tot / periods;
  endtask

  localparam int M = 6;
  int nb;
  real pp, mean, expect_v, worst[2], rip0[2];
  initial begin
    worst[0] = 0.0; worst[1] = 0.0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    wr(REG_MBITS, 32'd5);
    wr(REG_OLDUTY, 32'(16 << M));
    repeat (3000 * P) @(negedge clk);          // start-up transient
    $display("   m   thermometric ripple (mV)   DDPWM ripple (mV)");
    for (int m5 = 0; m5 < 32; m5++) begin
      real r[2];
      expect_v = (16.0 * 32.0 + m5) / 1024.0 * 10.0;
      for (int md = 0; md < 2; md++) begin
        wr(REG_CTRL, {28'd0, 1'b0, 1'b0, (md == 0) ? MODE_THERM : MODE_DDPM});
        wr(REG_OLDUTY, 32'((16 << M) | (m5 << 1)));
        repeat (600 * P) @(negedge clk);
        observe(64, 12, nb, pp, mean);
        r[md] = pp;
        if (pp > worst[md]) worst[md] = pp;
        if (m5 == 0) rip0[md] = pp;
        check(mean - expect_v < 0.005 && expect_v - mean < 0.005,
              $sformatf("m=%0d mode %0d: mean %.4f V, expected %.4f V", m5, md, mean, expect_v));
      end
      $display("  %2d   %8.2f                   %8.2f", m5, r[0] * 1e3, r[1] * 1e3);
    end
    $display("worst-case ripple: thermometric %.2f mV, DDPWM %.2f mV (ratio %.1f)",
             worst[0] * 1e3, worst[1] * 1e3, worst[0] / worst[1]);
    check(worst[0] > 3.0 * worst[1], "DDPWM ripple at least 3x below thermometric dithering");
    check(rip0[0] < 0.002 && rip0[1] < 0.002, "no dithering ripple at m = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
