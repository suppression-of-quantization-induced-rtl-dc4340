// ddpwm_controller_top_tb: end-to-end test of the DDPWM buck controller.
//
// The controller, at its default parameters (N = 5, M = 6, 1024-sample
// monitor memories), drives a behavioural synchronous buck (10 V in, LC
// output filter) through its two gate outputs and reads the output voltage
// through a behavioural 12-bit ADC with 10 V full scale. All settings go
// through the processor bus, and the closed-loop results are read back from
// the monitor memories over the same bus.
//
// 1. Open loop, word n = 16 with the 5 LSBs m swept: in every mode the
//    high-side on-time summed over a 32-period frame must be n*32 + m (the
//    plain DPWM: n*32), and the gates must be complementary. The
//    low-frequency ripple (peak-to-peak of the per-period mean output
//    voltage) is measured for thermometric dithering and for the DDPWM; the
//    worst case of the dithering must exceed that of the DDPWM at least 2x.
// 2. Closed loop, N_ADC = 8, DDPWM with k = 4 (9-bit duty): after settling,
//    a 1024-period capture of the ADC samples must lie in a single N_ADC bin
//    (no limit cycle), and the captured duty must follow the captured
//    modulator input, n or n+1 every period.
// 3. Closed loop, N_ADC = 8, k = 0 (plain 5-bit DPWM): the captured samples
//    must span at least two bins (limit cycle).
// 4. Closed loop, N_ADC = 4, k = 0: no limit cycle, but a DC error of more
//    than 100 mV (coarse regulation).
// 5. Closed loop, thermometric dithering with k = 4: the mean output must be
//    within one N_ADC = 8 bin of the target.
// Every mechanism exercised (each dithering mode, "+1" periods, loop closing,
// integrator clear, N_ADC change, capture, limit cycle present and absent)
// is counted, and one that never happened is a failure.
module ddpwm_controller_top_tb;
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

  localparam int P = 32;    // clocks per switching period
  localparam int M = 6;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // complementary gates, every clock
  int gate_errs = 0;
  logic rst_q = 0;
  always @(posedge clk) rst_q <= rst_n;
  always @(negedge clk) if (rst_q && (c_hs == c_ls)) gate_errs++;

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    bus_addr = 16'(a); bus_wdata = d; bus_write = 1;
    @(negedge clk);
    bus_write = 0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    bus_addr = a; bus_read = 1;
    @(negedge clk);
    bus_read = 0;
    d = bus_rdata;
  endtask

  // Run `periods` switching periods; return high-side on-clocks and the
  // peak-to-peak of the per-period mean output voltage, and its mean.
  task automatic run(input int periods, output int on, output real ripple, output real mean);
    real s, mn, mx, tot;
    on = 0; mn = 1.0e9; mx = -1.0e9; tot = 0.0;
    for (int j = 0; j < periods; j++) begin
      s = 0.0;
      for (int c = 0; c < P; c++) begin
        @(negedge clk);
        on += c_hs;
        s  += vo;
      end
      s = s / P;
      tot += s;
      if (s < mn) mn = s;
      if (s > mx) mx = s;
    end
    ripple = mx - mn;
    mean   = tot / periods;
  endtask

  // mechanism counters
  int n_mode_ddpm = 0, n_mode_therm = 0, n_mode_direct = 0, n_plus1 = 0;
  int n_loop_closed = 0, n_clear = 0, n_nadc = 0, n_capture = 0, n_lco = 0, n_no_lco = 0;

  task automatic set_ctrl(input dither_mode_e md, input bit closed, input bit clr);
    wr(REG_CTRL, {28'd0, clr, closed, md});
    case (md)
      MODE_DDPM:  n_mode_ddpm++;
      MODE_THERM: n_mode_therm++;
      default:    n_mode_direct++;
    endcase
    if (closed) n_loop_closed++;
    if (clr) n_clear++;
  endtask

  // Arm a capture, wait for it and read `mem` (1..6) back into `buf`.
  logic [31:0] cap0 [1024], cap4 [1024], cap5 [1024];
  task automatic capture();
    logic [31:0] d;
    wr(REG_DECIM, 32'd0);
    wr(REG_CAPTURE, 32'd1);
    do begin
      repeat (P * 64) @(negedge clk);
      rd(16'(REG_CAPTURE), d);
    end while (!d[0]);
    n_capture++;
    for (int a = 0; a < 1024; a++) begin
      rd(16'h1000 | 16'(a), cap0[a]);
      rd(16'h5000 | 16'(a), cap4[a]);
      rd(16'h6000 | 16'(a), cap5[a]);
    end
  endtask

  // Number of distinct N_ADC bins among the captured output samples, and
  // their mean in volts.
  function automatic int count_bins(int nadc, output real mean_v);
    int lo = 4096, hi = -1, b;
    real tot = 0.0;
    for (int a = 0; a < 1024; a++) begin
      b = int'(cap0[a]) >> (12 - nadc);
      if (b < lo) lo = b;
      if (b > hi) hi = b;
      tot += real'(cap0[a]);
    end
    mean_v = tot / 1024.0 / 4096.0 * 10.0;
    return hi - lo + 1;
  endfunction

  int on, nb, d_ok;
  real rip, mean, mean_v, worst_th, worst_dd, bin_lo, bin_hi;
  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;

    // ---- 1. open loop, n = 16, k = 5: on-time and low-frequency ripple ----
    wr(REG_MBITS, 32'd5);
    worst_th = 0.0; worst_dd = 0.0;
    for (int md = 0; md < 3; md++) begin
      for (int mi = 0; mi < 4; mi++) begin
        automatic int m5 = (md == 0) ? 16 : 4 + 6 * mi;  // m = 4, 10, 16, 22
        if (md == 0 && mi > 0) break;
        set_ctrl(dither_mode_e'(md), 1'b0, 1'b0);
        wr(REG_OLDUTY, 32'((16 << M) | (m5 << 1)));
        run(600, on, rip, mean);                 // settle
        run(64, on, rip, mean);
        if (md == 0) check(on == 2 * 16 * 32, $sformatf("plain DPWM on-time %0d", on));
        else check(on == 2 * (16 * 32 + m5), $sformatf("mode %0d m=%0d on-time %0d", md, m5, on));
        $display("open loop mode %0d m=%0d: mean %.4f V, low-frequency ripple %.2f mV",
                 md, m5, mean, rip * 1000.0);
        if (md == 1 && rip > worst_dd) worst_dd = rip;
        if (md == 2 && rip > worst_th) worst_th = rip;
      end
    end
    check(worst_th > 2.0 * worst_dd,
          $sformatf("dithering ripple %.2f mV vs DDPWM %.2f mV", worst_th * 1e3, worst_dd * 1e3));

    // ---- 2. closed loop, N_ADC = 8, DDPWM k = 4 ----
    wr(REG_NADC, 32'd8); n_nadc++;
    wr(REG_MBITS, 32'd4);
    set_ctrl(MODE_DDPM, 1'b1, 1'b1);
    run(3000, on, rip, mean);
    capture();
    nb = count_bins(8, mean_v);
    $display("closed loop DDPWM k=4, N_ADC=8: %0d bin(s), mean %.4f V, ripple %.2f mV",
             nb, mean_v, rip * 1e3);
    check(nb == 1, "DDPWM k=4 with N_ADC=8 is free of limit cycles");
    if (nb == 1) n_no_lco++;
    bin_lo = 2096.0 / 4096.0 * 10.0; bin_hi = 2112.0 / 4096.0 * 10.0;
    check(mean_v >= bin_lo - 0.003 && mean_v < bin_hi, "output in the zero-error bin");
    d_ok = 0;
    for (int a = 1; a < 1024; a++) begin
      // both are sampled at the end of a period: the modulator input held
      // during it and the duty it yields for the next period
      automatic int n = int'(cap4[a]) >> M;
      if (cap5[a] == n || cap5[a] == n + 1) d_ok++;
      if (cap5[a] == n + 1) n_plus1++;
    end
    check(d_ok == 1023, $sformatf("captured duty follows n or n+1 (%0d of 1023)", d_ok));

    // ---- 3. closed loop, N_ADC = 8, plain 5-bit DPWM ----
    wr(REG_MBITS, 32'd0);
    set_ctrl(MODE_DDPM, 1'b1, 1'b0);
    run(3000, on, rip, mean);
    capture();
    nb = count_bins(8, mean_v);
    $display("closed loop plain DPWM, N_ADC=8: %0d bin(s), mean %.4f V", nb, mean_v);
    check(nb >= 2, "plain 5-bit DPWM with N_ADC=8 limit-cycles");
    if (nb >= 2) n_lco++;

    // ---- 4. closed loop, N_ADC = 4, plain DPWM: no LCO, coarse DC ----
    wr(REG_NADC, 32'd4); n_nadc++;
    set_ctrl(MODE_DIRECT, 1'b1, 1'b1);
    run(3000, on, rip, mean);
    capture();
    nb = count_bins(4, mean_v);
    $display("closed loop plain DPWM, N_ADC=4: %0d bin(s), mean %.4f V", nb, mean_v);
    check(nb == 1, "plain DPWM with N_ADC=4 is free of limit cycles");
    if (nb == 1) n_no_lco++;
    check(mean_v - 5.12 > 0.1 || 5.12 - mean_v > 0.1, "N_ADC=4 regulation is coarse");

    // ---- 5. closed loop, thermometric dithering k = 4, N_ADC = 8 ----
    wr(REG_NADC, 32'd8); n_nadc++;
    wr(REG_MBITS, 32'd4);
    set_ctrl(MODE_THERM, 1'b1, 1'b1);
    run(3000, on, rip, mean);
    capture();
    nb = count_bins(8, mean_v);
    $display("closed loop thermometric k=4, N_ADC=8: %0d bin(s), mean %.4f V", nb, mean_v);
    check(mean_v > bin_lo - 0.04 && mean_v < bin_hi + 0.04, "thermometric loop regulates near the target");

    check(gate_errs == 0, $sformatf("gates complementary (%0d errors)", gate_errs));
    $display("mechanisms: ddpm=%0d therm=%0d direct=%0d plus1=%0d closed=%0d clear=%0d nadc=%0d capture=%0d lco=%0d no_lco=%0d",
             n_mode_ddpm, n_mode_therm, n_mode_direct, n_plus1, n_loop_closed, n_clear,
             n_nadc, n_capture, n_lco, n_no_lco);
    check(n_mode_ddpm > 0 && n_mode_therm > 0 && n_mode_direct > 0, "every dithering mode used");
    check(n_plus1 > 0, "DDPWM +1 periods seen");
    check(n_loop_closed > 0 && n_clear > 0, "loop closed and integrator cleared");
    check(n_nadc > 0 && n_capture > 0, "N_ADC changed and memories captured");
    check(n_lco > 0 && n_no_lco > 0, "limit cycle both present and suppressed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
