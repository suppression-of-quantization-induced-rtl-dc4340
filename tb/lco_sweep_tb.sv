// lco_sweep_tb: limit-cycle sweep of the closed loop over the dither width.
//
// The controller at its default parameters (N = 5) regulates the
// behavioural buck to 5.12 V with the DDPWM for every k = 0..6 active dither
// bits (k = 0 is plain DPWM), emulated ADC resolutions N_ADC = 4, 6 and 8,
// and two loads: open circuit and 1 A. For each point the loop is restarted
// (integrator cleared), left to settle for 3000 switching periods, and then
// observed for 1024 periods: the number of distinct N_ADC-bit bins the
// output samples fall in (more than one: limit cycle) and the peak-to-peak
// of the per-period mean output voltage are reported as a table.
// Checks: the loop settles into one bin whenever the duty LSB is at least
// two times finer than the ADC bin (N + k >= N_ADC + 1 and k >= 1 for
// N_ADC > N; every k for N_ADC = 4), and it limit-cycles with plain DPWM
// when N_ADC = 6 or 8, i.e. when the duty LSB is coarser than the bin.
module lco_sweep_tb;
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
    repeat (12_000_000) @(posedge clk);
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

  int nadc_list[3] = '{4, 6, 8};
  int nb, n_lco, n_free;
  real pp, mean;
  initial begin
    n_lco = 0; n_free = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int ld = 0; ld < 2; ld++) begin
      i_load = (ld == 0) ? 0.0 : 1.0;
      $display("load %.1f A: N_ADC  k  bins  p-p(mV)  mean(V)", i_load);
      foreach (nadc_list[ni]) begin
        for (int k = 0; k <= 6; k++) begin
          wr(REG_NADC, 32'(nadc_list[ni]));
          wr(REG_MBITS, 32'(k));
          wr(REG_CTRL, {28'd0, 1'b1, 1'b1, MODE_DDPM});   // clear, close loop
          repeat (3000 * P) @(negedge clk);
          observe(1024, nadc_list[ni], nb, pp, mean);
          $display("              %0d    %0d  %0d     %7.2f  %.4f", nadc_list[ni], k, nb, pp * 1e3, mean);
          if (nb > 1) n_lco++; else n_free++;
          if (nadc_list[ni] == 4 || (k >= 1 && 5 + k >= nadc_list[ni] + 1))
            check(nb == 1, $sformatf("load %.1f A, N_ADC %0d, k %0d: expected no limit cycle (%0d bins)",
                                     i_load, nadc_list[ni], k, nb));
          if (nadc_list[ni] > 5 && k == 0)
            check(nb > 1, $sformatf("load %.1f A, N_ADC %0d, plain DPWM: expected a limit cycle",
                                    i_load, nadc_list[ni]));
        end
      end
    end
    $display("points with a limit cycle: %0d, without: %0d", n_lco, n_free);
    check(n_lco > 0 && n_free > 0, "both regimes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
