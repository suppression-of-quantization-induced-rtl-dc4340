// adc_interface_tb: self-checking test of the ADC interface.
//
// A behavioural two-channel ADC answers the interface's requests. For random
// analog codes and every emulated resolution 1..12 bits it checks the
// request order (output voltage first, then input voltage), the masked
// sample v_s (low 12 - N_ADC bits cleared), the raw samples, the one-cycle
// valid pulses, and that a tick during a running sequence raises `overrun`.
module adc_interface_tb;
  localparam int unsigned ADC_W = 12;

  logic clk = 0, rst_n = 0, sample_tick = 0;
  logic [3:0] n_adc = 4'd12;
  logic adc_start, adc_ch, adc_done;
  logic [11:0] adc_data, ain0 = '0, ain1 = '0;
  logic [11:0] vs, vo_raw, vin, bin_mask;
  logic vs_valid, vin_valid, overrun;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc_interface #(.ADC_W(ADC_W)) dut (
    .clk, .rst_n, .sample_tick, .n_adc, .adc_start, .adc_ch, .adc_done, .adc_data,
    .vs, .vs_valid, .vo_raw, .vin, .vin_valid, .overrun, .bin_mask);

  adc_model #(.LATENCY(5)) u_adc (
    .clk, .start(adc_start), .ch(adc_ch), .ain0, .ain1, .done(adc_done), .data(adc_data));

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

  int starts, vsv, vinv, ovr;
  logic [11:0] a0, a1, mask;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      n_adc = 4'($urandom_range(1, 12));
      a0 = 12'($urandom); a1 = 12'($urandom);
      ain0 = a0; ain1 = a1;
      mask = 12'hFFF << (12 - n_adc);
      #1 check(bin_mask == mask, "bin mask");
      sample_tick = 1;
      @(negedge clk);
      sample_tick = 0;
      starts = 0; vsv = 0; vinv = 0; ovr = 0;
      for (int c = 0; c < 28; c++) begin
        if (adc_start) begin
          check(adc_ch == (starts == 1), "output voltage converted before input voltage");
          starts++;
        end
        if (vs_valid) begin
          vsv++;
          check(vs == (a0 & mask), $sformatf("vs=%h expected %h (N_ADC=%0d)", vs, a0 & mask, n_adc));
          check(vo_raw == a0, "raw output sample");
        end
        if (vin_valid) begin
          vinv++;
          check(vin == a1, "input-voltage sample");
          check(vsv == 1, "v_s delivered before v_in");
        end
        ovr += overrun;
        // one extra tick in the middle of some sequences: it must be flagged
        sample_tick = (t % 7 == 3) && (c == 4);
        @(negedge clk);
      end
      sample_tick = 0;
      check(starts == 2 && vsv == 1 && vinv == 1, "two conversions, one pulse each");
      check(ovr == ((t % 7 == 3) ? 1 : 0), "overrun flagged only for a tick during a sequence");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
