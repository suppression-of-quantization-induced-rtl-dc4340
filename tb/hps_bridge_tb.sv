// hps_bridge_tb: self-checking test of the processor register interface.
//
// Checks the reset values (DDPM mode, k = 4, N_ADC = 8, loop open, the
// reference for 5.12 V of 10 V and the parameter-table gains scaled to LSB
// units, computed here independently), write/read-back of every register,
// the clamping of k and N_ADC, the one-cycle clear and arm pulses, the
// read-only registers, the one-clock read latency and the selection of the
// six monitor memories by address region.
module hps_bridge_tb;
  import ddpwm_pkg::*;
  localparam int unsigned N = 5, M = 6, G_W = 24, G_FRAC = 16, DEC_W = 16, MEM_DEPTH = 1024;

  logic clk = 0, rst_n = 0;
  logic [15:0] bus_addr = '0;
  logic bus_write = 0, bus_read = 0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic bus_rdvalid;
  dither_mode_e mode;
  logic loop_closed, pid_clear, cap_arm;
  logic [2:0] k_bits;
  logic [3:0] n_adc;
  logic [11:0] vref;
  logic signed [G_W-1:0] kp, ki, kd;
  logic [N+M-1:0] ol_duty;
  logic [DEC_W-1:0] decim;
  logic cap_done = 0, adc_overrun = 0;
  logic [11:0] vin = 12'd1234;
  logic [N+M-1:0] u_live = 11'd777;
  logic [9:0] mem_rd_addr;
  logic [N_MEM-1:0][31:0] mem_rd_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hps_bridge #(.N(N), .M(M), .G_W(G_W), .G_FRAC(G_FRAC), .DEC_W(DEC_W), .MEM_DEPTH(MEM_DEPTH)) dut (
    .clk, .rst_n, .bus_addr, .bus_write, .bus_wdata, .bus_read, .bus_rdata, .bus_rdvalid,
    .mode, .loop_closed, .pid_clear, .k_bits, .n_adc, .vref, .kp, .ki, .kd, .ol_duty,
    .cap_arm, .decim, .cap_done, .adc_overrun, .vin, .u_live, .mem_rd_addr, .mem_rd_data);

  // memories: registered read of a known pattern
  always_ff @(posedge clk)
    for (int g = 0; g < N_MEM; g++) mem_rd_data[g] <= 32'(g) * 32'h0100_0000 + 32'(mem_rd_addr);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    bus_addr = a; bus_wdata = d; bus_write = 1;
    @(negedge clk);
    bus_write = 0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    bus_addr = a; bus_read = 1;
    @(negedge clk);
    bus_read = 0;
    check(bus_rdvalid, "read data valid one clock after the request");
    d = bus_rdata;
    @(negedge clk);
    check(!bus_rdvalid, "read valid is a single pulse");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] d;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(mode == MODE_DDPM && k_bits == 4 && n_adc == 8 && !loop_closed, "reset settings");
    check(vref == 12'd2097, "reset reference 5.12 V / 10 V * 4096");
    check(kp == 87756 && ki == 1337 && kd == 213054, $sformatf("reset gains %0d %0d %0d", kp, ki, kd));
    check(ol_duty == 0, "open-loop duty starts at zero");
    // registers
    wr(16'(REG_VREF), 32'd3000);   rd(16'(REG_VREF), d);   check(d == 3000 && vref == 3000, "vref");
    wr(16'(REG_KP), 32'hFFFF_F000); rd(16'(REG_KP), d);    check(kp == -4096 && d == 32'hFFFF_F000, "negative kp");
    wr(16'(REG_KI), 32'd55);       rd(16'(REG_KI), d);     check(ki == 55 && d == 55, "ki");
    wr(16'(REG_KD), 32'd99);       rd(16'(REG_KD), d);     check(kd == 99 && d == 99, "kd");
    wr(16'(REG_OLDUTY), 32'd1500); rd(16'(REG_OLDUTY), d); check(ol_duty == 1500 && d == 1500, "open-loop duty");
    wr(16'(REG_DECIM), 32'd9);     rd(16'(REG_DECIM), d);  check(decim == 9 && d == 9, "decimation");
    wr(16'(REG_MBITS), 32'd9);     check(k_bits == M, "k clamped to M");
    wr(16'(REG_MBITS), 32'd2);     rd(16'(REG_MBITS), d);  check(k_bits == 2 && d == 2, "k");
    wr(16'(REG_NADC), 32'd0);      check(n_adc == 1, "N_ADC clamped to 1");
    wr(16'(REG_NADC), 32'd40);     check(n_adc == 12, "N_ADC clamped to 12");
    wr(16'(REG_NADC), 32'd6);      rd(16'(REG_NADC), d);   check(n_adc == 6 && d == 6, "N_ADC");
    // control: mode, loop, clear pulse
    bus_addr = 16'(REG_CTRL); bus_wdata = 32'b1110; bus_write = 1;
    @(negedge clk); bus_write = 0;
    check(pid_clear && loop_closed && mode == MODE_THERM, "control write");
    @(negedge clk);
    check(!pid_clear, "clear is one clock long");
    rd(16'(REG_CTRL), d); check(d == 32'b110, "control read-back");
    // capture arm pulse and done status
    bus_addr = 16'(REG_CAPTURE); bus_wdata = 32'd1; bus_write = 1;
    @(negedge clk); bus_write = 0;
    check(cap_arm, "arm pulse");
    @(negedge clk);
    check(!cap_arm, "arm is one clock long");
    rd(16'(REG_CAPTURE), d); check(d == 0, "capture not done");
    cap_done = 1;
    rd(16'(REG_CAPTURE), d); check(d == 1, "capture done");
    adc_overrun = 1; @(negedge clk); adc_overrun = 0;
    rd(16'(REG_CAPTURE), d); check(d == 3, "sticky ADC overrun flag");
    wr(16'(REG_CAPTURE), 32'd2);
    rd(16'(REG_CAPTURE), d); check(d == 1, "overrun flag cleared");
    rd(16'(REG_VIN), d);    check(d == 1234, "input-voltage sample");
    rd(16'(REG_STATUS), d); check(d == 777, "live modulator input");
    // writes to a memory region change no register
    wr(16'h1003, 32'd5);     check(vref == 3000 && kd == 99, "memory region is read only");
    // memories
    for (int g = 1; g <= N_MEM; g++)
      for (int t = 0; t < 20; t++) begin
        automatic int a = $urandom_range(0, MEM_DEPTH - 1);
        rd(16'(g << 12) | 16'(a), d);
        check(d == 32'(g - 1) * 32'h0100_0000 + 32'(a), $sformatf("memory %0d addr %0d: %h", g, a, d));
      end
    rd(16'hF000, d); check(d == 0, "unmapped region reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
