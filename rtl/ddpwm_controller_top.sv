// ddpwm_controller_top: digital controller of a synchronous buck converter
// with an N+M bit dyadic digital PWM (DDPWM) modulator.
//
// The loop: once per switching period the ADC interface samples the output
// voltage (and the input voltage), the PID compensator turns the error
// against the digital reference into an N+M bit duty word, and the DDPWM
// modulator drives the two power switches with an N-bit PWM whose duty is
// raised by one LSB in m of every 2^M periods, following a dyadic pattern.
// The modulator's terminal count (f_clk / 2^N) paces sampling, compensation
// and the dither counter, so the loop still updates every switching period
// while the average duty has N+M bit resolution. This removes the
// quantization-induced limit cycles of a plain N-bit DPWM once the duty LSB
// is finer than the ADC bin, without raising the clock frequency.
//
// The processor programs everything through `bus_*` (see hps_bridge): the
// modulator mode (plain DPWM, DDPWM, thermometric dithering), the number of
// active dither bits k <= M, the emulated ADC resolution, the reference, the
// gains, and an open-loop duty word used instead of the compensator output
// when the loop is open. Six monitor memories record, once every DECIM+1
// periods after being armed: ADC sample, P, I and D terms (integer parts),
// compensator output and modulator duty.
//
// Gate outputs: `c_hs` drives the high-side switch and `c_ls` the low-side
// switch, its complement; both are registered, one clock after the PWM
// comparator. No dead time is inserted.
//
// The compensator's `u_valid` and the ADC interface's `vin_valid` are left
// unconnected on purpose: the modulator samples its input at the terminal
// count, and the input voltage is only read back by the processor.
//
// Defaults: N = 5 (32 clocks per switching period; 3.2 MHz clock for a
// 100 kHz converter) and M = 6, the largest dither width of the document's
// sweeps; after reset k = 4 and N_ADC = 8, the operating point the document
// uses to show limit-cycle suppression.
module ddpwm_controller_top
  import ddpwm_pkg::*;
#(
  parameter int unsigned N         = 5,
  parameter int unsigned M         = 6,
  parameter int unsigned G_W       = 24,
  parameter int unsigned G_FRAC    = 16,
  parameter int unsigned MEM_DEPTH = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor bus
  input  logic [15:0]       bus_addr,
  input  logic              bus_write,
  input  logic [31:0]       bus_wdata,
  input  logic              bus_read,
  output logic [31:0]       bus_rdata,
  output logic              bus_rdvalid,
  // ADC chip
  output logic              adc_start,
  output logic              adc_ch,
  input  logic              adc_done,
  input  logic [ADC_W-1:0]  adc_data,
  // power stage
  output logic              c_hs,
  output logic              c_ls
);

  localparam int unsigned DEC_W = 16;
  localparam int unsigned K_W   = $clog2(M+1);
  localparam int unsigned NA_W  = $clog2(ADC_W+1);
  localparam int unsigned MA_W  = $clog2(MEM_DEPTH);
  localparam int unsigned ACC_W = G_W + ADC_W + 4;

  dither_mode_e           mode;
  logic                   loop_closed, pid_clear, cap_arm;
  logic [K_W-1:0]         k_bits;
  logic [NA_W-1:0]        n_adc;
  logic [ADC_W-1:0]       vref, vref_q, vs, vo_raw, vin, bin_mask;
  logic signed [G_W-1:0]  kp, ki, kd;
  logic [N+M-1:0]         ol_duty, u_pid, u_mod, u_q;
  logic [DEC_W-1:0]       decim;
  logic                   tick, vs_valid, vin_valid, u_valid, overrun, pwm;
  logic signed [ACC_W-1:0] p_term, i_term, d_term;
  logic [N:0]             duty;
  logic [MA_W-1:0]        mem_rd_addr;
  logic [N_MEM-1:0][31:0] mem_din, mem_rd_data;
  logic [N_MEM-1:0]       mem_done;

  hps_bridge #(
    .N(N), .M(M), .G_W(G_W), .G_FRAC(G_FRAC), .DEC_W(DEC_W), .MEM_DEPTH(MEM_DEPTH)
  ) u_bridge (
    .clk, .rst_n,
    .bus_addr, .bus_write, .bus_wdata, .bus_read, .bus_rdata, .bus_rdvalid,
    .mode, .loop_closed, .pid_clear, .k_bits, .n_adc, .vref, .kp, .ki, .kd,
    .ol_duty, .cap_arm, .decim,
    .cap_done (&mem_done),
    .adc_overrun (overrun),
    .vin,
    .u_live   (u_q),
    .mem_rd_addr, .mem_rd_data
  );

  adc_interface #(.ADC_W(ADC_W)) u_adc (
    .clk, .rst_n,
    .sample_tick (tick),
    .n_adc,
    .adc_start, .adc_ch, .adc_done, .adc_data,
    .vs, .vs_valid, .vo_raw, .vin, .vin_valid,
    .overrun, .bin_mask
  );

  // The reference is quantized like the samples, to N_ADC bits.
  assign vref_q = vref & bin_mask;

  pid_controller #(
    .E_W(ADC_W), .U_W(N+M), .G_W(G_W), .G_FRAC(G_FRAC)
  ) u_pid_i (
    .clk, .rst_n,
    .clear (pid_clear || !loop_closed),
    .vs_valid, .vs, .vref (vref_q), .kp, .ki, .kd,
    .u (u_pid), .u_valid,
    .p_term, .i_term, .d_term
  );

  assign u_mod = loop_closed ? u_pid : ol_duty;

  ddpwm_modulator #(.N(N), .M(M)) u_mod_i (
    .clk, .rst_n,
    .u_in        (u_mod),
    .mode,
    .k_bits,
    .pwm,
    .period_tick (tick),
    .u_q,
    .duty
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_hs <= 1'b0;
      c_ls <= 1'b0;
    end else begin
      c_hs <= pwm;
      c_ls <= !pwm;
    end
  end

  // Monitor memories: ADC sample, P, I, D (integer parts), PID sum, duty.
  assign mem_din[0] = 32'(vo_raw);
  assign mem_din[1] = 32'(p_term >>> G_FRAC);
  assign mem_din[2] = 32'(i_term >>> G_FRAC);
  assign mem_din[3] = 32'(d_term >>> G_FRAC);
  assign mem_din[4] = 32'(u_q);
  assign mem_din[5] = 32'(duty);

  for (genvar g = 0; g < N_MEM; g++) begin : g_mem
    sample_memory #(.W(32), .DEPTH(MEM_DEPTH), .DEC_W(DEC_W)) u_mem (
      .clk, .rst_n,
      .arm     (cap_arm),
      .decim,
      .tick,
      .din     (mem_din[g]),
      .rd_addr (mem_rd_addr),
      .rd_data (mem_rd_data[g]),
      .busy    (),
      .done    (mem_done[g])
    );
  end

endmodule
