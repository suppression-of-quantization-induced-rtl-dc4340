// ddpwm_modulator: N+M bit dyadic digital pulse width modulator (DDPWM),
// with the dithering-mode multiplexer of the controller.
//
// The N+M bit duty word u = n*2^M + m is split into its N MSBs n and its M
// LSBs m. An N-bit DPWM runs at duty n or n+1 in each switching period; the
// choice of "+1" over a frame of 2^M periods is made by the M-bit dyadic
// pulse modulator driven by m, so that n+1 is applied in exactly m of the
// 2^M periods and the average duty is (n*2^M + m) / 2^(N+M). The DDPM
// counter advances once per switching period, paced by the DPWM terminal
// count, so the compensator may change u every period, not every frame.
//
// A multiplexer selects where the "+1" comes from: nothing (plain N-bit
// DPWM), the DDPM (the proposed modulator) or thermometric dithering (n+1 in
// the first m periods of the frame). A run-time `k_bits` (0..M) keeps only
// the top k bits of m; with the DDPM this is exactly a k-bit DDPM whose
// pattern repeats every 2^k periods, and k = 0 is plain DPWM.
//
// Timing: the input register takes `u_in` at the clock edge ending a period
// (`tc` high). At the same edge the DPWM duty register takes n + dither
// computed from the previous input register contents and the current DDPM
// count, so a new duty word reaches the output one switching period after it
// was captured. `period_tick` (= tc) runs at f_clk / 2^N.
//
// Follows the document: input register, DDPM with counter and priority
// multiplexer, adder, N-bit DPWM, terminal count pacing both the DDPM counter
// and the compensator, three-way dithering multiplexer. Own choices: the
// N+1 bit adder output (so n = 2^N-1 plus one gives a full-on period instead
// of wrapping to zero), truncation of m to k bits, and synchronous
// active-low reset.
module ddpwm_modulator
  import ddpwm_pkg::*;
#(
  parameter int unsigned N = 5,
  parameter int unsigned M = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N+M-1:0]         u_in,
  input  dither_mode_e           mode,
  input  logic [$clog2(M+1)-1:0] k_bits,
  output logic                   pwm,
  output logic                   period_tick,
  output logic [N+M-1:0]         u_q,
  output logic [N:0]             duty
);

  logic [N+M-1:0] in_q;
  logic [N-1:0]   n_field;
  logic [M-1:0]   m_field, m_masked, keep_mask;
  logic           d_ddpm, d_therm, dither;
  logic           tc;

  always_ff @(posedge clk) begin
    if (!rst_n)  in_q <= '0;
    else if (tc) in_q <= u_in;
  end

  assign n_field   = in_q[N+M-1:M];
  assign m_field   = in_q[M-1:0];
  // Keep the top k bits of the M-bit field.
  assign keep_mask = ~M'((({{M{1'b0}}, 1'b1}) << (M - 32'(k_bits))) - 1'b1);
  assign m_masked  = m_field & keep_mask;

  ddpm_modulator #(.M(M)) u_ddpm (
    .clk    (clk),
    .rst_n  (rst_n),
    .step   (tc),
    .m      (m_masked),
    .dither (d_ddpm),
    .count  ()
  );

  thermo_dither #(.M(M)) u_therm (
    .clk    (clk),
    .rst_n  (rst_n),
    .step   (tc),
    .m      (m_field),
    .k_bits (k_bits),
    .dither (d_therm)
  );

  always_comb begin
    unique case (mode)
      MODE_DDPM:  dither = d_ddpm;
      MODE_THERM: dither = d_therm;
      default:    dither = 1'b0;
    endcase
  end

  assign duty = {1'b0, n_field} + (N+1)'(dither);

  dpwm #(.N(N)) u_dpwm (
    .clk     (clk),
    .rst_n   (rst_n),
    .duty_in (duty),
    .pwm     (pwm),
    .tc      (tc),
    .count   ()
  );

  assign period_tick = tc;
  assign u_q         = in_q;

endmodule
