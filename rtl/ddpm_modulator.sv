// ddpm_modulator: M-bit dyadic digital pulse modulator (DDPM).
//
// For an M-bit number m it produces a stream of 2^M bits that holds exactly m
// ones, spread as the superposition of orthogonal dyadic basis signals: bit
// b_i of m contributes 2^i ones spaced 2^(M-i) steps apart. It is built, as
// the document describes, from an M-bit binary counter and a priority
// multiplexer. With counter value c, the multiplexer passes the MSB of m when
// c[0]=1 (every 2nd step), the next bit when c[1:0]=2'b10 (every 4th step),
// and so on down to the LSB of m when c is a one followed by M-1 zeros; the
// all-zero count passes nothing. The counter LSB has the highest priority.
//
// Interface: `step` advances the counter by one (in the DDPWM it is the DPWM
// terminal count, one step per switching period). `m` is the M-bit input,
// held by the caller's input register. `dither` is the combinational
// multiplexer output for the current count; the caller registers it (in the
// DDPWM it is summed into the DPWM duty register). `count` is exposed for
// monitoring and tests.
//
// Follows the document: counter plus priority multiplexer, selection rule.
// Own choices: synchronous active-low reset of the counter to zero, and a
// combinational output (the output register of the stand-alone DDPM is the
// DPWM duty register in the DDPWM).
module ddpm_modulator #(
  parameter int unsigned M = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic [M-1:0] m,
  output logic         dither,
  output logic [M-1:0] count
);

  logic [M-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n)    cnt_q <= '0;
    else if (step) cnt_q <= cnt_q + 1'b1;
  end

  // Priority multiplexer: the lowest set bit of the counter, at position p,
  // selects input bit M-1-p. A zero count selects nothing.
  always_comb begin
    dither = 1'b0;
    for (int p = M - 1; p >= 0; p--) begin
      if (cnt_q[p]) dither = m[M-1-p];
    end
  end

  assign count = cnt_q;

endmodule
