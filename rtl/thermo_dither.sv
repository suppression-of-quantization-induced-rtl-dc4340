// thermo_dither: thermometric duty-cycle dithering over 2^k switching periods.
//
// Given the k-bit LSB value m' of the duty word, it requests "+1 LSB" of duty
// in the first m' periods of every 2^k-period dithering frame and nothing in
// the remaining 2^k - m' periods, so that the average duty over a frame gains
// k bits of resolution. k (`k_bits`, 0..M) is set at run time: the top k bits
// of the M-bit field `m` are used and the frame is 2^k periods long; k = 0
// disables dithering.
//
// Interface: `step` advances the period counter (one step per switching
// period, the DPWM terminal count). `dither` is combinational from the
// counter and the inputs. Timing: a frame starts when the low k bits of the
// counter are zero.
//
// Follows the document: the pattern (first m periods at n+1, the rest at n).
// Own choices: the run-time frame length k and the use of the top k bits of
// the field, synchronous active-low reset.
module thermo_dither #(
  parameter int unsigned M = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   step,
  input  logic [M-1:0]           m,
  input  logic [$clog2(M+1)-1:0] k_bits,
  output logic                   dither
);

  logic [M-1:0] cnt_q;
  logic [M-1:0] m_eff, cnt_eff, mask;

  always_ff @(posedge clk) begin
    if (!rst_n)    cnt_q <= '0;
    else if (step) cnt_q <= cnt_q + 1'b1;
  end

  always_comb begin
    mask    = M'((({{M{1'b0}}, 1'b1}) << k_bits) - 1'b1);
    m_eff   = M'(m >> (M - 32'(k_bits)));
    cnt_eff = cnt_q & mask;
    dither  = (k_bits != 0) && (cnt_eff < m_eff);
  end

endmodule
