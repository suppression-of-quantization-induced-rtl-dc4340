// dpwm: N-bit counter-comparator digital pulse width modulator.
//
// A free-running N-bit counter, clocked at f_clk, divides time into
// switching periods of 2^N clock cycles. A duty register, loaded once per
// period, is compared with the counter: the output is high while
// count < duty, so a duty value H gives an on-time of H clock cycles. The
// counter's terminal count (all ones) marks the end of a period; it loads the
// duty register and is brought out as the period tick (f_clk / 2^N) that
// paces the dithering counter and the compensator.
//
// Interface: `duty_in` has N+1 bits so that a duty of 2^N (always on, which
// the dithered value n+1 reaches for n = 2^N-1) is representable. It is
// sampled on the clock edge at which `tc` is high and applies to the whole
// next period. `pwm` is combinational from the counter and duty register.
//
// Follows the document: counter, duty register, "<" comparator, terminal
// count output. Own choices: the extra duty bit and synchronous active-low
// reset (counter 0, duty 0, output low).
module dpwm #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N:0]   duty_in,
  output logic         pwm,
  output logic         tc,
  output logic [N-1:0] count
);

  logic [N-1:0] cnt_q;
  logic [N:0]   duty_q;

  assign tc = &cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      duty_q <= '0;
    end else begin
      cnt_q <= cnt_q + 1'b1;
      if (tc) duty_q <= duty_in;
    end
  end

  assign pwm   = ({1'b0, cnt_q} < duty_q);
  assign count = cnt_q;

endmodule
