// pid_controller: digital PID compensator in parallel form.
//
// Once per switching period, when a new output-voltage sample arrives, it
// forms the error e[k] = v_REF - v_s[k] and the duty command
//   u[k] = kP*e[k] + I[k] + kD*(e[k] - e[k-1]),   I[k] = I[k-1] + kI*e[k],
// saturated to the N+M bit range of the modulator input. Gains are signed
// fixed-point numbers with G_FRAC fractional bits, expressed in modulator
// LSBs per ADC LSB, and are programmed at run time (they are inputs). The
// integrator is clamped to the same range as the output (anti-windup) and
// can be cleared with `clear`. The output is truncated (rounded toward minus
// infinity) from the fixed-point sum.
//
// Timing: `vs_valid` (one-cycle pulse) with `vs`; the P, I and D terms are
// registered at that edge and `u` with `u_valid` one cycle later, so the
// latency is two clock cycles, well inside one switching period.
//
// Follows the document: parallel P, I and D branches with programmable
// coefficients summed into the modulator input, one update per switching
// period, error formed against a constant digital reference. Own choices:
// fixed-point formats, the clamp, truncation, reset values of zero.
module pid_controller #(
  parameter int unsigned E_W    = 12, // sample / reference width
  parameter int unsigned U_W    = 11, // modulator input width, N+M
  parameter int unsigned G_W    = 24, // gain width (signed)
  parameter int unsigned G_FRAC = 16, // gain fractional bits
  // Product of a gain and a difference of errors, plus headroom for sums.
  localparam int unsigned ACC_W = G_W + E_W + 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     vs_valid,
  input  logic [E_W-1:0]           vs,
  input  logic [E_W-1:0]           vref,
  input  logic signed [G_W-1:0]    kp,
  input  logic signed [G_W-1:0]    ki,
  input  logic signed [G_W-1:0]    kd,
  output logic [U_W-1:0]           u,
  output logic                     u_valid,
  output logic signed [ACC_W-1:0]  p_term,
  output logic signed [ACC_W-1:0]  i_term,
  output logic signed [ACC_W-1:0]  d_term
);

  localparam logic signed [ACC_W-1:0] I_MAX = ACC_W'(((64'd1 << U_W) - 1) << G_FRAC);

  logic signed [E_W:0]    e, e_prev_q;
  logic signed [E_W+1:0]  de;
  logic signed [ACC_W-1:0] p_next, d_next, i_sum, i_next;
  logic signed [ACC_W-1:0] sum;
  logic signed [ACC_W-1:0] u_int;
  logic                    valid_q;

  assign e  = $signed({1'b0, vref}) - $signed({1'b0, vs});
  assign de = (E_W+2)'(e) - (E_W+2)'(e_prev_q);

  always_comb begin
    p_next = ACC_W'(kp) * ACC_W'(e);
    d_next = ACC_W'(kd) * ACC_W'(de);
    i_sum  = i_term + ACC_W'(ki) * ACC_W'(e);
    if (i_sum < 0)          i_next = '0;
    else if (i_sum > I_MAX) i_next = I_MAX;
    else                    i_next = i_sum;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      e_prev_q <= '0;
      p_term   <= '0;
      i_term   <= '0;
      d_term   <= '0;
      valid_q  <= 1'b0;
    end else begin
      valid_q <= vs_valid;
      if (vs_valid) begin
        e_prev_q <= e;
        p_term   <= p_next;
        i_term   <= i_next;
        d_term   <= d_next;
      end
    end
  end

  assign sum   = p_term + i_term + d_term;
  assign u_int = sum >>> G_FRAC;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      u       <= '0;
      u_valid <= 1'b0;
    end else begin
      u_valid <= valid_q;
      if (valid_q) begin
        if (u_int < 0)                               u <= '0;
        else if (u_int > ACC_W'((64'd1 << U_W) - 1)) u <= '1;
        else                                         u <= U_W'(u_int);
      end
    end
  end

endmodule
