// pid_controller_tb: self-checking test of the parallel-form PID compensator.
//
// Random samples, references and gains (including the document's gains
// scaled to LSB units) are fed once every few cycles. A 64-bit integer model
// computes e, the P, I (clamped to the output range) and D terms and the
// saturated, truncated output; `u` must match it, with `u_valid` exactly two
// clocks after `vs_valid`. Output saturation at both ends, integrator
// clamping and `clear` must each happen at least once.
module pid_controller_tb;
  localparam int unsigned E_W = 12, U_W = 11, G_W = 24, G_FRAC = 16;
  localparam int unsigned ACC_W = G_W + E_W + 4;

  logic clk = 0, rst_n = 0, clear = 0, vs_valid = 0;
  logic [E_W-1:0] vs = '0, vref = '0;
  logic signed [G_W-1:0] kp = '0, ki = '0, kd = '0;
  logic [U_W-1:0] u;
  logic u_valid;
  logic signed [ACC_W-1:0] p_term, i_term, d_term;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pid_controller #(.E_W(E_W), .U_W(U_W), .G_W(G_W), .G_FRAC(G_FRAC)) dut (
    .clk, .rst_n, .clear, .vs_valid, .vs, .vref, .kp, .ki, .kd,
    .u, .u_valid, .p_term, .i_term, .d_term);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint e_prev = 0, integ = 0;
  longint imax = ((64'sd1 << U_W) - 1) <<< G_FRAC;
  longint umax = (64'sd1 << U_W) - 1;
  int n_sat_hi = 0, n_sat_lo = 0, n_iclamp = 0, n_clear = 0;

  function automatic longint floor_div(longint a);
    return a >>> G_FRAC;   // arithmetic shift is floor division
  endfunction

  task automatic sample(input int unsigned v);
    longint e, de, p, d, s, uexp;
    vs = E_W'(v);
    e  = longint'(vref) - longint'(v);
    de = e - e_prev;
    p  = longint'(kp) * e;
    d  = longint'(kd) * de;
    integ = integ + longint'(ki) * e;
    if (integ < 0)    begin integ = 0;    n_iclamp++; end
    if (integ > imax) begin integ = imax; n_iclamp++; end
    e_prev = e;
    s    = floor_div(p + integ + d);
    uexp = s < 0 ? 0 : (s > umax ? umax : s);
    if (s < 0) n_sat_lo++;
    if (s > umax) n_sat_hi++;
    vs_valid = 1;
    @(negedge clk);
    vs_valid = 0;
    check(!u_valid, "u_valid not before two clocks");
    @(negedge clk);
    check(u_valid, "u_valid two clocks after vs_valid");
    check(longint'(u) == uexp, $sformatf("u=%0d expected %0d", u, uexp));
    check(longint'(i_term) == integ, "integrator state");
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      check(!u_valid, "u_valid is a single pulse");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the document's gains, scaled to LSB units: 2^(G_FRAC + U_W - E_W)
    kp = G_W'(longint'(2.6781 * 32768.0));
    ki = G_W'(longint'(0.0408 * 32768.0));
    kd = G_W'(longint'(6.5019 * 32768.0));
    vref = 12'd2097;
    for (int t = 0; t < 300; t++) sample(2097 + $urandom_range(0, 40) - 20);
    for (int t = 0; t < 100; t++) sample($urandom_range(0, 4095));
    // random gains
    for (int t = 0; t < 2000; t++) begin
      if (t % 100 == 0) begin
        kp = G_W'($urandom_range(0, 1 << 20)) - G_W'(1 << 18);
        ki = G_W'($urandom_range(0, 1 << 14));
        kd = G_W'($urandom_range(0, 1 << 20)) - G_W'(1 << 18);
        vref = E_W'($urandom);
      end
      if (t % 500 == 250) begin
        clear = 1; @(negedge clk); clear = 0;
        integ = 0; e_prev = 0; n_clear++;
        check(u == 0 && i_term == 0, "clear empties the integrator and output");
      end
      sample($urandom_range(0, 4095));
    end
    check(n_sat_hi > 0, "output saturated high at least once");
    check(n_sat_lo > 0, "output saturated low at least once");
    check(n_iclamp > 0, "integrator clamped at least once");
    check(n_clear > 0, "clear used at least once");
    $display("saturations hi=%0d lo=%0d, integrator clamps=%0d, clears=%0d",
             n_sat_hi, n_sat_lo, n_iclamp, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
