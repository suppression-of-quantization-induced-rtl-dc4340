// ddpwm_modulator_tb: self-checking test of the N+M bit DDPWM modulator.
//
// A reference model follows the modulator period by period: the duty word
// taken at the end of period j is applied in period j+1 as n + dither, with
// the dither bit from the dyadic basis signals (DDPM mode), from the first-m
// rule (thermometric mode) or zero (direct mode), using the period counter's
// value. Every period's on-time (in clocks) and length (2^N clocks) is
// checked against the model. On top of that, with a constant duty word, the
// on-time summed over a frame of 2^k periods must equal n*2^k + m_k: the
// N+k bit average duty. The document's example (9-bit word 293 = 10010 0101,
// k = 4) must give 293 clocks of on-time in 16 periods.
module ddpwm_modulator_tb;
  import ddpwm_pkg::*;
  localparam int unsigned N = 5;
  localparam int unsigned M = 6;
  localparam int unsigned P = 1 << N;

  logic clk = 0, rst_n = 0;
  logic [N+M-1:0] u_in = '0, u_q;
  dither_mode_e mode = MODE_DIRECT;
  logic [2:0] k_bits = 3'd0;
  logic pwm, period_tick;
  logic [N:0] duty;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ddpwm_modulator #(.N(N), .M(M)) dut (
    .clk, .rst_n, .u_in, .mode, .k_bits, .pwm, .period_tick, .u_q, .duty);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic bit ddpm_ref(int unsigned mm, int unsigned c);
    bit r = 0;
    for (int i = 0; i < M; i++)
      if (mm[i] && (c % (1 << (M - i)) == (1 << (M - i - 1)))) r = 1;
    return r;
  endfunction

  // model state
  int unsigned in_m = 0, cnt_m = 0, duty_m = 0;

  function automatic int unsigned next_duty(int unsigned word, int unsigned c,
                                            dither_mode_e md, int unsigned k);
    int unsigned n  = word >> M;
    int unsigned mf = word % (1 << M);
    int unsigned mk = mf >> (M - k);            // top k bits
    bit d;
    case (md)
      MODE_DDPM:  d = ddpm_ref(mk << (M - k), c);
      MODE_THERM: d = (k != 0) && ((c % (1 << k)) < mk);
      default:    d = 0;
    endcase
    return n + d;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run `periods` periods with fixed settings; return the total on-time.
  task automatic run(input logic [N+M-1:0] word, input dither_mode_e md,
                     input int unsigned k, input int periods, output int total);
    int high;
    total = 0;
    for (int j = 0; j < periods; j++) begin
      high = 0;
      for (int c = 0; c < P; c++) begin
        @(negedge clk);
        high += pwm;
        check(period_tick == (c == P - 1), "terminal count at the period end");
        if (c == P - 1) begin
          // settings presented now are taken at the coming edge
          u_in = word; mode = md; k_bits = 3'(k);
        end
      end
      check(high == duty_m, $sformatf("word %0d mode %0d k %0d: on %0d, expected %0d",
                                      word, md, k, high, duty_m));
      total += high;
      // model of the terminal-count edge
      duty_m = next_duty(in_m, cnt_m, mode, k);
      in_m   = word;
      cnt_m  = (cnt_m + 1) % (1 << M);
    end
  endtask

  int total;
  logic [N+M-1:0] w;
  int unsigned k, mk, nn;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    do @(negedge clk); while (!period_tick);
    // first edge: model takes the reset state of the inputs
    @(posedge clk);
    duty_m = 0; in_m = 0; cnt_m = 1;
    // the document's worked example: 293/512 with N = 5, k = 4
    w = (N+M)'(293 << (M - 4));
    run(w, MODE_DDPM, 4, 2, total);            // fill the pipeline
    while (cnt_m % 16 != 1) run(w, MODE_DDPM, 4, 1, total);
    run(w, MODE_DDPM, 4, 16, total);
    check(total == 293, $sformatf("example frame on-time %0d, expected 293", total));
    // random words, all modes and k
    for (int t = 0; t < 60; t++) begin
      w = (N+M)'($urandom);
      k = $urandom_range(0, M);
      unique case (t % 3)
        0: begin
          run(w, MODE_DDPM, k, 2, total);
          run(w, MODE_DDPM, k, 1 << k, total);
          nn = w >> M; mk = (w % (1 << M)) >> (M - k);
          check(total == nn * (1 << k) + mk, "DDPWM frame average is n*2^k + m");
        end
        1: begin
          run(w, MODE_THERM, k, 2, total);
          run(w, MODE_THERM, k, 1 << k, total);
          nn = w >> M; mk = (w % (1 << M)) >> (M - k);
          check(total == nn * (1 << k) + mk, "thermometric frame average is n*2^k + m");
        end
        default: begin
          run(w, MODE_DIRECT, k, 2, total);
          run(w, MODE_DIRECT, k, 4, total);
          check(total == 4 * (w >> M), "direct mode applies n every period");
        end
      endcase
    end
    // saturation corner: n = 2^N - 1 with +1 gives a full-on period
    w = '1;
    run(w, MODE_DDPM, M, 2, total);
    run(w, MODE_DDPM, M, 1 << M, total);
    check(total == (1 << (N + M)) - 1, "all-ones word gives 2^(N+M)-1 on clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
