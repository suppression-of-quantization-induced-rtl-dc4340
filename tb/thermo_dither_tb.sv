// thermo_dither_tb: self-checking test of thermometric dithering.
//
// For every frame length k = 0..M and every k-bit value m' (placed in the
// top k bits of the M-bit input) it checks that, within each frame of 2^k
// periods, "+1" is requested in exactly the first m' periods.
module thermo_dither_tb;
  localparam int unsigned M = 6;

  logic clk = 0, rst_n = 0, step = 0;
  logic [M-1:0] m = '0;
  logic [2:0] k_bits = '0;
  logic dither;
  int checks = 0, failures = 0;
  int pos;

  always #5 clk = ~clk;

  thermo_dither #(.M(M)) dut (.clk, .rst_n, .step, .m, .k_bits, .dither);

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

  initial begin
    pos = 0;   // reference model of the period counter
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k <= M; k++) begin
      for (int mm = 0; mm < (1 << k); mm++) begin
        k_bits <= 3'(k);
        m      <= M'(mm << (M - k)) | M'($urandom_range(0, (1 << (M - k)) - 1));
        for (int s = 0; s < (1 << M); s++) begin
          @(negedge clk);
          check(dither == ((pos % (1 << k)) < mm),
                $sformatf("k=%0d m=%0d period %0d dither=%0b", k, mm, pos, dither));
          step <= 1; @(posedge clk); step <= 0;
          pos++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
