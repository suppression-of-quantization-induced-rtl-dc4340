// sample_memory_tb: self-checking test of a monitor memory.
//
// A small memory (DEPTH 64) is armed with several decimation factors; the
// testbench drives a known sample sequence, one value per period tick, and
// then reads the record back through the one-cycle-latency read port. The
// record must hold every (DECIM+1)-th value starting with the first tick
// after arming, `done` must rise after exactly DEPTH samples and later ticks
// must not overwrite the record.
module sample_memory_tb;
  localparam int unsigned W = 20, DEPTH = 64, DEC_W = 8;

  logic clk = 0, rst_n = 0, arm = 0, tick = 0;
  logic [DEC_W-1:0] decim = '0;
  logic [W-1:0] din = '0, rd_data;
  logic [5:0] rd_addr = '0;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sample_memory #(.W(W), .DEPTH(DEPTH), .DEC_W(DEC_W)) dut (
    .clk, .rst_n, .arm, .decim, .tick, .din, .rd_addr, .rd_data, .busy, .done);

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

  function automatic logic [W-1:0] value(int run, int idx);
    return W'(run * 7919 + idx * 31 + 5);
  endfunction

  int ticks, dec;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    for (int r = 0; r < 4; r++) begin
      dec = (r == 0) ? 0 : $urandom_range(1, 4);
      decim = DEC_W'(dec);
      arm = 1; @(negedge clk); arm = 0;
      check(busy && !done, "busy after arm");
      ticks = 0;
      while (ticks < (DEPTH + 5) * (dec + 1)) begin
        din = value(r, ticks);
        tick = 1; @(negedge clk); tick = 0;
        ticks++;
        if (ticks == DEPTH * (dec + 1) - dec) check(done && !busy, "done after DEPTH samples");
        if (ticks < DEPTH * (dec + 1) - dec) check(!done, "not done early");
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      for (int a = 0; a < DEPTH; a++) begin
        rd_addr = 6'(a);
        @(negedge clk);
        check(rd_data == value(r, a * (dec + 1)),
              $sformatf("run %0d decim %0d addr %0d: %0d", r, dec, a, rd_data));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
