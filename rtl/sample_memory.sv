// sample_memory: monitor memory that records one controller signal.
//
// When armed it writes the input `din` once every DECIM+1 switching periods
// (`tick` is the period tick) into consecutive locations, starting at
// address 0, until DEPTH samples are stored; it then stops and raises
// `done`, so the processor reads a consistent record through the read port.
// Arming again restarts the record. The read port has one cycle of latency.
//
// Interface: `arm` (one-cycle pulse), `decim` (periods skipped between
// samples), `tick`, `din`; `rd_addr` -> `rd_data` one clock later; `done`,
// `busy`.
//
// Follows the document: each hardware output is sampled periodically into a
// memory whose content the processor can read. Own choices: the one-shot
// record, the depth, the shared decimation, the read latency.
module sample_memory #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned DEC_W = 16,
  localparam int unsigned A_W  = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             arm,
  input  logic [DEC_W-1:0] decim,
  input  logic             tick,
  input  logic [W-1:0]     din,
  input  logic [A_W-1:0]   rd_addr,
  output logic [W-1:0]     rd_data,
  output logic             busy,
  output logic             done
);

  logic [W-1:0]     mem [DEPTH];
  logic [A_W-1:0]   wr_addr_q;
  logic [DEC_W-1:0] dec_cnt_q;
  logic             we;

  assign we = busy && tick && (dec_cnt_q == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      wr_addr_q <= '0;
      dec_cnt_q <= '0;
    end else if (arm) begin
      busy      <= 1'b1;
      done      <= 1'b0;
      wr_addr_q <= '0;
      dec_cnt_q <= '0;
    end else if (busy && tick) begin
      dec_cnt_q <= (dec_cnt_q == decim) ? '0 : dec_cnt_q + 1'b1;
      if (dec_cnt_q == '0) begin
        wr_addr_q <= wr_addr_q + 1'b1;
        if (32'(wr_addr_q) == DEPTH - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr_q] <= din;
    rd_data <= mem[rd_addr];
  end

endmodule
