// adc_model: behavioural model of a two-channel 12-bit ADC with a
// start/done handshake, used by the testbenches.
//
// On `start` it latches the channel and, LATENCY clocks later, returns the
// code of that channel's analog value (`ain0` or `ain1`, codes 0..4095,
// clipped) with a one-cycle `done`.
module adc_model #(
  parameter int LATENCY = 6
) (
  input  logic        clk,
  input  logic        start,
  input  logic        ch,
  input  logic [11:0] ain0,
  input  logic [11:0] ain1,
  output logic        done,
  output logic [11:0] data
);
  int  busy = 0;
  logic ch_q = 0;

  initial begin
    done = 0;
    data = '0;
  end

  always @(posedge clk) begin
    done <= 1'b0;
    if (start) begin
      busy <= LATENCY;
      ch_q <= ch;
    end else if (busy > 1) begin
      busy <= busy - 1;
    end else if (busy == 1) begin
      busy <= 0;
      done <= 1'b1;
      data <= ch_q ? ain1 : ain0;
    end
  end
endmodule
