// adc_interface: acquisition of the converter's output and input voltages.
//
// Once per switching period (`sample_tick`, the DPWM terminal count) it asks
// the external ADC for two conversions: first the output voltage (channel 0),
// then the input voltage (channel 1). The output-voltage sample is passed to
// the compensator as v_s[k] as soon as it is available. To emulate an ADC of
// lower resolution N_ADC with the 12-bit converter, the sample's low
// ADC_W - N_ADC bits are cleared, so v_s[k] moves in bins of
// V_FS / 2^N_ADC while keeping the 12-bit scale; `n_adc` (1..ADC_W) is set at
// run time.
//
// ADC handshake: `adc_start` is a one-cycle request with `adc_ch` held stable
// until `adc_done`, a one-cycle pulse that comes with `adc_data`. A tick that
// arrives while a sequence is running is ignored (`overrun` pulses).
// Outputs: `vs`/`vs_valid` (one-cycle pulse, masked output voltage),
// `vo_raw` (last full-resolution output sample), `vin`/`vin_valid`, and
// `bin_mask`, the mask of the bits an N_ADC-bit converter would deliver (the
// controller applies it to the digital reference as well, so that the
// reference is an N_ADC-bit number and a zero-error bin exists).
//
// Follows the document: the FPGA-side interface acquires the converter's
// input and output voltages once per sampling period from the board's 12-bit
// ADC and feeds the compensator. Own choices: the start/done handshake, the
// channel order, the bit-masking emulation of N_ADC, the overrun flag.
module adc_interface #(
  parameter int unsigned ADC_W = 12
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sample_tick,
  input  logic [$clog2(ADC_W+1)-1:0] n_adc,
  // external ADC
  output logic                       adc_start,
  output logic                       adc_ch,
  input  logic                       adc_done,
  input  logic [ADC_W-1:0]           adc_data,
  // to the controller
  output logic [ADC_W-1:0]           vs,
  output logic                       vs_valid,
  output logic [ADC_W-1:0]           vo_raw,
  output logic [ADC_W-1:0]           vin,
  output logic                       vin_valid,
  output logic                       overrun,
  output logic [ADC_W-1:0]           bin_mask
);

  typedef enum logic [1:0] {IDLE, CONV_VO, CONV_VIN} state_e;
  state_e state_q;

  logic [ADC_W-1:0] keep_mask;
  assign keep_mask = ~ADC_W'((({{ADC_W{1'b0}}, 1'b1}) << (ADC_W - 32'(n_adc))) - 1'b1);
  assign bin_mask  = keep_mask;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= IDLE;
      adc_start <= 1'b0;
      adc_ch    <= 1'b0;
      vs        <= '0;
      vs_valid  <= 1'b0;
      vo_raw    <= '0;
      vin       <= '0;
      vin_valid <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      adc_start <= 1'b0;
      vs_valid  <= 1'b0;
      vin_valid <= 1'b0;
      overrun   <= 1'b0;
      unique case (state_q)
        IDLE: if (sample_tick) begin
          adc_start <= 1'b1;
          adc_ch    <= 1'b0;
          state_q   <= CONV_VO;
        end
        CONV_VO: begin
          overrun <= sample_tick;
          if (adc_done) begin
            vo_raw    <= adc_data;
            vs        <= adc_data & keep_mask;
            vs_valid  <= 1'b1;
            adc_start <= 1'b1;
            adc_ch    <= 1'b1;
            state_q   <= CONV_VIN;
          end
        end
        CONV_VIN: begin
          overrun <= sample_tick;
          if (adc_done) begin
            vin       <= adc_data;
            vin_valid <= 1'b1;
            state_q   <= IDLE;
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

endmodule
