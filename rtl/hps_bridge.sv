// hps_bridge: processor-to-fabric register interface of the controller.
//
// It holds every run-time setting the processor programs: dithering mode,
// number of active dither bits k, emulated ADC resolution, digital
// reference, the three PID gains, the open-loop duty word and the
// open/closed-loop switch, plus the capture control of the monitor memories.
// It also lets the processor read back the live input-voltage sample, the
// live modulator input and the contents of the monitor memories.
//
// Bus: a simple memory-mapped slave with a 16-bit word address. A write
// (`bus_write` with `bus_addr`, `bus_wdata`) takes effect at the clock edge.
// A read (`bus_read`) returns `bus_rdata` with `bus_rdvalid` one clock later.
// Address bits [15:12] select the region: 0 = registers (map in ddpwm_pkg),
// 1..N_MEM = monitor memory i-1, addressed by the low address bits.
// Writing CTRL bit 3 gives a one-cycle integrator clear; writing CAPTURE
// bit 0 arms all monitor memories; writing CAPTURE bit 1 clears the sticky
// ADC-overrun flag read back in CAPTURE bit 1. k is clamped to M and n_adc to 1..ADC_W.
//
// Reset values follow the document's main operating point: DDPM mode with
// k = 4 and N_ADC = 8, reference 5.12 V with a 10 V full scale, PID gains of
// its parameter table converted to modulator LSBs per ADC LSB, and the loop
// open with zero duty (output off) until the processor closes it. The bus
// protocol and register map are this design's own.
module hps_bridge
  import ddpwm_pkg::*;
#(
  parameter int unsigned N         = 5,
  parameter int unsigned M         = 6,
  parameter int unsigned G_W       = 24,
  parameter int unsigned G_FRAC    = 16,
  parameter int unsigned DEC_W     = 16,
  parameter int unsigned MEM_DEPTH = 1024,
  localparam int unsigned K_W      = $clog2(M+1),
  localparam int unsigned NA_W     = $clog2(ADC_W+1),
  localparam int unsigned MA_W     = $clog2(MEM_DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // processor bus
  input  logic [15:0]             bus_addr,
  input  logic                    bus_write,
  input  logic [31:0]             bus_wdata,
  input  logic                    bus_read,
  output logic [31:0]             bus_rdata,
  output logic                    bus_rdvalid,
  // settings
  output dither_mode_e            mode,
  output logic                    loop_closed,
  output logic                    pid_clear,
  output logic [K_W-1:0]          k_bits,
  output logic [NA_W-1:0]         n_adc,
  output logic [ADC_W-1:0]        vref,
  output logic signed [G_W-1:0]   kp,
  output logic signed [G_W-1:0]   ki,
  output logic signed [G_W-1:0]   kd,
  output logic [N+M-1:0]          ol_duty,
  output logic                    cap_arm,
  output logic [DEC_W-1:0]        decim,
  // read-back
  input  logic                    cap_done,
  input  logic                    adc_overrun,
  input  logic [ADC_W-1:0]        vin,
  input  logic [N+M-1:0]          u_live,
  output logic [MA_W-1:0]         mem_rd_addr,
  input  logic [N_MEM-1:0][31:0]  mem_rd_data
);

  // Gains of the document's parameter table (normalised: duty fraction per
  // fraction of ADC full scale), scaled to modulator LSBs per 12-bit ADC LSB.
  localparam real GAIN_SCALE = 2.0 ** (real'(G_FRAC) + real'(N + M) - real'(ADC_W));
  localparam logic signed [G_W-1:0] KP_RST = G_W'(longint'(2.6781 * GAIN_SCALE));
  localparam logic signed [G_W-1:0] KI_RST = G_W'(longint'(0.0408 * GAIN_SCALE));
  localparam logic signed [G_W-1:0] KD_RST = G_W'(longint'(6.5019 * GAIN_SCALE));
  // 5.12 V output with a 10 V ADC full scale.
  localparam logic [ADC_W-1:0] VREF_RST = ADC_W'(longint'(0.512 * (2.0 ** ADC_W)));

  logic [3:0]  region, rd_region_q;
  logic [11:0] offset;
  logic [31:0] reg_rd_q, reg_val;
  logic        wr_reg;
  logic        overrun_q;

  assign region      = bus_addr[15:12];
  assign offset      = bus_addr[11:0];
  assign wr_reg      = bus_write && (region == 4'd0);
  assign mem_rd_addr = bus_addr[MA_W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode        <= MODE_DDPM;
      loop_closed <= 1'b0;
      pid_clear   <= 1'b0;
      k_bits      <= K_W'(M < 4 ? M : 4);
      n_adc       <= NA_W'(8);
      vref        <= VREF_RST;
      kp          <= KP_RST;
      ki          <= KI_RST;
      kd          <= KD_RST;
      ol_duty     <= '0;
      cap_arm     <= 1'b0;
      decim       <= '0;
      overrun_q   <= 1'b0;
    end else begin
      if (adc_overrun) overrun_q <= 1'b1;
      pid_clear <= 1'b0;
      cap_arm   <= 1'b0;
      if (wr_reg) begin
        unique case (offset)
          REG_CTRL: begin
            mode        <= dither_mode_e'(bus_wdata[1:0]);
            loop_closed <= bus_wdata[2];
            pid_clear   <= bus_wdata[3];
          end
          REG_MBITS:   k_bits  <= (bus_wdata > 32'(M)) ? K_W'(M) : K_W'(bus_wdata);
          REG_NADC:    n_adc   <= (bus_wdata > 32'(ADC_W)) ? NA_W'(ADC_W) :
                                  (bus_wdata == 0)         ? NA_W'(1) : NA_W'(bus_wdata);
          REG_VREF:    vref    <= bus_wdata[ADC_W-1:0];
          REG_KP:      kp      <= bus_wdata[G_W-1:0];
          REG_KI:      ki      <= bus_wdata[G_W-1:0];
          REG_KD:      kd      <= bus_wdata[G_W-1:0];
          REG_OLDUTY:  ol_duty <= bus_wdata[N+M-1:0];
          REG_CAPTURE: begin
            cap_arm <= bus_wdata[0];
            if (bus_wdata[1]) overrun_q <= 1'b0;
          end
          REG_DECIM:   decim   <= bus_wdata[DEC_W-1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (offset)
      REG_CTRL:    reg_val = {28'd0, 1'b0, loop_closed, mode};
      REG_MBITS:   reg_val = 32'(k_bits);
      REG_NADC:    reg_val = 32'(n_adc);
      REG_VREF:    reg_val = 32'(vref);
      REG_KP:      reg_val = 32'(kp);
      REG_KI:      reg_val = 32'(ki);
      REG_KD:      reg_val = 32'(kd);
      REG_OLDUTY:  reg_val = 32'(ol_duty);
      REG_CAPTURE: reg_val = {30'd0, overrun_q, cap_done};
      REG_DECIM:   reg_val = 32'(decim);
      REG_VIN:     reg_val = 32'(vin);
      REG_STATUS:  reg_val = 32'(u_live);
      default:     reg_val = 32'd0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_rdvalid <= 1'b0;
      rd_region_q <= '0;
      reg_rd_q    <= '0;
    end else begin
      bus_rdvalid <= bus_read;
      if (bus_read) begin
        rd_region_q <= region;
        reg_rd_q    <= reg_val;
      end
    end
  end

  always_comb begin
    if (rd_region_q == 4'd0)                    bus_rdata = reg_rd_q;
    else if (32'(rd_region_q) <= N_MEM)         bus_rdata = mem_rd_data[rd_region_q - 4'd1];
    else                                        bus_rdata = 32'd0;
  end

endmodule
