// ddpwm_pkg: types and constants shared by the DDPWM digital controller.
//
// The dithering mode selects how the M least significant bits of the N+M bit
// duty word are turned into a per-period "+1 LSB" request for the N-bit DPWM:
// not at all (plain N-bit DPWM), by the dyadic digital pulse modulator, or by
// thermometric dithering. The three modes and their roles follow the
// modulator multiplexer of the controller; the encoding is this design's own.
// The register map of the processor interface is also this design's own.
package ddpwm_pkg;

  typedef enum logic [1:0] {
    MODE_DIRECT = 2'd0,   // plain N-bit DPWM, LSBs ignored
    MODE_DDPM   = 2'd1,   // N+M bit dyadic digital PWM
    MODE_THERM  = 2'd2    // N+M bit thermometric dithering over 2^M periods
  } dither_mode_e;

  // Width of the ADC samples delivered by the converter chip.
  localparam int unsigned ADC_W = 12;

  // Processor register map (word addresses, bits [11:0] of the bus address).
  // Bits [15:12] of the address select a region: 0 registers, 1..N_MEM sample
  // memories (read only).
  localparam logic [11:0] REG_CTRL     = 12'h000; // [1:0] mode, [2] loop_closed, [3] pid_clear
  localparam logic [11:0] REG_MBITS    = 12'h001; // active DDPM / dither bits k, 0..M
  localparam logic [11:0] REG_NADC     = 12'h002; // emulated ADC resolution, 1..12 bits
  localparam logic [11:0] REG_VREF     = 12'h003; // digital reference, 12-bit ADC codes
  localparam logic [11:0] REG_KP       = 12'h004; // proportional gain, signed fixed point
  localparam logic [11:0] REG_KI       = 12'h005; // integral gain
  localparam logic [11:0] REG_KD       = 12'h006; // derivative gain
  localparam logic [11:0] REG_OLDUTY   = 12'h007; // open-loop N+M bit duty word
  localparam logic [11:0] REG_CAPTURE  = 12'h008; // write bit0=1: arm, bit1=1: clear overrun; read bit0: done, bit1: ADC overrun
  localparam logic [11:0] REG_DECIM    = 12'h009; // capture one sample every DECIM+1 periods
  localparam logic [11:0] REG_VIN      = 12'h00A; // last input-voltage sample (read only)
  localparam logic [11:0] REG_STATUS   = 12'h00B; // live N+M bit modulator input (read only)

  // Number of monitor memories: ADC sample, P, I, D terms, PID sum, modulator duty.
  localparam int unsigned N_MEM = 6;

endpackage
