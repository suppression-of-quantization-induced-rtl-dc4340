// buck_model: behavioural model of the synchronous buck power stage and of
// the analog side of its ADC, used by the controller testbench. Not
// synthesizable.
//
// Each clock period is split into SUB Euler steps of the averaged-free
// switched model: the switch node is V_IN while the high-side gate is on
// and 0 V while the low-side gate is on (both off: the inductor current
// freewheels through a diode, modelled as 0 V). State: inductor current i_L
// and capacitor voltage v_C with series resistances r_L and r_C; the load is
// a constant current sink I_LOAD (0 A: open circuit).
//   L di_L/dt = v_sw - r_L i_L - v_O,  C dv_C/dt = i_L - I_LOAD,
//   v_O = v_C + r_C (i_L - I_LOAD).
// Component values are those of the converter the design was sized for:
// V_IN 10 V, L 100 uH, r_L 56 mOhm, C 220 uF, r_C 90 mOhm. TCLK is the
// modulator clock period the model assumes: 312.5 ns by default (100 kHz
// switching with 32 clocks per period; 625 ns gives 100 kHz with 16).
// `vo_code` and `vin_code` are the 12-bit codes of an ADC whose full scale
// is V_FS = 10 V: floor(v / V_FS * 4096), clipped to 0..4095.
module buck_model #(
  parameter int  SUB  = 4,
  parameter real TCLK = 312.5e-9
) (
  input  logic        clk,
  input  logic        c_hs,
  input  logic        c_ls,
  input  real         vin,
  input  real         i_load,
  output real         vo,
  output logic [11:0] vo_code,
  output logic [11:0] vin_code
);
  localparam real L    = 100e-6;
  localparam real R_L  = 56e-3;
  localparam real C    = 220e-6;
  localparam real R_C  = 90e-3;
  localparam real V_FS = 10.0;

  real il = 0.0, vc = 0.0;

  function automatic logic [11:0] code(real v);
    real x = v / V_FS * 4096.0;
    if (x < 0.0) return 12'd0;
    if (x > 4095.0) return 12'd4095;
    return 12'($floor(x));
  endfunction

  initial begin
    vo = 0.0;
    vo_code = '0;
    vin_code = '0;
  end

  always @(posedge clk) begin
    real vsw, dt, v;
    dt  = TCLK / SUB;
    vsw = c_hs ? vin : 0.0;
    for (int s = 0; s < SUB; s++) begin
      v  = vc + R_C * (il - i_load);
      il = il + dt * (vsw - R_L * il - v) / L;
      if (!c_hs && !c_ls && il < 0.0) il = 0.0;
      vc = vc + dt * (il - i_load) / C;
    end
    vo       = vc + R_C * (il - i_load);
    vo_code  <= code(vo);
    vin_code <= code(vin);
  end
endmodule
