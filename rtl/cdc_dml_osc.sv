// Behavioural model (not synthesizable) of one dual-mode-logic relaxation
// oscillator, OSC1 or OSC2.
//
// The real part is a transistor-level relaxation oscillator in dual-mode logic
// with swapped header/footer biasing; its period is proportional to the
// capacitance on its load port: T = R_OSC * C, where R_OSC is a process-,
// voltage- and temperature-dependent capacitance-to-period gain. This model
// produces a square wave with period K_NS_PER_AF * (c_load_af + c_cal_af) ns,
// i.e. the load port capacitance (from the cap switch box) in parallel with the
// calibration bank. Mismatch between OSC1 and OSC2 is modelled by giving the two
// instances different gains. The period is re-evaluated every half period, so a
// load change takes effect within half a period. While enable is low the output
// is held low. Nothing is sampled at time zero, so that inputs not yet driven
// cannot set the length of the first half period.
//
// The default gain of 1.05 ns/aF (1.05 ms/pF) is this design's estimate from the
// reported 1.04 s conversion at 30 pF with M = 32, which takes M + 1 periods
// of the window oscillator in this design; noise and supply dependence
// are not modelled.
module cdc_dml_osc #(
  parameter real K_NS_PER_AF = 1.05  // capacitance-to-period gain R_OSC
) (
  input  logic        enable,
  input  logic [31:0] c_load_af,     // load port capacitance, aF
  input  logic [31:0] c_cal_af,      // calibration bank capacitance, aF
  output logic        clk_out
);
  timeunit 1ns; timeprecision 1ps;

  realtime half_period;

  initial clk_out = 1'b0;

  always begin
    if ($realtime == 0) #1;
    if (!enable) begin
      clk_out = 1'b0;
      wait (enable);
    end
    half_period = K_NS_PER_AF * (real'(c_load_af) + real'(c_cal_af)) / 2.0;
    if (half_period < 1.0) half_period = 1.0;
    #(half_period) clk_out = ~clk_out;
  end

endmodule
