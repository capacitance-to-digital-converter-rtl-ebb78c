// Behavioural model (not synthesizable as a capacitor) of one calibration
// capacitor bank, CCAL1 or CCAL2.
//
// Four binary-weighted capacitors, switched by the bits of the code S, sit in
// parallel with an oscillator's load; the added capacitance is S * C0 with C0 =
// 10 fF, so codes 0000..1111 give 0..150 fF in 10 fF steps. The capacitance is
// reported as an integer in aF for the oscillator model.
module cdc_cal_cap_bank #(
  parameter int unsigned CAL_W     = cdc_pkg::CAL_W_DEF,
  parameter int unsigned C_LSB_AF  = 10_000   // C0, aF
) (
  input  logic [CAL_W-1:0] s,       // calibration code S_CAL
  output logic [31:0]      c_af     // switched-in capacitance, aF
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    c_af = '0;
    for (int unsigned i = 0; i < CAL_W; i++)
      if (s[i]) c_af = c_af + (32'(C_LSB_AF) << i);
  end

endmodule
