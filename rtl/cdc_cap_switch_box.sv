// Behavioural model (not synthesizable) of the cap switch box.
//
// The real part is a set of pass gates that connect the unknown capacitance Cx
// (through its pads) and the on-chip reference CREF to the load ports of the two
// oscillators. Direct connection: Cx on OSC1, CREF on OSC2. Swapped connection:
// CREF on OSC1, Cx on OSC2. Capacitances are carried as integers in aF; the
// pass-gate parasitics are neglected. CREF is 500 fF as on the test chip.
module cdc_cap_switch_box
  import cdc_pkg::*;
#(
  parameter int unsigned CREF_AF = 500_000   // on-chip reference, aF
) (
  input  conn_e       load_conn,   // switch position from the control unit
  input  logic [31:0] cx_af,       // unknown capacitance at the pads, aF
  output logic [31:0] osc1_c_af,   // capacitance seen by OSC1's load port
  output logic [31:0] osc2_c_af    // capacitance seen by OSC2's load port
);
  timeunit 1ns; timeprecision 1ps;

  localparam logic [31:0] CREF = 32'(CREF_AF);

  always_comb begin
    if (load_conn == CONN_SWAPPED) begin
      osc1_c_af = CREF;
      osc2_c_af = cx_af;
    end else begin
      osc1_c_af = cx_af;
      osc2_c_af = CREF;
    end
  end

endmodule
