// Swappable counter connection: two 2:1 clock multiplexers.
//
// In direct counter mode OSC1 clocks counter #1 (the window down-counter) and
// OSC2 clocks counter #2 (the up-counter); in swapped mode the roles of the two
// oscillators are exchanged, so the other oscillator defines the window. The
// calibration readouts need this second level of swapping; normal conversions
// keep the counters direct. Purely combinational. The select only changes while
// the counters are held in preset/clear, so a glitch on a switched clock does not
// disturb a count.
module cdc_counter_mux
  import cdc_pkg::*;
(
  input  logic  osc1_clk,   // f_x  : output of OSC1
  input  logic  osc2_clk,   // f_REF: output of OSC2
  input  conn_e cnt_conn,   // CONN_DIRECT or CONN_SWAPPED
  output logic  cnt1_clk,   // clock of counter #1 (window)
  output logic  cnt2_clk    // clock of counter #2 (counted)
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    if (cnt_conn == CONN_SWAPPED) begin
      cnt1_clk = osc2_clk;
      cnt2_clk = osc1_clk;
    end else begin
      cnt1_clk = osc1_clk;
      cnt2_clk = osc2_clk;
    end
  end

endmodule
