// Counter #1: the down-counter that defines the measurement window.
//
// While `load` is high the counter is held at the preset M (asynchronous preset,
// since `load` comes from another clock domain than the oscillator that clocks
// this counter). After `load` falls and EN1 is high, the first rising edge of
// the window oscillator opens the window ("armed"); each following edge
// decrements the count, so the window closes on the M-th period after it opened
// and t_MEASURE is exactly M oscillator periods. ENDCOUNT1 rises when the count
// reaches 0 and freezes counter #2 through `window`.
//
// Interface: `window` is the enable of counter #2 (high between the opening edge
// and the count reaching 0); `endcount` is ENDCOUNT1 (high once the count is 0).
// Both change only on rising edges of clk, or on `load`.
//
// The preset, the countdown and the zero detector follow the description of the
// converter; the arming edge that aligns the window start to an oscillator edge
// is a choice of this design. M must be at least 1.
module cdc_down_counter #(
  parameter int unsigned CNT_W = cdc_pkg::CNT_W_DEF
) (
  input  logic             clk,       // window oscillator, through the counter mux
  input  logic             load,      // preset to m (asynchronous, active high)
  input  logic [CNT_W-1:0] m,         // preset M
  input  logic             en,        // EN1 from the control unit
  output logic [CNT_W-1:0] count,     // count #1: M, M-1, ..., 0
  output logic             window,    // measurement window open
  output logic             endcount   // ENDCOUNT1
);
  timeunit 1ns; timeprecision 1ps;

  logic armed;

  always_ff @(posedge clk or posedge load) begin
    if (load) begin
      count <= m;
      armed <= 1'b0;
    end else if (en) begin
      if (!armed)
        armed <= 1'b1;
      else if (count != '0)
        count <= count - 1'b1;
    end
  end

  assign window   = armed && (count != '0);
  assign endcount = armed && (count == '0);

endmodule
