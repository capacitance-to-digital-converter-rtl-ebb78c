// Counter #2: the up-counter that counts oscillator periods inside the window.
//
// Cleared to 0 while `clr` is high (asynchronous, like the preset of counter #1).
// It then increments on every rising edge of the counted oscillator at which
// both EN2 and the window from counter #1 are high, so it is frozen once counter
// #1 has reached 0. Its final value is the conversion result n.
//
// The 12-bit width follows the test chip. Saturation at all ones with a sticky
// overflow flag is a choice of this design (a count that would wrap is reported
// as overflow instead).
module cdc_up_counter #(
  parameter int unsigned CNT_W = cdc_pkg::CNT_W_DEF
) (
  input  logic             clk,     // counted oscillator, through the counter mux
  input  logic             clr,     // clear to 0 (asynchronous, active high)
  input  logic             en,      // EN2 from the control unit
  input  logic             window,  // window from counter #1 (low once count #1 = 0)
  output logic [CNT_W-1:0] count,   // count #2: 0, 1, 2, ...
  output logic             ovf      // count would have passed 2^CNT_W - 1
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      count <= '0;
      ovf   <= 1'b0;
    end else if (en && window) begin
      if (count == '1)
        ovf <= 1'b1;
      else
        count <= count + 1'b1;
    end
  end

endmodule
