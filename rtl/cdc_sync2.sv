// Two-flop synchroniser.
//
// Brings a level that changes in another clock domain (here ENDCOUNT1, which is
// produced on the window oscillator) into the clock domain of the control and
// calibration units. The output follows the input two rising edges of clk later.
// Asynchronous active-low reset clears both flops.
module cdc_sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  timeunit 1ns; timeprecision 1ps;

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
