// Core logic of the CDC: counter multiplexers, counter #1, counter #2 and the
// control unit, wired as in the converter's block diagram.
//
// The two oscillator outputs come in as clocks. The counter mux routes them to
// the window down-counter (#1) and the counting up-counter (#2); counter #1's
// window gates counter #2 directly, and its ENDCOUNT1 goes back to the control
// unit. The control unit runs on ctl_clk (the OSC2 output in the top) and drives
// the cap switch box position (load_conn) that the top applies to the oscillator
// loads. The calibration unit, when present, talks to it over cal_req/cal_ack.
//
// Everything here is synthesizable; the only clocks are the two oscillator
// outputs and ctl_clk.
module cdc_core_logic
  import cdc_pkg::*;
#(
  parameter int unsigned CNT_W = cdc_pkg::CNT_W_DEF
) (
  input  logic             ctl_clk,
  input  logic             rst_n,
  input  logic             osc1_clk,     // f_x from OSC1
  input  logic             osc2_clk,     // f_REF from OSC2
  input  logic [CNT_W-1:0] m,
  input  logic             start_meas,
  input  logic             cal_req,
  input  logic             cal_swap,
  output logic             cal_ack,
  output logic [CNT_W-1:0] rd_n,
  output conn_e            load_conn,
  output conn_e            cnt_conn,
  output logic             busy,
  output logic             out_valid,
  output logic [CNT_W-1:0] out_n,
  output logic             out_swapped,
  output logic             out_ovf
);
  timeunit 1ns; timeprecision 1ps;

  logic             cnt1_clk, cnt2_clk;
  logic             cnt_load, en1, en2;
  logic [CNT_W-1:0] count1, count2;
  logic             window, endcount, ovf;

  cdc_counter_mux u_mux (
    .osc1_clk (osc1_clk),
    .osc2_clk (osc2_clk),
    .cnt_conn (cnt_conn),
    .cnt1_clk (cnt1_clk),
    .cnt2_clk (cnt2_clk)
  );

  cdc_down_counter #(.CNT_W(CNT_W)) u_cnt1 (
    .clk      (cnt1_clk),
    .load     (cnt_load),
    .m        (m),
    .en       (en1),
    .count    (count1),
    .window   (window),
    .endcount (endcount)
  );

  cdc_up_counter #(.CNT_W(CNT_W)) u_cnt2 (
    .clk    (cnt2_clk),
    .clr    (cnt_load),
    .en     (en2),
    .window (window),
    .count  (count2),
    .ovf    (ovf)
  );

  cdc_control_unit #(.CNT_W(CNT_W)) u_ctl (
    .clk         (ctl_clk),
    .rst_n       (rst_n),
    .m           (m),
    .start_meas  (start_meas),
    .cal_req     (cal_req),
    .cal_swap    (cal_swap),
    .cal_ack     (cal_ack),
    .rd_n        (rd_n),
    .cnt_load    (cnt_load),
    .en1         (en1),
    .en2         (en2),
    .load_conn   (load_conn),
    .cnt_conn    (cnt_conn),
    .endcount    (endcount),
    .n_in        (count2),
    .ovf_in      (ovf),
    .busy        (busy),
    .out_valid   (out_valid),
    .out_n       (out_n),
    .out_swapped (out_swapped),
    .out_ovf     (out_ovf)
  );

endmodule
