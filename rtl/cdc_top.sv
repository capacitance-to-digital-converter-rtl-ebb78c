// Capacitance-to-digital converter with double-swappable oscillators and
// load-agnostic self-calibration.
//
// Two nominally identical relaxation oscillators are loaded by the unknown Cx and
// the 500 fF reference CREF through a cap switch box. Counter #1 counts down M
// periods of one oscillator to form a window; counter #2 counts the periods of
// the other inside it. A conversion reads n with Cx on OSC1 (Cx = n/M * CREF when
// n > M) or, if n <= M, again with the loads swapped (Cx = M/n * CREF). The
// self-calibration unit evens out the mismatch between the oscillators by
// comparing readouts with both the loads and the counters swapped and
// SAR-searching a 4-bit calibration capacitor bank on the faster oscillator. It
// needs no reference load and works with Cx connected.
//
// This top contains behavioural models of the analog parts (oscillators, switch
// box, calibration capacitor banks), so it simulates but is not synthesizable as
// a whole; cdc_core_logic and cdc_calibration_unit are the synthesizable digital
// part. The control and calibration units are clocked by the OSC2 output f_REF.
//
// Ports: enable runs the oscillators (the digital logic has no clock without
// it); rst_n resets the control and calibration units asynchronously; cx_af is
// the capacitance at the input pads in aF; m is the down-counter preset M;
// start_meas / start_cal start a conversion / a calibration, sampled while the
// respective unit is idle. Results: out_valid pulses with out_n and out_swapped.
// Calibration codes s_cal1/s_cal2 hold after cal_done.
module cdc_top
  import cdc_pkg::*;
#(
  parameter int unsigned CNT_W        = cdc_pkg::CNT_W_DEF,
  parameter int unsigned CAL_W        = cdc_pkg::CAL_W_DEF,
  parameter int unsigned CREF_AF      = 500_000,
  parameter int unsigned CCAL_LSB_AF  = 10_000,
  parameter real         K1_NS_PER_AF = 1.05,   // gain of OSC1
  parameter real         K2_NS_PER_AF = 1.05    // gain of OSC2
) (
  input  logic             enable,
  input  logic             rst_n,
  input  logic [31:0]      cx_af,
  input  logic [CNT_W-1:0] m,
  input  logic             start_meas,
  input  logic             start_cal,
  output logic             busy,
  output logic             out_valid,
  output logic [CNT_W-1:0] out_n,
  output logic             out_swapped,
  output logic             out_ovf,
  output logic             cal_busy,
  output logic             cal_done,
  output logic [CAL_W-1:0] s_cal1,
  output logic [CAL_W-1:0] s_cal2,
  output cal_sel_e         cal_sel,
  output conn_e            load_conn,
  output conn_e            cnt_conn,
  output logic             f_x,        // OSC1 output
  output logic             f_ref       // OSC2 output
);
  timeunit 1ns; timeprecision 1ps;

  logic [31:0]      osc1_c_af, osc2_c_af, ccal1_af, ccal2_af;
  logic             cal_req, cal_swap, cal_ack;
  logic [CNT_W-1:0] rd_n;

  cdc_cap_switch_box #(.CREF_AF(CREF_AF)) u_switch_box (
    .load_conn (load_conn),
    .cx_af     (cx_af),
    .osc1_c_af (osc1_c_af),
    .osc2_c_af (osc2_c_af)
  );

  cdc_cal_cap_bank #(.CAL_W(CAL_W), .C_LSB_AF(CCAL_LSB_AF)) u_ccal1 (
    .s    (s_cal1),
    .c_af (ccal1_af)
  );

  cdc_cal_cap_bank #(.CAL_W(CAL_W), .C_LSB_AF(CCAL_LSB_AF)) u_ccal2 (
    .s    (s_cal2),
    .c_af (ccal2_af)
  );

  cdc_dml_osc #(.K_NS_PER_AF(K1_NS_PER_AF)) u_osc1 (
    .enable    (enable),
    .c_load_af (osc1_c_af),
    .c_cal_af  (ccal1_af),
    .clk_out   (f_x)
  );

  cdc_dml_osc #(.K_NS_PER_AF(K2_NS_PER_AF)) u_osc2 (
    .enable    (enable),
    .c_load_af (osc2_c_af),
    .c_cal_af  (ccal2_af),
    .clk_out   (f_ref)
  );

  cdc_core_logic #(.CNT_W(CNT_W)) u_core (
    .ctl_clk     (f_ref),
    .rst_n       (rst_n),
    .osc1_clk    (f_x),
    .osc2_clk    (f_ref),
    .m           (m),
    .start_meas  (start_meas),
    .cal_req     (cal_req),
    .cal_swap    (cal_swap),
    .cal_ack     (cal_ack),
    .rd_n        (rd_n),
    .load_conn   (load_conn),
    .cnt_conn    (cnt_conn),
    .busy        (busy),
    .out_valid   (out_valid),
    .out_n       (out_n),
    .out_swapped (out_swapped),
    .out_ovf     (out_ovf)
  );

  cdc_calibration_unit #(.CNT_W(CNT_W), .CAL_W(CAL_W)) u_cal (
    .clk       (f_ref),
    .rst_n     (rst_n),
    .start_cal (start_cal),
    .rd_req    (cal_req),
    .rd_swap   (cal_swap),
    .rd_ack    (cal_ack),
    .rd_n      (rd_n),
    .s_cal1    (s_cal1),
    .s_cal2    (s_cal2),
    .cal_sel   (cal_sel),
    .busy      (cal_busy),
    .done      (cal_done)
  );

endmodule
