// Self-checking testbench of cdc_core_logic (counter mux, counters #1/#2 and
// control unit together).
//
// Two ideal oscillators are modelled in the testbench: each runs with the
// period of the capacitance the switch box position gives it (TCX for Cx,
// TREF for CREF), and the control clock is the OSC2 output as in the top. The
// conversion result is checked against the exact period ratio: in direct mode
// n = M * TCX / TREF, in swapped mode n = M * TREF / TCX, both within one count.
// Calibration readouts are checked in direct-direct and swapped-swapped mode,
// where in swapped-swapped mode OSC2 (now on Cx) defines the window and OSC1 (on
// CREF) is counted. The conversion time is checked against M window periods.
module tb_cdc_core_logic;
  timeunit 1ns; timeprecision 1ps;
  import cdc_pkg::*;

  localparam int unsigned W = 12;

  logic         rst_n, osc1 = 1'b0, osc2 = 1'b0;
  logic [W-1:0] m;
  logic         start_meas, cal_req, cal_swap, cal_ack;
  logic [W-1:0] rd_n, out_n;
  conn_e        load_conn, cnt_conn;
  logic         busy, out_valid, out_swapped, out_ovf;

  real tref = 500.0, tcx;
  int  checks = 0, failures = 0;

  cdc_core_logic dut (
    .ctl_clk(osc2), .rst_n(rst_n), .osc1_clk(osc1), .osc2_clk(osc2), .m(m),
    .start_meas(start_meas), .cal_req(cal_req), .cal_swap(cal_swap), .cal_ack(cal_ack),
    .rd_n(rd_n), .load_conn(load_conn), .cnt_conn(cnt_conn), .busy(busy),
    .out_valid(out_valid), .out_n(out_n), .out_swapped(out_swapped), .out_ovf(out_ovf));

  always begin
    #((load_conn == CONN_SWAPPED ? tref : tcx) / 2.0) osc1 = ~osc1;
  end
  always begin
    #((load_conn == CONN_SWAPPED ? tcx : tref) / 2.0) osc2 = ~osc2;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(input real ratio, input int mm);
    realtime t0, t1;
    real n_exp, win;
    tcx = tref * ratio;
    m = W'(mm);
    @(posedge osc2) start_meas <= 1'b1;
    @(posedge osc2) start_meas <= 1'b0;
    t0 = $realtime;
    while (!out_valid) @(posedge osc2);
    t1 = $realtime;
    if (ratio > 1.0) begin
      n_exp = mm * ratio;
      check(!out_swapped, $sformatf("ratio %f: direct", ratio));
      win = mm * tcx;
    end else begin
      n_exp = mm / ratio;
      check(out_swapped, $sformatf("ratio %f: swapped", ratio));
      // direct readout first, then the swapped one
      win = mm * tcx + mm * tref;
    end
    check(real'(out_n) >= n_exp - 1.0 && real'(out_n) <= n_exp + 1.0,
          $sformatf("ratio %f M %0d: n=%0d expected %f", ratio, mm, out_n, n_exp));
    // window periods plus a few control cycles and window-alignment periods
    check((t1 - t0) >= win && (t1 - t0) <= win + 12 * (tcx > tref ? tcx : tref) + 12 * tref,
          $sformatf("ratio %f: conversion time %f for window %f", ratio, t1 - t0, win));
  endtask

  task automatic cal_readout(input bit swap, input real ratio, input int mm);
    real n_exp;
    tcx = tref * ratio;
    m = W'(mm);
    @(posedge osc2) begin cal_req <= 1'b1; cal_swap <= swap; end
    while (!cal_ack) @(posedge osc2);
    cal_req <= 1'b0;
    // with equal oscillators both modes give M * TCX / TREF
    n_exp = mm * ratio;
    check(load_conn == (swap ? CONN_SWAPPED : CONN_DIRECT) && cnt_conn == load_conn,
          $sformatf("calibration readout %0d position", swap));
    check(real'(rd_n) >= n_exp - 1.0 && real'(rd_n) <= n_exp + 1.0,
          $sformatf("calibration readout %0d: n=%0d expected %f", swap, rd_n, n_exp));
  endtask

  initial begin
    rst_n = 1'b1; start_meas = 1'b0; cal_req = 1'b0; cal_swap = 1'b0; m = 12'd32; tcx = 1000.0;
    #1 rst_n = 1'b0;  // a falling edge, so the asynchronous reset is applied
    #5000 rst_n = 1'b1;
    convert(10.0, 32);
    convert(3.3, 32);
    convert(1.37, 64);
    convert(0.4, 32);
    convert(0.173, 128);
    convert(0.9, 32);
    cal_readout(1'b0, 7.5, 32);
    cal_readout(1'b1, 7.5, 32);
    cal_readout(1'b1, 2.25, 64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
