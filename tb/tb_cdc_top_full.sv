// Full-size testbench of cdc_top at its default parameters (12-bit counters,
// 4-bit calibration banks, CREF = 500 fF, 10 fF calibration step, equal
// oscillator gains of 1.05 ms/pF).
//
// Capacitances are totals at the input, including about 2 pF of pad, bond wire
// and board parasitics. The testbench calibrates once (with equal oscillators
// the comparison of n1 and n2 ends at once or the codes stay within one step of
// 0000), then converts at M = 32 the top of the 30 pF range, which must take
// about 1.04 s, further capacitances in direct mode and one below CREF in
// swapped mode, 30 pF at M = 64 and 15 pF at M = 128 (the largest counts the
// 12-bit counter must hold), and finally 66 pF at M = 32, beyond the 4096
// counts of the 12-bit counter, which must saturate at 4095 and flag an
// overflow. Each other result is checked within one count of M * Cx / CREF
// (direct) or M * CREF / Cx (swapped), corrected for the calibration codes.
module tb_cdc_top_full;
  timeunit 1ns; timeprecision 1ps;
  import cdc_pkg::*;

  localparam real CREF = 500_000.0;
  localparam real CPAD = 2_000_000.0;   // smallest input: parasitic offset

  logic        enable, rst_n, start_meas, start_cal;
  logic [31:0] cx_af;
  logic [11:0] m, out_n;
  logic        busy, out_valid, out_swapped, out_ovf, cal_busy, cal_done, f_x, f_ref;
  logic [3:0]  s_cal1, s_cal2;
  cal_sel_e    cal_sel;
  conn_e       load_conn, cnt_conn;

  int checks = 0, failures = 0;

  cdc_top dut (
    .enable(enable), .rst_n(rst_n), .cx_af(cx_af), .m(m), .start_meas(start_meas),
    .start_cal(start_cal), .busy(busy), .out_valid(out_valid), .out_n(out_n),
    .out_swapped(out_swapped), .out_ovf(out_ovf), .cal_busy(cal_busy), .cal_done(cal_done),
    .s_cal1(s_cal1), .s_cal2(s_cal2), .cal_sel(cal_sel), .load_conn(load_conn),
    .cnt_conn(cnt_conn), .f_x(f_x), .f_ref(f_ref));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #60_000_000_000;   // 60 s of simulated time
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(input bit cal);
    @(posedge f_ref) #1;
    if (cal) start_cal = 1'b1; else start_meas = 1'b1;
    @(posedge f_ref) #1;
    start_cal = 1'b0; start_meas = 1'b0;
  endtask

  task automatic convert(input real c_total, input int mm, output realtime t_conv);
    realtime t0;
    real n_exp;
    cx_af = 32'(int'(c_total));
    m = 12'(mm);
    pulse(1'b0);
    t0 = $realtime;
    wait (out_valid);
    t_conv = $realtime - t0;
    #1;
    if (c_total > CREF) begin
      n_exp = mm * (c_total + 10_000.0 * s_cal1) / (CREF + 10_000.0 * s_cal2);
      check(!out_swapped, $sformatf("Cx=%f direct", c_total));
    end else begin
      n_exp = mm * (CREF + 10_000.0 * s_cal1) / (c_total + 10_000.0 * s_cal2);
      check(out_swapped, $sformatf("Cx=%f swapped", c_total));
    end
    if (n_exp >= 4096.0)
      check(out_ovf && out_n == 12'hFFF,
            $sformatf("Cx=%f M=%0d: expected saturation, n=%0d ovf=%0b", c_total, mm, out_n, out_ovf));
    else
      check(!out_ovf && real'(out_n) >= n_exp - 1.0 && real'(out_n) <= n_exp + 1.0,
            $sformatf("Cx=%f M=%0d: n=%0d expected %f", c_total, mm, out_n, n_exp));
    $display("Cx=%0.0f aF M=%0d: n=%0d swapped=%0b conversion time %0.4f s",
             c_total, mm, out_n, out_swapped, t_conv * 1.0e-9);
  endtask

  initial begin
    realtime t;
    enable = 1'b0; rst_n = 1'b1; start_meas = 1'b0; start_cal = 1'b0;
    cx_af = 32'(int'(8_000_000.0)); m = 12'd32;
    #1 rst_n = 1'b0;  // a falling edge, so the asynchronous reset is applied
    #1000 enable = 1'b1;
    #3_000_000 rst_n = 1'b1;

    pulse(1'b1);
    wait (cal_done);
    #1;
    check(s_cal1 <= 4'd1 && s_cal2 <= 4'd1, $sformatf("calibration codes %0d/%0d", s_cal1, s_cal2));

    // largest capacitance of the 30 pF range, M = 32
    convert(30_000_000.0, 32, t);
    check(t > 1.02e9 && t < 1.06e9, $sformatf("conversion time %f ns at 30 pF", t));
    convert(CPAD, 32, t);
    convert(12_345_000.0, 32, t);
    convert(300_000.0, 32, t);            // below CREF: swapped readout
    convert(30_000_000.0, 64, t);
    check(!out_ovf, "30 pF fits the counter at M = 64");
    convert(15_000_000.0, 128, t);
    check(!out_ovf, "15 pF fits the counter at M = 128");
    // above the 64 pF that 4096 counts reach at M = 32: counter #2 saturates
    convert(66_000_000.0, 32, t);
    check(out_ovf, "66 pF overflows the counter at M = 32");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
