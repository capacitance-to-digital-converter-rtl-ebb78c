// End-to-end testbench of cdc_top with oscillator mismatch.
//
// Two converters run side by side: in `dut_a` OSC2's gain is 4% above OSC1's
// (OSC1 faster, so calibration must tune CCAL1), in `dut_b` OSC1's gain is 5%
// above OSC2's (CCAL2 is tuned). Each converter is calibrated with a Cx that is
// simply connected, then converts several capacitances above and below CREF,
// and finally one that overflows the 12-bit counter.
//
// Expected values come from the period formula T = K * C of the oscillators:
//   direct   n = M * K1*(Cx + C1) / (K2*(CREF + C2))   (Cx > CREF)
//   swapped  n = M * K1*(CREF + C1) / (K2*(Cx + C2))   (Cx <= CREF)
// checked within one count; the calibration code must be within one step of the
// largest non-overshooting code found by scanning all 16 codes. After
// calibration the direct-mode estimate n/M*CREF must be closer to the true Cx
// than without calibration. Each mechanism (direct and swapped conversion, CCAL1
// and CCAL2 search, a SAR bit cleared on overshoot, counter overflow, load and
// counter swap) is counted and must occur at least once.
module tb_cdc_top;
  timeunit 1ns; timeprecision 1ps;
  import cdc_pkg::*;

  localparam real K1A = 1.00, K2A = 1.04;
  localparam real K1B = 1.05, K2B = 1.00;
  localparam real CREF = 500_000.0, CLSB = 10_000.0;

  logic        enable, rst_n;
  logic [31:0] cx_af;
  logic [11:0] m;
  logic        start_meas_a, start_cal_a, start_meas_b, start_cal_b;

  // outputs of the two converters
  logic        busy[2], out_valid[2], out_swapped[2], out_ovf[2], cal_busy[2], cal_done[2];
  logic [11:0] out_n[2];
  logic [3:0]  s_cal1[2], s_cal2[2];
  cal_sel_e    cal_sel[2];
  conn_e       load_conn[2], cnt_conn[2];
  logic        f_x[2], f_ref[2];

  int checks = 0, failures = 0;
  int n_direct = 0, n_swapped = 0, n_cal1 = 0, n_cal2 = 0, n_clear = 0, n_ovf = 0;
  int n_load_swap = 0, n_cnt_swap = 0;

  cdc_top #(.K1_NS_PER_AF(K1A), .K2_NS_PER_AF(K2A)) dut_a (
    .enable(enable), .rst_n(rst_n), .cx_af(cx_af), .m(m),
    .start_meas(start_meas_a), .start_cal(start_cal_a),
    .busy(busy[0]), .out_valid(out_valid[0]), .out_n(out_n[0]), .out_swapped(out_swapped[0]),
    .out_ovf(out_ovf[0]), .cal_busy(cal_busy[0]), .cal_done(cal_done[0]),
    .s_cal1(s_cal1[0]), .s_cal2(s_cal2[0]), .cal_sel(cal_sel[0]),
    .load_conn(load_conn[0]), .cnt_conn(cnt_conn[0]), .f_x(f_x[0]), .f_ref(f_ref[0]));

  cdc_top #(.K1_NS_PER_AF(K1B), .K2_NS_PER_AF(K2B)) dut_b (
    .enable(enable), .rst_n(rst_n), .cx_af(cx_af), .m(m),
    .start_meas(start_meas_b), .start_cal(start_cal_b),
    .busy(busy[1]), .out_valid(out_valid[1]), .out_n(out_n[1]), .out_swapped(out_swapped[1]),
    .out_ovf(out_ovf[1]), .cal_busy(cal_busy[1]), .cal_done(cal_done[1]),
    .s_cal1(s_cal1[1]), .s_cal2(s_cal2[1]), .cal_sel(cal_sel[1]),
    .load_conn(load_conn[1]), .cnt_conn(cnt_conn[1]), .f_x(f_x[1]), .f_ref(f_ref[1]));

  // mechanism monitors
  always @(negedge s_cal1[0][3] or negedge s_cal1[0][2] or negedge s_cal1[0][1] or negedge s_cal1[0][0] or
           negedge s_cal2[1][3] or negedge s_cal2[1][2] or negedge s_cal2[1][1] or negedge s_cal2[1][0])
    if (rst_n && (cal_busy[0] || cal_busy[1])) n_clear++;
  always @(posedge load_conn[0] or posedge load_conn[1]) n_load_swap++;
  always @(posedge cnt_conn[0] or posedge cnt_conn[1]) n_cnt_swap++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real k1_of(input int d); return d == 0 ? K1A : K1B; endfunction
  function automatic real k2_of(input int d); return d == 0 ? K2A : K2B; endfunction

  function automatic real n_model(input int d, input bit swap, input real cx, input int mm,
                                  input int c1code, input int c2code);
    real c1 = CLSB * c1code, c2 = CLSB * c2code;
    if (!swap) return mm * k1_of(d) * (cx + c1) / (k2_of(d) * (CREF + c2));
    else       return mm * k2_of(d) * (cx + c2) / (k1_of(d) * (CREF + c1));
  endfunction

  // swapped loads, direct counters: OSC1 on CREF defines the window, OSC2 on Cx is counted
  function automatic real n_conv_swapped(input int d, input real cx, input int mm,
                                         input int c1code, input int c2code);
    return mm * k1_of(d) * (CREF + CLSB * c1code) / (k2_of(d) * (cx + CLSB * c2code));
  endfunction

  task automatic pulse(input int d, input bit cal);
    @(posedge (d == 0 ? f_ref[0] : f_ref[1]));
    #1;
    if (d == 0) begin if (cal) start_cal_a = 1'b1; else start_meas_a = 1'b1; end
    else        begin if (cal) start_cal_b = 1'b1; else start_meas_b = 1'b1; end
    @(posedge (d == 0 ? f_ref[0] : f_ref[1]));
    #1;
    start_cal_a = 1'b0; start_meas_a = 1'b0; start_cal_b = 1'b0; start_meas_b = 1'b0;
  endtask

  task automatic calibrate(input int d, input real cx);
    int exp_code = 0, got;
    bit tune1;
    cx_af = 32'(int'(cx));
    m = 12'd64;
    tune1 = n_model(d, 0, cx, 64, 0, 0) < n_model(d, 1, cx, 64, 0, 0);
    for (int c = 0; c < 16; c++)
      if (tune1 ? (n_model(d, 0, cx, 64, c, 0) <= n_model(d, 1, cx, 64, c, 0))
                : (n_model(d, 0, cx, 64, 0, c) >= n_model(d, 1, cx, 64, 0, c))) exp_code = c;
    pulse(d, 1'b1);
    wait (cal_done[d]);
    #1;
    got = tune1 ? int'(s_cal1[d]) : int'(s_cal2[d]);
    check(cal_sel[d] == (tune1 ? CAL_SEL_CAL1 : CAL_SEL_CAL2), $sformatf("dut %0d: bank", d));
    check((tune1 ? s_cal2[d] : s_cal1[d]) == 4'd0, $sformatf("dut %0d: other bank at 0000", d));
    check(got >= exp_code - 1 && got <= exp_code + 1,
          $sformatf("dut %0d: code %0d, expected %0d", d, got, exp_code));
    if (tune1) n_cal1++; else n_cal2++;
  endtask

  task automatic convert(input int d, input real cx, input int mm, input bit expect_ovf);
    real n_exp, est, err_cal, err_raw;
    bit  sw;
    cx_af = 32'(int'(cx));
    m = 12'(mm);
    pulse(d, 1'b0);
    wait (out_valid[d]);
    #1;
    if (expect_ovf) begin
      check(out_ovf[d] && out_n[d] == 12'hfff, $sformatf("dut %0d: overflow at Cx=%f", d, cx));
      if (out_ovf[d]) n_ovf++;
      return;
    end
    sw = n_model(d, 0, cx, mm, int'(s_cal1[d]), int'(s_cal2[d])) < mm + 1.0;
    n_exp = sw ? n_conv_swapped(d, cx, mm, int'(s_cal1[d]), int'(s_cal2[d]))
               : n_model(d, 0, cx, mm, int'(s_cal1[d]), int'(s_cal2[d]));
    check(out_swapped[d] == sw, $sformatf("dut %0d Cx=%f: swapped=%0b", d, cx, out_swapped[d]));
    check(!out_ovf[d], "no overflow");
    check(real'(out_n[d]) >= n_exp - 1.0 && real'(out_n[d]) <= n_exp + 1.0,
          $sformatf("dut %0d Cx=%f M=%0d: n=%0d expected %f", d, cx, mm, out_n[d], n_exp));
    // the estimate improves on an uncalibrated converter
    est = out_swapped[d] ? mm * CREF / real'(out_n[d]) : real'(out_n[d]) * CREF / mm;
    err_cal = (est - cx) / cx;
    err_raw = sw ? n_conv_swapped(d, cx, mm, 0, 0) : n_model(d, 0, cx, mm, 0, 0);
    err_raw = (sw ? mm * CREF / err_raw : err_raw * CREF / mm) / cx - 1.0;
    // (direct readouts only: in a swapped readout the calibration capacitance of
    // OSC2 sits in parallel with Cx and adds an offset, like the pad parasitics)
    if (!sw)
    check((err_cal < 0 ? -err_cal : err_cal) < (err_raw < 0 ? -err_raw : err_raw) + 1.0 / mm,
          $sformatf("dut %0d Cx=%f: relative error %f calibrated, %f raw", d, cx, err_cal, err_raw));
    if (out_swapped[d]) n_swapped++; else n_direct++;
  endtask

  initial begin
    enable = 1'b0; rst_n = 1'b1; cx_af = 32'd3_000_000; m = 12'd32;
    start_meas_a = 1'b0; start_cal_a = 1'b0; start_meas_b = 1'b0; start_cal_b = 1'b0;
    #1 rst_n = 1'b0;  // a falling edge, so the asynchronous reset is applied
    #1000 enable = 1'b1;
    #3_000_000 rst_n = 1'b1;
    calibrate(0, 3_000_000.0);
    calibrate(1, 3_000_000.0);
    for (int d = 0; d < 2; d++) begin
      convert(d, 5_000_000.0, 32, 1'b0);
      convert(d, 250_000.0, 32, 1'b0);
      convert(d, 12_500_000.0, 64, 1'b0);
      convert(d, 150_000.0, 64, 1'b0);
      convert(d, 20_000_000.0, 128, 1'b1);
    end
    check(n_direct > 0,    $sformatf("direct conversions: %0d", n_direct));
    check(n_swapped > 0,   $sformatf("swapped conversions: %0d", n_swapped));
    check(n_cal1 > 0,      $sformatf("CCAL1 searches: %0d", n_cal1));
    check(n_cal2 > 0,      $sformatf("CCAL2 searches: %0d", n_cal2));
    check(n_clear > 0,     $sformatf("SAR bits cleared on overshoot: %0d", n_clear));
    check(n_ovf > 0,       $sformatf("overflows: %0d", n_ovf));
    check(n_load_swap > 0, $sformatf("load swaps: %0d", n_load_swap));
    check(n_cnt_swap > 0,  $sformatf("counter swaps: %0d", n_cnt_swap));
    $display("mechanisms: direct=%0d swapped=%0d cal1=%0d cal2=%0d sar_clear=%0d ovf=%0d load_swap=%0d cnt_swap=%0d",
             n_direct, n_swapped, n_cal1, n_cal2, n_clear, n_ovf, n_load_swap, n_cnt_swap);
    $display("codes: dut_a CCAL1=%0d dut_b CCAL2=%0d", s_cal1[0], s_cal2[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
