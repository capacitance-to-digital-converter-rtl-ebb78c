// Workload testbench of cdc_top: the measurement series the converter is
// characterised with, run on a converter whose OSC2 gain is 3% above OSC1's.
//
// 1. Self-calibration once, at M = 64 with 10 pF connected.
// 2. Repeatability: 100 conversions at Cx = 20 * CREF (10 pF), M = 32. With
//    noise-free oscillator models the spread must stay within one count and
//    the mean within one count of the period formula.
// 3. Linearity sweep: 2 pF to 30 pF in 500 fF steps at M = 32. Every n must be
//    within one count of n = M * K1*(Cx + C1) / (K2*(CREF + C2)) and the codes
//    must rise monotonically; the largest deviation of the estimate n/M*CREF
//    from the straight line through the end points is reported in fF.
// 4. Conversion time: proportional to Cx (10 pF vs 20 pF) and to M (32 vs 64),
//    within 5%.
// 5. Counter range: at M = 32 a capacitance just below the 12-bit limit fits
//    and one above it saturates counter #2 with the overflow flag.
module tb_cdc_workloads;
  timeunit 1ns; timeprecision 1ps;
  import cdc_pkg::*;

  localparam real K1 = 1.05, K2 = 1.05 * 1.03;
  localparam real CREF = 500_000.0, CLSB = 10_000.0;

  logic        enable, rst_n, start_meas, start_cal;
  logic [31:0] cx_af;
  logic [11:0] m, out_n;
  logic        busy, out_valid, out_swapped, out_ovf, cal_busy, cal_done, f_x, f_ref;
  logic [3:0]  s_cal1, s_cal2;
  cal_sel_e    cal_sel;
  conn_e       load_conn, cnt_conn;

  int checks = 0, failures = 0;

  cdc_top #(.K1_NS_PER_AF(K1), .K2_NS_PER_AF(K2)) dut (
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
    #1000_000_000_000;   // 1000 s of simulated time
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real n_direct(input real cx, input int mm);
    return mm * K1 * (cx + CLSB * s_cal1) / (K2 * (CREF + CLSB * s_cal2));
  endfunction

  task automatic pulse(input bit cal);
    @(posedge f_ref) #1;
    if (cal) start_cal = 1'b1; else start_meas = 1'b1;
    @(posedge f_ref) #1;
    start_cal = 1'b0; start_meas = 1'b0;
  endtask

  task automatic convert(input real cx, input int mm, output int n, output realtime t);
    realtime t0;
    cx_af = 32'(int'(cx));
    m = 12'(mm);
    pulse(1'b0);
    t0 = $realtime;
    wait (out_valid);
    t = $realtime - t0;
    #1;
    n = int'(out_n);
  endtask

  initial begin
    int n, n_min, n_max, n_prev;
    real sum, est, line, dev, dev_max, n_first, n_last, cx;
    realtime t, t10, t20, t10_64;
    enable = 1'b0; rst_n = 1'b1; start_meas = 1'b0; start_cal = 1'b0;
    cx_af = 32'd10_000_000; m = 12'd64;
    #1 rst_n = 1'b0;  // a falling edge, so the asynchronous reset is applied
    #1000 enable = 1'b1;
    #3_000_000 rst_n = 1'b1;

    // 1. calibration
    pulse(1'b1);
    wait (cal_done);
    #1;
    check(cal_sel == CAL_SEL_CAL1 && s_cal1 != 4'd0 && s_cal2 == 4'd0,
          $sformatf("calibration tunes CCAL1 (codes %0d/%0d)", s_cal1, s_cal2));
    $display("calibration: S_CAL1=%0d S_CAL2=%0d", s_cal1, s_cal2);

    // 2. repeatability at Cx = 20 CREF
    n_min = 4096; n_max = -1; sum = 0.0;
    for (int i = 0; i < 100; i++) begin
      convert(20.0 * CREF, 32, n, t);
      if (n < n_min) n_min = n;
      if (n > n_max) n_max = n;
      sum += n;
    end
    check(n_max - n_min <= 1, $sformatf("repeatability spread %0d..%0d", n_min, n_max));
    check(sum / 100.0 >= n_direct(20.0 * CREF, 32) - 1.0 && sum / 100.0 <= n_direct(20.0 * CREF, 32) + 1.0,
          $sformatf("mean %f expected %f", sum / 100.0, n_direct(20.0 * CREF, 32)));

    // 3. linearity sweep
    n_prev = 0; dev_max = 0.0;
    convert(2_000_000.0, 32, n, t);  n_first = n;
    convert(30_000_000.0, 32, n, t); n_last = n;
    for (int k = 0; k <= 56; k++) begin
      cx = 2_000_000.0 + 500_000.0 * k;
      convert(cx, 32, n, t);
      check(!out_swapped && real'(n) >= n_direct(cx, 32) - 1.0 && real'(n) <= n_direct(cx, 32) + 1.0,
            $sformatf("sweep Cx=%f: n=%0d expected %f", cx, n, n_direct(cx, 32)));
      check(n >= n_prev, $sformatf("sweep monotonic at Cx=%f", cx));
      n_prev = n;
      est  = real'(n) * CREF / 32.0;
      line = (n_first + (n_last - n_first) * k / 56.0) * CREF / 32.0;
      dev  = est - line;
      if (dev < 0) dev = -dev;
      if (dev > dev_max) dev_max = dev;
    end
    $display("sweep: largest deviation from the end-point line %0.1f fF (one count = %0.1f fF)",
             dev_max / 1000.0, CREF / 32.0 / 1000.0);
    check(dev_max <= 2.0 * CREF / 32.0, "sweep deviation within two counts");

    // 4. conversion time proportional to Cx and M
    convert(10_000_000.0, 32, n, t10);
    convert(20_000_000.0, 32, n, t20);
    convert(10_000_000.0, 64, n, t10_64);
    check(t20 / t10 > 1.9 && t20 / t10 < 2.1, $sformatf("time ratio for 2x Cx: %f", t20 / t10));
    check(t10_64 / t10 > 1.9 && t10_64 / t10 < 2.1, $sformatf("time ratio for 2x M: %f", t10_64 / t10));
    $display("conversion time: 10 pF M=32 %0.3f s, 20 pF M=32 %0.3f s, 10 pF M=64 %0.3f s",
             t10 * 1e-9, t20 * 1e-9, t10_64 * 1e-9);

    // 5. counter range: just below and above the 12-bit limit (the limit lies
    //    above 64 pF here because OSC2 is the slower oscillator)
    convert(62_000_000.0, 32, n, t);
    check(!out_ovf && n_direct(62_000_000.0, 32) < 4095.0, $sformatf("62 pF at M=32 fits (n=%0d)", n));
    convert(68_000_000.0, 32, n, t);
    check(out_ovf && n == 4095 && n_direct(68_000_000.0, 32) > 4096.0,
          $sformatf("68 pF at M=32 overflows (n=%0d)", n));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
