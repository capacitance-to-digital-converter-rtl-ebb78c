// Self-checking testbench of cdc_calibration_unit.
//
// The control unit and the analog front end are replaced by a model that
// answers each readout request with the count an ideal, noise-free converter
// would give: with oscillator gains K1, K2, calibration capacitances C1, C2 and
// preset M,
//   direct-direct   n1 = floor(M * K1*(Cx + C1) / (K2*(CREF + C2)))
//   swapped-swapped n2 = floor(M * K2*(Cx + C2) / (K1*(CREF + C1)))
// The expected final code is found independently by scanning all 16 codes of the
// bank on the faster oscillator for the largest one that does not overshoot
// (n1 <= n2 when tuning CCAL1, n1 >= n2 when tuning CCAL2). Cases: OSC1 faster,
// OSC2 faster, no mismatch, and the same mismatch under a different Cx. The
// number of readouts (2 + 2 * 4, or 2 without mismatch) is checked too.
module tb_cdc_calibration_unit;
  timeunit 1ns; timeprecision 1ps;
  import cdc_pkg::*;

  localparam int unsigned W = 12;
  localparam real CREF = 500_000.0;   // aF
  localparam real CLSB = 10_000.0;    // aF

  logic         clk = 1'b0, rst_n, start_cal;
  logic         rd_req, rd_swap, rd_ack;
  logic [W-1:0] rd_n;
  logic [3:0]   s_cal1, s_cal2;
  cal_sel_e     cal_sel;
  logic         busy, done;

  int  checks = 0, failures = 0, readouts = 0;
  real k1, k2, cx, mm;

  cdc_calibration_unit dut (
    .clk(clk), .rst_n(rst_n), .start_cal(start_cal), .rd_req(rd_req), .rd_swap(rd_swap),
    .rd_ack(rd_ack), .rd_n(rd_n), .s_cal1(s_cal1), .s_cal2(s_cal2), .cal_sel(cal_sel),
    .busy(busy), .done(done));

  always #5 clk = ~clk;

  function automatic int n_of(input bit swap, input int c1code, input int c2code);
    real c1 = CLSB * c1code, c2 = CLSB * c2code;
    if (!swap) return int'($floor(mm * k1 * (cx + c1) / (k2 * (CREF + c2))));
    else       return int'($floor(mm * k2 * (cx + c2) / (k1 * (CREF + c1))));
  endfunction

  // readout model: acknowledges each request a few cycles later
  logic serving = 1'b0;
  logic swap_lat;
  int   wait_cnt;
  always @(posedge clk) begin
    rd_ack <= 1'b0;
    if (rd_req && !rd_ack && !serving) begin
      serving  <= 1'b1;
      wait_cnt <= 0;
      swap_lat <= rd_swap;
    end else if (serving) begin
      wait_cnt <= wait_cnt + 1;
      if (wait_cnt == 4) begin
        rd_ack   <= 1'b1;
        rd_n     <= W'(n_of(swap_lat, int'(s_cal1), int'(s_cal2)));
        serving  <= 1'b0;
        readouts <= readouts + 1;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input real k1_i, input real k2_i, input real cx_i, input string name);
    int n1, n2, exp1 = 0, exp2 = 0, guard = 0;
    cal_sel_e exp_sel;
    k1 = k1_i; k2 = k2_i; cx = cx_i;
    n1 = n_of(0, 0, 0);
    n2 = n_of(1, 0, 0);
    if (n1 < n2) begin
      exp_sel = CAL_SEL_CAL1;
      for (int c = 0; c < 16; c++) if (n_of(0, c, 0) <= n_of(1, c, 0)) exp1 = c;
    end else if (n1 > n2) begin
      exp_sel = CAL_SEL_CAL2;
      for (int c = 0; c < 16; c++) if (n_of(0, 0, c) >= n_of(1, 0, c)) exp2 = c;
    end else exp_sel = CAL_SEL_NONE;
    readouts = 0;
    @(negedge clk) start_cal = 1'b1;
    @(negedge clk) start_cal = 1'b0;
    check(busy, {name, ": busy"});
    while (!done && guard < 10000) begin @(negedge clk); guard++; end
    check(done, {name, ": done"});
    check(cal_sel == exp_sel, $sformatf("%s: bank %0d expected %0d", name, cal_sel, exp_sel));
    check(s_cal1 == 4'(exp1) && s_cal2 == 4'(exp2),
          $sformatf("%s: codes %0d/%0d expected %0d/%0d (n1=%0d n2=%0d)", name, s_cal1, s_cal2, exp1, exp2, n1, n2));
    check(readouts == ((exp_sel == CAL_SEL_NONE) ? 2 : 10), $sformatf("%s: %0d readouts", name, readouts));
    repeat (3) @(negedge clk);
    check(!busy && s_cal1 == 4'(exp1) && s_cal2 == 4'(exp2), {name, ": codes held"});
  endtask

  initial begin
    rst_n = 1'b1; start_cal = 1'b0; mm = 128.0;
    #1 rst_n = 1'b0;  // a falling edge, so the asynchronous reset is applied
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_case(1.00, 1.05, 5_000_000.0, "OSC1 faster");
    run_case(1.00, 1.05, 12_000_000.0, "OSC1 faster, other Cx");
    run_case(1.06, 1.00, 5_000_000.0, "OSC2 faster");
    run_case(1.02, 1.00, 20_000_000.0, "OSC2 slightly faster");
    run_case(1.00, 1.00, 5_000_000.0, "no mismatch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
