// Self-checking testbench of cdc_control_unit.
//
// The counters are replaced by a simple model: while cnt_load is high it clears
// the count; once EN1 is high it raises ENDCOUNT1 after a fixed number of clock
// cycles and presents a count n chosen by the testbench for the current
// load/counter position. The testbench checks the measurement flowchart
// (n > M ends after the direct readout, n <= M adds a swapped readout), the
// switch positions of each readout, the calibration readout handshake in both
// modes, overflow reporting and the time from start to result.
module tb_cdc_control_unit;
  timeunit 1ns; timeprecision 1ps;
  import cdc_pkg::*;

  localparam int unsigned W = 12;
  localparam int unsigned WIN_CYC = 20;   // modelled window length in clk cycles

  logic         clk = 1'b0, rst_n;
  logic [W-1:0] m;
  logic         start_meas, cal_req, cal_swap, cal_ack;
  logic [W-1:0] rd_n, n_in, out_n;
  logic         cnt_load, en1, en2, endcount, ovf_in;
  conn_e        load_conn, cnt_conn;
  logic         busy, out_valid, out_swapped, out_ovf;

  int checks = 0, failures = 0;
  int readouts = 0;
  int run_cycles = 0;
  // counts the model returns per position
  int n_direct, n_swapped, n_dd = 0, n_ss;
  logic ovf_model;
  conn_e last_load[$], last_cnt[$];

  cdc_control_unit #(.CNT_W(W)) dut (
    .clk(clk), .rst_n(rst_n), .m(m), .start_meas(start_meas),
    .cal_req(cal_req), .cal_swap(cal_swap), .cal_ack(cal_ack), .rd_n(rd_n),
    .cnt_load(cnt_load), .en1(en1), .en2(en2), .load_conn(load_conn), .cnt_conn(cnt_conn),
    .endcount(endcount), .n_in(n_in), .ovf_in(ovf_in),
    .busy(busy), .out_valid(out_valid), .out_n(out_n), .out_swapped(out_swapped), .out_ovf(out_ovf));

  always #5 clk = ~clk;

  // counter model
  always @(posedge clk) begin
    if (cnt_load) begin
      endcount   <= 1'b0;
      n_in       <= '0;
      ovf_in     <= 1'b0;
      run_cycles <= 0;
    end else if (en1 && !endcount) begin
      if (!en2) begin failures++; $display("FAIL EN2 low during window"); end
      run_cycles <= run_cycles + 1;
      if (run_cycles == 0) begin
        readouts++;
        last_load.push_back(load_conn);
        last_cnt.push_back(cnt_conn);
      end
      if (run_cycles == WIN_CYC - 1) begin
        endcount <= 1'b1;
        ovf_in   <= ovf_model;
        if (load_conn == CONN_DIRECT && cnt_conn == CONN_DIRECT)        n_in <= W'(n_direct);
        else if (load_conn == CONN_SWAPPED && cnt_conn == CONN_DIRECT)  n_in <= W'(n_swapped);
        else if (load_conn == CONN_SWAPPED && cnt_conn == CONN_SWAPPED) n_in <= W'(n_ss);
        else                                                            n_in <= W'(n_dd);
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one conversion; returns the number of clk cycles from start to out_valid
  task automatic convert(output int cycles);
    readouts = 0;
    last_load.delete(); last_cnt.delete();
    @(negedge clk) start_meas = 1'b1;
    @(negedge clk) start_meas = 1'b0;
    cycles = 1;
    while (!out_valid && cycles < 1000) begin @(negedge clk); cycles++; end
  endtask

  task automatic cal_readout(input bit swap, output logic [W-1:0] n);
    int guard = 0;
    readouts = 0;
    last_load.delete(); last_cnt.delete();
    @(negedge clk);
    cal_req = 1'b1; cal_swap = swap;
    while (!cal_ack && guard < 1000) begin @(negedge clk); guard++; end
    n = rd_n;
    @(negedge clk) cal_req = 1'b0;
  endtask

  initial begin
    int cyc;
    logic [W-1:0] n;
    rst_n = 1'b1; start_meas = 1'b0; cal_req = 1'b0; cal_swap = 1'b0;
    m = 12'd32; ovf_model = 1'b0;
    endcount = 1'b0; n_in = '0; ovf_in = 1'b0;
    #1 rst_n = 1'b0;  // a falling edge, so the asynchronous reset is applied
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(!busy && !en1, "idle after reset");

    // Cx > CREF: n > M after the direct readout
    n_direct = 100; n_swapped = 7;
    convert(cyc);
    check(out_valid && out_n == 100 && !out_swapped, "direct result");
    check(readouts == 1 && last_load[0] == CONN_DIRECT && last_cnt[0] == CONN_DIRECT, "one direct readout");
    // preset cycles + window + synchroniser + capture/evaluate
    check(cyc >= WIN_CYC + 3 + 2 && cyc <= WIN_CYC + 3 + 2 + 5, $sformatf("conversion time %0d cycles", cyc));

    // Cx < CREF: n <= M, swapped readout follows
    n_direct = 20; n_swapped = 51;
    convert(cyc);
    check(out_valid && out_n == 51 && out_swapped, "swapped result");
    check(readouts == 2, "two readouts");
    check(last_load.size() == 2 && last_load[1] == CONN_SWAPPED && last_cnt[1] == CONN_DIRECT,
          "second readout has swapped loads, direct counters");

    // n == M is not n > M: swapped readout
    n_direct = 32; n_swapped = 32;
    convert(cyc);
    check(out_swapped && readouts == 2, "n equal to M repeats swapped");

    // overflow is reported with the result
    n_direct = 4095; ovf_model = 1'b1;
    convert(cyc);
    check(out_ovf && !out_swapped, "overflow reported");
    ovf_model = 1'b0;

    // calibration readouts
    n_direct = 333; n_ss = 345;   // direct-direct is the position of a direct conversion readout
    cal_readout(1'b0, n);
    check(n == 333 && readouts == 1 && last_load[0] == CONN_DIRECT && last_cnt[0] == CONN_DIRECT,
          "direct-direct readout");
    check(!out_valid, "no conversion result for a calibration readout");
    cal_readout(1'b1, n);
    check(n == 345 && readouts == 1 && last_load[0] == CONN_SWAPPED && last_cnt[0] == CONN_SWAPPED,
          "swapped-swapped readout");
    repeat (5) @(negedge clk);
    check(!busy, "idle at the end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
