// Self-checking testbench of cdc_down_counter (counter #1).
//
// For several presets M it holds the counter in preset, checks the preset value,
// then enables it and counts the clock periods during which the window is open:
// it must be exactly M, and ENDCOUNT1 must follow on the last edge and stay,
// with the count frozen at 0. It also checks that nothing moves while EN1 is low.
module tb_cdc_down_counter;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned W = 12;
  logic         clk = 1'b0, load, en;
  logic [W-1:0] m, count;
  logic         window, endcount;
  int           checks = 0, failures = 0;

  cdc_down_counter #(.CNT_W(W)) dut (.clk(clk), .load(load), .m(m), .en(en),
                                     .count(count), .window(window), .endcount(endcount));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (count=%0d window=%0b end=%0b)", what, count, window, endcount); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int presets[5] = '{1, 8, 32, 128, 4095};

  initial begin
    en = 1'b0; load = 1'b0; m = '0;
    foreach (presets[i]) begin
      int open_periods;
      m = W'(presets[i]);
      load = 1'b0;
      #1 load = 1'b1;
      #2;
      check(count == m && !window && !endcount, "preset value");
      @(negedge clk);
      load = 1'b0;
      repeat (3) @(negedge clk);
      check(count == m && !window, "no count while EN1 low");
      en = 1'b1;
      @(negedge clk);             // arming edge
      check(window && count == m, "window opens on first edge");
      open_periods = 0;
      while (window && open_periods < 5000) begin
        @(negedge clk);
        open_periods++;
      end
      check(open_periods == presets[i], $sformatf("window length %0d for M=%0d", open_periods, presets[i]));
      check(endcount && count == 0, "ENDCOUNT1 at zero");
      repeat (4) @(negedge clk);
      check(endcount && count == 0 && !window, "frozen at zero");
      en = 1'b0;
      load = 1'b1;
      #1;
      check(!endcount && count == m, "asynchronous preset");
      load = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
