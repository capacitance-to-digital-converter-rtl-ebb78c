// Self-checking testbench of the oscillator model: the period must be
// K * (load + calibration capacitance), it must follow a load change, and the
// output must stay low while disabled.
module tb_cdc_dml_osc;
  timeunit 1ns; timeprecision 1ps;

  logic        enable;
  logic [31:0] c_load, c_cal;
  logic        clk_out;
  int          checks = 0, failures = 0;

  cdc_dml_osc #(.K_NS_PER_AF(0.5)) dut (.enable(enable), .c_load_af(c_load),
                                        .c_cal_af(c_cal), .clk_out(clk_out));

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input real expected_ns);
    realtime t0, t1;
    repeat (2) @(posedge clk_out);   // let a load change settle
    @(posedge clk_out); t0 = $realtime;
    @(posedge clk_out); t1 = $realtime;
    checks++;
    if ((t1 - t0) < expected_ns - 0.01 || (t1 - t0) > expected_ns + 0.01) begin
      failures++;
      $display("FAIL period %f ns, expected %f ns", t1 - t0, expected_ns);
    end
  endtask

  initial begin
    enable = 1'b0; c_load = 32'd500_000; c_cal = 32'd0;
    #10_000;
    checks++;
    if (clk_out !== 1'b0) begin failures++; $display("FAIL output not low while disabled"); end
    enable = 1'b1;
    measure(0.5 * 500_000.0);
    c_cal = 32'd70_000;
    measure(0.5 * 570_000.0);
    c_load = 32'd2_000_000; c_cal = 32'd0;
    measure(0.5 * 2_000_000.0);
    enable = 1'b0;
    #3_000_000;
    checks++;
    if (clk_out !== 1'b0) begin failures++; $display("FAIL output not low after disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
