// Self-checking testbench of the calibration capacitor bank model: every 4-bit
// code must switch in code * 10 fF (in aF).
module tb_cdc_cal_cap_bank;
  timeunit 1ns; timeprecision 1ps;

  logic [3:0]  s;
  logic [31:0] c_af;
  int          checks = 0, failures = 0;

  cdc_cal_cap_bank dut (.s(s), .c_af(c_af));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int code = 0; code < 16; code++) begin
      s = 4'(code);
      #1;
      checks++;
      if (c_af != 32'(code * 10_000)) begin
        failures++;
        $display("FAIL code %0d gives %0d aF", code, c_af);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
