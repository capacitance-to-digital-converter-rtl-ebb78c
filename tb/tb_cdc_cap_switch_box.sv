// Self-checking testbench of the cap switch box model: in direct position Cx
// loads OSC1 and the 500 fF reference loads OSC2, in swapped position the
// reverse, for a few values of Cx.
module tb_cdc_cap_switch_box;
  timeunit 1ns; timeprecision 1ps;
  import cdc_pkg::*;

  conn_e       conn;
  logic [31:0] cx, c1, c2;
  int          checks = 0, failures = 0;

  cdc_cap_switch_box dut (.load_conn(conn), .cx_af(cx), .osc1_c_af(c1), .osc2_c_af(c2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) begin
      cx = $urandom_range(100_000, 32_000_000);
      conn = CONN_DIRECT;
      #1;
      checks += 2;
      if (c1 != cx)      begin failures++; $display("FAIL direct OSC1 load"); end
      if (c2 != 500_000) begin failures++; $display("FAIL direct OSC2 load"); end
      conn = CONN_SWAPPED;
      #1;
      checks += 2;
      if (c1 != 500_000) begin failures++; $display("FAIL swapped OSC1 load"); end
      if (c2 != cx)      begin failures++; $display("FAIL swapped OSC2 load"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
