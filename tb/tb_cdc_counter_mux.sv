// Self-checking testbench of cdc_counter_mux: drives every combination of the
// two oscillator inputs in both counter positions and compares the two counter
// clocks with the expected routing (direct: OSC1->#1, OSC2->#2; swapped: the
// reverse).
module tb_cdc_counter_mux;
  timeunit 1ns; timeprecision 1ps;
  import cdc_pkg::*;

  logic  osc1, osc2, c1, c2;
  conn_e conn;
  int    checks = 0, failures = 0;

  cdc_counter_mux dut (.osc1_clk(osc1), .osc2_clk(osc2), .cnt_conn(conn),
                       .cnt1_clk(c1), .cnt2_clk(c2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int v = 0; v < 4; v++) begin
        conn = s[0] ? CONN_SWAPPED : CONN_DIRECT;
        osc1 = v[0];
        osc2 = v[1];
        #1;
        checks += 2;
        if (c1 !== (s[0] ? v[1] : v[0])) begin failures++; $display("FAIL cnt1 s=%0d v=%0d", s, v); end
        if (c2 !== (s[0] ? v[0] : v[1])) begin failures++; $display("FAIL cnt2 s=%0d v=%0d", s, v); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
