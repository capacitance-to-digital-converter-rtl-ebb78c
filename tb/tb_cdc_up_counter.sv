// Self-checking testbench of cdc_up_counter (counter #2), at a reduced width of
// 6 bits so that saturation is reached quickly.
//
// Drives random EN2 / window patterns and compares the count with a reference
// count of the edges at which both were high; then keeps both high until the
// counter saturates at all ones and checks the overflow flag and the
// asynchronous clear.
module tb_cdc_up_counter;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned W = 6;
  logic         clk = 1'b0, clr, en, window, ovf;
  logic [W-1:0] count;
  int           checks = 0, failures = 0, ref_count = 0;

  cdc_up_counter #(.CNT_W(W)) dut (.clk(clk), .clr(clr), .en(en), .window(window),
                                   .count(count), .ovf(ovf));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (count=%0d ref=%0d ovf=%0b)", what, count, ref_count, ovf); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0; window = 1'b0; clr = 1'b0;
    #1 clr = 1'b1;
    #2;
    check(count == 0 && !ovf, "clear");
    @(negedge clk);
    clr = 1'b0;
    for (int i = 0; i < 40; i++) begin
      en     = 1'($urandom_range(0, 1));
      window = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (en && window) ref_count++;
      @(negedge clk);
      check(count == W'(ref_count), "count follows EN2 and window");
    end
    en = 1'b1; window = 1'b1;
    repeat (2 ** W) @(negedge clk);
    check(count == '1, "saturates at all ones");
    check(ovf, "overflow flag");
    window = 1'b0;
    repeat (3) @(negedge clk);
    check(count == '1 && ovf, "frozen when window closed");
    clr = 1'b1;
    #1;
    check(count == 0 && !ovf, "asynchronous clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
