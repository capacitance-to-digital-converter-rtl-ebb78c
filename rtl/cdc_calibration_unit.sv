// CDC calibration unit: load-agnostic self-calibration of oscillator mismatch.
//
// With whatever Cx is connected, the unit asks the control unit for a readout n1
// in direct-direct mode (Cx on OSC1, OSC1 drives counter #1) and n2 in
// swapped-swapped mode (Cx on OSC2, OSC2 drives counter #1). Without mismatch
// n1 = n2. If n1 < n2 OSC1 is the faster oscillator and the 4-bit code S_CAL1 of
// its calibration capacitor bank is searched; if n1 > n2 S_CAL2 is searched; if
// n1 = n2 calibration ends with both codes 0. The search is a successive
// approximation from the MSB down: set the bit, read n1 and n2 again, and clear
// the bit if it overshot (n1 > n2 while tuning CCAL1, n1 < n2 while tuning CCAL2).
// The other bank stays at 0000. After the LSB the codes are held until the next
// start_cal.
//
// Steps A (n1), B (n2), C (compare), D (set bit), E (n1), F (n2), G (update),
// H (last bit?) and I (end) follow the self-calibration flow chart of the
// converter; a full calibration is 2 + 2*CAL_W readouts.
//
// Interface: start_cal is sampled while idle; rd_req/rd_swap/rd_ack/rd_n is the
// readout handshake of the control unit (request held until the ack pulse).
// done pulses for one cycle at the end. clk is the control clock (the OSC2
// output in the top); the state encoding and handshake are choices of this design.
module cdc_calibration_unit
  import cdc_pkg::*;
#(
  parameter int unsigned CNT_W = cdc_pkg::CNT_W_DEF,
  parameter int unsigned CAL_W = cdc_pkg::CAL_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_cal,
  output logic             rd_req,
  output logic             rd_swap,     // 0: direct-direct, 1: swapped-swapped
  input  logic             rd_ack,
  input  logic [CNT_W-1:0] rd_n,
  output logic [CAL_W-1:0] s_cal1,      // code of CCAL1 (OSC1 bank)
  output logic [CAL_W-1:0] s_cal2,      // code of CCAL2 (OSC2 bank)
  output cal_sel_e         cal_sel,     // bank chosen at step C
  output logic             busy,
  output logic             done
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [3:0] {
    ST_IDLE,
    ST_A,      // readout n1, direct-direct
    ST_B,      // readout n2, swapped-swapped
    ST_C,      // compare n1, n2
    ST_D,      // set the bit under test
    ST_E,      // readout n1
    ST_F,      // readout n2
    ST_G,      // keep or clear the bit
    ST_I       // end of calibration
  } state_e;

  state_e                     state;
  logic [CNT_W-1:0]           n1, n2;
  logic [$clog2(CAL_W)-1:0]   bit_idx;
  logic                       overshoot;

  assign rd_req  = (state == ST_A) || (state == ST_B) || (state == ST_E) || (state == ST_F);
  assign rd_swap = (state == ST_B) || (state == ST_F);
  assign busy    = (state != ST_IDLE);

  // Too much capacitance added to the bank under search.
  assign overshoot = (cal_sel == CAL_SEL_CAL1) ? (n1 > n2) : (n1 < n2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      n1      <= '0;
      n2      <= '0;
      bit_idx <= '0;
      s_cal1  <= '0;
      s_cal2  <= '0;
      cal_sel <= CAL_SEL_NONE;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start_cal) begin
          s_cal1  <= '0;
          s_cal2  <= '0;
          cal_sel <= CAL_SEL_NONE;
          state   <= ST_A;
        end
        ST_A: if (rd_ack) begin n1 <= rd_n; state <= ST_B; end
        ST_B: if (rd_ack) begin n2 <= rd_n; state <= ST_C; end
        ST_C: begin
          bit_idx <= CAL_W[$bits(bit_idx)-1:0] - 1'b1;
          if (n1 == n2) begin
            state <= ST_I;
          end else begin
            cal_sel <= (n1 < n2) ? CAL_SEL_CAL1 : CAL_SEL_CAL2;
            state   <= ST_D;
          end
        end
        ST_D: begin
          if (cal_sel == CAL_SEL_CAL1) s_cal1[bit_idx] <= 1'b1;
          else                         s_cal2[bit_idx] <= 1'b1;
          state <= ST_E;
        end
        ST_E: if (rd_ack) begin n1 <= rd_n; state <= ST_F; end
        ST_F: if (rd_ack) begin n2 <= rd_n; state <= ST_G; end
        ST_G: begin
          if (overshoot) begin
            if (cal_sel == CAL_SEL_CAL1) s_cal1[bit_idx] <= 1'b0;
            else                         s_cal2[bit_idx] <= 1'b0;
          end
          // step H: SAR over after the LSB
          if (bit_idx == '0) begin
            state <= ST_I;
          end else begin
            bit_idx <= bit_idx - 1'b1;
            state   <= ST_D;
          end
        end
        ST_I: begin
          done  <= 1'b1;
          state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
