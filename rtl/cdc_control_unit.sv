// CDC control unit: sequences readouts and the conversion flowchart.
//
// One readout presets counter #1 to M and clears counter #2 (cnt_load), sets the
// load and counter swaps, raises EN1/EN2, waits for the synchronised ENDCOUNT1 and
// captures the final count n of counter #2. A conversion (start_meas) is the
// measurement flowchart: a readout with Cx on OSC1 (direct loads); if n > M the
// assumption Cx > CREF held and n is the result (Cx = n/M * CREF); otherwise the
// readout is repeated with swapped loads and that n is the result
// (Cx = M/n * CREF). Counters stay in direct mode for conversions.
//
// The calibration unit asks for single readouts through cal_req/cal_swap: with
// cal_swap = 0 loads and counters are both direct (direct-direct), with 1 both
// swapped (swapped-swapped). cal_req must stay high, with cal_swap stable, until
// the one-cycle cal_ack, which comes with the count on rd_n. A request is only
// taken when no conversion is running; a calibration request wins over a
// simultaneous start_meas.
//
// Timing: clk is the control clock (in the top, the OSC2 output). Counters are
// held in preset/clear for PRESET_CYC cycles before each window (cnt_load always
// rises from low, so the asynchronous preset sees an edge); ENDCOUNT1 arrives through a two-flop synchroniser, so a readout takes
// PRESET_CYC + (M + 1) window periods + about 3 control cycles. out_valid is a
// one-cycle pulse; out_n/out_swapped/out_ovf hold until the next result.
//
// The readout and flowchart follow the description of the converter; the clock
// choice, handshake, synchroniser and cycle counts are choices of this design.
module cdc_control_unit
  import cdc_pkg::*;
#(
  parameter int unsigned CNT_W      = cdc_pkg::CNT_W_DEF,
  parameter int unsigned PRESET_CYC = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] m,            // down-counter preset M (>= 1)
  input  logic             start_meas,   // START MEAS: run one conversion
  // readout requests from the calibration unit
  input  logic             cal_req,
  input  logic             cal_swap,     // 0: direct-direct, 1: swapped-swapped
  output logic             cal_ack,
  output logic [CNT_W-1:0] rd_n,         // n of the last readout
  // counters and swaps
  output logic             cnt_load,     // preset counter #1, clear counter #2
  output logic             en1,
  output logic             en2,
  output conn_e            load_conn,    // cap switch box position
  output conn_e            cnt_conn,     // counter mux position
  input  logic             endcount,     // ENDCOUNT1, asynchronous to clk
  input  logic [CNT_W-1:0] n_in,         // count #2
  input  logic             ovf_in,       // counter #2 overflow
  // conversion result
  output logic             busy,
  output logic             out_valid,
  output logic [CNT_W-1:0] out_n,
  output logic             out_swapped,  // 1: n came from the swapped readout
  output logic             out_ovf
);
  timeunit 1ns; timeprecision 1ps;

  typedef enum logic [2:0] {
    ST_IDLE,
    ST_PRESET,
    ST_RUN,
    ST_EVAL,
    ST_ACK
  } state_e;

  state_e                    state;
  logic                      for_cal;       // readout requested by the calibration unit
  logic [$clog2(PRESET_CYC+1)-1:0] timer;
  logic                      endcount_s;
  logic [CNT_W-1:0]          n_cap;
  logic                      ovf_cap;

  cdc_sync2 u_sync (.clk(clk), .rst_n(rst_n), .d(endcount), .q(endcount_s));

  assign busy     = (state != ST_IDLE);
  assign cnt_load = (state == ST_PRESET);
  assign en1      = (state == ST_RUN);
  assign en2      = (state == ST_RUN);
  assign cal_ack  = (state == ST_ACK);
  assign rd_n     = n_cap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_IDLE;
      for_cal     <= 1'b0;
      timer       <= '0;
      load_conn   <= CONN_DIRECT;
      cnt_conn    <= CONN_DIRECT;
      n_cap       <= '0;
      ovf_cap     <= 1'b0;
      out_valid   <= 1'b0;
      out_n       <= '0;
      out_swapped <= 1'b0;
      out_ovf     <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          timer <= '0;
          if (cal_req) begin
            for_cal   <= 1'b1;
            load_conn <= cal_swap ? CONN_SWAPPED : CONN_DIRECT;
            cnt_conn  <= cal_swap ? CONN_SWAPPED : CONN_DIRECT;
            state     <= ST_PRESET;
          end else if (start_meas) begin
            for_cal   <= 1'b0;
            load_conn <= CONN_DIRECT;   // first assume Cx > CREF
            cnt_conn  <= CONN_DIRECT;
            state     <= ST_PRESET;
          end
        end
        ST_PRESET: begin
          // counters held in preset; the synchronised ENDCOUNT1 settles low
          if (timer == PRESET_CYC[$bits(timer)-1:0] - 1'b1) begin
            timer <= '0;
            if (!endcount_s) state <= ST_RUN;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        ST_RUN: begin
          if (endcount_s) begin
            // counter #2 is frozen once ENDCOUNT1 is high: n is stable
            n_cap   <= n_in;
            ovf_cap <= ovf_in;
            state   <= for_cal ? ST_ACK : ST_EVAL;
          end
        end
        ST_EVAL: begin
          if (load_conn == CONN_DIRECT && n_cap <= m) begin
            // n <= M: Cx < CREF, repeat with swapped loads
            load_conn <= CONN_SWAPPED;
            state     <= ST_PRESET;
          end else begin
            out_valid   <= 1'b1;
            out_n       <= n_cap;
            out_swapped <= (load_conn == CONN_SWAPPED);
            out_ovf     <= ovf_cap;
            state       <= ST_IDLE;
          end
        end
        ST_ACK: begin
          state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Readout request handshake: held, with a stable mode, until acknowledged.
  a_req_held : assert property (@(posedge clk) disable iff (!rst_n)
                                 (cal_req && !cal_ack) |=> cal_req);
  a_req_mode : assert property (@(posedge clk) disable iff (!rst_n)
                                 (cal_req && !cal_ack) |=> $stable(cal_swap));

endmodule
