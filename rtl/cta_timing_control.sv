// cta_timing_control: makes sure a stream frame is sent inside the device's own
// channel time allocation (CTA).
//
// On a request it first checks whether send-and-wait is free (sw_status); if
// not it waits for it (tc_wait_sw). It then estimates the frame's total
// processing time, its air time plus OVERHEAD cycles for the ACK exchange,
// and compares it with the time left in the current own CTA (time_enough). If
// it fits, the frame is sent at once (tc_transmit); otherwise it is suspended
// until the next CTA start indication (tc_wait_cta), when it is resumed. The
// confirm from below is passed up (re_finish). A clear from above is passed
// down if a frame is in flight. States and transitions follow the CTA timing
// control state diagram; the overhead term is this design's choice.
//
// Inputs from superframe control: cta_start pulses when an own CTA begins,
// cta_active is high during it, cta_remaining counts the cycles left.
module cta_timing_control
  import mac_pkg::*;
#(
  parameter int OVERHEAD = 40
) (
  input  logic              clk,
  input  logic              rst_n,
  mac_link_if.dst           up,
  mac_link_if.src           dn,
  input  logic              sw_busy,
  input  logic              cta_start,
  input  logic              cta_active,
  input  logic [TIME_W-1:0] cta_remaining,
  output logic              suspend_evt    // pulse: a frame was held for the next CTA
);
  typedef enum logic [2:0] {TC_IDLE, TC_WAIT_SW, TC_CHECK, TC_WAIT_CTA, TC_WAIT_CFM} state_e;
  state_e state;
  frame_t frm;
  logic   time_enough;

  assign time_enough = cta_active &&
                       (cta_remaining >= TIME_W'(air_time(frm)) + TIME_W'(OVERHEAD));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= TC_IDLE;
      frm         <= '0;
      up.cfm      <= 1'b0;
      up.ok       <= 1'b0;
      dn.req      <= 1'b0;
      dn.clr      <= 1'b0;
      dn.frm      <= '0;
      suspend_evt <= 1'b0;
    end else begin
      up.cfm      <= 1'b0;
      dn.req      <= 1'b0;
      dn.clr      <= 1'b0;
      suspend_evt <= 1'b0;
      if (up.clr) begin
        if (state == TC_WAIT_CFM) dn.clr <= 1'b1;
        state <= TC_IDLE;
      end else begin
        case (state)
          TC_IDLE: if (up.req) begin
            frm   <= up.frm;
            state <= sw_busy ? TC_WAIT_SW : TC_CHECK;
          end
          TC_WAIT_SW: if (!sw_busy) state <= TC_CHECK;
          TC_CHECK: begin
            if (time_enough) begin
              dn.req <= 1'b1;
              dn.frm <= frm;
              state  <= TC_WAIT_CFM;
            end else begin
              suspend_evt <= 1'b1;
              state       <= TC_WAIT_CTA;
            end
          end
          TC_WAIT_CTA: if (cta_start) state <= TC_WAIT_SW;
          TC_WAIT_CFM: if (dn.cfm) begin
            up.cfm <= 1'b1;
            up.ok  <= dn.ok;
            state  <= TC_IDLE;
          end
          default: state <= TC_IDLE;
        endcase
      end
    end
  end

endmodule
