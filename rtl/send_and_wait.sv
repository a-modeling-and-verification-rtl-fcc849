// send_and_wait: immediate-ACK control for one outgoing frame.
//
// A request is sent to the PHY transmitter as soon as the transmitter is idle
// (tx_status). When the transmitter confirms the end of the frame the block
// listens for the ACK (sw_listen) and starts a timer of ACK_TIMEOUT cycles. An
// ACK from the frame's destination carrying the same sequence and fragment
// numbers confirms success upward; if the timer runs out first a failure is
// confirmed, and the block above decides whether to retry. Broadcast frames
// need no ACK and succeed when sent. A clear while sending is passed to the
// transmitter; a clear while waiting just stops the wait. `busy` is the
// sw_status the blocks above check. This follows the send-and-wait state
// diagram; the timeout value is this design's choice.
module send_and_wait
  import mac_pkg::*;
#(
  parameter int ACK_TIMEOUT = 32
) (
  input  logic     clk,
  input  logic     rst_n,
  mac_link_if.dst  up,
  output logic     busy,
  // PHY transmitter
  input  logic     tx_busy,
  output logic     tx_req,
  output frame_t   tx_frm,
  output logic     tx_clr,
  input  logic     tx_cfm,
  // ACK indication from dispatch
  input  logic     ack_valid,
  input  frame_t   ack_frm,
  output logic     timeout_evt   // pulse: no ACK within ACK_TIMEOUT
);
  typedef enum logic [1:0] {SW_IDLE, SW_WAIT_TX, SW_WAIT_CFM, SW_WAIT_ACK} state_e;
  state_e state;
  frame_t frm;
  logic [15:0] timer;
  logic ack_match;

  assign busy      = (state != SW_IDLE);
  assign ack_match = ack_valid && ack_frm.ftype == FT_ACK && ack_frm.src == frm.dst &&
                     ack_frm.seq == frm.seq && ack_frm.frag == frm.frag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= SW_IDLE;
      frm         <= '0;
      timer       <= '0;
      up.cfm      <= 1'b0;
      up.ok       <= 1'b0;
      tx_req      <= 1'b0;
      tx_frm      <= '0;
      tx_clr      <= 1'b0;
      timeout_evt <= 1'b0;
    end else begin
      up.cfm      <= 1'b0;
      tx_req      <= 1'b0;
      tx_clr      <= 1'b0;
      timeout_evt <= 1'b0;
      if (up.clr) begin
        // S: stop the transmitter; W: stop listening
        if (state == SW_WAIT_CFM) tx_clr <= 1'b1;
        state <= SW_IDLE;
      end else begin
        case (state)
          SW_IDLE: if (up.req) begin
            frm   <= up.frm;
            state <= SW_WAIT_TX;
          end
          SW_WAIT_TX: if (!tx_busy && !tx_req) begin
            tx_req <= 1'b1;
            tx_frm <= frm;
            state  <= SW_WAIT_CFM;
          end
          SW_WAIT_CFM: if (tx_cfm) begin
            if (frm.dst == BCAST_ID) begin
              up.cfm <= 1'b1;
              up.ok  <= 1'b1;
              state  <= SW_IDLE;
            end else begin
              timer <= 16'(ACK_TIMEOUT);
              state <= SW_WAIT_ACK;
            end
          end
          SW_WAIT_ACK: begin
            if (ack_match) begin
              up.cfm <= 1'b1;
              up.ok  <= 1'b1;
              state  <= SW_IDLE;
            end else if (timer == '0) begin
              up.cfm      <= 1'b1;
              up.ok       <= 1'b0;
              timeout_evt <= 1'b1;
              state       <= SW_IDLE;
            end else begin
              timer <= timer - 1'b1;
            end
          end
          default: state <= SW_IDLE;
        endcase
      end
    end
  end

endmodule
