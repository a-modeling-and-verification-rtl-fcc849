// ack_responder: sends the immediate ACK for a received unicast data or command
// frame.
//
// On a trigger from dispatch it waits SIFS cycles, then asks the transmitter
// to send an ACK frame addressed to the frame's source, carrying the frame's
// sequence and fragment numbers, ACK_LEN cycles long. It is busy until the
// transmitter confirms; a trigger that arrives while busy is dropped and
// counted. The document only says that the ACK block returns an ACK to the
// source; the SIFS wait and the ACK length are this design's choices.
module ack_responder
  import mac_pkg::*;
#(
  parameter logic [ID_W-1:0] MY_ID   = '0,
  parameter int              SIFS    = 2,
  parameter int              ACK_LEN = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   trig,
  input  frame_t rx_frm,
  output logic   tx_req,
  output frame_t tx_frm,
  input  logic   tx_cfm,
  output logic   busy,
  output logic   drop_evt
);
  typedef enum logic [1:0] {AK_IDLE, AK_SIFS, AK_WAIT_CFM} state_e;
  state_e state;
  logic [7:0] cnt;

  assign busy = (state != AK_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= AK_IDLE;
      cnt      <= '0;
      tx_req   <= 1'b0;
      tx_frm   <= '0;
      drop_evt <= 1'b0;
    end else begin
      tx_req   <= 1'b0;
      drop_evt <= trig && (state != AK_IDLE);
      case (state)
        AK_IDLE: if (trig) begin
          tx_frm         <= '0;
          tx_frm.ftype   <= FT_ACK;
          tx_frm.src     <= MY_ID;
          tx_frm.dst     <= rx_frm.src;
          tx_frm.seq     <= rx_frm.seq;
          tx_frm.frag    <= rx_frm.frag;
          tx_frm.last    <= 1'b1;
          tx_frm.len     <= LEN_W'(ACK_LEN);
          cnt            <= 8'(SIFS);
          state          <= AK_SIFS;
        end
        AK_SIFS: begin
          if (cnt <= 8'd1) begin
            tx_req <= 1'b1;
            state  <= AK_WAIT_CFM;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        AK_WAIT_CFM: if (tx_cfm) state <= AK_IDLE;
        default: state <= AK_IDLE;
      endcase
    end
  end

endmodule
