// dispatch: decodes each frame the receiver hands up and sends it to the
// block that handles its type.
//
// Frames addressed neither to this device (MY_ID) nor to the broadcast
// address are discarded. A beacon goes to the beacon decoder, an ACK to
// send-and-wait, a data frame to defragmentation and a command frame to the
// command buffer. A unicast data or command frame also triggers the ACK block.
// All outputs are registered one-cycle pulses with the frame on `frm`. The
// routing follows the MAC function stack; the address filter is this design's.
module dispatch
  import mac_pkg::*;
#(
  parameter logic [ID_W-1:0] MY_ID = '0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   rx_valid,
  input  frame_t rx_frm,
  output frame_t frm,
  output logic   beacon_valid,
  output logic   ack_valid,
  output logic   data_valid,
  output logic   cmd_valid,
  output logic   ack_req,
  output logic   discard_evt
);
  logic for_me, unicast;
  assign unicast = (rx_frm.dst == MY_ID);
  assign for_me  = unicast || (rx_frm.dst == BCAST_ID);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frm          <= '0;
      beacon_valid <= 1'b0;
      ack_valid    <= 1'b0;
      data_valid   <= 1'b0;
      cmd_valid    <= 1'b0;
      ack_req      <= 1'b0;
      discard_evt  <= 1'b0;
    end else begin
      beacon_valid <= 1'b0;
      ack_valid    <= 1'b0;
      data_valid   <= 1'b0;
      cmd_valid    <= 1'b0;
      ack_req      <= 1'b0;
      discard_evt  <= rx_valid && !for_me;
      if (rx_valid) frm <= rx_frm;
      if (rx_valid && for_me) begin
        case (rx_frm.ftype)
          FT_BEACON: beacon_valid <= 1'b1;
          FT_ACK:    ack_valid    <= unicast;
          FT_DATA: begin
            data_valid <= 1'b1;
            ack_req    <= unicast;
          end
          FT_CMD: begin
            cmd_valid <= 1'b1;
            ack_req   <= unicast;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
