// beacon_generator: the piconet coordinator's beacon source.
//
// When enabled, it asks the transmitter for a beacon, waits for the confirm,
// then counts SF_LEN cycles, the superframe that follows the beacon, and asks
// for the next one. The beacon is broadcast from MY_ID and carries the
// superframe length, CAP length, CTA length and CTA owners as a
// beacon_info_t. As the coordinator does not hear its own beacon, each sent
// beacon is also handed to its own beacon decoder (own_valid, own_frm) when
// the transmitter confirms it. The schedule is fixed by parameters: the
// channel time management that would choose it is not part of this design.
module beacon_generator
  import mac_pkg::*;
#(
  parameter logic [ID_W-1:0]            MY_ID      = '0,
  parameter int                         BEACON_LEN = 32,
  parameter int                         SF_LEN     = 3200,
  parameter int                         CAP_LEN    = 1024,
  parameter int                         CTA_LEN    = 512,
  parameter logic [N_CTA-1:0][ID_W-1:0] OWNERS     = {4'd3, 4'd2, 4'd1, 4'd0}
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  output logic   tx_req,
  output frame_t tx_frm,
  input  logic   tx_cfm,
  output logic   own_valid,
  output frame_t own_frm,
  output logic [7:0] beacon_seq
);
  typedef enum logic [1:0] {BG_OFF, BG_SEND, BG_WAIT_CFM, BG_COUNT} state_e;
  state_e state;
  logic [TIME_W-1:0] cnt;
  beacon_info_t info;
  frame_t beacon;

  always_comb begin
    info.sf_len  = TIME_W'(SF_LEN);
    info.cap_len = TIME_W'(CAP_LEN);
    info.cta_len = TIME_W'(CTA_LEN);
    info.owner   = OWNERS;
    beacon         = '0;
    beacon.ftype   = FT_BEACON;
    beacon.src     = MY_ID;
    beacon.dst     = BCAST_ID;
    beacon.seq     = beacon_seq;
    beacon.last    = 1'b1;
    beacon.len     = LEN_W'(BEACON_LEN);
    beacon.payload = 64'(info);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= BG_OFF;
      cnt        <= '0;
      tx_req     <= 1'b0;
      tx_frm     <= '0;
      own_valid  <= 1'b0;
      own_frm    <= '0;
      beacon_seq <= '0;
    end else begin
      tx_req    <= 1'b0;
      own_valid <= 1'b0;
      case (state)
        BG_OFF:  if (en) state <= BG_SEND;
        BG_SEND: begin
          tx_req <= 1'b1;
          tx_frm <= beacon;
          state  <= BG_WAIT_CFM;
        end
        BG_WAIT_CFM: if (tx_cfm) begin
          own_valid  <= 1'b1;
          own_frm    <= tx_frm;
          beacon_seq <= beacon_seq + 1'b1;
          cnt        <= TIME_W'(SF_LEN - 1);
          state      <= BG_COUNT;
        end
        BG_COUNT: begin
          if (cnt == '0) state <= en ? BG_SEND : BG_OFF;
          else           cnt   <= cnt - 1'b1;
        end
        default: state <= BG_OFF;
      endcase
    end
  end

endmodule
