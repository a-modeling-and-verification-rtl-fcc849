// mac_pkg: types and constants shared by the IEEE 802.15.3 MAC blocks.
//
// A frame is carried between blocks as a descriptor (frame_t), not as a byte
// stream: type, source and destination device IDs, MSDU sequence number,
// fragment number, last-fragment flag, retry count, air time and a 64-bit
// payload. One unit of `len` is one clock cycle of air time. A beacon's payload
// is a beacon_info_t: superframe length, CAP length, CTA length and the owners
// of the CTAs that follow the CAP. The backoff-window table [7, 15, 31, 63] is
// the standard's; the field widths and the beacon layout are this design's own.
package mac_pkg;

  localparam int ID_W     = 4;
  localparam int LEN_W    = 12;
  localparam int TIME_W   = 16;
  localparam int N_CTA    = 4;      // CTAs per superframe (the superframe figure shows four)
  localparam int RETRY_W  = 2;

  localparam logic [ID_W-1:0] BCAST_ID = '1;   // broadcast / unassigned owner

  typedef enum logic [1:0] {
    FT_BEACON = 2'd0,
    FT_ACK    = 2'd1,
    FT_DATA   = 2'd2,
    FT_CMD    = 2'd3
  } ftype_e;

  typedef struct packed {
    ftype_e              ftype;
    logic [ID_W-1:0]     src;
    logic [ID_W-1:0]     dst;
    logic [7:0]          seq;
    logic [3:0]          frag;
    logic                last;
    logic [RETRY_W-1:0]  retry;
    logic [LEN_W-1:0]    len;
    logic [63:0]         payload;
  } frame_t;

  typedef struct packed {
    logic [TIME_W-1:0]            sf_len;    // superframe length, beacon end to next beacon start
    logic [TIME_W-1:0]            cap_len;   // CAP length, starts when the beacon ends
    logic [TIME_W-1:0]            cta_len;   // length of each CTA
    logic [N_CTA-1:0][ID_W-1:0]   owner;     // owner of CTA k, BCAST_ID = unused
  } beacon_info_t;

  // One-cycle event pulses a device reports, for monitoring and test.
  typedef struct packed {
    logic st_retry;       // stream fragment re-sent
    logic st_drop;        // stream fragment dropped after the retry limit
    logic cmd_retry;      // command re-sent
    logic cmd_drop;       // command dropped after the retry limit
    logic cta_suspend;    // stream frame held for the next CTA
    logic cap_busy;       // backoff countdown suspended by a busy medium
    logic cap_suspend;    // backoff suspended by the end of the CAP
    logic ack_timeout;    // no ACK before the send-and-wait timer ran out
    logic ack_sent;       // ACK frame sent
    logic dup_drop;       // repeated fragment dropped by defragmentation
    logic setup;          // superframe set up from a beacon
  } mac_evt_t;

  // Backoff window for attempt `retry` (0 = first attempt): 7, 15, 31, 63.
  function automatic logic [5:0] backoff_window(input logic [RETRY_W-1:0] retry);
    case (retry)
      2'd0:    return 6'd7;
      2'd1:    return 6'd15;
      2'd2:    return 6'd31;
      default: return 6'd63;
    endcase
  endfunction

  // Air time of a frame: at least one cycle.
  function automatic logic [LEN_W-1:0] air_time(input frame_t f);
    return (f.len == '0) ? LEN_W'(1) : f.len;
  endfunction

endpackage
