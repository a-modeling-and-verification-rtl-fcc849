// fragmentation: cuts an MSDU from the stream output buffer into fragments and
// passes them down one at a time.
//
// The MSDU's length is split into fragments of at most FRAG_SIZE units (the
// device's system parameter); fragment k carries frag = k, and the final one has
// `last` set. The next fragment is sent only after the lower layer confirms the
// previous one with success. A failed fragment ends the MSDU with a failure
// confirm upward; the rest is not sent. A clear from above is passed down and
// returns the block to idle. The document states only that the fragment size
// depends on a system parameter and on the data size; the splitting rule, and
// that fragments are sent one at a time, are this design's choices.
//
// Both sides are mac_link_if links. A fragment request leaves one cycle after
// the request or the previous confirm.
module fragmentation
  import mac_pkg::*;
#(
  parameter int FRAG_SIZE = 256
) (
  input  logic     clk,
  input  logic     rst_n,
  mac_link_if.dst  up,
  mac_link_if.src  dn
);
  typedef enum logic [1:0] {FG_IDLE, FG_SEND, FG_WAIT} state_e;
  state_e state;

  frame_t            msdu;
  logic [LEN_W-1:0]  remaining;
  logic [3:0]        frag_no;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= FG_IDLE;
      msdu      <= '0;
      remaining <= '0;
      frag_no   <= '0;
      up.cfm    <= 1'b0;
      up.ok     <= 1'b0;
      dn.req    <= 1'b0;
      dn.clr    <= 1'b0;
      dn.frm    <= '0;
    end else begin
      up.cfm <= 1'b0;
      dn.req <= 1'b0;
      dn.clr <= 1'b0;
      if (up.clr) begin
        if (state == FG_WAIT) dn.clr <= 1'b1;
        state <= FG_IDLE;
      end else begin
        case (state)
          FG_IDLE: if (up.req) begin
            msdu      <= up.frm;
            remaining <= (up.frm.len == '0) ? LEN_W'(1) : up.frm.len;
            frag_no   <= '0;
            state     <= FG_SEND;
          end
          FG_SEND: begin
            dn.req       <= 1'b1;
            dn.frm       <= msdu;
            dn.frm.frag  <= frag_no;
            dn.frm.retry <= '0;
            if (remaining > LEN_W'(FRAG_SIZE)) begin
              dn.frm.len  <= LEN_W'(FRAG_SIZE);
              dn.frm.last <= 1'b0;
              remaining   <= remaining - LEN_W'(FRAG_SIZE);
            end else begin
              dn.frm.len  <= remaining;
              dn.frm.last <= 1'b1;
              remaining   <= '0;
            end
            state <= FG_WAIT;
          end
          FG_WAIT: if (dn.cfm) begin
            if (!dn.ok || remaining == '0) begin
              up.cfm <= 1'b1;
              up.ok  <= dn.ok;
              state  <= FG_IDLE;
            end else begin
              frag_no <= frag_no + 1'b1;
              state   <= FG_SEND;
            end
          end
          default: state <= FG_IDLE;
        endcase
      end
    end
  end

endmodule
