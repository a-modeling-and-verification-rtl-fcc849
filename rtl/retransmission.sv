// retransmission: passes a frame down and, on a failed confirm, either sends it
// again or drops it.
//
// A request is stored and sent down with retry = 0. A successful confirm from
// below is passed up as success. A failed confirm re-sends the frame with the
// retry counter incremented, until MAX_RETRY retries have been spent; then the
// frame is dropped and a failure is confirmed upward. The retry count travels in
// the frame so that the CAP backoff below can widen its window. A clear from
// above is passed down. The retry limit is this design's choice; the document
// says only that the block decides between dropping and retransmitting.
//
// Both sides are mac_link_if links; a retransmission leaves the cycle after
// the failed confirm.
module retransmission
  import mac_pkg::*;
#(
  parameter int MAX_RETRY = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  mac_link_if.dst  up,
  mac_link_if.src  dn,
  output logic     retry_evt,   // pulse: a frame was re-sent
  output logic     drop_evt     // pulse: a frame was dropped after MAX_RETRY retries
);
  typedef enum logic [0:0] {RT_IDLE, RT_WAIT} state_e;
  state_e state;
  frame_t frm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= RT_IDLE;
      frm       <= '0;
      up.cfm    <= 1'b0;
      up.ok     <= 1'b0;
      dn.req    <= 1'b0;
      dn.clr    <= 1'b0;
      dn.frm    <= '0;
      retry_evt <= 1'b0;
      drop_evt  <= 1'b0;
    end else begin
      up.cfm    <= 1'b0;
      dn.req    <= 1'b0;
      dn.clr    <= 1'b0;
      retry_evt <= 1'b0;
      drop_evt  <= 1'b0;
      if (up.clr) begin
        if (state == RT_WAIT) dn.clr <= 1'b1;
        state <= RT_IDLE;
      end else begin
        case (state)
          RT_IDLE: if (up.req) begin
            frm          <= up.frm;
            frm.retry    <= '0;
            dn.req       <= 1'b1;
            dn.frm       <= up.frm;
            dn.frm.retry <= '0;
            state        <= RT_WAIT;
          end
          RT_WAIT: if (dn.cfm) begin
            if (dn.ok) begin
              up.cfm <= 1'b1;
              up.ok  <= 1'b1;
              state  <= RT_IDLE;
            end else if (int'(frm.retry) < MAX_RETRY) begin
              frm.retry    <= frm.retry + 1'b1;
              dn.req       <= 1'b1;
              dn.frm       <= frm;
              dn.frm.retry <= frm.retry + 1'b1;
              retry_evt    <= 1'b1;
            end else begin
              up.cfm   <= 1'b1;
              up.ok    <= 1'b0;
              drop_evt <= 1'b1;
              state    <= RT_IDLE;
            end
          end
          default: state <= RT_IDLE;
        endcase
      end
    end
  end

endmodule
