// stream_output_buffer: serves stream transmission requests from the layer
// above the MAC.
//
// Each request is pushed into a FIFO together with the time it arrived. When
// the fragmentation block below is idle, the head of the FIFO is sent down
// (so_transmit) and a timeout is armed at request time + DELAY_BOUND. If the
// lower layer confirms first, the head is popped and its result is passed up
// (so_finish). If the timer runs out first, a clear is sent down to drop the
// unfinished transmission, the head is popped and a failure is reported
// (so_timeout). An upper-layer clear (so_clr) aborts the transmission in
// progress and empties the buffer. A head whose deadline has already passed is
// dropped without being sent. This follows the stream output buffer state
// diagram; the depth and delay bound are this design's choices.
//
// Upper side: up_req pushes up_frm (ignored when up_full); up_cfm/up_ok/up_seq
// report the result of each MSDU one cycle after it is known. Lower side:
// mac_link_if src. `now` is the free-running MAC time in cycles.
module stream_output_buffer
  import mac_pkg::*;
#(
  parameter int DEPTH       = 8,
  parameter int DELAY_BOUND = 4000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TIME_W-1:0] now,
  // upper layer
  input  logic              up_req,
  input  frame_t            up_frm,
  output logic              up_full,
  input  logic              up_clr,
  output logic              up_cfm,
  output logic              up_ok,
  output logic [7:0]        up_seq,
  // fragmentation below
  mac_link_if.src           dn
);
  typedef struct packed {
    frame_t            frm;
    logic [TIME_W-1:0] t_req;
  } entry_t;

  typedef enum logic [0:0] {SO_IDLE, SO_WAIT_CFM} state_e;
  state_e state;

  entry_t head, din;
  logic   empty, pop, flush;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [TIME_W-1:0] age;
  logic   expired;

  assign din     = '{frm: up_frm, t_req: now};
  assign age     = now - head.t_req;
  assign expired = (age >= TIME_W'(DELAY_BOUND));

  frame_fifo #(.T(entry_t), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .flush, .push(up_req), .din, .pop, .dout(head),
    .empty, .full(up_full), .count
  );

  always_comb begin
    pop   = 1'b0;
    flush = up_clr;
    if (!up_clr) begin
      case (state)
        SO_IDLE:     pop = !empty && expired;
        SO_WAIT_CFM: pop = dn.cfm || expired;
        default:     pop = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= SO_IDLE;
      dn.req <= 1'b0;
      dn.clr <= 1'b0;
      dn.frm <= '0;
      up_cfm <= 1'b0;
      up_ok  <= 1'b0;
      up_seq <= '0;
    end else begin
      dn.req <= 1'b0;
      dn.clr <= 1'b0;
      up_cfm <= 1'b0;
      if (up_clr) begin
        // so_clear: drop the unfinished transmission and the queue
        if (state == SO_WAIT_CFM) dn.clr <= 1'b1;
        state <= SO_IDLE;
      end else begin
        case (state)
          SO_IDLE: if (!empty && !dn.req) begin
            if (expired) begin
              up_cfm <= 1'b1;
              up_ok  <= 1'b0;
              up_seq <= head.frm.seq;
            end else begin
              // so_transmit
              dn.req <= 1'b1;
              dn.frm <= head.frm;
              state  <= SO_WAIT_CFM;
            end
          end
          SO_WAIT_CFM: begin
            if (dn.cfm) begin
              // so_finish
              up_cfm <= 1'b1;
              up_ok  <= dn.ok;
              up_seq <= head.frm.seq;
              state  <= SO_IDLE;
            end else if (expired) begin
              // so_timeout
              dn.clr <= 1'b1;
              up_cfm <= 1'b1;
              up_ok  <= 1'b0;
              up_seq <= head.frm.seq;
              state  <= SO_IDLE;
            end
          end
          default: state <= SO_IDLE;
        endcase
      end
    end
  end

endmodule
