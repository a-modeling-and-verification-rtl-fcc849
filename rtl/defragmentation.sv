// defragmentation: rebuilds MSDUs from received data fragments and hands each
// complete MSDU to the stream input buffer.
//
// Fragments of one MSDU must arrive in order, starting at fragment 0. The
// block accumulates their lengths; when the fragment with `last` set arrives,
// it emits the MSDU (out_valid, with len = the sum and frag = 0). A repeat of
// the fragment just accepted (same source, sequence and fragment number, as
// happens when an ACK is lost and the sender retransmits) is dropped. A
// fragment that does not continue the MSDU in progress discards it; a
// fragment 0 then starts a new one. One MSDU is reassembled at a time. The
// document only names this block; the rules are this design's.
module defragmentation
  import mac_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  frame_t in_frm,
  output logic   out_valid,
  output frame_t out_frm,
  output logic   dup_evt,
  output logic   discard_evt
);
  logic       active;
  logic       have_last;
  frame_t     cur;        // MSDU being rebuilt; len accumulates
  frame_t     last_frm;   // last fragment accepted
  logic       is_dup, is_next;

  assign is_dup  = have_last && in_frm.src == last_frm.src && in_frm.seq == last_frm.seq &&
                   in_frm.frag == last_frm.frag;
  assign is_next = active && in_frm.src == cur.src && in_frm.seq == cur.seq &&
                   in_frm.frag == last_frm.frag + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active      <= 1'b0;
      have_last   <= 1'b0;
      cur         <= '0;
      last_frm    <= '0;
      out_valid   <= 1'b0;
      out_frm     <= '0;
      dup_evt     <= 1'b0;
      discard_evt <= 1'b0;
    end else begin
      out_valid   <= 1'b0;
      dup_evt     <= 1'b0;
      discard_evt <= 1'b0;
      if (in_valid) begin
        if (is_dup) begin
          dup_evt <= 1'b1;
        end else if (is_next || in_frm.frag == '0) begin
          if (!is_next && active) discard_evt <= 1'b1;
          last_frm  <= in_frm;
          have_last <= 1'b1;
          if (is_next) cur.len <= cur.len + in_frm.len;
          else         cur     <= in_frm;
          if (in_frm.last) begin
            active       <= 1'b0;
            out_valid    <= 1'b1;
            out_frm      <= is_next ? cur : in_frm;
            out_frm.len  <= is_next ? cur.len + in_frm.len : in_frm.len;
            out_frm.frag <= '0;
            out_frm.last <= 1'b1;
          end else begin
            active <= 1'b1;
          end
        end else begin
          discard_evt <= 1'b1;
          active      <= 1'b0;
        end
      end
    end
  end

endmodule
