// link_arbiter: lets the CAP and CTA timing controls share send-and-wait.
//
// Each input link's request is held as pending until send-and-wait is free;
// input a wins a tie. The owner's confirm is returned to it alone, and a
// clear from the owner is passed on (a clear of a pending request just drops
// it). `busy` is high while a request is pending or in flight, and is the
// sw_status seen by the blocks above. The sharing scheme is this design's own.
module link_arbiter
  import mac_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  mac_link_if.dst a,
  mac_link_if.dst b,
  mac_link_if.src out,
  output logic    busy
);
  logic   pend_a, pend_b, active, own_b;
  frame_t frm_a, frm_b;

  assign busy  = pend_a || pend_b || active;
  assign a.cfm = active && !own_b && out.cfm;
  assign b.cfm = active &&  own_b && out.cfm;
  assign a.ok  = out.ok;
  assign b.ok  = out.ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_a  <= 1'b0;
      pend_b  <= 1'b0;
      frm_a   <= '0;
      frm_b   <= '0;
      active  <= 1'b0;
      own_b   <= 1'b0;
      out.req <= 1'b0;
      out.clr <= 1'b0;
      out.frm <= '0;
    end else begin
      out.req <= 1'b0;
      out.clr <= 1'b0;
      if (a.req) begin pend_a <= 1'b1; frm_a <= a.frm; end
      else if (a.clr) pend_a <= 1'b0;
      if (b.req) begin pend_b <= 1'b1; frm_b <= b.frm; end
      else if (b.clr) pend_b <= 1'b0;
      if (active) begin
        if (out.cfm) active <= 1'b0;
        else if ((own_b && b.clr) || (!own_b && a.clr)) begin
          out.clr <= 1'b1;
          active  <= 1'b0;
        end
      end else if (pend_a) begin
        out.req <= 1'b1;
        out.frm <= frm_a;
        active  <= 1'b1;
        own_b   <= 1'b0;
        pend_a  <= a.req;
      end else if (pend_b) begin
        out.req <= 1'b1;
        out.frm <= frm_b;
        active  <= 1'b1;
        own_b   <= 1'b1;
        pend_b  <= b.req;
      end
    end
  end

endmodule
