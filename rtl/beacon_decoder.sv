// beacon_decoder: takes a received beacon apart and sets up superframe
// control.
//
// The beacon's payload is read as a beacon_info_t (superframe length, CAP
// length, CTA length, CTA owners). A beacon whose CAP and CTAs do not fit in
// its superframe, or whose superframe length is zero, is rejected (bad_evt).
// A good beacon gives a one-cycle `setup` pulse with the decoded fields and
// records the source as the piconet coordinator (pnc_id). The beacon layout
// and the consistency check are this design's; the document only names the
// block.
module beacon_decoder
  import mac_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            beacon_valid,
  input  frame_t          beacon_frm,
  output logic            setup,
  output beacon_info_t    info,
  output logic [ID_W-1:0] pnc_id,
  output logic            bad_evt
);
  beacon_info_t in_info;
  logic [TIME_W+2:0] used;
  logic ok;

  assign in_info = beacon_info_t'(beacon_frm.payload);
  assign used    = (TIME_W+3)'(in_info.cap_len) + (TIME_W+3)'(in_info.cta_len) * (TIME_W+3)'(N_CTA);
  assign ok      = beacon_frm.ftype == FT_BEACON && in_info.sf_len != '0 &&
                   used <= (TIME_W+3)'(in_info.sf_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      setup   <= 1'b0;
      info    <= '0;
      pnc_id  <= BCAST_ID;
      bad_evt <= 1'b0;
    end else begin
      setup   <= beacon_valid && ok;
      bad_evt <= beacon_valid && !ok;
      if (beacon_valid && ok) begin
        info   <= in_info;
        pnc_id <= beacon_frm.src;
      end
    end
  end

endmodule
