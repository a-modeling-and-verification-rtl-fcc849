// mac_device: one IEEE 802.15.3 device (DEV) MAC, wired as the MAC function
// stack: an output control path, an input control path and the PHY interface.
//
// Output, streams: stream output buffer -> fragmentation -> retransmission ->
// CTA timing control -> send-and-wait. Streams are sent only inside this
// device's CTAs. Output, commands: command buffer -> retransmission -> CAP
// timing control -> send-and-wait, sent by CSMA/CA backoff in the CAP. The two
// timing controls share send-and-wait through a small arbiter. Send-and-wait,
// the ACK block and (on the coordinator, IS_PNC = 1) the beacon generator
// share the transmitter, ACK first.
// Input: RX -> dispatch, which sends beacons to the beacon decoder (which sets
// up superframe control), ACKs to send-and-wait, data to defragmentation and
// then the stream input buffer, and commands to the input command buffer, and
// triggers the ACK block for unicast data and commands.
//
// Upper-layer side: st_* queues stream MSDUs and reports each result;
// cmd_* queues command frames and reports each result; rxs_* and rxc_* are
// first-word-fall-through read ports of the stream input buffer and the input
// command buffer. Channel side: see phy_if. The block partition and their
// links follow the document's MAC function stack; the sizes are this design's.
//
// Several status outputs of the sub-blocks (buffer counts and full flags on
// the input side, the ACK responder's busy and drop pulse, the discard pulses
// of dispatch and defragmentation, the decoded coordinator ID and beacon
// number, in_sf) are left unconnected here: they serve debugging and would be
// read by management software, which this device does not include.
module mac_device
  import mac_pkg::*;
#(
  parameter logic [ID_W-1:0]            MY_ID       = '0,
  parameter bit                         IS_PNC      = 1'b0,
  parameter int                         BUF_DEPTH   = 8,
  parameter int                         DELAY_BOUND = 12000,
  parameter int                         FRAG_SIZE   = 256,
  parameter int                         MAX_RETRY   = 3,
  parameter int                         BIFS        = 4,
  parameter int                         SLOT        = 4,
  parameter int                         SIFS        = 2,
  parameter int                         ACK_LEN     = 8,
  parameter int                         ACK_TIMEOUT = 32,
  parameter int                         OVERHEAD    = 48,
  parameter logic [15:0]                SEED        = 16'hACE1,
  parameter int                         BEACON_LEN  = 32,
  parameter int                         SF_LEN      = 3200,
  parameter int                         CAP_LEN     = 1024,
  parameter int                         CTA_LEN     = 512,
  parameter logic [N_CTA-1:0][ID_W-1:0] OWNERS      = {4'd3, 4'd2, 4'd1, 4'd0}
) (
  input  logic   clk,
  input  logic   rst_n,
  // streams from the upper layer
  input  logic   st_req,
  input  frame_t st_frm,
  output logic   st_full,
  input  logic   st_clr,
  output logic   st_cfm,
  output logic   st_ok,
  output logic [7:0] st_seq,
  // commands from the upper layer / management
  input  logic   cmd_req,
  input  frame_t cmd_frm,
  output logic   cmd_full,
  output logic   cmd_cfm,
  output logic   cmd_ok,
  // received MSDUs and commands
  output logic   rxs_valid,
  output frame_t rxs_frm,
  input  logic   rxs_pop,
  output logic   rxc_valid,
  output frame_t rxc_frm,
  input  logic   rxc_pop,
  // channel
  output logic   ch_tx_active,
  output frame_t ch_tx_frm,
  output logic   ch_rx_en,
  input  logic   ch_rx_valid,
  input  frame_t ch_rx_frm,
  input  logic   ch_busy,
  // event pulses
  output mac_evt_t evt,
  output logic [5:0] cap_bw
);
  logic [TIME_W-1:0] now;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  mac_link_if so2fg ();
  mac_link_if fg2rt ();
  mac_link_if rt2tc ();
  mac_link_if tc2ar ();
  mac_link_if cb2rt ();
  mac_link_if rt2cp ();
  mac_link_if cp2ar ();
  mac_link_if ar2sw ();

  // superframe timing
  logic              cap_start, cap_end, cap_active, cta_start, cta_active, in_sf;
  logic [TIME_W-1:0] cap_remaining, cta_remaining;

  // PHY
  localparam int SRC_ACK = 0, SRC_BCN = 1, SRC_SW = 2;
  logic   [2:0] tx_req, tx_clr, tx_cfm;
  frame_t [2:0] tx_frm;
  logic         tx_busy, rx_valid, cca_busy;
  frame_t       rx_frm;

  // ---------------- stream output path ----------------
  stream_output_buffer #(.DEPTH(BUF_DEPTH), .DELAY_BOUND(DELAY_BOUND)) u_sob (
    .clk, .rst_n, .now,
    .up_req(st_req), .up_frm(st_frm), .up_full(st_full), .up_clr(st_clr),
    .up_cfm(st_cfm), .up_ok(st_ok), .up_seq(st_seq),
    .dn(so2fg)
  );

  fragmentation #(.FRAG_SIZE(FRAG_SIZE)) u_frag (
    .clk, .rst_n, .up(so2fg), .dn(fg2rt)
  );

  logic st_retry_evt, st_drop_evt;
  retransmission #(.MAX_RETRY(MAX_RETRY)) u_rt_st (
    .clk, .rst_n, .up(fg2rt), .dn(rt2tc), .retry_evt(st_retry_evt), .drop_evt(st_drop_evt)
  );

  logic sw_busy, cta_suspend_evt;
  cta_timing_control #(.OVERHEAD(OVERHEAD)) u_cta (
    .clk, .rst_n, .up(rt2tc), .dn(tc2ar), .sw_busy,
    .cta_start, .cta_active, .cta_remaining, .suspend_evt(cta_suspend_evt)
  );

  // ---------------- command output path ----------------
  frame_t cmd_head;
  logic   cmd_empty, cmd_pop, cmd_busy;
  logic [$clog2(BUF_DEPTH+1)-1:0] cmd_count;

  frame_fifo #(.DEPTH(BUF_DEPTH)) u_cmd_out (
    .clk, .rst_n, .flush(1'b0), .push(cmd_req), .din(cmd_frm), .pop(cmd_pop),
    .dout(cmd_head), .empty(cmd_empty), .full(cmd_full), .count(cmd_count)
  );

  // command buffer control: send the head, pop it when it is confirmed
  assign cmd_pop = cb2rt.cfm;
  assign cb2rt.clr = 1'b0;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_busy  <= 1'b0;
      cb2rt.req <= 1'b0;
      cb2rt.frm <= '0;
      cmd_cfm   <= 1'b0;
      cmd_ok    <= 1'b0;
    end else begin
      cb2rt.req <= 1'b0;
      cmd_cfm   <= cb2rt.cfm;
      if (cb2rt.cfm) cmd_ok <= cb2rt.ok;
      if (!cmd_busy && !cmd_empty) begin
        cb2rt.req <= 1'b1;
        cb2rt.frm <= cmd_head;
        cmd_busy  <= 1'b1;
      end else if (cmd_busy && cb2rt.cfm) begin
        cmd_busy <= 1'b0;
      end
    end
  end

  logic cmd_retry_evt, cmd_drop_evt;
  retransmission #(.MAX_RETRY(MAX_RETRY)) u_rt_cmd (
    .clk, .rst_n, .up(cb2rt), .dn(rt2cp), .retry_evt(cmd_retry_evt), .drop_evt(cmd_drop_evt)
  );

  logic cap_busy_evt, cap_susp_evt;
  cap_timing_control #(.BIFS(BIFS), .SLOT(SLOT), .OVERHEAD(OVERHEAD), .SEED(SEED)) u_cap (
    .clk, .rst_n, .up(rt2cp), .dn(cp2ar),
    .cap_start, .cap_end, .cap_active, .cap_remaining, .cca_busy,
    .busy_suspend_evt(cap_busy_evt), .cap_suspend_evt(cap_susp_evt), .bw(cap_bw)
  );

  // ---------------- send and wait ----------------
  link_arbiter u_arb (
    .clk, .rst_n, .a(tc2ar), .b(cp2ar), .out(ar2sw), .busy(sw_busy)
  );

  logic   ack_valid, sw_timeout_evt, sw_state_busy;
  frame_t disp_frm;
  send_and_wait #(.ACK_TIMEOUT(ACK_TIMEOUT)) u_sw (
    .clk, .rst_n, .up(ar2sw), .busy(sw_state_busy),
    .tx_busy, .tx_req(tx_req[SRC_SW]), .tx_frm(tx_frm[SRC_SW]), .tx_clr(tx_clr[SRC_SW]),
    .tx_cfm(tx_cfm[SRC_SW]),
    .ack_valid, .ack_frm(disp_frm), .timeout_evt(sw_timeout_evt)
  );

  // ---------------- PHY interface ----------------
  phy_if #(.N_SRC(3)) u_phy (
    .clk, .rst_n, .tx_req, .tx_frm, .tx_clr, .tx_cfm, .tx_busy,
    .rx_valid, .rx_frm, .cca_busy,
    .ch_tx_active, .ch_tx_frm, .ch_rx_en, .ch_rx_valid, .ch_rx_frm, .ch_busy
  );

  // ---------------- input path ----------------
  logic beacon_valid, data_valid, cmd_valid, ack_req, disp_discard_evt;
  dispatch #(.MY_ID(MY_ID)) u_disp (
    .clk, .rst_n, .rx_valid, .rx_frm, .frm(disp_frm),
    .beacon_valid, .ack_valid, .data_valid, .cmd_valid, .ack_req,
    .discard_evt(disp_discard_evt)
  );

  logic ack_busy, ack_drop_evt;
  ack_responder #(.MY_ID(MY_ID), .SIFS(SIFS), .ACK_LEN(ACK_LEN)) u_ack (
    .clk, .rst_n, .trig(ack_req), .rx_frm(disp_frm),
    .tx_req(tx_req[SRC_ACK]), .tx_frm(tx_frm[SRC_ACK]), .tx_cfm(tx_cfm[SRC_ACK]),
    .busy(ack_busy), .drop_evt(ack_drop_evt)
  );
  assign tx_clr[SRC_ACK] = 1'b0;
  assign tx_clr[SRC_BCN] = 1'b0;

  logic   msdu_valid, dup_evt, defrag_discard_evt;
  frame_t msdu_frm;
  defragmentation u_defrag (
    .clk, .rst_n, .in_valid(data_valid), .in_frm(disp_frm),
    .out_valid(msdu_valid), .out_frm(msdu_frm), .dup_evt, .discard_evt(defrag_discard_evt)
  );

  logic rxs_empty, rxs_full, rxc_empty, rxc_full;
  logic [$clog2(BUF_DEPTH+1)-1:0] rxs_count, rxc_count;
  frame_fifo #(.DEPTH(BUF_DEPTH)) u_st_in (
    .clk, .rst_n, .flush(1'b0), .push(msdu_valid), .din(msdu_frm), .pop(rxs_pop),
    .dout(rxs_frm), .empty(rxs_empty), .full(rxs_full), .count(rxs_count)
  );
  assign rxs_valid = !rxs_empty;

  frame_fifo #(.DEPTH(BUF_DEPTH)) u_cmd_in (
    .clk, .rst_n, .flush(1'b0), .push(cmd_valid), .din(disp_frm), .pop(rxc_pop),
    .dout(rxc_frm), .empty(rxc_empty), .full(rxc_full), .count(rxc_count)
  );
  assign rxc_valid = !rxc_empty;

  // beacon: received, or on the coordinator its own
  logic   bg_own_valid, bcn_in_valid, bcn_setup, bcn_bad_evt;
  frame_t bg_own_frm, bcn_in_frm;
  beacon_info_t bcn_info;
  logic [ID_W-1:0] pnc_id;
  logic [7:0] beacon_seq;

  beacon_generator #(
    .MY_ID(MY_ID), .BEACON_LEN(BEACON_LEN), .SF_LEN(SF_LEN), .CAP_LEN(CAP_LEN),
    .CTA_LEN(CTA_LEN), .OWNERS(OWNERS)
  ) u_bg (
    .clk, .rst_n, .en(IS_PNC),
    .tx_req(tx_req[SRC_BCN]), .tx_frm(tx_frm[SRC_BCN]), .tx_cfm(tx_cfm[SRC_BCN]),
    .own_valid(bg_own_valid), .own_frm(bg_own_frm), .beacon_seq
  );

  assign bcn_in_valid = beacon_valid || bg_own_valid;
  assign bcn_in_frm   = bg_own_valid ? bg_own_frm : disp_frm;

  beacon_decoder u_bdec (
    .clk, .rst_n, .beacon_valid(bcn_in_valid), .beacon_frm(bcn_in_frm),
    .setup(bcn_setup), .info(bcn_info), .pnc_id, .bad_evt(bcn_bad_evt)
  );

  assign evt = '{st_retry: st_retry_evt, st_drop: st_drop_evt, cmd_retry: cmd_retry_evt,
                 cmd_drop: cmd_drop_evt, cta_suspend: cta_suspend_evt, cap_busy: cap_busy_evt,
                 cap_suspend: cap_susp_evt, ack_timeout: sw_timeout_evt,
                 ack_sent: tx_cfm[SRC_ACK], dup_drop: dup_evt, setup: bcn_setup};

  superframe_control #(.MY_ID(MY_ID)) u_sfc (
    .clk, .rst_n, .setup(bcn_setup), .info_in(bcn_info),
    .cap_start, .cap_end, .cap_active, .cap_remaining,
    .cta_start, .cta_active, .cta_remaining, .in_sf
  );

endmodule
