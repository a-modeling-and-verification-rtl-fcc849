// tb_mac_device: one coordinator device against a modelled peer on the
// channel. Checks that the device sends beacons on schedule, ACKs a received
// data frame after SIFS and delivers it, sends a command in the CAP and a
// stream in its own CTA, and reports both as successful when the peer ACKs.
module tb_mac_device;
  import mac_pkg::*;
  localparam int BL = 16, SF = 800, CAP = 200, CTA = 150;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic st_req = 0, st_full, st_clr = 0, st_cfm, st_ok, cmd_req = 0, cmd_full, cmd_cfm, cmd_ok;
  logic rxs_valid, rxs_pop, rxc_valid, rxc_pop, ch_tx_active, ch_rx_en, ch_rx_valid = 0, ch_busy;
  frame_t st_frm = '0, cmd_frm = '0, rxs_frm, rxc_frm, ch_tx_frm, ch_rx_frm = '0;
  logic [7:0] st_seq;
  mac_evt_t evt;
  logic [5:0] cap_bw;
  logic peer_tx = 0;
  assign ch_busy = ch_tx_active || peer_tx;
  assign rxs_pop = rxs_valid;
  assign rxc_pop = rxc_valid;

  mac_device #(.MY_ID(4'd0), .IS_PNC(1'b1), .FRAG_SIZE(100), .BEACON_LEN(BL), .SF_LEN(SF),
               .CAP_LEN(CAP), .CTA_LEN(CTA), .OWNERS({4'd3, 4'd0, 4'd2, 4'd1})) dut (.*);

  // frames the device puts on the channel, captured at their end
  frame_t sent[$];
  longint sent_end[$], t = 0;
  logic act_q = 0;
  int rx_msdu = 0, st_ok_n = 0, cmd_ok_n = 0;
  always @(posedge clk) if (rst_n) begin
    t++;
    act_q <= ch_tx_active;
    if (act_q && !ch_tx_active) begin sent.push_back(ch_tx_frm); sent_end.push_back(t); end
    if (rxs_valid) begin rx_msdu++; check(rxs_frm.src == 4'd1 && rxs_frm.len == 60, "received MSDU"); end
    if (st_cfm && st_ok) st_ok_n++;
    if (cmd_cfm && cmd_ok) cmd_ok_n++;
  end

  task automatic peer_send(input frame_t f);
    @(negedge clk); peer_tx = 1;
    repeat (int'(f.len)) @(negedge clk);
    peer_tx = 0; ch_rx_valid = 1; ch_rx_frm = f;
    @(negedge clk); ch_rx_valid = 0;
  endtask

  // the peer ACKs every unicast frame to device 1
  frame_t ackf;
  int acks_sent = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (act_q && !ch_tx_active && ch_tx_frm.dst == 4'd1 && ch_tx_frm.ftype != FT_ACK) begin
        ackf = '0; ackf.ftype = FT_ACK; ackf.src = 4'd1; ackf.dst = 4'd0;
        ackf.seq = ch_tx_frm.seq; ackf.frag = ch_tx_frm.frag; ackf.len = 8;
        repeat (2) @(posedge clk);
        peer_send(ackf); acks_sent++;
      end
    end
  end

  frame_t df;
  int n_beacon;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (BL + 10) @(posedge clk);
    check(sent.size() == 1 && sent[0].ftype == FT_BEACON && sent[0].dst == BCAST_ID, "first beacon");
    check(evt.setup || dut.cap_active, "own superframe set up");
    // a data frame from the peer: ACK after SIFS, MSDU delivered
    df = '0; df.ftype = FT_DATA; df.src = 4'd1; df.dst = 4'd0; df.seq = 8'd33; df.last = 1; df.len = 60;
    peer_send(df);
    repeat (30) @(posedge clk);
    check(sent.size() == 2 && sent[1].ftype == FT_ACK && sent[1].dst == 4'd1 && sent[1].seq == 33, "ACK returned");
    check(rx_msdu == 1, "MSDU delivered");
    // a command and a 150-unit stream to the peer
    @(negedge clk); cmd_req = 1; cmd_frm = '0; cmd_frm.ftype = FT_CMD; cmd_frm.src = 4'd0;
    cmd_frm.dst = 4'd1; cmd_frm.seq = 8'd200; cmd_frm.last = 1; cmd_frm.len = 20;
    @(negedge clk); cmd_req = 0;
    st_req = 1; st_frm = '0; st_frm.ftype = FT_DATA; st_frm.src = 4'd0; st_frm.dst = 4'd1;
    st_frm.seq = 8'd5; st_frm.len = 150;
    @(negedge clk); st_req = 0;
    repeat (2 * (SF + BL)) @(posedge clk);
    check(cmd_ok_n == 1, "command confirmed");
    check(st_ok_n == 1, "stream confirmed");
    n_beacon = 0;
    foreach (sent[i]) begin
      if (sent[i].ftype == FT_BEACON) n_beacon++;
      if (sent[i].ftype == FT_DATA) begin
        // own CTA is CTA 2: starts CAP + 2 * CTA after the beacon's end
        check(sent[i].len == 100 || sent[i].len == 50, "fragment sizes");
      end
    end
    check(n_beacon >= 3, $sformatf("beacons every superframe (%0d)", n_beacon));
    check(acks_sent == 3, $sformatf("peer ACKed command and two fragments (%0d)", acks_sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
