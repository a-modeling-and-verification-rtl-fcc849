// tb_send_and_wait: a frame is handed to the transmitter only when it is idle;
// after the transmitter confirms, a matching ACK gives success; a wrong ACK is
// ignored; with no ACK a failure comes ACK_TIMEOUT + 2 cycles after
// the transmitter's confirm; a broadcast succeeds without an ACK; a clear
// during transmission clears the transmitter.
module tb_send_and_wait;
  import mac_pkg::*;
  localparam int TMO = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  mac_link_if up ();
  logic busy, tx_busy = 0, tx_req, tx_clr, tx_cfm = 0, ack_valid = 0, timeout_evt;
  frame_t tx_frm, ack_frm = '0;
  send_and_wait #(.ACK_TIMEOUT(TMO)) dut (.clk, .rst_n, .up(up.dst), .busy, .tx_busy, .tx_req,
    .tx_frm, .tx_clr, .tx_cfm, .ack_valid, .ack_frm, .timeout_evt);

  // transmitter model: confirms 10 cycles after a request
  int txn = 0, clrs = 0, cnt = -1, upcfm = 0, tmo = 0;
  longint t = 0, t_txcfm = 0, t_upcfm = 0;
  bit last_ok;
  frame_t sent;
  always @(posedge clk) if (rst_n) begin
    t++;
    tx_cfm <= 1'b0;
    if (tx_req) begin txn++; sent = tx_frm; cnt <= 10; check(!tx_busy, "request only when the transmitter is idle"); end
    else if (tx_clr) begin clrs++; cnt <= -1; end
    else if (cnt > 0) cnt <= cnt - 1;
    else if (cnt == 0) begin tx_cfm <= 1'b1; t_txcfm = t + 1; cnt <= -1; end
    if (up.cfm) begin upcfm++; last_ok = up.ok; t_upcfm = t; end
    if (timeout_evt) tmo++;
  end

  task automatic request(input logic [ID_W-1:0] dst, input logic [7:0] seq);
    @(negedge clk); up.req = 1; up.frm = '0; up.frm.ftype = FT_DATA; up.frm.src = 4'd1;
    up.frm.dst = dst; up.frm.seq = seq; up.frm.frag = 4'd2; up.frm.len = 30;
    @(negedge clk); up.req = 0;
  endtask
  task automatic ack(input logic [ID_W-1:0] src, input logic [7:0] seq, input logic [3:0] frag);
    @(negedge clk); ack_valid = 1; ack_frm = '0; ack_frm.ftype = FT_ACK; ack_frm.src = src;
    ack_frm.dst = 4'd1; ack_frm.seq = seq; ack_frm.frag = frag;
    @(negedge clk); ack_valid = 0;
  endtask

  initial begin
    up.req = 0; up.clr = 0; up.frm = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // transmitter busy at first
    tx_busy = 1;
    request(4'd2, 8'd7);
    repeat (10) @(posedge clk);
    check(txn == 0 && busy, "held while the transmitter is busy");
    @(negedge clk); tx_busy = 0;
    repeat (15) @(posedge clk);
    check(txn == 1 && sent.seq == 7, "sent when the transmitter frees");
    repeat (3) @(posedge clk);
    ack(4'd3, 8'd7, 4'd2);            // wrong source
    ack(4'd2, 8'd6, 4'd2);            // wrong sequence
    repeat (2) @(posedge clk);
    check(upcfm == 0, "wrong ACKs ignored");
    ack(4'd2, 8'd7, 4'd2);
    repeat (2) @(posedge clk);
    check(upcfm == 1 && last_ok && !busy, "matching ACK: success");
    // no ACK: timeout
    request(4'd2, 8'd8);
    repeat (TMO + 30) @(posedge clk);
    check(upcfm == 2 && !last_ok && tmo == 1, "no ACK: failure");
    check(t_upcfm - t_txcfm == TMO + 2, $sformatf("failure %0d cycles after the end of the frame", t_upcfm - t_txcfm));
    // broadcast: no ACK needed
    request(BCAST_ID, 8'd9);
    repeat (16) @(posedge clk);
    check(upcfm == 3 && last_ok && tmo == 1, "broadcast succeeds without ACK");
    // clear during transmission
    request(4'd2, 8'd10);
    repeat (4) @(posedge clk);
    @(negedge clk); up.clr = 1; @(negedge clk); up.clr = 0;
    repeat (TMO + 20) @(posedge clk);
    check(clrs == 1 && upcfm == 3 && !busy, "clear stops the transmitter, no confirm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
