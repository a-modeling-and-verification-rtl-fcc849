// tb_phy_if: a frame holds ch_tx_active for exactly its air time and is then
// confirmed to its source; simultaneous requests are served ACK source first;
// a clear cuts a frame short without a confirm; received frames reach
// dispatch one cycle later except while transmitting; CCA follows the channel.
module tb_phy_if;
  import mac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [2:0] tx_req = 0, tx_clr = 0, tx_cfm;
  frame_t [2:0] tx_frm = '0;
  logic tx_busy, rx_valid, cca_busy, ch_tx_active, ch_rx_en, ch_rx_valid = 0, ch_busy = 0;
  frame_t rx_frm, ch_tx_frm, ch_rx_frm = '0;
  phy_if #(.N_SRC(3)) dut (.*);

  int active_cycles = 0, rxv = 0;
  int cfm_cnt[3] = '{0, 0, 0};
  logic [7:0] order[$];
  always @(posedge clk) if (rst_n) begin
    if (ch_tx_active) active_cycles++;
    for (int i = 0; i < 3; i++) if (tx_cfm[i]) cfm_cnt[i]++;
    if (ch_tx_active && (order.size() == 0 || order[$] != ch_tx_frm.seq)) order.push_back(ch_tx_frm.seq);
    if (rx_valid) rxv++;
  end

  task automatic req(input int src, input logic [7:0] seq, input int len);
    tx_req[src] = 1; tx_frm[src] = '0; tx_frm[src].seq = seq; tx_frm[src].len = LEN_W'(len);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); req(2, 8'd1, 10); @(negedge clk); tx_req = 0;
    repeat (20) @(posedge clk);
    check(active_cycles == 10, $sformatf("air time 10, got %0d", active_cycles));
    check(cfm_cnt[2] == 1 && cfm_cnt[0] == 0, "confirm to its source");
    // two sources at once: ACK (0) first
    @(negedge clk); req(2, 8'd2, 5); req(0, 8'd3, 4); @(negedge clk); tx_req = 0;
    check(tx_busy, "busy while requests are pending");
    repeat (20) @(posedge clk);
    check(order.size() == 3 && order[1] == 3 && order[2] == 2, "ACK source served first");
    check(cfm_cnt[0] == 1 && cfm_cnt[2] == 2, "both confirmed");
    check(active_cycles == 19, "both air times");
    // clear cuts the frame short
    @(negedge clk); req(2, 8'd4, 50); @(negedge clk); tx_req = 0;
    repeat (5) @(negedge clk);
    tx_clr[2] = 1; @(negedge clk); tx_clr = 0;
    repeat (60) @(posedge clk);
    check(cfm_cnt[2] == 2 && !ch_tx_active, "cleared frame not confirmed");
    check(active_cycles < 19 + 10, "cleared frame cut short");
    // receive
    @(negedge clk); ch_rx_valid = 1; ch_rx_frm = '0; ch_rx_frm.seq = 8'd77; @(negedge clk); ch_rx_valid = 0;
    @(posedge clk); #1;
    check(rxv == 1 && rx_frm.seq == 77, "received frame passed up");
    @(negedge clk); req(1, 8'd5, 10); @(negedge clk); tx_req = 0;
    repeat (3) @(negedge clk);
    ch_rx_valid = 1; @(negedge clk); ch_rx_valid = 0;
    repeat (3) @(posedge clk);
    check(rxv == 1 && !ch_rx_en, "no reception while transmitting");
    @(negedge clk); ch_busy = 1; @(posedge clk); #1 check(cca_busy, "CCA busy");
    @(negedge clk); ch_busy = 0; @(posedge clk); #1 check(!cca_busy, "CCA idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
