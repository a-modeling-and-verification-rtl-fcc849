// tb_uwb_piconet_impaired: the same end-to-end traffic as tb_uwb_piconet,
// run over an impaired channel. Devices 1 and 3, which both send commands to
// the coordinator in the CAP, cannot hear each other (a hidden pair), so
// their carrier sense does not stop one from starting on top of the other;
// and 16 of every 1024 frames are lost to noise. The scoreboard is the same:
// every MSDU and command confirmed as delivered must arrive intact, and no
// MSDU twice (a command may arrive twice when only its ACK was lost; the
// MAC has no duplicate filter for commands). Besides the mechanisms counted
// by tb_uwb_piconet, this run must show overlapping transmissions of the
// hidden pair and frames lost to noise.
module tb_uwb_piconet_impaired;
  import mac_pkg::*;
  localparam int N = 4;
  localparam int N_SF = 24;                 // superframes simulated
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat ((N_SF + 4) * 3300) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic   [N-1:0] st_req = '0, st_full, st_clr = '0, st_cfm, st_ok;
  frame_t [N-1:0] st_frm = '0, cmd_frm = '0, rxs_frm, rxc_frm;
  logic   [N-1:0][7:0] st_seq;
  logic   [N-1:0] cmd_req = '0, cmd_full, cmd_cfm, cmd_ok, rxs_valid, rxc_valid;
  logic   [N-1:0] rxs_pop, rxc_pop;
  logic   [2:0]   ch_load;
  logic           ch_collision, ch_noise;
  mac_evt_t [N-1:0] evt;
  logic   [N-1:0][5:0] cap_bw;
  assign rxs_pop = rxs_valid;
  assign rxc_pop = rxc_valid;

  // row j lists whom device j hears: 1 and 3 are hidden from each other
  localparam logic [N-1:0][N-1:0] HEAR = {4'b1101, 4'b1111, 4'b0111, 4'b1111};
  uwb_piconet #(.HEAR(HEAR), .NOISE_PER_1024(16)) dut (.*);
  int n_hidden = 0, n_noise = 0;
  logic hidden_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (dut.tx_active[1] && dut.tx_active[3] && !hidden_q) n_hidden++;
    hidden_q <= dut.tx_active[1] && dut.tx_active[3];
    if (ch_noise) n_noise++;
  end

  // ---------------- scoreboard ----------------
  // key: {src, seq}; value: expected length and destination
  int st_len [int], st_dst [int], cmd_len [int];
  int st_rx  [int], cmd_rx [int];
  int st_ok_n = 0, st_fail_n = 0, cmd_ok_n = 0, cmd_fail_n = 0;
  int st_rx_n = 0, cmd_rx_n = 0;
  int st_ok_key[$], cmd_ok_key[$];
  logic [7:0] cmd_seq_q[N][$];

  // mechanism counters
  int n_setup = 0, n_frag = 0, n_cta_susp = 0, n_busy_susp = 0, n_cap_susp = 0;
  int n_coll = 0, n_tmo = 0, n_retry = 0, n_bw_grow = 0, n_deadline = 0, n_clr = 0, n_ack = 0;
  int maxload = 0;
  int k;

  always @(posedge clk) if (rst_n) begin
    if (ch_collision) n_coll++;
    if (int'(ch_load) > maxload) maxload = int'(ch_load);
    for (int d = 0; d < N; d++) begin
      if (evt[d].setup) n_setup++;
      if (evt[d].cta_suspend) n_cta_susp++;
      if (evt[d].cap_busy) n_busy_susp++;
      if (evt[d].cap_suspend) n_cap_susp++;
      if (evt[d].ack_timeout) n_tmo++;
      if (evt[d].st_retry || evt[d].cmd_retry) n_retry++;
      if (evt[d].ack_sent) n_ack++;
      if (st_cfm[d]) begin
        if (st_ok[d]) begin st_ok_n++; st_ok_key.push_back(d * 256 + int'(st_seq[d])); end
        else begin st_fail_n++; end
      end
      if (cmd_cfm[d]) begin
        if (cmd_ok[d]) cmd_ok_n++; else cmd_fail_n++;
        if (cmd_seq_q[d].size() > 0) begin
          if (cmd_ok[d]) cmd_ok_key.push_back(d * 256 + int'(cmd_seq_q[d][0]));
          void'(cmd_seq_q[d].pop_front());
        end
      end
      if (rxs_valid[d]) begin
        k = int'(rxs_frm[d].src) * 256 + int'(rxs_frm[d].seq);
        st_rx_n++;
        check(st_len.exists(k), $sformatf("dev %0d received unknown MSDU %0d", d, k));
        if (st_len.exists(k)) begin
          check(int'(rxs_frm[d].len) == st_len[k] && st_dst[k] == d, $sformatf("MSDU %0d intact at %0d", k, d));
          if (st_len[k] > 256) n_frag++;
        end
        check(!st_rx.exists(k), $sformatf("MSDU %0d delivered once", k));
        st_rx[k] = 1;
      end
      if (rxc_valid[d]) begin
        k = int'(rxc_frm[d].src) * 256 + int'(rxc_frm[d].seq);
        cmd_rx_n++;
        check(d == 0 && cmd_len.exists(k), $sformatf("dev %0d received unknown command %0d", d, k));
        if (cmd_len.exists(k)) check(int'(rxc_frm[d].len) == cmd_len[k], "command intact");
        cmd_rx[k] = 1;
      end
    end
  end

  int bw_max = 7;
  always @(posedge clk) if (rst_n) for (int d = 0; d < N; d++)
    if (int'(cap_bw[d]) > bw_max) begin bw_max = int'(cap_bw[d]); n_bw_grow++; end

  // ---------------- traffic ----------------
  task automatic push_stream(input int d, input int seq, input int len);
    @(negedge clk);
    st_req[d] = 1; st_frm[d] = '0; st_frm[d].ftype = FT_DATA; st_frm[d].src = ID_W'(d);
    st_frm[d].dst = ID_W'((d + 1) % N); st_frm[d].seq = 8'(seq); st_frm[d].len = LEN_W'(len);
    st_len[d * 256 + seq] = len; st_dst[d * 256 + seq] = (d + 1) % N;
    @(negedge clk); st_req[d] = 0;
  endtask
  task automatic push_cmd(input int d, input int seq, input int len);
    @(negedge clk);
    cmd_req[d] = 1; cmd_frm[d] = '0; cmd_frm[d].ftype = FT_CMD; cmd_frm[d].src = ID_W'(d);
    cmd_frm[d].dst = 4'd0; cmd_frm[d].seq = 8'(seq); cmd_frm[d].last = 1; cmd_frm[d].len = LEN_W'(len);
    cmd_len[d * 256 + seq] = len; cmd_seq_q[d].push_back(8'(seq));
    @(negedge clk); cmd_req[d] = 0;
  endtask

  int n_unrecv;
  initial begin
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (100) @(posedge clk);
    // streams: a mix of one-, two- and three-fragment MSDUs from every device
    for (int d = 0; d < N; d++) begin
      push_stream(d, 1, 700);
      push_stream(d, 2, 120);
      push_stream(d, 3, 400);
    end
    // device 3 queues more than its CTAs can carry before the delay bound
    for (int s = 10; s < 15; s++) push_stream(3, s, 700);
    // commands: three rounds from devices 1..3 at once
    for (int r = 0; r < 3; r++) begin
      for (int d = 1; d < N; d++) push_cmd(d, 128 + r * 4, 30);
    end
    repeat (3 * 3232) @(posedge clk);
    // a long command pushed late in a CAP waits for the next one
    wait (dut.g_dev[2].u_dev.cap_active && dut.g_dev[2].u_dev.cap_remaining < 300);
    push_cmd(2, 140, 400);
    // more contention
    for (int r = 0; r < 6; r++) begin
      for (int d = 1; d < N; d++) push_cmd(d, 150 + r * 4 + d, 20);
      repeat (700) @(posedge clk);
    end
    // device 0: queue two MSDUs and clear them from the upper layer
    push_stream(0, 50, 700);
    push_stream(0, 51, 700);
    repeat (200) @(posedge clk);
    @(negedge clk); st_clr[0] = 1; n_clr++; @(negedge clk); st_clr[0] = 0;
    st_len.delete(50); st_len.delete(51);
    repeat ((N_SF - 6) * 3232 - 6 * 700) @(posedge clk);

    // ---------------- results ----------------
    n_deadline = st_fail_n;
    n_unrecv = 0;
    foreach (st_ok_key[i]) if (!st_rx.exists(st_ok_key[i])) n_unrecv++;
    check(n_unrecv == 0, $sformatf("%0d confirmed MSDUs never arrived", n_unrecv));
    n_unrecv = 0;
    foreach (cmd_ok_key[i]) if (!cmd_rx.exists(cmd_ok_key[i])) n_unrecv++;
    check(n_unrecv == 0, $sformatf("%0d confirmed commands never arrived", n_unrecv));
    for (int d = 0; d < N; d++)
      check(st_rx.exists(d * 256 + 1), $sformatf("first MSDU of device %0d delivered", d));
    check(st_ok_n >= 8, $sformatf("at least 8 MSDUs confirmed (%0d)", st_ok_n));
    check(cmd_ok_n + cmd_fail_n == 28, $sformatf("every command got a result (%0d)", cmd_ok_n + cmd_fail_n));
    $display("mechanisms: setup=%0d frag=%0d cta_susp=%0d busy_susp=%0d cap_susp=%0d coll=%0d ack_tmo=%0d retry=%0d bw_grow=%0d deadline=%0d clear=%0d acks=%0d",
             n_setup, n_frag, n_cta_susp, n_busy_susp, n_cap_susp, n_coll, n_tmo, n_retry, n_bw_grow, n_deadline, n_clr, n_ack);
    $display("streams ok=%0d fail=%0d rx=%0d  commands ok=%0d fail=%0d rx=%0d  max load=%0d",
             st_ok_n, st_fail_n, st_rx_n, cmd_ok_n, cmd_fail_n, cmd_rx_n, maxload);
    check(n_setup >= 4 * (N_SF - 2), "beacon set-up in every device");
    check(n_frag > 0, "fragmentation");
    check(n_cta_susp > 0, "CTA suspension");
    check(n_busy_susp > 0, "backoff suspended by a busy medium");
    check(n_cap_susp > 0, "backoff suspended by the CAP end");
    check(n_coll > 0, "collision");
    check(n_tmo > 0, "ACK timeout");
    check(n_retry > 0, "retransmission");
    check(n_bw_grow > 0, "backoff window growth");
    check(n_deadline > 0, "delay-bound timeout");
    check(n_clr > 0, "upper-layer clear");
    check(n_ack > 0, "ACKs sent");
    $display("impairments: hidden-pair overlaps=%0d noise losses=%0d", n_hidden, n_noise);
    check(n_hidden > 0, "hidden-pair overlap");
    check(n_noise > 0, "frame lost to noise");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
