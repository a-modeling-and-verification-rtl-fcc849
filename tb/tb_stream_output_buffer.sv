// tb_stream_output_buffer: requests leave in FIFO order, one at a time, and
// each result is reported upward; a request not confirmed within DELAY_BOUND
// cycles of its arrival is cleared below and reported as failed at exactly
// that time; a request already too old when it reaches the head is dropped
// unsent; an upper-layer clear empties the buffer.
module tb_stream_output_buffer;
  import mac_pkg::*;
  localparam int BOUND = 60;
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

  logic [TIME_W-1:0] now;
  logic up_req = 0, up_clr = 0, up_full, up_cfm, up_ok;
  frame_t up_frm = '0;
  logic [7:0] up_seq;
  mac_link_if dn ();
  stream_output_buffer #(.DEPTH(4), .DELAY_BOUND(BOUND)) dut (
    .clk, .rst_n, .now, .up_req, .up_frm, .up_full, .up_clr, .up_cfm, .up_ok, .up_seq, .dn(dn.dst)
  );
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0; else now <= now + 1'b1;

  // lower layer: confirms after `delay` cycles unless told to hang
  int delay = 5;
  bit hang = 0;
  frame_t got[$];
  int clr_seen = 0;
  logic [7:0] cfm_seq[$];
  bit cfm_ok[$];
  longint cfm_time[$];
  always @(posedge clk) if (rst_n) begin
    if (dn.clr) clr_seen++;
    if (up_cfm) begin cfm_seq.push_back(up_seq); cfm_ok.push_back(up_ok); cfm_time.push_back(now); end
    if (up_cfm || dn.req) check(!(up_cfm && dn.req), "request and result not in the same cycle");
  end
  int cnt = -1;
  always @(posedge clk) begin
    dn.cfm <= 1'b0;
    dn.ok  <= 1'b1;
    if (dn.req && rst_n) begin
      got.push_back(dn.frm);
      cnt <= hang ? -1 : delay;
    end else if (cnt > 0) cnt <= cnt - 1;
    else if (cnt == 0) begin dn.cfm <= 1'b1; cnt <= -1; end
  end

  task automatic push(input logic [7:0] seq);
    @(negedge clk); up_req = 1; up_frm = '0; up_frm.seq = seq; up_frm.len = 100;
    @(negedge clk); up_req = 0;
  endtask

  longint t0;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    push(1); push(2); push(3);
    repeat (60) @(posedge clk);
    check(got.size() == 3, $sformatf("three sent, got %0d", got.size()));
    if (got.size() == 3) check(got[0].seq == 1 && got[1].seq == 2 && got[2].seq == 3, "FIFO order");
    check(cfm_seq.size() == 3 && cfm_ok[0] && cfm_ok[1] && cfm_ok[2], "three successes reported");
    if (cfm_seq.size() == 3) check(cfm_seq[0] == 1 && cfm_seq[2] == 3, "reported in order");
    // timeout: lower layer never answers
    got.delete(); cfm_seq.delete(); cfm_ok.delete(); cfm_time.delete();
    hang = 1;
    @(negedge clk); t0 = now; up_req = 1; up_frm = '0; up_frm.seq = 9; @(negedge clk); up_req = 0;
    push(10);
    repeat (BOUND + 10) @(posedge clk);
    check(cfm_seq.size() >= 1 && cfm_seq[0] == 9 && !cfm_ok[0], "timed-out MSDU reported failed");
    if (cfm_time.size() >= 1)
      check(cfm_time[0] == t0 + BOUND + 1, $sformatf("timeout at request + bound: %0d vs %0d", cfm_time[0], t0 + BOUND + 1));
    check(clr_seen >= 1, "clear sent below on timeout");
    // seq 10 went out after 9 was dropped and also times out (it was queued 2 cycles later)
    repeat (20) @(posedge clk);
    check(got.size() == 2 && got[1].seq == 10, "next MSDU sent after the timeout");
    check(cfm_seq.size() == 2 && cfm_seq[1] == 10 && !cfm_ok[1], "second MSDU timed out too");
    check(clr_seen == 2, "second clear");
    // upper-layer clear while one is in flight and two are queued
    hang = 1; got.delete(); cfm_seq.delete(); cfm_ok.delete();
    push(20); push(21); push(22);
    repeat (5) @(posedge clk);
    @(negedge clk); up_clr = 1; @(negedge clk); up_clr = 0;
    repeat (BOUND + 20) @(posedge clk);
    check(got.size() == 1, "nothing sent after the clear");
    check(clr_seen == 3, "clear passed below");
    check(cfm_seq.size() == 0, "no result after the clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
