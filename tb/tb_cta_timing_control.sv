// tb_cta_timing_control: a frame whose air time plus overhead fits in the
// time left in the own CTA goes out at once; one that does not is held until
// the next CTA start; while send-and-wait is busy nothing is sent; outside a
// CTA nothing is sent; the confirm is passed up; a clear is passed down.
module tb_cta_timing_control;
  import mac_pkg::*;
  localparam int OVH = 40;
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

  mac_link_if up (), dn ();
  logic sw_busy = 0, cta_start = 0, cta_active = 0, suspend_evt;
  logic [TIME_W-1:0] cta_remaining = '0;
  cta_timing_control #(.OVERHEAD(OVH)) dut (.clk, .rst_n, .up(up.dst), .dn(dn.src), .sw_busy,
    .cta_start, .cta_active, .cta_remaining, .suspend_evt);

  int req_cnt = 0, clr_cnt = 0, susp = 0, upcfm = 0;
  longint t = 0, t_req = 0;
  bit up_ok_last;
  always @(posedge clk) if (rst_n) begin
    t++;
    if (dn.req) begin req_cnt++; t_req = t; check(cta_active && !sw_busy, "request only inside the CTA with send-and-wait free"); end
    if (dn.clr) clr_cnt++;
    if (suspend_evt) susp++;
    if (up.cfm) begin upcfm++; up_ok_last = up.ok; end
  end
  // CTA model: remaining counts down while active
  always @(posedge clk) if (cta_active && cta_remaining > 0) cta_remaining <= cta_remaining - 1'b1;

  task automatic request(input int len);
    @(negedge clk); up.req = 1; up.frm = '0; up.frm.len = LEN_W'(len); @(negedge clk); up.req = 0;
  endtask
  task automatic confirm(input bit ok);
    @(negedge clk); dn.cfm = 1; dn.ok = ok; @(negedge clk); dn.cfm = 0;
  endtask

  longint t_start;
  initial begin
    up.req = 0; up.clr = 0; up.frm = '0; dn.cfm = 0; dn.ok = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // inside a CTA with 500 left: 100 + 40 fits
    @(negedge clk); cta_active = 1; cta_remaining = 500;
    request(100);
    repeat (5) @(posedge clk);
    check(req_cnt == 1 && susp == 0, "fits: sent at once");
    confirm(1);
    repeat (2) @(posedge clk);
    check(upcfm == 1 && up_ok_last, "success passed up");
    // does not fit: 200 + 40 > remaining
    @(negedge clk); cta_remaining = 150;
    request(200);
    repeat (30) @(posedge clk);
    check(req_cnt == 1 && susp == 1, "too long: held");
    @(negedge clk); cta_active = 0; cta_remaining = 0;
    repeat (20) @(posedge clk);
    @(negedge clk); cta_active = 1; cta_remaining = 512; cta_start = 1; t_start = t;
    @(negedge clk); cta_start = 0;
    repeat (5) @(posedge clk);
    check(req_cnt == 2, "resumed at the next CTA start");
    check(t_req - t_start <= 4, $sformatf("resumed within 4 cycles, took %0d", t_req - t_start));
    confirm(0);
    repeat (2) @(posedge clk);
    check(upcfm == 2 && !up_ok_last, "failure passed up");
    // send-and-wait busy: wait for it
    @(negedge clk); sw_busy = 1; cta_remaining = 500;
    request(50);
    repeat (20) @(posedge clk);
    check(req_cnt == 2, "waits while send-and-wait is busy");
    @(negedge clk); sw_busy = 0;
    repeat (5) @(posedge clk);
    check(req_cnt == 3, "sent when send-and-wait frees");
    @(negedge clk); up.clr = 1; @(negedge clk); up.clr = 0;
    repeat (3) @(posedge clk);
    check(clr_cnt == 1, "clear passed down");
    // fits by air time alone but not with the ACK overhead: 100 + 40 > 120
    @(negedge clk); cta_remaining = 120;
    request(100);
    repeat (10) @(posedge clk);
    check(req_cnt == 3 && susp == 2, "overhead counted in the time check");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
