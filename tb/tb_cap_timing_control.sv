// tb_cap_timing_control: the backoff window follows [7, 15, 31, 63] with the
// retry count; the delay from request to transmission is BIFS plus a random
// number of slots within the window; a busy medium freezes the countdown and
// nothing is sent while it is busy; the end of the CAP suspends the backoff
// until the next CAP start; a frame that does not fit in the rest of the CAP
// waits for the next CAP.
module tb_cap_timing_control;
  import mac_pkg::*;
  localparam int BIFS = 4, SLOT = 4, OVH = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (60000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  mac_link_if up (), dn ();
  logic cap_start = 0, cap_end = 0, cap_active = 0, cca_busy = 0;
  logic [TIME_W-1:0] cap_remaining = '0;
  logic busy_suspend_evt, cap_suspend_evt;
  logic [5:0] bw;
  cap_timing_control #(.BIFS(BIFS), .SLOT(SLOT), .OVERHEAD(OVH)) dut (.clk, .rst_n, .up(up.dst),
    .dn(dn.src), .cap_start, .cap_end, .cap_active, .cap_remaining, .cca_busy,
    .busy_suspend_evt, .cap_suspend_evt, .bw);

  int reqs = 0, busy_ev = 0, cap_ev = 0;
  longint t = 0, t_dn = 0;
  always @(posedge clk) if (rst_n) begin
    t++;
    if (dn.req) begin
      reqs++; t_dn = t;
      check(!cca_busy && cap_active, "no transmission while busy or outside the CAP");
    end
    if (busy_suspend_evt) busy_ev++;
    if (cap_suspend_evt) cap_ev++;
  end

  longint t_up;
  task automatic request(input logic [1:0] retry, input int len);
    @(negedge clk); up.req = 1; up.frm = '0; up.frm.retry = retry; up.frm.len = LEN_W'(len);
    t_up = t + 1;
    @(negedge clk); up.req = 0;
  endtask
  task automatic confirm();
    @(negedge clk); dn.cfm = 1; dn.ok = 1; @(negedge clk); dn.cfm = 0;
  endtask
  // one request with an idle medium; returns the delay in cycles
  task automatic one(input logic [1:0] retry, output longint d);
    int r0 = reqs;
    request(retry, 20);
    while (reqs == r0) @(posedge clk);
    d = t_dn - t_up;
    confirm();
  endtask

  longint d, dmax, dmin;
  int exp_bw[4] = '{7, 15, 31, 63};
  initial begin
    up.req = 0; up.clr = 0; up.frm = '0; dn.cfm = 0; dn.ok = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); cap_active = 1; cap_remaining = 16'hFFFF;
    for (int r = 0; r < 4; r++) begin
      dmax = 0; dmin = 1 << 30;
      for (int k = 0; k < 24; k++) begin
        one(2'(r), d);
        if (d > dmax) dmax = d;
        if (d < dmin) dmin = d;
        repeat ($urandom_range(0, 9)) @(posedge clk);
      end
      check(bw == 6'(exp_bw[r]), $sformatf("retry %0d: window %0d", r, bw));
      check(dmin >= BIFS, $sformatf("retry %0d: at least BIFS idle first (%0d)", r, dmin));
      check(dmax <= BIFS + exp_bw[r] * SLOT + 3, $sformatf("retry %0d: delay %0d within the window", r, dmax));
      if (r > 0) check(dmax > BIFS + exp_bw[r-1] * SLOT + 3, $sformatf("retry %0d: window grew (%0d)", r, dmax));
    end
    // busy medium freezes the countdown
    request(2'd3, 20);
    repeat (BIFS + 6) @(posedge clk);
    if (reqs == 96) begin
      @(negedge clk); cca_busy = 1;
      repeat (100) @(posedge clk);
      check(reqs == 96, "nothing sent while busy");
      @(negedge clk); cca_busy = 0;
    end
    while (reqs == 96) @(posedge clk);
    check(t_dn - t_up >= 100 + BIFS, "countdown resumed after the busy period");
    check(busy_ev >= 1, "busy suspension reported");
    confirm();
    // CAP ends during the backoff
    request(2'd3, 20);
    repeat (BIFS + 3) @(posedge clk);
    @(negedge clk); cap_end = 1; cap_active = 0; @(negedge clk); cap_end = 0;
    repeat (300) @(posedge clk);
    check(reqs == 97 && cap_ev == 1, "suspended at the CAP end");
    @(negedge clk); cap_start = 1; cap_active = 1; @(negedge clk); cap_start = 0;
    while (reqs == 97) @(posedge clk);
    check(1, "resumed in the next CAP");
    confirm();
    // frame too long for the rest of the CAP
    @(negedge clk); cap_remaining = 50;
    request(2'd0, 20);        // 20 + 40 > 50
    repeat (BIFS + 7 * SLOT + 10) @(posedge clk);
    check(reqs == 98 && cap_ev == 2, "waits when the frame does not fit");
    @(negedge clk); cap_remaining = 16'hFFFF; cap_start = 1; @(negedge clk); cap_start = 0;
    repeat (BIFS + 7 * SLOT + 10) @(posedge clk);
    check(reqs == 99, "sent in the next CAP");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
