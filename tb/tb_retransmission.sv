// tb_retransmission: fail, fail, ok must give three requests with retry 0, 1, 2
// and a success upward; four failures with MAX_RETRY = 3 must drop the frame
// with a failure; a clear is passed down.
module tb_retransmission;
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

  mac_link_if up (), dn ();
  logic retry_evt, drop_evt;
  retransmission #(.MAX_RETRY(3)) dut (.clk, .rst_n, .up(up.dst), .dn(dn.src), .retry_evt, .drop_evt);

  bit ok_pattern[$];
  frame_t got[$];
  int clr_seen = 0, retries = 0, drops = 0;
  always @(posedge clk) if (rst_n) begin
    if (retry_evt) retries++;
    if (drop_evt) drops++;
    if (dn.clr) clr_seen++;
  end
  initial begin
    dn.cfm = 0; dn.ok = 0;
    forever begin
      @(posedge clk);
      if (dn.req) begin
        got.push_back(dn.frm);
        repeat (3) @(posedge clk);
        @(negedge clk);
        dn.cfm = 1; dn.ok = (ok_pattern.size() > 0) ? ok_pattern.pop_front() : 1'b1;
        @(negedge clk); dn.cfm = 0;
      end
    end
  end

  task automatic send(input logic [7:0] seq, output bit ok);
    @(negedge clk);
    up.req = 1; up.frm = '0; up.frm.ftype = FT_CMD; up.frm.seq = seq; up.frm.len = 20;
    @(negedge clk); up.req = 0;
    while (!up.cfm) @(posedge clk);
    ok = up.ok;
  endtask

  bit ok;
  initial begin
    up.req = 0; up.clr = 0; up.frm = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    ok_pattern = '{0, 0, 1};
    send(8'd1, ok);
    check(ok, "success after two retries");
    check(got.size() == 3, $sformatf("three attempts, got %0d", got.size()));
    for (int i = 0; i < got.size(); i++) check(got[i].retry == RETRY_W'(i) && got[i].seq == 1, "retry count in frame");
    check(retries == 2 && drops == 0, $sformatf("two retry events, got %0d/%0d", retries, drops));
    got.delete();
    ok_pattern = '{0, 0, 0, 0};
    send(8'd2, ok);
    repeat (10) @(posedge clk);
    check(!ok, "dropped after the retry limit");
    check(got.size() == 4, $sformatf("1 + 3 attempts, got %0d", got.size()));
    check(drops == 1, "one drop event");
    got.delete();
    ok_pattern = '{1};
    send(8'd3, ok);
    check(ok && got.size() == 1 && got[0].retry == 0, "new frame starts at retry 0");
    @(negedge clk);
    up.req = 1; up.frm = '0; @(negedge clk); up.req = 0;
    up.clr = 1; @(negedge clk); up.clr = 0;
    repeat (10) @(posedge clk);
    check(clr_seen == 1, "clear passed down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
