// tb_fragmentation: an MSDU of 700 units with FRAG_SIZE = 256 must leave as
// fragments of 256, 256 and 188 numbered 0..2 with `last` on the third, one
// per confirm; a failed fragment ends the MSDU with a failure and nothing
// more is sent; a clear is passed down.
module tb_fragmentation;
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
  fragmentation #(.FRAG_SIZE(256)) dut (.clk, .rst_n, .up(up.dst), .dn(dn.src));

  // lower layer: answers every request after 5 cycles with ok_pattern[index]
  bit ok_pattern[$];
  frame_t got[$];
  int clr_seen = 0;
  initial begin
    dn.cfm = 0; dn.ok = 0;
    forever begin
      @(posedge clk);
      if (dn.clr) clr_seen++;
      if (dn.req) begin
        got.push_back(dn.frm);
        repeat (5) @(posedge clk);
        @(negedge clk);
        dn.cfm = 1; dn.ok = (ok_pattern.size() > 0) ? ok_pattern.pop_front() : 1'b1;
        @(negedge clk); dn.cfm = 0;
      end
    end
  end

  task automatic send(input int len, input logic [7:0] seq, output bit ok);
    @(negedge clk);
    up.req = 1; up.frm = '0; up.frm.ftype = FT_DATA; up.frm.seq = seq; up.frm.len = LEN_W'(len);
    @(negedge clk); up.req = 0;
    while (!up.cfm) @(posedge clk);
    ok = up.ok;
  endtask

  bit ok;
  initial begin
    up.req = 0; up.clr = 0; up.frm = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    send(700, 8'd5, ok);
    check(ok, "700-unit MSDU confirmed ok");
    check(got.size() == 3, $sformatf("3 fragments, got %0d", got.size()));
    if (got.size() == 3) begin
      check(got[0].len == 256 && got[1].len == 256 && got[2].len == 188, "fragment lengths");
      check(got[0].frag == 0 && got[1].frag == 1 && got[2].frag == 2, "fragment numbers");
      check(!got[0].last && !got[1].last && got[2].last, "last flag");
      check(got[2].seq == 5, "sequence carried");
    end
    got.delete();
    send(256, 8'd6, ok);
    check(ok && got.size() == 1 && got[0].last && got[0].len == 256, "exact-size MSDU is one fragment");
    got.delete();
    ok_pattern.push_back(1); ok_pattern.push_back(0);
    send(1000, 8'd7, ok);
    repeat (20) @(posedge clk);
    check(!ok, "failed fragment fails the MSDU");
    check(got.size() == 2, $sformatf("no fragment after the failure, got %0d", got.size()));
    got.delete();
    // clear while waiting for a confirm
    @(negedge clk);
    up.req = 1; up.frm = '0; up.frm.len = 600;
    @(negedge clk); up.req = 0;
    repeat (3) @(negedge clk);
    up.clr = 1; @(negedge clk); up.clr = 0;
    repeat (30) @(posedge clk);
    check(clr_seen == 1, "clear passed down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
