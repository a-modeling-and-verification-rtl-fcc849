// tb_beacon_decoder: a consistent beacon gives a setup pulse with its fields
// and records the coordinator; an inconsistent one is rejected.
module tb_beacon_decoder;
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

  logic beacon_valid = 0, setup, bad_evt;
  frame_t beacon_frm = '0;
  beacon_info_t info;
  logic [ID_W-1:0] pnc_id;
  beacon_decoder dut (.*);

  task automatic beacon(input int sf, input int cap, input int cta, input logic [ID_W-1:0] src);
    beacon_info_t bi;
    bi.sf_len = 16'(sf); bi.cap_len = 16'(cap); bi.cta_len = 16'(cta);
    bi.owner = {4'd3, 4'd1, 4'd2, 4'd0};
    @(negedge clk); beacon_valid = 1; beacon_frm = '0; beacon_frm.ftype = FT_BEACON;
    beacon_frm.src = src; beacon_frm.payload = 64'(bi);
    @(negedge clk); beacon_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    beacon(1000, 200, 100, 4'd0);
    check(setup && !bad_evt, "good beacon accepted");
    check(info.sf_len == 1000 && info.cap_len == 200 && info.cta_len == 100, "fields");
    check(info.owner[1] == 4'd2 && info.owner[3] == 4'd3 && pnc_id == 0, "owners and coordinator");
    @(negedge clk); check(!setup, "setup is a pulse");
    beacon(500, 200, 100, 4'd7);      // 200 + 4 * 100 > 500
    check(!setup && bad_evt, "inconsistent beacon rejected");
    check(info.sf_len == 1000 && pnc_id == 0, "previous setup kept");
    beacon(600, 200, 100, 4'd7);
    check(setup && pnc_id == 7, "exact fit accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
