// tb_beacon_generator: beacons are requested every BEACON_LEN + SF_LEN
// cycles plus 3 handshake cycles when the transmitter confirms
// BEACON_LEN + 1 cycles after the request; each carries the schedule and a new sequence number and
// is looped back to the own decoder when confirmed; disabling stops them.
module tb_beacon_generator;
  import mac_pkg::*;
  localparam int BL = 10, SF = 300;
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

  logic en = 0, tx_req, tx_cfm = 0, own_valid;
  frame_t tx_frm, own_frm;
  logic [7:0] beacon_seq;
  beacon_generator #(.MY_ID(4'd0), .BEACON_LEN(BL), .SF_LEN(SF), .CAP_LEN(100), .CTA_LEN(40),
                     .OWNERS({4'd3, 4'd2, 4'd1, 4'd0})) dut (.*);

  int reqs = 0, owns = 0, cnt = -1;
  longint t = 0, t_req[$];
  beacon_info_t bi;
  always @(posedge clk) if (rst_n) begin
    t++;
    tx_cfm <= 1'b0;
    if (tx_req) begin
      reqs++; t_req.push_back(t); cnt <= BL - 1;
      bi = beacon_info_t'(tx_frm.payload);
      check(tx_frm.ftype == FT_BEACON && tx_frm.dst == BCAST_ID && tx_frm.len == BL, "beacon header");
      check(bi.sf_len == SF && bi.cap_len == 100 && bi.cta_len == 40 && bi.owner[2] == 4'd2, "schedule");
      check(tx_frm.seq == 8'(reqs - 1), "sequence number");
    end else if (cnt > 0) cnt <= cnt - 1;
    else if (cnt == 0) begin tx_cfm <= 1'b1; cnt <= -1; end
    if (own_valid) begin owns++; check(own_frm.ftype == FT_BEACON, "looped back"); end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (20) @(posedge clk);
    check(reqs == 0, "silent when disabled");
    @(negedge clk); en = 1;
    repeat (3 * (SF + BL) + 20) @(posedge clk);
    check(reqs == 4 && owns >= 3, $sformatf("four beacons (%0d)", reqs));
    for (int i = 1; i < t_req.size(); i++)
      check(t_req[i] - t_req[i-1] == SF + BL + 3, $sformatf("period %0d", t_req[i] - t_req[i-1]));
    @(negedge clk); en = 0;
    repeat (2 * (SF + BL)) @(posedge clk);
    check(reqs <= 5, "stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
