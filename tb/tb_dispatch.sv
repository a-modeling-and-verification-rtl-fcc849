// tb_dispatch: each frame type reaches its own output, frames for other
// devices are discarded, and only unicast data and commands ask for an ACK.
module tb_dispatch;
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

  logic rx_valid = 0, beacon_valid, ack_valid, data_valid, cmd_valid, ack_req, discard_evt;
  frame_t rx_frm = '0, frm;
  dispatch #(.MY_ID(4'd2)) dut (.*);

  task automatic send(input ftype_e ft, input logic [ID_W-1:0] dst,
                      input bit e_bcn, input bit e_ack, input bit e_data, input bit e_cmd,
                      input bit e_ackreq, input bit e_disc);
    @(negedge clk); rx_valid = 1; rx_frm = '0; rx_frm.ftype = ft; rx_frm.dst = dst;
    rx_frm.src = 4'd5; rx_frm.seq = 8'($urandom);
    @(negedge clk); rx_valid = 0;
    check({beacon_valid, ack_valid, data_valid, cmd_valid, ack_req, discard_evt} ==
          {e_bcn, e_ack, e_data, e_cmd, e_ackreq, e_disc},
          $sformatf("type %0d dst %0d routed", ft, dst));
    check(frm == rx_frm, "frame passed on");
    @(negedge clk);
    check({beacon_valid, ack_valid, data_valid, cmd_valid, ack_req} == '0, "one-cycle pulses");
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    send(FT_BEACON, BCAST_ID, 1, 0, 0, 0, 0, 0);
    send(FT_ACK,    4'd2,     0, 1, 0, 0, 0, 0);
    send(FT_DATA,   4'd2,     0, 0, 1, 0, 1, 0);
    send(FT_CMD,    4'd2,     0, 0, 0, 1, 1, 0);
    send(FT_DATA,   BCAST_ID, 0, 0, 1, 0, 0, 0);
    send(FT_DATA,   4'd3,     0, 0, 0, 0, 0, 1);
    send(FT_ACK,    4'd4,     0, 0, 0, 0, 0, 1);
    send(FT_CMD,    BCAST_ID, 0, 0, 0, 1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
