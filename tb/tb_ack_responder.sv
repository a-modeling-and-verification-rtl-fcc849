// tb_ack_responder: after a trigger the ACK request comes SIFS cycles later,
// addressed to the frame's source with its sequence and fragment numbers;
// a trigger while busy is dropped; the block frees on the transmitter confirm.
// Twenty more frames from random sources, confirmed after random delays,
// repeat the timing and field checks.
module tb_ack_responder;
  import mac_pkg::*;
  localparam int SIFS = 3;
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

  logic trig = 0, tx_req, tx_cfm = 0, busy, drop_evt;
  frame_t rx_frm = '0, tx_frm;
  ack_responder #(.MY_ID(4'd6), .SIFS(SIFS), .ACK_LEN(8)) dut (.*);

  int reqs = 0, drops = 0;
  longint t = 0, t_req = 0;
  always @(posedge clk) if (rst_n) begin
    t++;
    if (tx_req) begin reqs++; t_req = t; end
    if (drop_evt) drops++;
  end

  longint t_trig;
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); trig = 1; rx_frm = '0; rx_frm.ftype = FT_DATA; rx_frm.src = 4'd3;
    rx_frm.dst = 4'd6; rx_frm.seq = 8'd44; rx_frm.frag = 4'd5; t_trig = t + 1;
    @(negedge clk); trig = 0;
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;     // while busy
    repeat (10) @(posedge clk);
    check(reqs == 1, "one ACK requested");
    check(t_req - t_trig == SIFS + 1, $sformatf("ACK after SIFS: %0d", t_req - t_trig));
    check(tx_frm.ftype == FT_ACK && tx_frm.src == 4'd6 && tx_frm.dst == 4'd3, "ACK addressing");
    check(tx_frm.seq == 8'd44 && tx_frm.frag == 4'd5 && tx_frm.len == 8, "ACK fields");
    check(drops == 1 && busy, "second trigger dropped");
    @(negedge clk); tx_cfm = 1; @(negedge clk); tx_cfm = 0;
    check(!busy, "free after the confirm");
    // twenty more frames from random sources, each confirmed after a random
    // transmitter delay: every ACK matches its frame and comes SIFS later
    for (int n = 0; n < 20; n++) begin
      logic [3:0] src;
      logic [7:0] seq;
      int r0;
      src = 4'($urandom_range(14)); seq = 8'($urandom);
      r0 = reqs;
      @(negedge clk); trig = 1; rx_frm = '0; rx_frm.ftype = FT_CMD; rx_frm.src = src;
      rx_frm.dst = 4'd6; rx_frm.seq = seq; rx_frm.frag = 4'(n); t_trig = t + 1;
      @(negedge clk); trig = 0;
      repeat (SIFS + 2) @(negedge clk);
      check(reqs == r0 + 1 && t_req - t_trig == SIFS + 1, $sformatf("ACK %0d after SIFS", n));
      check(tx_frm.dst == src && tx_frm.seq == seq && tx_frm.frag == 4'(n) && tx_frm.src == 4'd6,
            $sformatf("ACK %0d fields", n));
      repeat ($urandom_range(5)) @(negedge clk);
      check(busy, "busy until confirmed");
      tx_cfm = 1; @(negedge clk); tx_cfm = 0;
      check(!busy, "free after the confirm");
    end
    check(drops == 1, "no further drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
