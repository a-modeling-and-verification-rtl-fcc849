// tb_frame_fifo: checks order, full/empty flags, simultaneous push and pop
// and flush of frame_fifo against a queue model.
module tb_frame_fifo;
  import mac_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic flush = 0, push = 0, pop = 0, empty, full;
  frame_t din = '0, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  frame_t model[$];

  frame_fifo #(.DEPTH(DEPTH)) dut (.*);

  task automatic step(input bit pu, input bit po, input logic [7:0] seq);
    @(negedge clk);
    push = pu; pop = po; din = '0; din.seq = seq; din.len = LEN_W'(seq) * 3;
    @(posedge clk); #1;
    begin
      int n_before = model.size();
      if (po && n_before > 0) void'(model.pop_front());
      if (pu && n_before < DEPTH) model.push_back(din);
    end
    push = 0; pop = 0;
    check(count == model.size(), $sformatf("count %0d model %0d", count, model.size()));
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == DEPTH), "full flag");
    if (model.size() > 0) check(dout == model[0], $sformatf("head seq %0d exp %0d", dout.seq, model[0].seq));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) step(1, 0, 8'(i + 1));      // overfill: 5 and 6 refused
    check(full, "full after 4 pushes");
    step(1, 1, 8'd20);                                      // pop and push together when full
    for (int i = 0; i < 3; i++) step(0, 1, 0);
    for (int i = 0; i < 40; i++) step($urandom_range(0, 1), $urandom_range(0, 1), 8'($urandom));
    @(negedge clk); flush = 1; @(negedge clk); flush = 0; model.delete();
    #1 check(empty && count == 0, "flush empties");
    step(1, 0, 8'd99);
    check(dout.seq == 99, "push after flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
