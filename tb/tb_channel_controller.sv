// tb_channel_controller: three checks of the shared medium, each on its own
// instance. Ideal channel (dut): a lone frame reaches every other listening
// device when it ends; two overlapping frames both collide and reach nobody;
// the loading counter counts active transmitters; every device senses the
// channel busy while anyone transmits; a device whose receiver is off gets
// nothing. Hidden node (hn, devices 0 and 2 cannot hear each other): 0's
// frame reaches only 1, device 2 senses the channel idle during it, and when
// 0 and 2 overlap, device 1 loses both frames. Noise (nz, loss rate 1/2):
// of 200 lone frames every one is either delivered or reported lost to
// noise, and the lost share lies between 35% and 65%.
module tb_channel_controller;
  import mac_pkg::*;
  localparam int N = 3;
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

  logic [N-1:0] tx_active = 0, rx_en = '1, rx_valid;
  frame_t [N-1:0] tx_frm = '0;
  frame_t rx_frm;
  logic [N-1:0] busy;
  logic collision_evt, noise_evt;
  logic [1:0] load;
  channel_controller #(.N_DEV(N)) dut (.*);

  // hidden node: row j of HEAR lists whom device j hears
  localparam logic [N-1:0][N-1:0] HN_HEAR = {3'b110, 3'b111, 3'b011};
  logic [N-1:0] h_tx = '0, h_busy, h_rx_valid;
  frame_t [N-1:0] h_frm = '0;
  frame_t h_rx_frm;
  logic [1:0] h_load;
  logic h_coll, h_noise;
  channel_controller #(.N_DEV(N), .HEAR(HN_HEAR)) hn (
    .clk, .rst_n, .tx_active(h_tx), .tx_frm(h_frm), .rx_en('1), .busy(h_busy),
    .rx_valid(h_rx_valid), .rx_frm(h_rx_frm), .load(h_load), .collision_evt(h_coll),
    .noise_evt(h_noise));
  int h_got[N] = '{0, 0, 0};
  int h_collisions = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (h_rx_valid[i]) h_got[i]++;
    if (h_coll) h_collisions++;
  end

  // noise: half of all clean frames lost
  logic [N-1:0] z_tx = '0, z_busy, z_rx_valid;
  frame_t [N-1:0] z_frm = '0;
  frame_t z_rx_frm;
  logic [1:0] z_load;
  logic z_coll, z_noise;
  channel_controller #(.N_DEV(N), .NOISE_PER_1024(512)) nz (
    .clk, .rst_n, .tx_active(z_tx), .tx_frm(z_frm), .rx_en('1), .busy(z_busy),
    .rx_valid(z_rx_valid), .rx_frm(z_rx_frm), .load(z_load), .collision_evt(z_coll),
    .noise_evt(z_noise));
  int z_got = 0, z_lost = 0;
  always @(posedge clk) if (rst_n) begin
    if (z_rx_valid[1]) z_got++;
    if (z_noise) z_lost++;
  end

  int got[N] = '{0, 0, 0};
  int coll = 0, maxload = 0;
  logic [7:0] seq_got;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (rx_valid[i]) begin got[i]++; seq_got = rx_frm.seq; end
    if (collision_evt) coll++;
    if (int'(load) > maxload) maxload = int'(load);
    check(int'(load) == $countones(tx_active), "load counts transmitters");
    check(busy == {N{tx_active != 0}}, "busy everywhere while anyone transmits");
  end

  task automatic burst(input int dev, input int start, input int len, input logic [7:0] seq);
    fork begin
      repeat (start) @(negedge clk);
      tx_active[dev] = 1; tx_frm[dev] = '0; tx_frm[dev].seq = seq;
      repeat (len) @(negedge clk);
      tx_active[dev] = 0;
    end join_none
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    burst(0, 1, 10, 8'd1);
    repeat (20) @(posedge clk);
    check(got[0] == 0 && got[1] == 1 && got[2] == 1 && seq_got == 1, "clean frame delivered to others");
    burst(1, 1, 10, 8'd2); burst(2, 6, 10, 8'd3);
    repeat (30) @(posedge clk);
    check(got[0] == 0 && got[1] == 1 && got[2] == 1, "collided frames not delivered");
    check(coll == 2 && maxload == 2, "both frames collided");
    @(negedge clk); rx_en = 3'b011;
    burst(1, 1, 5, 8'd4);
    repeat (20) @(posedge clk);
    check(got[0] == 1 && got[2] == 1, "receiver off gets nothing");

    // hidden node
    @(negedge clk); h_tx[0] = 1; h_frm[0].seq = 8'd9;
    repeat (3) @(negedge clk);
    check(h_busy == 3'b011, "device 2 does not sense device 0");
    repeat (5) @(negedge clk); h_tx[0] = 0;
    repeat (5) @(posedge clk);
    check(h_got[0] == 0 && h_got[1] == 1 && h_got[2] == 0, "hidden frame reaches only device 1");
    @(negedge clk); h_tx[0] = 1;
    repeat (4) @(negedge clk); h_tx[2] = 1;
    repeat (3) @(negedge clk);
    check(h_busy == 3'b111, "device 1 senses both");
    repeat (3) @(negedge clk); h_tx[0] = 0;
    repeat (6) @(negedge clk); h_tx[2] = 0;
    repeat (5) @(posedge clk);
    check(h_got[1] == 1 && h_got[0] == 0 && h_got[2] == 0, "hidden-node overlap lost at device 1");
    check(h_collisions == 2, "both hidden-node frames collided");

    // noise
    for (int f = 0; f < 200; f++) begin
      @(negedge clk); z_tx[0] = 1;
      repeat (3) @(negedge clk); z_tx[0] = 0;
      repeat (2) @(negedge clk);
    end
    repeat (5) @(posedge clk);
    check(z_got + z_lost == 200, $sformatf("each frame delivered or lost (%0d + %0d)", z_got, z_lost));
    check(z_lost >= 70 && z_lost <= 130, $sformatf("noise loss near one half (%0d of 200)", z_lost));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
