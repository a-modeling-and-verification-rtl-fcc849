// tb_superframe_control: with sf 200, CAP 40, CTA 20 and owners {1, 3, 1, 2},
// device 1 sees the CAP for 40 cycles right after setup, its own CTAs at
// t = 40..59 and 80..99 with cta_remaining counting down, and nothing after
// t = 200 until the next beacon.
module tb_superframe_control;
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

  logic setup = 0;
  beacon_info_t info_in;
  logic cap_start, cap_end, cap_active, cta_start, cta_active, in_sf;
  logic [TIME_W-1:0] cap_remaining, cta_remaining;
  superframe_control #(.MY_ID(4'd1)) dut (.*);

  int t = -1;
  int cap_cycles = 0, cta_cycles = 0, cap_starts = 0, cap_ends = 0, cta_starts = 0;
  int first_cta = -1, sf_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (t >= 0) t++;
    if (setup) t = 0;
    if (cap_active) begin
      cap_cycles++;
      check(int'(cap_remaining) == 40 - (t - 1), $sformatf("cap_remaining at t=%0d: %0d", t, cap_remaining));
    end
    if (cta_active) begin
      cta_cycles++;
      if (first_cta < 0) first_cta = t;
      check((t - 1 >= 40 && t - 1 < 60) || (t - 1 >= 80 && t - 1 < 100), $sformatf("own CTA at t=%0d", t - 1));
      check(int'(cta_remaining) == 20 - ((t - 1 - 40) % 20), "cta_remaining");
    end
    if (in_sf) sf_cycles++;
    if (cap_start) cap_starts++;
    if (cap_end) cap_ends++;
    if (cta_start) cta_starts++;
  end

  initial begin
    info_in.sf_len = 200; info_in.cap_len = 40; info_in.cta_len = 20;
    info_in.owner = {4'd2, 4'd1, 4'd3, 4'd1};
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); setup = 1; @(negedge clk); setup = 0;
    repeat (260) @(posedge clk);
    check(cap_cycles == 40 && cap_starts == 1 && cap_ends == 1, $sformatf("CAP of 40 cycles (%0d)", cap_cycles));
    check(cta_cycles == 40 && cta_starts == 2, $sformatf("two own CTAs of 20 (%0d, %0d starts)", cta_cycles, cta_starts));
    check(first_cta == 41, $sformatf("first own CTA right after the CAP (%0d)", first_cta));
    check(sf_cycles == 200 && !in_sf, $sformatf("superframe of 200 (%0d)", sf_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
