// tb_defragmentation: fragments 0..2 of one MSDU give one MSDU whose length
// is their sum; a repeated fragment is dropped; a gap discards the MSDU; a
// one-fragment MSDU passes straight through. A random run of 60 MSDUs of one
// to four fragments, with repeated fragments and some MSDUs missing a middle
// fragment, is compared with a reference list of the MSDUs that should come
// out and of the repeats that should be dropped.
module tb_defragmentation;
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

  logic in_valid = 0, out_valid, dup_evt, discard_evt;
  frame_t in_frm = '0, out_frm;
  defragmentation dut (.*);

  frame_t outs[$];
  int dups = 0, discards = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) outs.push_back(out_frm);
    if (dup_evt) dups++;
    if (discard_evt) discards++;
  end

  task automatic frag(input logic [3:0] src, input logic [7:0] seq, input logic [3:0] n,
                      input bit last, input int len);
    @(negedge clk); in_valid = 1; in_frm = '0; in_frm.ftype = FT_DATA; in_frm.src = src;
    in_frm.seq = seq; in_frm.frag = n; in_frm.last = last; in_frm.len = LEN_W'(len);
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    frag(1, 10, 0, 0, 256); frag(1, 10, 1, 0, 256); frag(1, 10, 1, 0, 256); frag(1, 10, 2, 1, 188);
    repeat (3) @(posedge clk);
    check(outs.size() == 1, "one MSDU");
    if (outs.size() == 1) check(outs[0].len == 700 && outs[0].seq == 10 && outs[0].src == 1, "length is the sum");
    check(dups == 1, "repeat dropped");
    frag(2, 11, 0, 0, 100); frag(2, 11, 2, 1, 100);
    repeat (3) @(posedge clk);
    check(outs.size() == 1 && discards == 1, "gap discards the MSDU");
    frag(3, 12, 0, 1, 77);
    repeat (3) @(posedge clk);
    check(outs.size() == 2 && outs[1].len == 77 && outs[1].seq == 12, "single fragment MSDU");

    // random run: MSDUs of 1..4 fragments, some fragments repeated, some
    // MSDUs with a missing middle fragment; compared with a reference list
    begin
      frame_t exp_q[$];
      int n_exp_dup, base, nf, len, tot, skip;
      n_exp_dup = dups; base = outs.size();
      for (int m = 0; m < 60; m++) begin
        nf   = 1 + int'($urandom_range(3));
        skip = (nf >= 3 && $urandom_range(9) < 2) ? 1 : 0;
        tot  = 0;
        for (int f = 0; f < nf; f++) begin
          len = 1 + int'($urandom_range(255));
          if (skip && f == 1) continue;
          frag(4'(m % 15), 8'(20 + m), 4'(f), f == nf - 1, len);
          tot += len;
          if (!skip && $urandom_range(3) == 0) begin
            frag(4'(m % 15), 8'(20 + m), 4'(f), f == nf - 1, len);
            n_exp_dup++;
          end
        end
        if (!skip) begin
          frame_t e;
          e = '0; e.src = 4'(m % 15); e.seq = 8'(20 + m); e.len = LEN_W'(tot);
          exp_q.push_back(e);
        end
      end
      repeat (3) @(posedge clk);
      check(outs.size() - base == exp_q.size(),
            $sformatf("random run: %0d MSDUs out, %0d expected", outs.size() - base, exp_q.size()));
      foreach (exp_q[i])
        if (base + i < outs.size())
          check(outs[base + i].src == exp_q[i].src && outs[base + i].seq == exp_q[i].seq &&
                outs[base + i].len == exp_q[i].len && outs[base + i].last && outs[base + i].frag == 0,
                $sformatf("random MSDU %0d rebuilt", i));
      check(dups == n_exp_dup, $sformatf("random run: %0d repeats dropped, %0d expected", dups, n_exp_dup));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
