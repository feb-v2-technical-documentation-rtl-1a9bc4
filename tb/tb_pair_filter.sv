// tb_pair_filter: channel pair filtering. Strip s has its direct end on
// channel 15-s and its return end on 16+s. Strips 0-3 are enabled with the
// difference range [100, 200]. Checks: a pair in range leaves as one pair on
// the direct channel's slot one cycle after its second end, in either arrival
// order and for simultaneous ends; an out-of-range pair is dropped and
// counted; a lone end is discarded after max_wait cycles; channels of
// disabled strips and BC0 pass as single words tagged with FPGA and channel.
module tb_pair_filter;
  import feb_pkg::*;
  logic clk = 0, rst = 1, flush = 0;
  logic [1:0] fpga_id = 2;
  logic [15:0] pair_en = 16'h000F;
  logic [15:0][15:0] diff_min, diff_max;
  logic [6:0] max_wait = 20;
  logic [N_CH-1:0] in_valid = '0;
  logic [N_CH-1:0][TS_W-1:0] in_ts = '0;
  ch_slot_t [N_CH-1:0] out;
  logic [15:0] pairs_ok, pairs_rejected;
  int checks = 0, failures = 0;
  int n_single, n_pair;

  pair_filter dut (.*);
  always #4 clk = ~clk;
  always @(posedge clk) if (!rst) for (int c = 0; c < N_CH; c++) if (out[c].valid) begin
    if (out[c].pair) n_pair++; else n_single++;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic hit(input int c, input logic [TS_W-1:0] t);
    @(negedge clk); in_valid = '0; in_valid[c] = 1; in_ts[c] = t;
    @(negedge clk); in_valid = '0;
  endtask
  // expect a pair of strip s on the output right now
  task automatic expect_pair(input int s, input logic [TS_W-1:0] td, tr);
    int d = 15 - s, r = 16 + s;
    check(out[d].valid && out[d].pair, $sformatf("strip %0d pair out", s));
    check(out[d].w0 == {fpga_id, 6'(d), td} && out[d].w1 == {fpga_id, 6'(r), tr}, $sformatf("strip %0d pair words", s));
    check(!out[r].valid, $sformatf("strip %0d return slot empty", s));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin diff_min[s] = 100; diff_max[s] = 200; end
    repeat (3) @(negedge clk);
    rst = 0;
    // strip 0: direct then return, diff 150
    hit(15, 1000); check(out[15].valid == 0, "first end held");
    hit(16, 850); expect_pair(0, 1000, 850);
    // strip 1: return first, gap of 5 cycles
    hit(17, 5000); repeat (5) @(negedge clk);
    hit(14, 5100); expect_pair(1, 5100, 5000);
    // strip 2: both ends in the same cycle
    @(negedge clk); in_valid = '0; in_valid[13] = 1; in_valid[18] = 1; in_ts[13] = 7200; in_ts[18] = 7000;
    @(negedge clk); in_valid = '0; expect_pair(2, 7200, 7000);
    // strip 3: diff 50, rejected
    @(negedge clk); n_pair = 0; n_single = 0;
    hit(12, 9050); hit(19, 9000);
    @(negedge clk);
    check(n_pair == 0 && n_single == 0 && pairs_rejected == 1, "out-of-range pair dropped");
    // strip 3: lone direct end times out
    hit(12, 12000);
    repeat (25) @(negedge clk);
    hit(19, 11850);
    repeat (3) @(negedge clk);
    check(n_pair == 0, "timed-out end does not pair");
    // the return end is now held; its partner arriving pairs it
    hit(12, 12000); expect_pair(3, 12000, 11850);
    check(pairs_ok == 4, "pair counter");
    // disabled strip 5 and BC0 pass as singles
    @(negedge clk); in_valid = '0; in_valid[10] = 1; in_valid[21] = 1; in_valid[CH_BC0] = 1;
    in_ts[10] = 1; in_ts[21] = 2; in_ts[CH_BC0] = 3;
    @(negedge clk); in_valid = '0;
    check(out[10].valid && !out[10].pair && out[10].w0 == {2'd2, 6'd10, 24'd1}, "disabled strip direct end single");
    check(out[21].valid && out[21].w0 == {2'd2, 6'd21, 24'd2}, "disabled strip return end single");
    check(out[CH_BC0].valid && out[CH_BC0].w0 == {2'd2, 6'd32, 24'd3}, "BC0 single");
    // flush drops a held end
    hit(15, 100); @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    hit(16, 0); @(negedge clk);
    check(!out[15].valid, "flush cleared the held end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
