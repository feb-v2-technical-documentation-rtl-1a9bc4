// tb_retrig_mitig: retriggering mitigation. A channel of the top PETIROC
// firing every cycle trips the threshold and mutes only the top PETIROC for
// exactly mute_time cycles; a channel firing slower than the decrement rate
// never trips; the bottom PETIROC is muted by channel 20; a readout overflow
// mutes both; threshold 0 disables everything; data pass with one cycle of
// latency.
module tb_retrig_mitig;
  import feb_pkg::*;
  logic clk = 0, rst = 1, overflow = 0;
  logic [3:0] threshold = 4;
  logic [7:0] dec_time = 8, mute_time = 50;
  logic [N_CH-1:0] in_valid = '0, out_valid;
  logic [N_CH-1:0][TS_W-1:0] in_ts = '0, out_ts;
  logic [1:0] roc_mute;
  logic [15:0] mute_events;
  int checks = 0, failures = 0;
  int mute_len [2];

  retrig_mitig dut (.*);
  always #4 clk = ~clk;
  always @(posedge clk) for (int r = 0; r < 2; r++) if (roc_mute[r]) mute_len[r]++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (3) @(negedge clk);
    rst = 0;
    // slow channel: one hit every 8 cycles is balanced by the decrement
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = '0; in_valid[3] = (i % 8 == 0); in_ts[3] = TS_W'(i);
      if (i > 0 && out_valid[3]) check(out_ts[3] == TS_W'(i - 1), "data delayed one cycle");
    end
    check(mute_events == 0 && roc_mute == 0, "slow channel never mutes");
    // oscillating channel 7
    t = 0;
    mute_len = '{0, 0};
    while (!roc_mute[0] && t < 100) begin @(negedge clk); in_valid = 34'h80; t++; end
    in_valid = '0;
    check(t >= 5 && t <= 8, $sformatf("trip after %0d hits", t));
    check(!roc_mute[1], "bottom PETIROC not muted by a top channel");
    repeat (80) @(negedge clk);
    check(mute_len[0] == 50, $sformatf("mute lasts %0d cycles, expect 50", mute_len[0]));
    check(mute_events == 1, "one mute event");
    // bottom channel 20
    t = 0;
    while (!roc_mute[1] && t < 100) begin @(negedge clk); in_valid = 34'h10_0000; t++; end
    in_valid = '0;
    check(roc_mute == 2'b10, "channel 20 mutes the bottom PETIROC only");
    repeat (80) @(negedge clk);
    // overflow mutes both
    @(negedge clk); overflow = 1; @(negedge clk); overflow = 0;
    check(roc_mute == 2'b11, "overflow mutes both PETIROCs");
    repeat (80) @(negedge clk);
    // disabled
    threshold = 0;
    repeat (100) begin @(negedge clk); in_valid = 34'hFFFF_FFFF; end
    @(negedge clk); overflow = 1; @(negedge clk); overflow = 0; in_valid = '0;
    check(roc_mute == 0, "threshold 0 disables muting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
