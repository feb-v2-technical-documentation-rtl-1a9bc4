// tb_dead_time_filter: per-channel dead time. With dead_time = 10 a channel
// firing every cycle passes one hit every 10 cycles; hits 10 cycles apart all
// pass, 9 apart alternate; BC0/Resync are never filtered; dead_time 0 passes
// everything; the drop counter counts the rest.
module tb_dead_time_filter;
  import feb_pkg::*;
  logic clk = 0, rst = 1, flush = 0;
  logic [5:0] dead_time = 10;
  logic [N_CH-1:0] in_valid = '0, out_valid;
  logic [N_CH-1:0][TS_W-1:0] in_ts = '0, out_ts;
  logic [15:0] dropped;
  int checks = 0, failures = 0;
  int n_out [N_CH];
  int n_in  [N_CH];

  dead_time_filter dut (.*);
  always #4 clk = ~clk;
  always @(posedge clk) for (int c = 0; c < N_CH; c++) begin
    if (out_valid[c] && !rst) n_out[c]++;
    if (in_valid[c] && !rst) n_in[c]++;
  end

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
    int total_in, total_out;
    repeat (3) @(negedge clk);
    rst = 0;
    // 200 cycles: channel 0 every cycle, channel 1 every 10, channel 2 every 9,
    // BC0 every cycle, channel 5 every 3 cycles with timestamps checked
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      in_valid = '0;
      in_valid[0] = 1;
      in_valid[1] = (i % 10 == 0);
      in_valid[2] = (i % 9 == 0);
      in_valid[CH_BC0] = 1;
      for (int c = 0; c < N_CH; c++) in_ts[c] = TS_W'(i * 64 + c);
      if (i > 0) for (int c = 0; c < N_CH; c++) if (out_valid[c]) check(out_ts[c] == TS_W'((i - 1) * 64 + c), "timestamp passes unchanged");
    end
    @(negedge clk); in_valid = '0; @(negedge clk);
    check(n_out[0] == 20, $sformatf("every-cycle channel: %0d of 200 pass, expect 20", n_out[0]));
    check(n_out[1] == 20, $sformatf("10-cycle channel: %0d of 20 pass", n_out[1]));
    check(n_out[2] == 12, $sformatf("9-cycle channel: %0d of 23 pass, expect 12", n_out[2]));
    check(n_out[CH_BC0] == 200, "BC0 channel never filtered");
    total_in = n_in[0] + n_in[1] + n_in[2];
    total_out = n_out[0] + n_out[1] + n_out[2];
    check(dropped == 16'(total_in - total_out), $sformatf("drop counter %0d, expect %0d", dropped, total_in - total_out));
    dead_time = 0; n_out[0] = 0;
    repeat (50) begin @(negedge clk); in_valid = 34'h1; end
    @(negedge clk); in_valid = '0; @(negedge clk);
    check(n_out[0] == 50, "dead time 0 passes every hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
