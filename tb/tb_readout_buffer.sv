// tb_readout_buffer: readout multiplexer and FIFO. Checks: simultaneous
// words leave in the fixed priority order (Resync, BC0, strip ends) at one
// word per cycle with no gap; a pair takes two consecutive cycles, direct end
// first; under a flood of hits on all channels no word older than
// max_disparity plus the pipeline latency reaches the bus, overflow pulses
// and the drop counter moves; flush empties the buffer.
module tb_readout_buffer;
  import feb_pkg::*;
  logic clk = 0, rst = 1, flush = 0;
  logic [6:0] max_disparity = 100;
  ch_slot_t [N_CH-1:0] in = '0;
  logic bus_valid, overflow;
  tdc_word_t bus_word;
  logic [15:0] dropped;
  int checks = 0, failures = 0, cyc = 0, n_ovf = 0;
  tdc_word_t got [$];
  int        got_cyc [$];

  readout_buffer dut (.*);
  always #4 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (!rst && bus_valid) begin got.push_back(bus_word); got_cyc.push_back(cyc); end
    if (!rst && overflow) n_ovf++;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic ch_slot_t single(int c, int t);
    single = '0; single.valid = 1; single.w0 = {2'd1, 6'(c), 24'(t)};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0;
    repeat (3) @(negedge clk);
    rst = 0;
    // five simultaneous singles
    @(negedge clk);
    in = '0;
    foreach (in[c]) if (c inside {0, 15, 16, 32, 33, 9}) in[c] = single(c, 77);
    c0 = cyc;
    @(negedge clk); in = '0;
    repeat (12) @(negedge clk);
    check(got.size() == 6, $sformatf("6 words out (%0d)", got.size()));
    if (got.size() == 6) begin
      int exp_order [6] = '{33, 32, 15, 16, 9, 0};
      for (int i = 0; i < 6; i++) begin
        check(got[i].ch == 6'(exp_order[i]), $sformatf("word %0d from channel %0d, expect %0d", i, got[i].ch, exp_order[i]));
        if (i > 0) check(got_cyc[i] == got_cyc[i-1] + 1, "one word per cycle");
      end
      check(got_cyc[0] - c0 <= 4, $sformatf("latency %0d cycles", got_cyc[0] - c0));
    end
    got.delete(); got_cyc.delete();
    // a pair and a single
    @(negedge clk);
    in = '0;
    in[14].valid = 1; in[14].pair = 1; in[14].w0 = {2'd1, 6'd14, 24'd500}; in[14].w1 = {2'd1, 6'd17, 24'd400};
    in[2] = single(2, 9);
    @(negedge clk); in = '0;
    repeat (10) @(negedge clk);
    check(got.size() == 3 && got[0].ch == 14 && got[1].ch == 17 && got[1].ts == 400 && got[2].ch == 2,
          "pair words back to back, then the lower-priority single");
    if (got.size() == 3) check(got_cyc[1] == got_cyc[0] + 1, "pair words consecutive");
    got.delete(); got_cyc.delete();
    // flood: every channel every cycle, timestamps carry the arrival cycle
    max_disparity = 20;
    n_ovf = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      foreach (in[c]) in[c] = single(c, cyc);
      // pairs on the direct ends take two bus cycles each, so the FIFO backs up
      for (int c = 0; c < 16; c++) begin in[c].pair = 1; in[c].w1 = {2'd1, 6'(31 - c), 24'(cyc)}; end
    end
    @(negedge clk); in = '0;
    repeat (60) @(negedge clk);
    begin
      int worst = 0;
      foreach (got[i]) if (got_cyc[i] - int'(got[i].ts) > worst) worst = got_cyc[i] - int'(got[i].ts);
      check(worst <= 20 + 4, $sformatf("worst age on the bus %0d cycles, limit 20 + 4", worst));
      check(got.size() >= 395, $sformatf("bus stays busy in the flood (%0d words)", got.size()));
    end
    check(n_ovf > 0 && dropped > 0, "overflow reported");
    // flush
    foreach (in[c]) in[c] = single(c, 1);
    @(negedge clk); in = '0; @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    got.delete();
    repeat (10) @(negedge clk);
    check(got.size() == 0, "flush empties the buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
