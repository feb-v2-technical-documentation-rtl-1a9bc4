// tb_data_concentrator: the concentrator of the middle FPGA. Strip pairs on
// buses 0 and 1 and a single word on bus 2 go in; the frames read out at one
// per three cycles must hold strip 0 (FPGA 0), strip 17 (FPGA 1, strip 1)
// with their differences and the single word. The middle bus must reach the
// output mid_delay cycles later than an identical word on bus 0. A flood with
// a queue limit of 2 frames must raise overflow; flush empties the queue.
module tb_data_concentrator;
  import feb_pkg::*;
  logic clk = 0, rst = 1, flush = 0;
  dp_cfg_t cfg;
  logic [2:0] bus_valid = '0;
  tdc_word_t [2:0] bus_word = '0;
  logic frame_pop = 0, frame_empty, overflow;
  logic [111:0] frame_head;
  int checks = 0, failures = 0, cyc = 0, n_ovf = 0;
  rec_t recs [$];
  int   rec_cyc [$];

  data_concentrator dut (.*);
  always #4 clk = ~clk;
  // reader: one frame every third cycle, records unpacked
  always @(posedge clk) begin
    cyc++;
    if (!rst && overflow) n_ovf++;
    if (frame_pop && !frame_empty) begin
      for (int s = 0; s < 3; s++) if (frame_head[66 - s]) begin
        rec_t r;
        r = '0;
        r.w = s == 0 ? frame_head[63:32] : s == 1 ? frame_head[31:0] : frame_head[111:80];
        if (s < 2 && frame_head[69 - s]) begin r.strip = 1; r.diff = s == 0 ? frame_head[111:96] : frame_head[95:80]; end
        recs.push_back(r); rec_cyc.push_back(cyc);
      end
    end
  end
  always @(negedge clk) frame_pop <= (cyc % 3 == 0);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic put(input logic [2:0] v, input tdc_word_t w0, w1, w2);
    @(negedge clk); bus_valid = v; bus_word[0] = w0; bus_word[1] = w1; bus_word[2] = w2;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    cfg.cluster_en = 1; cfg.queue_max = 63; cfg.mid_delay = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    put(3'b111, {2'd0, 6'd15, 24'd1000}, {2'd1, 6'd14, 24'd3000}, {2'd2, 6'd5, 24'd77});
    put(3'b011, {2'd0, 6'd16, 24'd900}, {2'd1, 6'd17, 24'd3050}, '0);
    put(3'b000, '0, '0, '0);
    repeat (20) @(negedge clk);
    check(recs.size() == 3, $sformatf("3 records (%0d)", recs.size()));
    begin
      int seen = 0;
      foreach (recs[i]) begin
        if (recs[i].strip && recs[i].w.ch == 6'd0 && recs[i].w.dev == 0 && recs[i].w.ts == 1000 && recs[i].diff == 100) seen |= 1;
        if (recs[i].strip && recs[i].w.ch == 6'd17 && recs[i].w.ts == 3000 && recs[i].diff == 16'hFFCE) seen |= 2;
        if (!recs[i].strip && recs[i].w == {2'd2, 6'd5, 24'd77}) seen |= 4;
      end
      check(seen == 7, $sformatf("strip 0, strip 17 and the single all present (%b)", seen));
    end
    // middle bus delay: same single on bus 0 and bus 1, read at once
    recs.delete(); rec_cyc.delete();
    cfg.mid_delay = 30;   // changing the delay replays old beats, so flush
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    put(3'b011, {2'd0, 6'd40, 24'd1}, {2'd1, 6'd40, 24'd2}, '0);
    put(3'b000, '0, '0, '0);
    repeat (60) @(negedge clk);
    check(recs.size() == 2 && recs[0].w.dev == 0 && recs[1].w.dev == 1, "bus 0 word first");
    if (recs.size() == 2) check(rec_cyc[1] - rec_cyc[0] >= 28 && rec_cyc[1] - rec_cyc[0] <= 33,
                                $sformatf("middle bus %0d cycles later, delay 30", rec_cyc[1] - rec_cyc[0]));
    // flood with a 2-frame queue
    cfg.mid_delay = 0; cfg.queue_max = 2; n_ovf = 0;
    for (int i = 0; i < 100; i++) put(3'b111, {2'd0, 6'd40, 24'(i)}, {2'd1, 6'd40, 24'(i)}, {2'd2, 6'd40, 24'(i)});
    put(3'b000, '0, '0, '0);
    check(n_ovf > 0, "queue limit causes overflow");
    check(dut.u_queue.count <= 2, "queue held to 2 frames");
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    check(frame_empty, "flush empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
