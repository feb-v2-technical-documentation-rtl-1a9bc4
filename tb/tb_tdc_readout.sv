// tb_tdc_readout: the TDC readout chain of one FPGA. A BC0 and the two ends
// of strip 0 go in; out come the BC0 word and the strip pair with the BC0
// time and the per-channel offset subtracted, pair words back to back,
// 6 cycles after the last input. Also checks the dead time on a fast
// channel and that an oscillating channel mutes its PETIROC.
module tb_tdc_readout;
  import feb_pkg::*;
  logic clk = 0, rst = 1, flush = 0;
  dp_cfg_t cfg;
  sc_req_t req = '0;
  logic [15:0] rdata;
  logic [N_CH-1:0] ts_valid = '0;
  logic [N_CH-1:0][TS_W-1:0] ts = '0;
  logic bus_valid, overflow;
  tdc_word_t bus_word;
  logic [1:0] roc_mute;
  int checks = 0, failures = 0, cyc = 0;
  tdc_word_t got [$];
  int got_cyc [$];

  tdc_readout dut (.clk, .rst, .flush, .fpga_id(2'd1), .cfg, .bc0_corr_en(1'b1), .bc0_drop(1'b0),
    .req, .rdata, .ts_valid, .ts, .bus_valid, .bus_word, .overflow, .roc_mute);
  always #4 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (!rst && bus_valid) begin got.push_back(bus_word); got_cyc.push_back(cyc); end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic hit(input int c, input logic [TS_W-1:0] t);
    @(negedge clk); ts_valid = '0; ts_valid[c] = 1; ts[c] = t;
    @(negedge clk); ts_valid = '0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c_last;
    cfg = '0;
    cfg.max_disparity = 127; cfg.pair_en = 16'h0001;
    for (int s = 0; s < 16; s++) begin cfg.diff_min[s] = 0; cfg.diff_max[s] = 16'hFFFF; end
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk); req = '{wr: 1, rd: 0, addr: 16'h2800 + 16'd30, wdata: 16'd10}; @(negedge clk); req = '0;
    hit(CH_BC0, 1000);
    hit(15, 5000);
    hit(16, 4900); c_last = cyc;
    repeat (10) @(negedge clk);
    check(got.size() == 3, $sformatf("3 words (%0d)", got.size()));
    if (got.size() == 3) begin
      check(got[0] == {2'd1, 6'd32, 24'd1000}, "BC0 word");
      check(got[1] == {2'd1, 6'd15, 24'(5000 - 1000 - 10)}, "direct end corrected by BC0 and offset");
      check(got[2] == {2'd1, 6'd16, 24'(4900 - 1000)}, "return end corrected by BC0");
      check(got_cyc[2] == got_cyc[1] + 1, "pair back to back");
      // input sampled at edge k (c_last), bus word registered at k+6, recorded at k+7
      check(got_cyc[1] - c_last == 7, $sformatf("latency %0d cycles", got_cyc[1] - c_last));
    end
    got.delete();
    // dead time
    cfg.dead_time = 10;
    hit(5, 100); hit(5, 200); hit(5, 300);
    repeat (10) @(negedge clk);
    check(got.size() == 1, "dead time keeps one of three close hits");
    // retriggering
    cfg.retrig_thr = 3; cfg.retrig_dec = 50; cfg.retrig_mute = 40;
    for (int i = 0; i < 20; i++) hit(20, 24'(i * 100));
    check(roc_mute == 2'b10, "oscillating channel 20 mutes the bottom PETIROC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
