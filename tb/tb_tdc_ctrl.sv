// tb_tdc_ctrl: TDC Control slave. Checks the CMD-valid application of the
// calibration and measure-enable registers, the BC0 feature reset value, the
// status registers, a data count over a 1000-cycle window, and the
// injection modes: the square-wave period, the delay of the BC0-locked pulse
// (offset + 1 cycles) and trig_ext on BC0 and Resync.
module tb_tdc_ctrl;
  import feb_pkg::*;
  localparam int DIV = 50;
  logic clk = 0, rst = 1;
  sc_req_t req = '0;
  logic [15:0] rdata;
  logic bc0 = 0, resync = 0;
  logic [N_CH-1:0] ts_valid = '0, dnl_done = '0, lut_done = '0;
  logic tdc_enable, bc0_corr_en, bc0_drop, trig_ext;
  logic [N_CH-1:0] meas_en, calib_req, inj_sel, inj_hits;
  int checks = 0, failures = 0;

  tdc_ctrl #(.DIV_1KHZ(DIV)) dut (.*);
  always #4 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [15:0] a, d);
    @(negedge clk); req = '{wr: 1, rd: 0, addr: a, wdata: d}; @(negedge clk); req = '0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk); req = '{wr: 0, rd: 1, addr: a, wdata: 0}; @(negedge clk); req = '0; d = rdata;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Hit pattern for the data count: channel c fires every c+1 cycles
  int cyc = 0;
  logic gen = 0;
  always @(negedge clk) begin
    cyc++;
    for (int c = 0; c < N_CH; c++) ts_valid[c] = gen && (cyc % (c + 1) == 0);
  end

  initial begin
    logic [15:0] d, hi;
    int t0, n, seen_calib;
    repeat (3) @(negedge clk);
    rst = 0;
    check(bc0_corr_en && !bc0_drop && !tdc_enable, "reset values");
    wr(16'h0300, 1); check(tdc_enable, "TDC enable");
    wr(16'h0302, 16'h8001); wr(16'h0304, 16'h0002); wr(16'h0305, 16'hFFFF); wr(16'h0306, 16'hFFFF); wr(16'h0307, 3);
    check(calib_req == 0 && meas_en == 0, "nothing applied before CMD valid");
    @(negedge clk); req = '{wr: 1, rd: 0, addr: 16'h0301, wdata: 1};
    @(negedge clk); req = '0;
    check(calib_req == 34'h2_0000_8001, "calibration request pulse");
    check(meas_en == '1, "measure enable applied");
    @(negedge clk); check(calib_req == 0, "calibration request lasts one cycle");
    rd(16'h030D, d); check(d == 1, "BC0 feature register reset value");
    wr(16'h030D, 3); check(bc0_drop && bc0_corr_en, "BC0 drop");
    dnl_done = 34'h3_0000_0005; lut_done = 34'h1_8000_0000;
    rd(16'h0310, d); check(d == 5, "DNL done low");
    rd(16'h0312, d); check(d == 3, "DNL done high");
    rd(16'h0314, d); check(d == 16'h8000, "LUT done middle");
    // data count over 1000 cycles
    wr(16'h030A, 1000); wr(16'h030B, 0);
    gen = 1;
    wr(16'h030C, 1);
    repeat (1010) @(negedge clk);
    rd(16'h0316, d); check(d == 1, "count valid after window");
    for (int c = 0; c < N_CH; c += 11) begin
      rd(16'h0317 + 16'(2 * c), d); rd(16'h0318 + 16'(2 * c), hi);
      n = 1000 / (c + 1);
      check(d >= 16'(n - 1) && d <= 16'(n + 1) && hi == 0, $sformatf("counter %0d = %0d, expect about %0d", c, d, n));
    end
    gen = 0;
    // square wave: half period DIV cycles
    wr(16'h0308, 4'b0001);
    @(negedge clk); check(inj_sel == '1, "square wave selects all channels");
    @(posedge inj_hits[0]); t0 = cyc;
    @(posedge inj_hits[0]);
    check(cyc - t0 == 2 * DIV, $sformatf("square-wave period %0d cycles", cyc - t0));
    // delayed pulse after BC0
    wr(16'h0308, 4'b0010); wr(16'h0309, 20);
    check(inj_sel == {2'b00, 32'hFFFF_FFFF}, "pulse mode selects channels 0-31");
    @(negedge clk); bc0 = 1; t0 = cyc; @(negedge clk); bc0 = 0;
    n = 0;
    while (!inj_hits[5] && n < 100) begin @(negedge clk); n++; end
    // BC0 sampled at edge k, pulse registered at edge k+21 and seen at the
    // following falling edge, 22 falling edges after BC0 was raised
    check(cyc - t0 == 22, $sformatf("pulse delay %0d cycles after BC0", cyc - t0));
    @(negedge clk); check(!inj_hits[5], "pulse is one cycle");
    // trig_ext
    wr(16'h0308, 4'b0100);
    @(negedge clk); bc0 = 1; @(negedge clk); bc0 = 0; check(trig_ext, "trig_ext on BC0");
    @(negedge clk); resync = 1; @(negedge clk); resync = 0; check(!trig_ext, "no trig_ext on Resync in mode 0100");
    wr(16'h0308, 4'b1000);
    @(negedge clk); resync = 1; @(negedge clk); resync = 0; check(trig_ext, "trig_ext on Resync");
    seen_calib = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
