// tb_tdc_core: TDC core with 4 channels and a 1024-entry calibration
// histogram. Time unit: clk_tdc period 20, bus clock period 60 (the real
// 2.5 ns / 8.33 ns ratio rounded to 1:3). The testbench models the delay
// line: a hit arriving a fraction f of a clk_tdc period before the capturing
// edge gets the non-linear raw code g(j) = 2j^2 + j, with j = 0..9 the
// position of the hit within the period. Hits and the calibration clock
// change only at even times and clk_tdc rises at odd times, so no edge
// coincides with a sampling edge.
// Checks: raw codes pass through before calibration; calibration of two
// channels runs one after the other (DNL done, then LUT done); the channel
// under calibration and channels without measure enable give no data; after
// calibration the LUT maps code g(j) to the bin centre (2j+1)*12.8 and time
// differences between hits are measured to within 3 fine LSB; the LUT page
// of a channel reads back through its slow-control slave; a hit appears on
// ts_valid within 6 bus cycles.
module tb_tdc_core;
  import feb_pkg::*;
  localparam int NCH = 4;
  logic clk_tdc = 0, rst_tdc = 1, clk = 0, rst = 1, cal_clk = 0;
  logic [NCH-1:0] hit = '0;
  logic [NCH-1:0][7:0] fine_raw = '0;
  logic tdc_enable = 0;
  logic [NCH-1:0] meas_en = '0, calib_req = '0, dnl_done, lut_done, ts_valid;
  logic [NCH-1:0][TS_W-1:0] ts;
  sc_req_t req = '0;
  logic [15:0] rdata;
  int checks = 0, failures = 0;

  tdc_core #(.NCH(NCH), .CAL_LOG2(10)) dut (.*);

  initial begin #5 clk_tdc = 1; forever #10 clk_tdc = ~clk_tdc; end   // rises at 5, 25, 45 ...
  always #30 clk = ~clk;
  always #153 cal_clk = ~cal_clk;                          // rises every 306

  function automatic logic [7:0] g(int j);
    return 8'(2 * j * j + j);
  endfunction
  // position j of a hit at time t inside the clk_tdc period ending at the capture edge
  function automatic int pos(longint t);
    longint ph;
    ph = (t - 5) % 20;          // 0..19 after the last rising edge
    return int'(ph / 2);        // ph is odd: 1,3..19 -> 0..9
  endfunction
  // delay line: code of the latest edge of each channel's input (hit or calibration clock)
  always @(posedge cal_clk) for (int c = 0; c < NCH; c++) if (dut.cal_sel_s2[c]) fine_raw[c] = g(pos($time));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // one hit on channel c at the current (even) time
  task automatic fire(int c);
    fine_raw[c] = g(pos($time));
    hit[c] = 1; #40; hit[c] = 0;
  endtask
  // wait for the next timestamp of channel c
  task automatic get_ts(int c, output logic [TS_W-1:0] t, output int cycles);
    cycles = 0;
    while (!ts_valid[c] && cycles < 20) begin @(posedge clk); #1; cycles++; end
    t = ts[c];
  endtask

  initial begin
    #4_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_valid [NCH];
  always @(posedge clk) for (int c = 0; c < NCH; c++) if (ts_valid[c]) n_valid[c]++;

  initial begin
    logic [TS_W-1:0] t1, t2;
    int cyc, d, exp;
    #200; rst_tdc = 0; rst = 0;
    tdc_enable = 1; meas_en = 4'b0111;
    #600;
    // raw code passes through before calibration
    #2 fork fire(1); get_ts(1, t1, cyc); join   // latency
    check(cyc <= 6, $sformatf("hit to ts_valid in %0d bus cycles", cyc));
    begin
      longint th; th = 10002; #(th - $time);
      fork fire(1); get_ts(1, t1, cyc); join
      check(t1[7:0] == g(pos(th)), $sformatf("uncalibrated fine = raw code (%0d vs %0d)", t1[7:0], g(pos(th))));
    end
    // meas_en gating
    n_valid[3] = 0;
    #1000 fire(3); #1000;
    check(n_valid[3] == 0, "channel without measure enable gives no data");
    // calibrate channels 1 and 2
    @(posedge clk); #1 calib_req = 4'b0110; @(posedge clk); #1 calib_req = 0;
    n_valid[1] = 0;
    wait (dnl_done[1]);
    check(!dnl_done[2] && !lut_done[1], "channel 1 histogram done first");
    check(n_valid[1] == 0, "no data from the channel under calibration");
    wait (lut_done[1]);
    check(!dnl_done[2], "channel 2 starts after channel 1's LUT");
    wait (lut_done[2]);
    check(dnl_done == 4'b0110 && lut_done == 4'b0110, "both channels calibrated");
    // LUT contents: bin centres
    for (int j = 0; j < 10; j++) begin
      @(negedge clk); req = '{wr: 0, rd: 1, addr: {8'h05, g(j)}, wdata: 0};
      @(negedge clk); req = '0;
      exp = (2 * j + 1) * 128 / 10;
      check(rdata >= 16'(exp - 3) && rdata <= 16'(exp + 3), $sformatf("LUT ch1 code %0d -> %0d, expect %0d", g(j), rdata, exp));
    end
    // calibrated time differences
    for (int k = 0; k < 6; k++) begin
      longint ta, tb_;
      ta = ($time / 2 + 500) * 2 + 2 * k * 7;  // even, varied phase
      #(ta - $time);
      fork fire(2); get_ts(2, t1, cyc); join
      tb_ = ta + 2000 + 2 * (k * 3 + 1);
      #(tb_ - $time);
      fork fire(2); get_ts(2, t2, cyc); join
      d = int'(t2 - t1);
      exp = int'((tb_ - ta) * 256 / 20);
      check(d >= exp - 3 && d <= exp + 3, $sformatf("calibrated interval %0d, expect %0d", d, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
