// tb_feb_v2_top: end-to-end test of the board firmware through its GBT
// frames only. The testbench plays the GBTx (80-bit downlink frames, one per
// frame strobe every third bus cycle), the six PETIROCs (shift-register
// models and trigger pulses) and idle flash / remote-update IP. It decodes
// every uplink frame: status header flags, slow-control replies and data
// records. Each mechanism of the design is exercised and counted; a
// mechanism that never happened counts as a failure:
//   sc_readback   slow-control write then read back through the uplink
//   bc0_loopback, resync_loopback   fast-control loop-back header bits
//   tdc_data      a PETIROC trigger arrives as a data record with its channel
//   bc0_corr      its timestamp is relative to the last BC0
//   clustering    two ends of a strip arrive as one strip record
//   pair_reject   a pair outside its difference window never arrives
//   dead_time     a second hit inside the dead time is removed
//   retrig_mute   an oscillating channel mutes its PETIROC (VAL_EVT low)
//   mute          MuteROCChannels drives VAL_EVT low on all six ASICs
//   roc_config    a configuration load reaches the PETIROC model intact
//   calibration   a TDC channel's code-density calibration completes
//   injection     BC0-locked injection produces data on all 32 channels
//   frame_overflow, readout_overflow   header overflow flags under a flood
//   flush         FlushDataPath stops the data frames at once
//   i2c_elink     an I2C write over the SCA bus sets one FPGA's e-link loopback
// Reduced parameters keep the run short: 256-sample calibration, 64-cycle
// injection square-wave divider. Time unit: clk_tdc period 2, bus period 6.
module tb_feb_v2_top;
  import feb_pkg::*;
  logic clk = 0, rst = 1, clk_tdc = 0, rst_tdc = 1, cal_clk = 0, frame_stb = 0;
  logic [79:0]  rx_frame = '0;
  logic         rx_data_valid = 0, tx_data_valid;
  logic [111:0] tx_frame;
  logic [1:0]   tx_frame_type;
  logic [2:0][63:0]          chip_id = '{64'h3, 64'h2, 64'h1};
  logic [2:0][N_ROC_CH-1:0]  roc_trig = '0;
  logic [2:0][N_CH-1:0][7:0] fine_raw;
  logic [2:0][1:0] roc_sr_ck, roc_sr_in, roc_sr_rstb, roc_sr_out, roc_digital_rstb, roc_inject, roc_hold_ext, roc_val_evt;
  logic [2:0][1:0][3:0] roc_stage_off;
  logic [2:0] roc_trig_ext;
  logic [2:0][5:0]  fl_csr_address;
  logic [2:0]       fl_csr_write, fl_csr_read, fl_mem_write, fl_mem_read, ru_csr_write, ru_csr_read;
  logic [2:0][31:0] fl_csr_writedata, fl_mem_writedata, ru_csr_writedata;
  logic [2:0][21:0] fl_mem_address;
  logic [2:0][6:0]  fl_mem_burstcount;
  logic [2:0][3:0]  fl_mem_byteenable;
  logic [2:0][2:0]  ru_csr_address;
  logic [2:0]       fl_csr_waitrequest = '0, fl_csr_readdatavalid = '0, fl_mem_waitrequest = '0,
                    fl_mem_readdatavalid = '0, ru_csr_waitrequest = '0, ru_csr_readdatavalid = '0;
  logic [2:0][31:0] fl_csr_readdata = '0, fl_mem_readdata = '0, ru_csr_readdata = '0;

  logic             i2c_scl = 1, i2c_sda_m = 1, i2c_sda_oe;
  wire              i2c_sda_in = i2c_sda_m & !i2c_sda_oe;
  elink_cfg_t [2:0] elink_cfg;
  logic [2:0]       elink_align_req;
  logic [2:0][7:0]  elink_align_result = '0;

  feb_v2_top #(.TDC_CAL_LOG2(8), .DIV_1KHZ(64)) dut (.*);

  for (genvar f = 0; f < 3; f++) begin : g_roc
    for (genvar r = 0; r < 2; r++) begin : g_r
      petiroc_model #(.NBITS(664)) u_roc (
        .sr_ck(roc_sr_ck[f][r]), .sr_in(roc_sr_in[f][r]), .sr_rstb(roc_sr_rstb[f][r]), .sr_out(roc_sr_out[f][r])
      );
    end
  end

  always #1 clk_tdc = ~clk_tdc;
  always #3 clk = ~clk;
  always #17 cal_clk = ~cal_clk;
  initial for (int f = 0; f < 3; f++) for (int c = 0; c < N_CH; c++) fine_raw[f][c] = 8'd100;

  int checks = 0, failures = 0;
  int mech [string];
  string mech_names [$] = '{"sc_readback", "bc0_loopback", "resync_loopback", "tdc_data", "bc0_corr",
    "clustering", "pair_reject", "dead_time", "retrig_mute", "mute", "roc_config", "calibration",
    "injection", "frame_overflow", "readout_overflow", "flush", "i2c_elink"};

  // I2C master, 12 bus cycles per SCL half period
  task automatic i2c_half(); repeat (12) @(posedge clk); endtask
  task automatic i2c_byte(input logic [7:0] b, output logic ack);
    for (int i = 7; i >= 0; i--) begin
      i2c_sda_m = b[i]; i2c_half(); i2c_scl = 1; i2c_half(); i2c_scl = 0;
    end
    i2c_sda_m = 1; i2c_half(); i2c_scl = 1; i2c_half(); ack = !i2c_sda_in; i2c_scl = 0; i2c_half();
  endtask
  task automatic i2c_write(input logic [6:0] dev, input logic [7:0] a, input logic [7:0] d, output logic ok);
    logic k0, k1, k2;
    i2c_sda_m = 1; i2c_half(); i2c_scl = 1; i2c_half(); i2c_sda_m = 0; i2c_half(); i2c_scl = 0; i2c_half();
    i2c_byte({dev, 1'b0}, k0); i2c_byte(a, k1); i2c_byte(d, k2);
    i2c_sda_m = 0; i2c_half(); i2c_scl = 1; i2c_half(); i2c_sda_m = 1; i2c_half();
    ok = k0 && k1 && k2;
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- downlink ----------------
  logic [79:0] dl [$];
  logic mute_lvl = 0;
  int   scnt = 0;
  always @(posedge clk) begin
    scnt <= (scnt == 2) ? 0 : scnt + 1;
    frame_stb <= (scnt == 1);
    if (frame_stb) rx_frame <= dl.size() > 0 ? dl.pop_front() : {4'b0, mute_lvl, 11'd0, 64'd0};
  end
  function automatic logic [15:0] hdr(input logic [2:0] sel, input logic rs = 0, b0 = 0, rsc = 0, fl = 0);
    return {rs, b0, rsc, fl, mute_lvl, 8'd0, sel};
  endfunction
  task automatic wait_sent();
    wait (dl.size() == 0);
    repeat (9) @(posedge clk);
  endtask
  task automatic fast(input logic rs, b0, fl);
    dl.push_back({hdr(3'b000, rs, b0, 1'b0, fl), 64'd0});
    wait_sent();
  endtask
  // write n words starting at addr to the FPGAs in sel
  task automatic sc_write(input logic [2:0] sel, input logic [15:0] addr, input logic [15:0] d [$]);
    int n = d.size();
    dl.push_back({hdr(sel), 7'd0, 1'b1, 8'(n - 1), addr, d[0], n > 1 ? d[1] : 16'd0});
    for (int k = 2; k < n; k += 4)
      dl.push_back({hdr(sel), d[k], k + 1 < n ? d[k+1] : 16'd0, k + 2 < n ? d[k+2] : 16'd0, k + 3 < n ? d[k+3] : 16'd0});
  endtask
  task automatic wr1(input logic [2:0] sel, input logic [15:0] addr, input logic [15:0] v);
    logic [15:0] d [$];
    d.push_back(v);
    sc_write(sel, addr, d);
  endtask

  // ---------------- uplink ----------------
  logic [15:0] rq [3][$];
  typedef struct { rec_t r; int t; } seen_t;
  seen_t recs [$];
  int n_data_frames = 0;
  logic stb_d = 0;
  always @(posedge clk) begin
    stb_d <= frame_stb;
    if (stb_d && !rst) begin
      logic [15:0] h;
      h = tx_frame[79:64];
      if (h[15]) mech["resync_loopback"]++;
      if (h[14]) mech["bc0_loopback"]++;
      if (h[13]) mech["frame_overflow"]++;
      if (h[12:10] != 0) mech["readout_overflow"]++;
      if (tx_frame_type == 2) begin
        check(h[6], "slow-control frame flag");
        if (h[5]) rq[0].push_back(tx_frame[63:48]);
        if (h[4]) rq[0].push_back(tx_frame[47:32]);
        if (h[3]) rq[1].push_back(tx_frame[31:16]);
        if (h[2]) rq[1].push_back(tx_frame[15:0]);
        if (h[1]) rq[2].push_back(tx_frame[111:96]);
        if (h[0]) rq[2].push_back(tx_frame[95:80]);
      end else if (tx_frame_type == 1) begin
        n_data_frames++;
        for (int s = 0; s < 3; s++) if (h[2 - s]) begin
          seen_t e;
          e.r = '0;
          e.r.w = s == 0 ? tx_frame[63:32] : s == 1 ? tx_frame[31:0] : tx_frame[111:80];
          if (s < 2 && h[5 - s]) begin e.r.strip = 1; e.r.diff = s == 0 ? tx_frame[111:96] : tx_frame[95:80]; end
          e.t = int'($time);
          recs.push_back(e);
        end
      end
    end
  end
  task automatic sc_read(input int f, input logic [15:0] addr, input int n, output logic [15:0] d [$]);
    int w = 0;
    rq[f].delete();
    dl.push_back({hdr(3'(1 << f)), 7'd0, 1'b0, 8'(n - 1), addr, 32'd0});
    while (rq[f].size() < n && w < 3000) begin @(posedge clk); w++; end
    d = rq[f];
    check(rq[f].size() == n, $sformatf("read of %0d words from FPGA %0d at %h answered", n, f, addr));
  endtask
  task automatic rd1(input int f, input logic [15:0] addr, output logic [15:0] v);
    logic [15:0] d [$];
    sc_read(f, addr, 1, d);
    v = d.size() > 0 ? d[0] : 16'hDEAD;
  endtask

  // ---------------- PETIROC triggers ----------------
  task automatic trig(input int f, input int c);
    roc_trig[f][c] = 1; #6; roc_trig[f][c] = 0;
  endtask
  function automatic int count_recs(input int dev, input int ch, input bit strip);
    int n = 0;
    foreach (recs[i]) if (recs[i].r.w.dev == 2'(dev) && recs[i].r.w.ch == 6'(ch) && recs[i].r.strip == strip) n++;
    return n;
  endfunction

  // BC0 time seen by the TDCs
  longint t_bc0 = 0;
  always @(posedge dut.fc.bc0) t_bc0 = $time;

  initial begin
    #3_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    logic [15:0] d [$];
    foreach (mech_names[i]) mech[mech_names[i]] = 0;
    #30 rst = 0; rst_tdc = 0;
    repeat (10) @(posedge clk);
    rx_data_valid = 1;
    repeat (12) @(posedge clk);
    check(tx_data_valid, "TxDataValid raised once the link is up");

    // slow control round trip on all three FPGAs
    for (int f = 0; f < 3; f++) wr1(3'(1 << f), 16'h0003, 16'hA50 + 16'(f));
    for (int f = 0; f < 3; f++) begin
      rd1(f, 16'h0003, v);
      check(v == 16'hA50 + 16'(f), $sformatf("FPGA %0d test register %h", f, v));
      if (v == 16'hA50 + 16'(f)) mech["sc_readback"]++;
    end
    rd1(2, 16'h0010, v); check(v[1:0] == 2, "FPGA id of the right FPGA");
    sc_read(1, 16'h2900, 3, d);
    check(d.size() == 3 && d[0] == 16'h0D && d[1] == 16'h3F && d[2] == 0, "burst read of Data Path Control defaults");

    // TDC on, all channels measured, on all FPGAs at once
    wr1(3'b111, 16'h0300, 1);
    begin
      logic [15:0] m [$] = '{16'hFFFF, 16'hFFFF, 16'h0003};
      sc_write(3'b111, 16'h0305, m);
    end
    wr1(3'b111, 16'h0301, 1);
    wait_sent();

    // BC0, then a hit on FPGA 0 channel 3
    fast(1'b0, 1'b1, 1'b0);
    #600;
    recs.delete();
    begin
      longint th;
      #1; th = $time; trig(0, 3);
      repeat (100) @(posedge clk);
      if (count_recs(0, 3, 0) == 1) mech["tdc_data"]++;
      foreach (recs[i]) if (recs[i].r.w.dev == 0 && recs[i].r.w.ch == 3) begin
        longint exp;
        exp = ((th - t_bc0) / 2) * 256;
        $display("hit ts %0d expected about %0d", recs[i].r.w.ts, exp);
        if (longint'(recs[i].r.w.ts) > exp - 768 && longint'(recs[i].r.w.ts) < exp + 768) mech["bc0_corr"]++;
      end
    end
    check(mech["bc0_loopback"] > 0, "BC0 looped back");
    fast(1'b1, 1'b0, 1'b0);

    // clustering on in the concentrator; strip 2 of FPGA 2 (channels 13, 18)
    wr1(3'b010, 16'h2902, 1);
    wait_sent();
    recs.delete();
    fork trig(2, 13); trig(2, 18); join
    repeat (100) @(posedge clk);
    if (count_recs(2, 2 * 16 + 2, 1) == 1 && count_recs(2, 13, 0) == 0) mech["clustering"]++;

    // pair filtering of strip 0 on FPGA 0, window [0, 300]
    wr1(3'b001, 16'h2918, 300);
    wr1(3'b001, 16'h2906, 16'h0001);
    wait_sent();
    recs.delete();
    trig(0, 15); #200 trig(0, 16);         // return 200 units later: direct - return < 0, rejected
    repeat (100) @(posedge clk);
    if (count_recs(0, 15, 0) + count_recs(0, 16, 0) + count_recs(0, 0, 1) == 0) mech["pair_reject"]++;
    recs.delete();
    fork trig(0, 15); trig(0, 16); join    // same time: diff 0, accepted
    repeat (100) @(posedge clk);
    check(count_recs(0, 0, 1) == 1, "accepted pair arrives as strip 0 of FPGA 0");

    // dead time of 60 bus cycles on FPGA 0
    wr1(3'b001, 16'h2905, 60);
    wait_sent();
    recs.delete();
    trig(0, 5); #120 trig(0, 5);
    repeat (100) @(posedge clk);
    if (count_recs(0, 5, 0) == 1) mech["dead_time"]++;

    // retriggering on FPGA 2: threshold 2, slow decrement, long mute
    begin
      logic [15:0] m [$] = '{16'd2, 16'd200, 16'd200};
      sc_write(3'b100, 16'h2928, m);
    end
    wait_sent();
    for (int i = 0; i < 6; i++) begin trig(2, 20); #30; end
    repeat (3) @(posedge clk);
    if (roc_val_evt[2] == 2'b01) mech["retrig_mute"]++;
    repeat (250) @(posedge clk);
    check(roc_val_evt[2] == 2'b11, "retrigger mute ends");

    // MuteROCChannels
    mute_lvl = 1;
    repeat (12) @(posedge clk);
    if (roc_val_evt == '0) mech["mute"]++;
    mute_lvl = 0;
    repeat (12) @(posedge clk);
    check(roc_val_evt == '1, "unmuted");

    // PETIROC configuration of FPGA 1 bottom ASIC
    begin
      logic [15:0] cfgw [$];
      logic [663:0] exp;
      for (int k = 0; k < 42; k++) cfgw.push_back(16'h1234 + 16'(k * 977));
      for (int k = 0; k < 41; k++) exp[663 - 16 * k -: 16] = cfgw[k];
      exp[7:0] = cfgw[41][15:8];
      sc_write(3'b010, 16'h0216, cfgw);
      wr1(3'b010, 16'h0200, 1);
      wait_sent();
      repeat (20) @(posedge clk);
      check(roc_val_evt[1][1] == 0, "VAL_EVT low while the ASIC is configured");
      repeat (6000) @(posedge clk);
      if (g_roc[1].g_r[1].u_roc.sr == exp) mech["roc_config"]++;
    end

    // calibration of FPGA 0 channel 0
    wr1(3'b001, 16'h0302, 1);
    wr1(3'b001, 16'h0301, 1);
    wait_sent();
    repeat (3000) @(posedge clk);
    rd1(0, 16'h0313, v);
    if (v[0]) mech["calibration"]++;

    // BC0-locked injection on FPGA 1: 32 channels 10 cycles after BC0
    wr1(3'b010, 16'h0309, 10);
    wr1(3'b010, 16'h0308, 4'b0010);
    wait_sent();
    recs.delete();
    fast(1'b0, 1'b1, 1'b0);
    repeat (300) @(posedge clk);
    begin
      int n = 0;
      foreach (recs[i]) if (recs[i].r.w.dev == 1 && recs[i].r.w.ch < 32) n += recs[i].r.strip ? 2 : 1;   // a strip record holds two channels
      $display("injection: %0d channels from FPGA 1", n);
      if (n >= 32) mech["injection"]++;
    end

    // flood: injection on all FPGAs, a 2-frame queue and a 3-cycle disparity on FPGA 0
    wr1(3'b010, 16'h2901, 2);
    wr1(3'b001, 16'h2904, 3);
    wr1(3'b111, 16'h0309, 10);
    wr1(3'b111, 16'h0308, 4'b0010);
    wait_sent();
    fast(1'b0, 1'b1, 1'b0);
    repeat (300) @(posedge clk);
    // flush in the middle of a flood
    wr1(3'b111, 16'h2904, 127);
    wr1(3'b010, 16'h2901, 63);
    wait_sent();
    dl.push_back({hdr(3'b000, 1'b0, 1'b1, 1'b0, 1'b0), 64'd0});  // BC0: injection burst
    for (int i = 0; i < 4; i++) dl.push_back({hdr(3'b000), 64'd0});
    dl.push_back({hdr(3'b000, 1'b0, 1'b0, 1'b0, 1'b1), 64'd0});  // flush
    wait (dl.size() == 0);
    repeat (12) @(posedge clk);
    begin
      int n0;
      n0 = n_data_frames;
      repeat (60) @(posedge clk);
      $display("data frames after flush: %0d", n_data_frames - n0);
      if (n_data_frames == n0) mech["flush"]++;
    end
    // e-link settings over the SCA I2C bus: FPGA 1 answers address 0x21
    begin
      logic ok;
      i2c_write(7'h21, 8'h00, 8'h01, ok);
      check(ok, "I2C write acknowledged");
      if (ok && elink_cfg[1].loopback && !elink_cfg[0].loopback && !elink_cfg[2].loopback)
        mech["i2c_elink"]++;
    end

    foreach (mech_names[i]) begin
      $display("mechanism %-18s %0d", mech_names[i], mech[mech_names[i]]);
      check(mech[mech_names[i]] > 0, $sformatf("mechanism %s never happened", mech_names[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
