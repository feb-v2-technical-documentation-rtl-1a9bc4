// tb_feb_v2_top_full: the board firmware with every parameter at its
// default (4096-sample calibration, 664-bit PETIROC register, 1 kHz divider
// for 120 MHz, 4-stage inter-FPGA links). Through the GBT frames only, it
// brings the link up, writes and reads a register on each FPGA, reads a
// 256-word burst (the largest slow-control transfer) back, enables the
// TDCs, sends a BC0 and one PETIROC hit per FPGA, and checks that the three
// hits and the BC0 loop-back arrive in the uplink, with the data path
// latency from hit to uplink frame under 100 bus cycles. Time unit: clk_tdc
// period 2, bus period 6.
module tb_feb_v2_top_full;
  import feb_pkg::*;
  logic clk = 0, rst = 1, clk_tdc = 0, rst_tdc = 1, cal_clk = 0, frame_stb = 0;
  logic [79:0]  rx_frame = '0;
  logic         rx_data_valid = 0, tx_data_valid;
  logic [111:0] tx_frame;
  logic [1:0]   tx_frame_type;
  logic [2:0][63:0]          chip_id = '{64'h3, 64'h2, 64'h1};
  logic [2:0][N_ROC_CH-1:0]  roc_trig = '0;
  logic [2:0][N_CH-1:0][7:0] fine_raw = '0;
  logic [2:0][1:0] roc_sr_ck, roc_sr_in, roc_sr_rstb, roc_digital_rstb, roc_inject, roc_hold_ext, roc_val_evt;
  logic [2:0][1:0] roc_sr_out = '0;
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

  logic             i2c_scl = 1, i2c_sda_in = 1, i2c_sda_oe;
  elink_cfg_t [2:0] elink_cfg;
  logic [2:0]       elink_align_req;
  logic [2:0][7:0]  elink_align_result = '0;

  feb_v2_top dut (.*);

  always #1 clk_tdc = ~clk_tdc;
  always #3 clk = ~clk;
  always #17 cal_clk = ~cal_clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // downlink: one queued frame per strobe
  logic [79:0] dl [$];
  int scnt = 0;
  always @(posedge clk) begin
    scnt <= (scnt == 2) ? 0 : scnt + 1;
    frame_stb <= (scnt == 1);
    if (frame_stb) rx_frame <= dl.size() > 0 ? dl.pop_front() : '0;
  end
  task automatic wr1(input logic [2:0] sel, input logic [15:0] addr, v);
    dl.push_back({13'd0, sel, 7'd0, 1'b1, 8'd0, addr, v, 16'd0});
  endtask

  // uplink decode
  logic [15:0] rq [3][$];
  tdc_word_t   words [$];
  int          word_cyc [$];
  int          cyc = 0, n_bc0_lb = 0;
  logic        stb_d = 0;
  always @(posedge clk) begin
    cyc++;
    stb_d <= frame_stb;
    if (stb_d && !rst) begin
      if (tx_frame[79]) ;
      if (tx_frame[78]) n_bc0_lb++;
      if (tx_frame_type == 2) begin
        if (tx_frame[69]) rq[0].push_back(tx_frame[63:48]);
        if (tx_frame[68]) rq[0].push_back(tx_frame[47:32]);
        if (tx_frame[67]) rq[1].push_back(tx_frame[31:16]);
        if (tx_frame[66]) rq[1].push_back(tx_frame[15:0]);
        if (tx_frame[65]) rq[2].push_back(tx_frame[111:96]);
        if (tx_frame[64]) rq[2].push_back(tx_frame[95:80]);
      end else if (tx_frame_type == 1) begin
        for (int s = 0; s < 3; s++) if (tx_frame[66 - s]) begin
          words.push_back(s == 0 ? tx_frame[63:32] : s == 1 ? tx_frame[31:0] : tx_frame[111:80]);
          word_cyc.push_back(cyc);
        end
      end
    end
  end

  initial begin
    #4_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_hit;
    #30 rst = 0; rst_tdc = 0;
    repeat (10) @(posedge clk);
    rx_data_valid = 1;
    for (int f = 0; f < 3; f++) wr1(3'(1 << f), 16'h0005, 16'h700 + 16'(f));
    for (int f = 0; f < 3; f++) dl.push_back({13'd0, 3'(1 << f), 7'd0, 1'b0, 8'd0, 16'h0005, 32'd0});
    repeat (200) @(posedge clk);
    for (int f = 0; f < 3; f++)
      check(rq[f].size() == 1 && rq[f][0] == 16'h700 + 16'(f), $sformatf("FPGA %0d register read back", f));
    // largest slow-control read: 256 words (BurstAdditionnalWords = 0xFF) of
    // the middle FPGA's general control slave; replies return two per frame
    rq[1].delete();
    dl.push_back({13'd0, 3'b010, 7'd0, 1'b0, 8'hFF, 16'h0000, 32'd0});
    repeat (1200) @(posedge clk);
    check(rq[1].size() == 256, $sformatf("256-word burst read: %0d words", rq[1].size()));
    if (rq[1].size() == 256) begin
      int bad;
      bad = 0;
      for (int i = 0; i < 256; i++)
        if (i != 5 && i != 16 && i != 17 && i != 18 && !(i >= 19 && i <= 22) && rq[1][i] != 16'd0) bad++;
      check(rq[1][5] == 16'h701, "burst word 5 is the written scratch register");
      check(rq[1][16] == 16'd1, "burst word 0x10 is the FPGA ID");
      check(rq[1][22] == 16'h0002, "burst word 0x16 is the chip ID low word");
      check(bad == 0, $sformatf("burst unused addresses read zero (%0d wrong)", bad));
    end
    wr1(3'b111, 16'h0300, 1);
    wr1(3'b111, 16'h0305, 16'hFFFF);
    wr1(3'b111, 16'h0301, 1);
    dl.push_back({16'h4000, 64'd0});   // BC0
    repeat (100) @(posedge clk);
    check(n_bc0_lb == 1, "BC0 loop-back");
    words.delete(); word_cyc.delete();
    t_hit = cyc;
    roc_trig[0][7] = 1; roc_trig[1][8] = 1; roc_trig[2][9] = 1;
    #6 roc_trig = '0;
    repeat (200) @(posedge clk);
    check(words.size() == 3, $sformatf("three hit words (%0d)", words.size()));
    for (int f = 0; f < 3; f++) begin
      int found;
      found = 0;
      foreach (words[i]) if (words[i].dev == 2'(f) && words[i].ch == 6'(7 + f)) begin
        found++;
        check(word_cyc[i] - t_hit < 100, $sformatf("FPGA %0d hit in the uplink after %0d cycles", f, word_cyc[i] - t_hit));
      end
      check(found == 1, $sformatf("FPGA %0d hit found", f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
