// tb_feb_fpga: one FPGA of the board, driven at its slow-control payload and
// fast-control inputs. Checks: a write then a burst read through the frame
// decoder, bus master and slaves, with the replies in the reply FIFO; the
// FPGA id and chip id registers; a PETIROC trigger and the BC0 pulse turned
// into data-bus words with this FPGA's id, the hit relative to the BC0; the
// MuteROCChannels level and a PETIROC load driving VAL_EVT low; the
// injection square wave feeding the TDC. Small calibration histogram and
// square-wave divider. Time unit: clk_tdc period 2, bus period 6.
module tb_feb_fpga;
  import feb_pkg::*;
  logic clk = 0, rst = 1, clk_tdc = 0, rst_tdc = 1, cal_clk = 0;
  fc_t fc = '0;
  logic sc_valid = 0;
  logic [63:0] sc_payload = '0;
  logic reply_valid, reply_pop = 0;
  logic [15:0] reply_data;
  logic [N_ROC_CH-1:0] roc_trig = '0;
  logic [N_CH-1:0][7:0] fine_raw = '0;
  logic [1:0] roc_sr_ck, roc_sr_in, roc_sr_rstb, roc_sr_out, roc_digital_rstb, roc_inject, roc_hold_ext, roc_val_evt;
  logic [1:0][3:0] roc_stage_off;
  logic roc_trig_ext;
  logic [5:0] fl_csr_address;
  logic fl_csr_write, fl_csr_read, fl_mem_write, fl_mem_read, ru_csr_write, ru_csr_read;
  logic [31:0] fl_csr_writedata, fl_mem_writedata, ru_csr_writedata;
  logic [21:0] fl_mem_address;
  logic [6:0] fl_mem_burstcount;
  logic [3:0] fl_mem_byteenable;
  logic [2:0] ru_csr_address;
  logic bus_valid, tdc_overflow;
  tdc_word_t bus_word;
  dp_cfg_t dp_cfg;
  int checks = 0, failures = 0;
  tdc_word_t words [$];
  logic [15:0] replies [$];

  feb_fpga #(.TDC_CAL_LOG2(8), .ROC_NBITS(664), .DIV_1KHZ(40)) dut (
    .clk, .rst, .clk_tdc, .rst_tdc, .cal_clk, .fpga_id(2'd2), .chip_id(64'h0123_4567_89AB_CDEF),
    .fc, .sc_valid, .sc_payload, .reply_valid, .reply_data, .reply_pop, .roc_trig, .fine_raw,
    .roc_sr_ck, .roc_sr_in, .roc_sr_rstb, .roc_sr_out, .roc_stage_off, .roc_digital_rstb,
    .roc_inject, .roc_hold_ext, .roc_val_evt, .roc_trig_ext,
    .fl_csr_address, .fl_csr_write, .fl_csr_read, .fl_csr_writedata, .fl_csr_waitrequest(1'b0),
    .fl_csr_readdata(32'd0), .fl_csr_readdatavalid(1'b0),
    .fl_mem_address, .fl_mem_write, .fl_mem_read, .fl_mem_burstcount, .fl_mem_byteenable,
    .fl_mem_writedata, .fl_mem_waitrequest(1'b0), .fl_mem_readdata(32'd0), .fl_mem_readdatavalid(1'b0),
    .ru_csr_address, .ru_csr_write, .ru_csr_read, .ru_csr_writedata, .ru_csr_waitrequest(1'b0),
    .ru_csr_readdata(32'd0), .ru_csr_readdatavalid(1'b0),
    .i2c_scl(1'b1), .i2c_sda_in(1'b1), .i2c_sda_oe(), .elink_cfg(), .elink_align_req(), .elink_align_result(8'd0),
    .bus_valid, .bus_word, .tdc_overflow, .dp_cfg
  );
  petiroc_model #(.NBITS(664)) roc0 (.sr_ck(roc_sr_ck[0]), .sr_in(roc_sr_in[0]), .sr_rstb(roc_sr_rstb[0]), .sr_out(roc_sr_out[0]));
  petiroc_model #(.NBITS(664)) roc1 (.sr_ck(roc_sr_ck[1]), .sr_in(roc_sr_in[1]), .sr_rstb(roc_sr_rstb[1]), .sr_out(roc_sr_out[1]));

  always #1 clk_tdc = ~clk_tdc;
  always #3 clk = ~clk;
  always #17 cal_clk = ~cal_clk;
  always @(posedge clk) begin
    if (!rst && bus_valid) words.push_back(bus_word);
    reply_pop <= !rst && reply_valid && !reply_pop;
    if (reply_pop && !rst) replies.push_back(reply_data);
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // one slow-control frame, then two idle cycles (frames every third cycle)
  task automatic frame(input logic [63:0] p);
    @(negedge clk); sc_valid = 1; sc_payload = p;
    @(negedge clk); sc_valid = 0;
    @(negedge clk);
  endtask
  task automatic wr1(input logic [15:0] a, v);
    frame({7'd0, 1'b1, 8'd0, a, v, 16'd0});
  endtask
  task automatic pulse_fc(input int which);
    @(negedge clk);
    if (which == 0) fc.bc0 = 1; else fc.flush = 1;
    @(negedge clk); fc.bc0 = 0; fc.flush = 0;
  endtask

  initial begin
    #400_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_bc0, t_hit;
    #30 rst = 0; rst_tdc = 0;
    repeat (5) @(negedge clk);
    // write two test registers (one request frame), read four words back
    frame({7'd0, 1'b1, 8'd1, 16'h0000, 16'hBEEF, 16'hCAFE});
    frame({7'd0, 1'b0, 8'd3, 16'h0000, 32'd0});
    frame({7'd0, 1'b0, 8'd0, 16'h0010, 32'd0});
    frame({7'd0, 1'b0, 8'd0, 16'h0016, 32'd0});
    repeat (30) @(negedge clk);
    check(replies.size() == 6, $sformatf("6 replies (%0d)", replies.size()));
    if (replies.size() == 6) begin
      check(replies[0] == 16'hBEEF && replies[1] == 16'hCAFE && replies[2] == 0, "test registers");
      check(replies[4] == 16'd2, "FPGA id register");
      check(replies[5] == 16'hCDEF, "chip id register");
    end
    // TDC on, all channels, BC0 then a hit on channel 4
    wr1(16'h0300, 1); wr1(16'h0305, 16'hFFFF); wr1(16'h0306, 16'hFFFF); wr1(16'h0307, 3); wr1(16'h0301, 1);
    repeat (5) @(negedge clk);
    words.delete();
    pulse_fc(0); t_bc0 = $time - 6;
    #300;
    t_hit = $time; roc_trig[4] = 1; #6 roc_trig[4] = 0;
    repeat (30) @(negedge clk);
    check(words.size() == 2, $sformatf("BC0 and hit words (%0d)", words.size()));
    if (words.size() == 2) begin
      longint exp;
      exp = ((t_hit - t_bc0) / 2) * 256;
      check(words[0].dev == 2 && words[0].ch == 32, "BC0 word");
      check(words[1].dev == 2 && words[1].ch == 4, "hit word");
      check(longint'(words[1].ts) > exp - 768 && longint'(words[1].ts) < exp + 768,
            $sformatf("hit time %0d relative to BC0, expect about %0d", words[1].ts, exp));
    end
    // mute
    @(negedge clk); fc.mute = 1; repeat (2) @(negedge clk);
    check(roc_val_evt == 2'b00, "MuteROCChannels drives VAL_EVT low");
    fc.mute = 0; repeat (2) @(negedge clk);
    check(roc_val_evt == 2'b11, "VAL_EVT back high");
    // PETIROC top load
    wr1(16'h0116, 16'h8001);
    wr1(16'h0100, 1);
    repeat (3) @(negedge clk);
    check(roc_val_evt == 2'b10, "VAL_EVT of the top PETIROC low while it loads");
    repeat (5400) @(negedge clk);
    check(roc0.sr[663:648] == 16'h8001 && roc_val_evt == 2'b11, "top PETIROC loaded");
    // injection square wave on all channels
    words.delete();
    wr1(16'h0308, 4'b0001);
    repeat (200) @(negedge clk);
    wr1(16'h0308, 0);
    check(words.size() > 0, $sformatf("injection gives data (%0d words)", words.size()));
    // flush
    words.delete();
    pulse_fc(1);
    repeat (20) @(negedge clk);
    words.delete();
    repeat (20) @(negedge clk);
    check(words.size() == 0, "flush empties the readout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
