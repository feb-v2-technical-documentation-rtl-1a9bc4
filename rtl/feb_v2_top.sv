// feb_v2_top: digital firmware of the FEB v2 front-end board: three TDC
// FPGAs (left = 0, middle = 1, right = 2), each reading two 16-channel
// PETIROC ASICs, and the GBT interface and data concentrator of the middle
// FPGA.
//
// Downlink: one 80-bit GBT frame per frame_stb (every third 120 MHz cycle).
// gbt_rx_ctrl waits for RxDataValid, decodes the fast-control header and
// hands slow-control payloads to the FPGAs selected by FPGASel. Resync and
// BC0 are sent, equally delayed, to TDC channels 33 and 32 of all FPGAs;
// FlushDataPath, ResetSCPath and MuteROCChannels go to all three.
// Uplink: every FPGA's readout drives a 32-bit data bus. The left and right
// buses reach the middle FPGA through inter-FPGA links, modelled here as
// LINK_LAT register stages (the serial transceivers themselves are not part
// of this RTL); the middle bus is delayed by the Data Path Control register
// 0 of FPGA 1 to match. The concentrator packs the data into frames, and
// uplink_builder sends one 112-bit frame per frame_stb: data first, else
// slow-control replies of the three FPGAs, else an empty frame, always with
// the status header. The slow-control reply paths from the side FPGAs are
// direct connections here. The three FPGAs' I2C slaves share the GBT-SCA
// I2C bus; their open-drain pull-downs are OR-ed into i2c_sda_oe.
module feb_v2_top
  import feb_pkg::*;
#(
  parameter int TDC_CAL_LOG2 = 12,
  parameter int ROC_NBITS    = 664,
  parameter int DIV_1KHZ     = 60000,
  parameter int LINK_LAT     = 4,
  parameter int RO_DEPTH     = 64
) (
  input  logic                         clk,        // 120 MHz bus clock
  input  logic                         rst,
  input  logic                         clk_tdc,    // 400 MHz TDC clock
  input  logic                         rst_tdc,
  input  logic                         cal_clk,    // TDC calibration clock
  input  logic                         frame_stb,  // 40 MHz GBT frame strobe
  // GBTx
  input  logic [79:0]                  rx_frame,
  input  logic                         rx_data_valid,
  output logic [111:0]                 tx_frame,
  output logic                         tx_data_valid,
  output logic [1:0]                   tx_frame_type,
  // per FPGA
  input  logic [2:0][63:0]             chip_id,
  input  logic [2:0][N_ROC_CH-1:0]     roc_trig,
  input  logic [2:0][N_CH-1:0][7:0]    fine_raw,
  output logic [2:0][1:0]              roc_sr_ck,
  output logic [2:0][1:0]              roc_sr_in,
  output logic [2:0][1:0]              roc_sr_rstb,
  input  logic [2:0][1:0]              roc_sr_out,
  output logic [2:0][1:0][3:0]         roc_stage_off,
  output logic [2:0][1:0]              roc_digital_rstb,
  output logic [2:0][1:0]              roc_inject,
  output logic [2:0][1:0]              roc_hold_ext,
  output logic [2:0][1:0]              roc_val_evt,
  output logic [2:0]                   roc_trig_ext,
  output logic [2:0][5:0]              fl_csr_address,
  output logic [2:0]                   fl_csr_write,
  output logic [2:0]                   fl_csr_read,
  output logic [2:0][31:0]             fl_csr_writedata,
  input  logic [2:0]                   fl_csr_waitrequest,
  input  logic [2:0][31:0]             fl_csr_readdata,
  input  logic [2:0]                   fl_csr_readdatavalid,
  output logic [2:0][21:0]             fl_mem_address,
  output logic [2:0]                   fl_mem_write,
  output logic [2:0]                   fl_mem_read,
  output logic [2:0][6:0]              fl_mem_burstcount,
  output logic [2:0][3:0]              fl_mem_byteenable,
  output logic [2:0][31:0]             fl_mem_writedata,
  input  logic [2:0]                   fl_mem_waitrequest,
  input  logic [2:0][31:0]             fl_mem_readdata,
  input  logic [2:0]                   fl_mem_readdatavalid,
  output logic [2:0][2:0]              ru_csr_address,
  output logic [2:0]                   ru_csr_write,
  output logic [2:0]                   ru_csr_read,
  output logic [2:0][31:0]             ru_csr_writedata,
  input  logic [2:0]                   ru_csr_waitrequest,
  input  logic [2:0][31:0]             ru_csr_readdata,
  input  logic [2:0]                   ru_csr_readdatavalid,
  // GBT-SCA I2C bus to the FPGAs (open drain, one slave per FPGA)
  input  logic                         i2c_scl,
  input  logic                         i2c_sda_in,
  output logic                         i2c_sda_oe,
  output elink_cfg_t [2:0]             elink_cfg,
  output logic [2:0]                   elink_align_req,
  input  logic [2:0][7:0]              elink_align_result
);
  fc_t         fc;
  logic [2:0]  sc_valid;
  logic [63:0] sc_payload;
  logic        link_up;

  gbt_rx_ctrl u_rx (
    .clk, .rst, .frame_stb, .rx_frame, .rx_data_valid, .fe_ready(1'b1),
    .tx_data_valid, .link_up, .fc, .sc_valid, .sc_payload
  );

  logic [2:0]            bus_valid, reply_valid, reply_pop, tdc_ovf;
  tdc_word_t [2:0]       bus_word;
  logic [2:0][15:0]      reply_data;
  dp_cfg_t [2:0]         dp_cfg;

  logic [2:0] sda_oe_f;
  assign i2c_sda_oe = |sda_oe_f;  // wired-AND of the open-drain drivers

  for (genvar f = 0; f < 3; f++) begin : g_fpga
    feb_fpga #(
      .TDC_CAL_LOG2(TDC_CAL_LOG2), .ROC_NBITS(ROC_NBITS), .DIV_1KHZ(DIV_1KHZ),
      .RO_DEPTH(RO_DEPTH)
    ) u_fpga (
      .clk, .rst, .clk_tdc, .rst_tdc, .cal_clk, .fpga_id(2'(f)), .chip_id(chip_id[f]),
      .fc, .sc_valid(sc_valid[f]), .sc_payload,
      .reply_valid(reply_valid[f]), .reply_data(reply_data[f]), .reply_pop(reply_pop[f]),
      .roc_trig(roc_trig[f]), .fine_raw(fine_raw[f]),
      .roc_sr_ck(roc_sr_ck[f]), .roc_sr_in(roc_sr_in[f]), .roc_sr_rstb(roc_sr_rstb[f]),
      .roc_sr_out(roc_sr_out[f]), .roc_stage_off(roc_stage_off[f]),
      .roc_digital_rstb(roc_digital_rstb[f]), .roc_inject(roc_inject[f]),
      .roc_hold_ext(roc_hold_ext[f]), .roc_val_evt(roc_val_evt[f]), .roc_trig_ext(roc_trig_ext[f]),
      .fl_csr_address(fl_csr_address[f]), .fl_csr_write(fl_csr_write[f]),
      .fl_csr_read(fl_csr_read[f]), .fl_csr_writedata(fl_csr_writedata[f]),
      .fl_csr_waitrequest(fl_csr_waitrequest[f]), .fl_csr_readdata(fl_csr_readdata[f]),
      .fl_csr_readdatavalid(fl_csr_readdatavalid[f]),
      .fl_mem_address(fl_mem_address[f]), .fl_mem_write(fl_mem_write[f]),
      .fl_mem_read(fl_mem_read[f]), .fl_mem_burstcount(fl_mem_burstcount[f]),
      .fl_mem_byteenable(fl_mem_byteenable[f]), .fl_mem_writedata(fl_mem_writedata[f]),
      .fl_mem_waitrequest(fl_mem_waitrequest[f]), .fl_mem_readdata(fl_mem_readdata[f]),
      .fl_mem_readdatavalid(fl_mem_readdatavalid[f]),
      .ru_csr_address(ru_csr_address[f]), .ru_csr_write(ru_csr_write[f]),
      .ru_csr_read(ru_csr_read[f]), .ru_csr_writedata(ru_csr_writedata[f]),
      .ru_csr_waitrequest(ru_csr_waitrequest[f]), .ru_csr_readdata(ru_csr_readdata[f]),
      .ru_csr_readdatavalid(ru_csr_readdatavalid[f]),
      .i2c_scl, .i2c_sda_in, .i2c_sda_oe(sda_oe_f[f]),
      .elink_cfg(elink_cfg[f]), .elink_align_req(elink_align_req[f]),
      .elink_align_result(elink_align_result[f]),
      .bus_valid(bus_valid[f]), .bus_word(bus_word[f]), .tdc_overflow(tdc_ovf[f]),
      .dp_cfg(dp_cfg[f])
    );
  end

  // inter-FPGA data links (left and right buses), fixed latency
  logic [LINK_LAT-1:0][2:0]       lv;
  tdc_word_t [LINK_LAT-1:0][2:0]  lw;
  always_ff @(posedge clk) begin
    if (rst || fc.flush) begin
      lv <= '0; lw <= '0;
    end else begin
      lv[0] <= bus_valid;
      lw[0] <= bus_word;
      for (int i = 1; i < LINK_LAT; i++) begin
        lv[i] <= lv[i-1];
        lw[i] <= lw[i-1];
      end
    end
  end

  logic [2:0]      cv;
  tdc_word_t [2:0] cw;
  assign cv = {lv[LINK_LAT-1][2], bus_valid[1], lv[LINK_LAT-1][0]};
  assign cw = {lw[LINK_LAT-1][2], bus_word[1], lw[LINK_LAT-1][0]};

  logic [111:0] q_head;
  logic         q_empty, q_pop, frame_ovf;

  data_concentrator u_conc (
    .clk, .rst, .flush(fc.flush), .cfg(dp_cfg[1]), .bus_valid(cv), .bus_word(cw),
    .frame_pop(q_pop), .frame_head(q_head), .frame_empty(q_empty), .overflow(frame_ovf)
  );

  uplink_builder u_tx (
    .clk, .rst, .frame_stb, .resync(fc.resync), .bc0(fc.bc0), .frame_ovf, .tdc_ovf,
    .q_head, .q_empty, .q_pop, .reply_valid, .reply_data, .reply_pop, .tx_frame,
    .frame_type(tx_frame_type)
  );
endmodule
