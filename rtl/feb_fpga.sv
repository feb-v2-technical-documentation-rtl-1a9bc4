// feb_fpga: the firmware of one of the three FPGAs of the board.
//
// Slow control: downlink payloads addressed to this FPGA are decoded into
// bus operations (sc_frame_decoder), played on the internal 16-bit bus
// (sc_master) and answered by the slaves: general control (0x00), PETIROC top
// and bottom control (0x01, 0x02), TDC control (0x03), TDC LUTs (0x04-0x25),
// serial flash (0x26), remote update (0x27), timestamp correction (0x28) and
// data path control (0x29). Read replies queue in the master's reply FIFO for
// the uplink builder.
// Data: the 34-channel TDC timestamps the 32 PETIROC triggers and the BC0 and
// Resync pulses (or the injected test signals), and the readout module filters
// and serialises them onto this FPGA's 120 MHz data bus (32-bit words).
// VAL_EVT of each PETIROC is driven low (channels muted) while the
// MuteROCChannels fast control is set, while the retrigger mitigation mutes
// it, and while the ASIC is being configured or reset. All bus-side logic
// runs on clk (120 MHz); the TDC capture runs on clk_tdc (400 MHz).
// An I2C slave on the GBT-SCA's FPGA bus holds the e-link settings
// (loopback, test patterns, bitslip); they leave through elink_cfg.
// The frame decoder's lost-operation counter is left open (no register for
// it in the document).
module feb_fpga
  import feb_pkg::*;
#(
  parameter int TDC_CAL_LOG2 = 12,
  parameter int ROC_NBITS    = 664,
  parameter int DIV_1KHZ     = 60000,
  parameter int RO_DEPTH     = 64
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  clk_tdc,
  input  logic                  rst_tdc,
  input  logic                  cal_clk,
  input  logic [1:0]            fpga_id,
  input  logic [63:0]           chip_id,
  // fast control and slow-control downlink
  input  fc_t                   fc,
  input  logic                  sc_valid,
  input  logic [63:0]           sc_payload,
  // slow-control replies
  output logic                  reply_valid,
  output logic [15:0]           reply_data,
  input  logic                  reply_pop,
  // PETIROC triggers and delay-line codes
  input  logic [N_ROC_CH-1:0]   roc_trig,
  input  logic [N_CH-1:0][7:0]  fine_raw,
  // PETIROC control pins, [0] top, [1] bottom
  output logic [1:0]            roc_sr_ck,
  output logic [1:0]            roc_sr_in,
  output logic [1:0]            roc_sr_rstb,
  input  logic [1:0]            roc_sr_out,
  output logic [1:0][3:0]       roc_stage_off,
  output logic [1:0]            roc_digital_rstb,
  output logic [1:0]            roc_inject,
  output logic [1:0]            roc_hold_ext,
  output logic [1:0]            roc_val_evt,
  output logic                  roc_trig_ext,
  // serial flash controller
  output logic [5:0]            fl_csr_address,
  output logic                  fl_csr_write,
  output logic                  fl_csr_read,
  output logic [31:0]           fl_csr_writedata,
  input  logic                  fl_csr_waitrequest,
  input  logic [31:0]           fl_csr_readdata,
  input  logic                  fl_csr_readdatavalid,
  output logic [21:0]           fl_mem_address,
  output logic                  fl_mem_write,
  output logic                  fl_mem_read,
  output logic [6:0]            fl_mem_burstcount,
  output logic [3:0]            fl_mem_byteenable,
  output logic [31:0]           fl_mem_writedata,
  input  logic                  fl_mem_waitrequest,
  input  logic [31:0]           fl_mem_readdata,
  input  logic                  fl_mem_readdatavalid,
  // remote update controller
  output logic [2:0]            ru_csr_address,
  output logic                  ru_csr_write,
  output logic                  ru_csr_read,
  output logic [31:0]           ru_csr_writedata,
  input  logic                  ru_csr_waitrequest,
  input  logic [31:0]           ru_csr_readdata,
  input  logic                  ru_csr_readdatavalid,
  // I2C bus of the GBT-SCA: e-link settings
  input  logic                  i2c_scl,
  input  logic                  i2c_sda_in,
  output logic                  i2c_sda_oe,
  output elink_cfg_t            elink_cfg,
  output logic                  elink_align_req,
  input  logic [7:0]            elink_align_result,
  // data bus towards the concentrator
  output logic                  bus_valid,
  output tdc_word_t             bus_word,
  output logic                  tdc_overflow,
  output dp_cfg_t               dp_cfg
);
  // ---------------- slow control ----------------
  logic        op_valid, op_we, op_pop;
  logic [15:0] op_addr;
  logic [8:0]  op_len;
  logic [3:0][15:0] op_data;
  sc_req_t     req;
  logic [15:0] rd_gen, rd_roc0, rd_roc1, rd_tdc, rd_lut, rd_fl, rd_ru, rd_ts, rd_dp, rdata;

  sc_frame_decoder u_dec (
    .clk, .rst, .reset_sc(fc.reset_sc), .frame_valid(sc_valid), .payload(sc_payload),
    .op_valid, .op_we, .op_addr, .op_len, .op_data, .op_pop, .lost_ops()
  );
  sc_master u_master (
    .clk, .rst, .reset_sc(fc.reset_sc), .op_valid, .op_we, .op_addr, .op_len, .op_data,
    .op_pop, .req, .rdata, .reply_valid, .reply_data, .reply_pop
  );
  assign rdata = rd_gen | rd_roc0 | rd_roc1 | rd_tdc | rd_lut | rd_fl | rd_ru | rd_ts | rd_dp;

  i2c_fpga_slave u_i2c (
    .clk, .rst, .fpga_id, .scl_in(i2c_scl), .sda_in(i2c_sda_in), .sda_oe(i2c_sda_oe),
    .cfg(elink_cfg), .align_req(elink_align_req), .align_result(elink_align_result)
  );

  sc_gen_slave u_gen (.clk, .rst, .req, .rdata(rd_gen), .fpga_id, .chip_id);

  logic [1:0] roc_busy;
  petiroc_ctrl #(.BASE(SC_ROC_TOP), .NBITS(ROC_NBITS)) u_roc_top (
    .clk, .rst, .req, .rdata(rd_roc0), .sr_ck(roc_sr_ck[0]), .sr_in(roc_sr_in[0]),
    .sr_rstb(roc_sr_rstb[0]), .sr_out(roc_sr_out[0]), .stage_off(roc_stage_off[0]),
    .digital_rstb(roc_digital_rstb[0]), .inject(roc_inject[0]), .hold_ext(roc_hold_ext[0]),
    .busy(roc_busy[0])
  );
  petiroc_ctrl #(.BASE(SC_ROC_BOT), .NBITS(ROC_NBITS)) u_roc_bot (
    .clk, .rst, .req, .rdata(rd_roc1), .sr_ck(roc_sr_ck[1]), .sr_in(roc_sr_in[1]),
    .sr_rstb(roc_sr_rstb[1]), .sr_out(roc_sr_out[1]), .stage_off(roc_stage_off[1]),
    .digital_rstb(roc_digital_rstb[1]), .inject(roc_inject[1]), .hold_ext(roc_hold_ext[1]),
    .busy(roc_busy[1])
  );

  // ---------------- TDC ----------------
  logic                      tdc_enable, bc0_corr_en, bc0_drop;
  logic [N_CH-1:0]           meas_en, calib_req, dnl_done, lut_done, inj_sel, inj_hits;
  logic [N_CH-1:0]           ts_valid, hit;
  logic [N_CH-1:0][TS_W-1:0] ts;

  tdc_ctrl #(.DIV_1KHZ(DIV_1KHZ)) u_tdc_ctrl (
    .clk, .rst, .req, .rdata(rd_tdc), .bc0(fc.bc0), .resync(fc.resync), .ts_valid,
    .dnl_done, .lut_done, .tdc_enable, .meas_en, .calib_req, .bc0_corr_en, .bc0_drop,
    .inj_sel, .inj_hits, .trig_ext(roc_trig_ext)
  );

  always_comb begin
    hit[N_ROC_CH-1:0] = roc_trig;
    hit[CH_BC0]       = fc.bc0;
    hit[CH_RESYNC]    = fc.resync;
    for (int c = 0; c < N_CH; c++) if (inj_sel[c]) hit[c] = inj_hits[c];
  end

  tdc_core #(.CAL_LOG2(TDC_CAL_LOG2)) u_tdc (
    .clk_tdc, .rst_tdc, .hit, .fine_raw, .cal_clk, .clk, .rst, .tdc_enable, .meas_en,
    .calib_req, .dnl_done, .lut_done, .ts_valid, .ts, .req, .rdata(rd_lut)
  );

  // ---------------- readout ----------------
  logic [1:0] roc_mute;
  dp_ctrl_slave u_dp (.clk, .rst, .req, .rdata(rd_dp), .cfg(dp_cfg));

  tdc_readout #(.DEPTH(RO_DEPTH)) u_readout (
    .clk, .rst, .flush(fc.flush), .fpga_id, .cfg(dp_cfg), .bc0_corr_en, .bc0_drop, .req,
    .rdata(rd_ts), .ts_valid, .ts, .bus_valid, .bus_word, .overflow(tdc_overflow), .roc_mute
  );

  always_ff @(posedge clk) begin
    if (rst) roc_val_evt <= '0;
    else for (int r = 0; r < 2; r++) roc_val_evt[r] <= !(fc.mute || roc_mute[r] || roc_busy[r]);
  end

  // ---------------- firmware update ----------------
  flash_ctrl_slave u_flash (
    .clk, .rst, .req, .rdata(rd_fl),
    .csr_address(fl_csr_address), .csr_write(fl_csr_write), .csr_read(fl_csr_read),
    .csr_writedata(fl_csr_writedata), .csr_waitrequest(fl_csr_waitrequest),
    .csr_readdata(fl_csr_readdata), .csr_readdatavalid(fl_csr_readdatavalid),
    .mem_address(fl_mem_address), .mem_write(fl_mem_write), .mem_read(fl_mem_read),
    .mem_burstcount(fl_mem_burstcount), .mem_byteenable(fl_mem_byteenable),
    .mem_writedata(fl_mem_writedata), .mem_waitrequest(fl_mem_waitrequest),
    .mem_readdata(fl_mem_readdata), .mem_readdatavalid(fl_mem_readdatavalid)
  );
  remote_update_slave u_ru (
    .clk, .rst, .req, .rdata(rd_ru),
    .csr_address(ru_csr_address), .csr_write(ru_csr_write), .csr_read(ru_csr_read),
    .csr_writedata(ru_csr_writedata), .csr_waitrequest(ru_csr_waitrequest),
    .csr_readdata(ru_csr_readdata), .csr_readdatavalid(ru_csr_readdatavalid)
  );
endmodule
