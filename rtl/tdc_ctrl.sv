// tdc_ctrl: "TDC Control" slow-control slave (base 0x03).
//
//   0x00 [0] TDC enable
//   0x01 [0] CMD valid: writing 1 applies the CMD registers: the calibration
//        request bits become a one-cycle calib_req, the measure-enable bits
//        are copied to meas_en
//   0x02-0x04 calibration request, channels 0-15, 16-31, 32-33
//   0x05-0x07 measure enable, same layout
//   0x08 [3:0] injection mode (see tdc_injection), 0x09 injection BC0 offset
//   0x0A-0x0B data counter time window [15:0],[31:16] in bus cycles (8.33 ns)
//   0x0C [0] writing 1 starts a data count
//   0x0D [0] BC0 offset correction (reset value 1), [1] drop BC0 channel data
//   0x10-0x12 DNL build done, 0x13-0x15 LUT build done (read only)
//   0x16 [0] data counters valid, 0x17+2c / 0x18+2c counter of channel c
// A data count clears the 34 counters, counts each channel's timestamps for
// the window, then sets "valid". The register map is the documented one; the
// exact meaning of "CMD valid" and of the count start are this design's reading.
module tdc_ctrl
  import feb_pkg::*;
#(
  parameter logic [7:0] BASE     = SC_TDC,
  parameter int         DIV_1KHZ = 60000
) (
  input  logic              clk,
  input  logic              rst,
  input  sc_req_t           req,
  output logic [15:0]       rdata,
  input  logic              bc0,
  input  logic              resync,
  input  logic [N_CH-1:0]   ts_valid,
  input  logic [N_CH-1:0]   dnl_done,
  input  logic [N_CH-1:0]   lut_done,
  output logic              tdc_enable,
  output logic [N_CH-1:0]   meas_en,
  output logic [N_CH-1:0]   calib_req,
  output logic              bc0_corr_en,
  output logic              bc0_drop,
  output logic [N_CH-1:0]   inj_sel,
  output logic [N_CH-1:0]   inj_hits,
  output logic              trig_ext
);
  logic [N_CH-1:0] cali_r, meas_r;
  logic [3:0]  inj_mode;
  logic [15:0] inj_offset;
  logic [31:0] window, win_cnt;
  logic        counting, cnt_valid;
  logic [31:0] counters [N_CH];
  logic [1:0]  bc0_feat;

  wire       sel = (req.addr[15:8] == BASE);
  wire [7:0] a   = req.addr[7:0];
  wire       start = sel && req.wr && a == 8'h0C && req.wdata[0];

  assign bc0_corr_en = bc0_feat[0];
  assign bc0_drop    = bc0_feat[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      tdc_enable <= 1'b0; meas_en <= '0; calib_req <= '0; cali_r <= '0; meas_r <= '0;
      inj_mode <= '0; inj_offset <= '0; window <= '0; bc0_feat <= 2'b01; rdata <= '0;
    end else begin
      calib_req <= '0;
      if (sel && req.wr) begin
        unique case (a)
          8'h00: tdc_enable <= req.wdata[0];
          8'h01: if (req.wdata[0]) begin calib_req <= cali_r; meas_en <= meas_r; end
          8'h02: cali_r[15:0]  <= req.wdata;
          8'h03: cali_r[31:16] <= req.wdata;
          8'h04: cali_r[33:32] <= req.wdata[1:0];
          8'h05: meas_r[15:0]  <= req.wdata;
          8'h06: meas_r[31:16] <= req.wdata;
          8'h07: meas_r[33:32] <= req.wdata[1:0];
          8'h08: inj_mode   <= req.wdata[3:0];
          8'h09: inj_offset <= req.wdata;
          8'h0A: window[15:0]  <= req.wdata;
          8'h0B: window[31:16] <= req.wdata;
          8'h0D: bc0_feat <= req.wdata[1:0];
          default: ;
        endcase
      end
      rdata <= '0;
      if (sel && req.rd) begin
        unique case (a) inside
          8'h00: rdata <= {15'd0, tdc_enable};
          8'h02: rdata <= cali_r[15:0];
          8'h03: rdata <= cali_r[31:16];
          8'h04: rdata <= {14'd0, cali_r[33:32]};
          8'h05: rdata <= meas_r[15:0];
          8'h06: rdata <= meas_r[31:16];
          8'h07: rdata <= {14'd0, meas_r[33:32]};
          8'h08: rdata <= {12'd0, inj_mode};
          8'h09: rdata <= inj_offset;
          8'h0A: rdata <= window[15:0];
          8'h0B: rdata <= window[31:16];
          8'h0D: rdata <= {14'd0, bc0_feat};
          8'h10: rdata <= dnl_done[15:0];
          8'h11: rdata <= dnl_done[31:16];
          8'h12: rdata <= {14'd0, dnl_done[33:32]};
          8'h13: rdata <= lut_done[15:0];
          8'h14: rdata <= lut_done[31:16];
          8'h15: rdata <= {14'd0, lut_done[33:32]};
          8'h16: rdata <= {15'd0, cnt_valid};
          [8'h17:8'h5A]: rdata <= (a[0] == 1'b1) ? counters[(a - 8'h17) >> 1][15:0]
                                                 : counters[(a - 8'h17) >> 1][31:16];
          default: rdata <= '0;
        endcase
      end
    end
  end

  // data counters
  always_ff @(posedge clk) begin
    if (rst) begin
      counting <= 1'b0; cnt_valid <= 1'b0; win_cnt <= '0;
      for (int c = 0; c < N_CH; c++) counters[c] <= '0;
    end else if (start) begin
      counting <= 1'b1; cnt_valid <= 1'b0; win_cnt <= '0;
      for (int c = 0; c < N_CH; c++) counters[c] <= '0;
    end else if (counting) begin
      for (int c = 0; c < N_CH; c++) if (ts_valid[c]) counters[c] <= counters[c] + 1'b1;
      win_cnt <= win_cnt + 1'b1;
      if (win_cnt + 1 >= window) begin
        counting <= 1'b0; cnt_valid <= 1'b1;
      end
    end
  end

  tdc_injection #(.DIV_1KHZ(DIV_1KHZ)) u_inj (
    .clk, .rst, .mode(inj_mode), .offset(inj_offset), .bc0, .resync,
    .inj_sel, .inj_hits, .trig_ext
  );
endmodule
