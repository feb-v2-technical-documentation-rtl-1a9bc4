// tdc_core: multichannel TDC of one FPGA with its calibration LUTs.
//
// Capture side (clk_tdc, 400 MHz): a free-running COARSE_W-bit counter gives
// the coarse time in 2.5 ns steps. Each channel's trigger input is sampled;
// on a rising edge the coarse count and the channel's raw fine code (the
// 8-bit position of the edge in the FPGA delay line, delivered by the delay
// line on the same clock edge) are stored and a toggle flag is flipped.
// Bus side (clk, 120 MHz): the toggle is synchronised with two flip-flops;
// its change marks a new raw timestamp, which is read from the stable
// capture register. The raw fine code is then replaced by its calibrated
// value from the channel's LUT, giving a 24-bit timestamp {coarse, fine}
// (fine LSB = 2.5 ns / 256). Hits of channels not enabled (tdc_enable and
// meas_en) are dropped. A channel must not see two edges within about four
// bus cycles, or the first one is lost.
// Calibration (code-density method): a calibration request for a channel
// switches its input to the free-running calibration clock cal_clk, whose
// edges are uncorrelated with clk_tdc. 2**CAL_LOG2 raw codes are histogrammed
// (DNL build done), then the LUT entry of code i is set to the centre of its
// bin on the cumulative distribution, (sum(h[0..i-1]) + h[i]/2) * 256 / N
// (LUT build done). Channels are calibrated one after the other. Until a
// channel's LUT is built its raw code is used unchanged.
// The LUTs are read-only slow-control slaves at bases SC_LUT0+ch (0x04..0x25),
// one 256-entry page per channel; an entry is 8 bits, so rdata[15:8] reads
// zero. The document gives the coarse clock, the
// fine width, the LUT built by the TDC with a calibration clock and the LUT
// slaves; the code-density algorithm, the handshake and the histogram size
// are this design's choices.
module tdc_core
  import feb_pkg::*;
#(
  parameter int NCH      = N_CH,
  parameter int CAL_LOG2 = 12
) (
  input  logic                  clk_tdc,
  input  logic                  rst_tdc,
  input  logic [NCH-1:0]        hit,          // trigger inputs, clk_tdc domain
  input  logic [NCH-1:0][7:0]   fine_raw,     // delay-line codes
  input  logic                  cal_clk,      // calibration clock, sampled by clk_tdc
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  tdc_enable,
  input  logic [NCH-1:0]        meas_en,
  input  logic [NCH-1:0]        calib_req,    // one-cycle request per channel
  output logic [NCH-1:0]        dnl_done,
  output logic [NCH-1:0]        lut_done,
  output logic [NCH-1:0]        ts_valid,
  output logic [NCH-1:0][TS_W-1:0] ts,
  input  sc_req_t               req,
  output logic [15:0]           rdata
);
  // ---------------- capture side ----------------
  logic [COARSE_W-1:0] coarse;
  logic [NCH-1:0] cal_sel_s1, cal_sel_s2;   // calibration select, synchronised
  logic [NCH-1:0] src_q, tog;
  logic [NCH-1:0][COARSE_W+7:0] cap;
  logic [NCH-1:0] calibrating;

  always_ff @(posedge clk_tdc) begin
    if (rst_tdc) begin
      coarse <= '0; src_q <= '0; tog <= '0; cal_sel_s1 <= '0; cal_sel_s2 <= '0;
      cap <= '0;
    end else begin
      coarse <= coarse + 1'b1;
      cal_sel_s1 <= calibrating;
      cal_sel_s2 <= cal_sel_s1;
      for (int c = 0; c < NCH; c++) begin
        logic s;
        s = cal_sel_s2[c] ? cal_clk : hit[c];
        src_q[c] <= s;
        if (s && !src_q[c]) begin
          cap[c] <= {coarse, fine_raw[c]};
          tog[c] <= ~tog[c];
        end
      end
    end
  end

  // ---------------- bus side ----------------
  logic [NCH-1:0] tog_s1, tog_s2, tog_s3;
  logic [NCH-1:0] new_hit;
  always_ff @(posedge clk) begin
    if (rst) begin
      tog_s1 <= '0; tog_s2 <= '0; tog_s3 <= '0;
    end else begin
      tog_s1 <= tog; tog_s2 <= tog_s1; tog_s3 <= tog_s2;
    end
  end
  assign new_hit = tog_s2 ^ tog_s3;

  logic [7:0] lut [NCH][256];
  logic [CAL_LOG2:0] hist [256];

  typedef enum logic [1:0] {C_IDLE, C_CLEAR, C_COLLECT, C_BUILD} cstate_t;
  cstate_t cstate;
  logic [NCH-1:0] pending;
  logic [$clog2(NCH)-1:0] cch;
  logic [7:0] idx;
  logic [CAL_LOG2:0] ncal;
  logic [CAL_LOG2+8:0] cum;

  // lowest pending channel
  logic [$clog2(NCH)-1:0] next_ch;
  always_comb begin
    next_ch = '0;
    for (int c = NCH - 1; c >= 0; c--) if (pending[c]) next_ch = c[$clog2(NCH)-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cstate <= C_IDLE; pending <= '0; cch <= '0; idx <= '0; ncal <= '0; cum <= '0;
      calibrating <= '0; dnl_done <= '0; lut_done <= '0;
    end else begin
      pending <= pending | calib_req;
      unique case (cstate)
        C_IDLE: if (pending != 0) begin
          cch <= next_ch;
          pending[next_ch] <= 1'b0;
          dnl_done[next_ch] <= 1'b0;
          lut_done[next_ch] <= 1'b0;
          calibrating[next_ch] <= 1'b1;
          idx <= '0;
          cstate <= C_CLEAR;
        end
        C_CLEAR: begin
          hist[idx] <= '0;
          idx <= idx + 1'b1;
          ncal <= '0;
          if (idx == 8'hFF) cstate <= C_COLLECT;
        end
        C_COLLECT: if (new_hit[cch]) begin
          // the first few hits may still come from the trigger input; they
          // are harmless in a histogram of thousands of codes
          hist[cap[cch][7:0]] <= hist[cap[cch][7:0]] + 1'b1;
          ncal <= ncal + 1'b1;
          if (ncal == (CAL_LOG2+1)'((1 << CAL_LOG2) - 1)) begin
            dnl_done[cch] <= 1'b1;
            calibrating[cch] <= 1'b0;
            idx <= '0;
            cum <= '0;
            cstate <= C_BUILD;
          end
        end
        C_BUILD: begin
          lut[cch][idx] <= 8'(((cum << 1) + (CAL_LOG2+9)'(hist[idx])) >> (CAL_LOG2 - 7));
          cum <= cum + (CAL_LOG2+9)'(hist[idx]);
          idx <= idx + 1'b1;
          if (idx == 8'hFF) begin
            lut_done[cch] <= 1'b1;
            cstate <= C_IDLE;
          end
        end
        default: cstate <= C_IDLE;
      endcase
    end
  end

  // timestamps out
  always_ff @(posedge clk) begin
    if (rst) begin
      ts_valid <= '0;
      ts <= '0;
    end else begin
      for (int c = 0; c < NCH; c++) begin
        ts_valid[c] <= new_hit[c] && tdc_enable && meas_en[c] && !calibrating[c];
        ts[c] <= {cap[c][COARSE_W+7:8], lut_done[c] ? lut[c][cap[c][7:0]] : cap[c][7:0]};
      end
    end
  end

  // LUT read-out slaves
  logic [7:0] page;
  assign page = req.addr[15:8] - SC_LUT0;
  always_ff @(posedge clk) begin
    if (rst) rdata <= '0;
    else begin
      rdata <= '0;
      if (req.rd && req.addr[15:8] >= SC_LUT0 && page < 8'(NCH))
        rdata <= {8'd0, lut[page[$clog2(NCH)-1:0]][req.addr[7:0]]};
    end
  end
endmodule
