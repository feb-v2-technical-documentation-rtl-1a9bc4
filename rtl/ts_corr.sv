// ts_corr: timestamp correction of the 34 TDC channels, with its
// "TDC Timestamp Correction" slow-control slave (base 0x28).
//
// Each raw timestamp becomes  raw - bc0_ref - offset[c]  (modulo 2**24), where
// bc0_ref is the raw timestamp of the last BC0 (channel 32) and offset[c] a
// per-channel constant compensating the strip geometry. With bc0_corr_en low
// the BC0 reference is not subtracted. A BC0 hit updates the reference for
// the following hits; its own output is relative to the previous BC0, and is
// suppressed when bc0_drop is set. Latency one cycle, all channels in
// parallel. Registers: 0x00+2c offset[15:0], 0x01+2c offset[23:16] of
// channel c (c = 0..33). Behaviour and register map follow the document.
module ts_corr
  import feb_pkg::*;
#(
  parameter logic [7:0] BASE = SC_TSCORR
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      flush,
  input  sc_req_t                   req,
  output logic [15:0]               rdata,
  input  logic                      bc0_corr_en,
  input  logic                      bc0_drop,
  input  logic [N_CH-1:0]           in_valid,
  input  logic [N_CH-1:0][TS_W-1:0] in_ts,
  output logic [N_CH-1:0]           out_valid,
  output logic [N_CH-1:0][TS_W-1:0] out_ts
);
  logic [TS_W-1:0] offset [N_CH];
  logic [TS_W-1:0] bc0_ref;

  wire       sel = (req.addr[15:8] == BASE);
  wire [7:0] a   = req.addr[7:0];
  wire [5:0] rc  = 6'(a >> 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < N_CH; c++) offset[c] <= '0;
      rdata <= '0;
    end else begin
      if (sel && req.wr && a < 8'(2 * N_CH)) begin
        if (a[0]) offset[rc][23:16] <= req.wdata[7:0];
        else      offset[rc][15:0]  <= req.wdata;
      end
      rdata <= '0;
      if (sel && req.rd && a < 8'(2 * N_CH))
        rdata <= a[0] ? {8'd0, offset[rc][23:16]} : offset[rc][15:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      bc0_ref <= '0; out_valid <= '0; out_ts <= '0;
    end else begin
      if (in_valid[CH_BC0]) bc0_ref <= in_ts[CH_BC0];
      for (int c = 0; c < N_CH; c++) begin
        out_valid[c] <= in_valid[c] && !(c == CH_BC0 && bc0_drop);
        out_ts[c]    <= in_ts[c] - (bc0_corr_en ? bc0_ref : '0) - offset[c];
      end
    end
  end
endmodule
