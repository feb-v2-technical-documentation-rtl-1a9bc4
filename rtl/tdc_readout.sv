// tdc_readout: TDC channels readout module of one FPGA.
//
// Reads the 34 channel timestamps from the TDC, filters them and serialises
// them onto the FPGA's 120 MHz data bus:
//   ts_corr          subtract the last BC0 time and a per-channel offset
//   retrig_mitig     mute a PETIROC whose channels oscillate
//   dead_time_filter minimum time between two hits of a channel
//   pair_filter      match and check the two ends of each strip
//   readout_buffer   priority multiplexer, FIFO and maximum time disparity
// Latency from a TDC timestamp to the bus is 6 cycles plus the queueing time,
// which max_disparity bounds. FlushDataPath empties every stage. The chain
// and its order are the document's.
// The statistics outputs of the stages (mute events, dead-time drops, pair
// counts, buffer drops) are left open: the document defines no register for
// them, and they are kept in the stages for simulation and debugging.
module tdc_readout
  import feb_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      flush,
  input  logic [1:0]                fpga_id,
  input  dp_cfg_t                   cfg,
  input  logic                      bc0_corr_en,
  input  logic                      bc0_drop,
  input  sc_req_t                   req,
  output logic [15:0]               rdata,
  input  logic [N_CH-1:0]           ts_valid,
  input  logic [N_CH-1:0][TS_W-1:0] ts,
  output logic                      bus_valid,
  output tdc_word_t                 bus_word,
  output logic                      overflow,
  output logic [1:0]                roc_mute
);
  logic [N_CH-1:0]           v1, v2, v3;
  logic [N_CH-1:0][TS_W-1:0] t1, t2, t3;
  ch_slot_t [N_CH-1:0]       slots;

  ts_corr u_corr (
    .clk, .rst, .flush, .req, .rdata, .bc0_corr_en, .bc0_drop,
    .in_valid(ts_valid), .in_ts(ts), .out_valid(v1), .out_ts(t1)
  );
  retrig_mitig u_retrig (
    .clk, .rst, .threshold(cfg.retrig_thr), .dec_time(cfg.retrig_dec),
    .mute_time(cfg.retrig_mute), .overflow, .in_valid(v1), .in_ts(t1),
    .out_valid(v2), .out_ts(t2), .roc_mute, .mute_events()
  );
  dead_time_filter u_dead (
    .clk, .rst, .flush, .dead_time(cfg.dead_time), .in_valid(v2), .in_ts(t2),
    .out_valid(v3), .out_ts(t3), .dropped()
  );
  pair_filter u_pair (
    .clk, .rst, .flush, .fpga_id, .pair_en(cfg.pair_en), .diff_min(cfg.diff_min),
    .diff_max(cfg.diff_max), .max_wait(cfg.max_disparity), .in_valid(v3), .in_ts(t3),
    .out(slots), .pairs_ok(), .pairs_rejected()
  );
  readout_buffer #(.DEPTH(DEPTH)) u_buf (
    .clk, .rst, .flush, .max_disparity(cfg.max_disparity), .in(slots),
    .bus_valid, .bus_word, .overflow, .dropped()
  );
endmodule
