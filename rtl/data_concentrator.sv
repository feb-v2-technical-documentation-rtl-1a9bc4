// data_concentrator: data concentrator of the middle FPGA.
//
// Receives the three FPGA data buses (left = FPGA 0, middle = FPGA 1,
// right = FPGA 2) at 120 MHz. The middle bus goes through the configurable
// delay buffer that compensates the inter-FPGA link latency of the other two.
// Each bus then passes a strip clustering stage, the frame merger packs the
// records into uplink data frames, and the frame queue holds them until the
// uplink builder takes one per GBT frame, dropping the oldest beyond the
// configured maximum. overflow reports any loss (queue or merger input), for
// the Frame Overflow status flag. Structure as in the document.
// The frame queue's fill count is left open; only its overflow is reported.
module data_concentrator
  import feb_pkg::*;
#(
  parameter int QDEPTH = 64
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              flush,
  input  dp_cfg_t           cfg,
  input  logic [2:0]        bus_valid,
  input  tdc_word_t [2:0]   bus_word,
  input  logic              frame_pop,
  output logic [111:0]      frame_head,
  output logic              frame_empty,
  output logic              overflow
);
  logic [2:0]      v;
  tdc_word_t [2:0] w;
  logic [2:0]      rv;
  rec_t [2:0]      rr;
  logic            mf_valid, m_ovf, q_ovf;
  logic [111:0]    mf;

  assign v[0] = bus_valid[0];
  assign w[0] = bus_word[0];
  assign v[2] = bus_valid[2];
  assign w[2] = bus_word[2];
  delay_buffer #(.DEPTH(64)) u_mid_delay (
    .clk, .rst, .flush, .delay(cfg.mid_delay), .in_valid(bus_valid[1]), .in_word(bus_word[1]),
    .out_valid(v[1]), .out_word(w[1])
  );

  for (genvar b = 0; b < 3; b++) begin : g_cl
    strip_cluster u_cl (
      .clk, .rst, .flush, .cluster_en(cfg.cluster_en), .remove_single(cfg.remove_single[b]),
      .in_valid(v[b]), .in_word(w[b]), .out_valid(rv[b]), .out_rec(rr[b])
    );
  end

  frame_merger u_merge (
    .clk, .rst, .flush, .in_valid(rv), .in_rec(rr), .frame_valid(mf_valid), .frame(mf),
    .overflow(m_ovf)
  );

  frame_queue #(.DEPTH(QDEPTH), .W(112)) u_queue (
    .clk, .rst, .flush, .max_size(cfg.queue_max), .push(mf_valid), .din(mf), .pop(frame_pop),
    .head(frame_head), .empty(frame_empty), .overflow(q_ovf), .count()
  );

  assign overflow = m_ovf | q_ovf;
endmodule
