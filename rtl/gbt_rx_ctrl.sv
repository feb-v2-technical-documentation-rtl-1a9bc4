// gbt_rx_ctrl: downlink link control and fast-control decoder (middle FPGA).
//
// After reset every received frame is ignored until the GBTx RxDataValid flag
// has been seen high once; from then on the link is up and, once the local
// logic reports ready, TxDataValid is raised towards the GBTx. Each frame
// (one every frame_stb, i.e. every 25 ns) has its 16-bit G4 header decoded:
//   [15] Resync  [14] BC0  [13] ResetSCPath  [12] FlushDataPath
//   [11] MuteROCChannels  [10:3] MiscCtrl  [2:0] FPGASel
// Resync, BC0, ResetSCPath and FlushDataPath become one-cycle pulses in the
// cycle after frame_stb; MuteROCChannels and MiscCtrl are held as levels until
// the next frame. sc_valid[i] marks a frame whose payload (G3..G0) goes to
// FPGA i. Bit order within the header and the one-cycle pulse length in the
// 120 MHz bus clock are this design's choices; the fields and their widths
// follow the documented frame format.
module gbt_rx_ctrl
  import feb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        frame_stb,      // one cycle in three: a new downlink frame
  input  logic [79:0] rx_frame,
  input  logic        rx_data_valid,  // GBTx RxDataValid
  input  logic        fe_ready,       // FEB logic ready to send and receive
  output logic        tx_data_valid,  // to GBTx TxDataValid
  output logic        link_up,
  output fc_t         fc,             // decoded fast control
  output logic [2:0]  sc_valid,       // payload present for FPGA 0..2
  output logic [63:0] sc_payload      // groups G3..G0
);
  logic [15:0] hdr;
  assign hdr = rx_frame[79:64];

  always_ff @(posedge clk) begin
    if (rst) begin
      link_up       <= 1'b0;
      tx_data_valid <= 1'b0;
      fc            <= '0;
      sc_valid      <= '0;
      sc_payload    <= '0;
    end else begin
      fc.resync   <= 1'b0;
      fc.bc0      <= 1'b0;
      fc.reset_sc <= 1'b0;
      fc.flush    <= 1'b0;
      sc_valid    <= '0;
      tx_data_valid <= link_up && fe_ready;
      if (frame_stb) begin
        if (rx_data_valid) link_up <= 1'b1;
        if (link_up || rx_data_valid) begin
          fc.resync   <= hdr[15];
          fc.bc0      <= hdr[14];
          fc.reset_sc <= hdr[13];
          fc.flush    <= hdr[12];
          fc.mute     <= hdr[11];
          fc.misc     <= hdr[10:3];
          sc_valid    <= hdr[2:0];
          sc_payload  <= rx_frame[63:0];
        end
      end
    end
  end
endmodule
