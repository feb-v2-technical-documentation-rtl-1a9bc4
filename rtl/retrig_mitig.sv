// retrig_mitig: retriggering mitigation for the two PETIROCs of an FPGA.
//
// Each of the 32 PETIROC channels has a leaky activity counter: +1 for each
// timestamp, -1 every dec_time bus cycles. When a counter goes above
// threshold (threshold 0 disables the feature) the PETIROC owning the channel
// (channels 0-15 top, 16-31 bottom) is muted for mute_time bus cycles,
// giving the oscillating channel time to settle; its counter is cleared. A
// TDC readout overflow mutes both PETIROCs for the same time. Timestamps pass
// through unchanged with one cycle of latency. The document gives the purpose
// and the three registers; the leaky-counter form is this design's choice.
module retrig_mitig
  import feb_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  input  logic [3:0]                threshold,
  input  logic [7:0]                dec_time,
  input  logic [7:0]                mute_time,
  input  logic                      overflow,
  input  logic [N_CH-1:0]           in_valid,
  input  logic [N_CH-1:0][TS_W-1:0] in_ts,
  output logic [N_CH-1:0]           out_valid,
  output logic [N_CH-1:0][TS_W-1:0] out_ts,
  output logic [1:0]                roc_mute,   // [0] top, [1] bottom
  output logic [15:0]               mute_events
);
  logic [4:0] act [N_ROC_CH];
  logic [7:0] dec_cnt;
  logic [7:0] mute_cnt [2];
  logic [1:0] trip;

  always_comb begin
    trip = '0;
    for (int c = 0; c < N_ROC_CH; c++)
      if (threshold != 0 && act[c] > {1'b0, threshold}) trip[c / 16] = 1'b1;
    if (overflow && threshold != 0) trip = 2'b11;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < N_ROC_CH; c++) act[c] <= '0;
      dec_cnt <= '0; mute_cnt[0] <= '0; mute_cnt[1] <= '0; mute_events <= '0;
      out_valid <= '0; out_ts <= '0;
    end else begin
      out_valid <= in_valid;
      out_ts    <= in_ts;
      dec_cnt <= (dec_cnt + 1 >= dec_time) ? 8'd0 : dec_cnt + 1'b1;
      for (int c = 0; c < N_ROC_CH; c++) begin
        logic [4:0] v;
        v = act[c];
        if (in_valid[c] && v != 5'h1F) v = v + 1'b1;
        if (dec_time != 0 && dec_cnt + 1 >= dec_time && v != 0) v = v - 1'b1;
        if (trip[c / 16] && mute_cnt[c / 16] == 0) v = '0;
        act[c] <= v;
      end
      for (int r = 0; r < 2; r++) begin
        if (trip[r] && mute_cnt[r] == 0) begin
          mute_cnt[r] <= (mute_time == 0) ? 8'd1 : mute_time;
          mute_events <= mute_events + 1'b1;
        end else if (mute_cnt[r] != 0) mute_cnt[r] <= mute_cnt[r] - 1'b1;
      end
    end
  end

  assign roc_mute[0] = (mute_cnt[0] != 0);
  assign roc_mute[1] = (mute_cnt[1] != 0);
endmodule
