// dead_time_filter: per-channel dead time on the 32 PETIROC channels.
//
// A timestamp is dropped if it arrives less than dead_time bus cycles
// (8.33 ns each) after the last accepted one of the same channel; dead_time 0
// lets everything through. The BC0 and Resync channels are never filtered.
// Latency one cycle. The document gives the rule and the 6-bit register; the
// measurement of the interval in bus cycles of arrival is this design's choice.
module dead_time_filter
  import feb_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      flush,
  input  logic [5:0]                dead_time,
  input  logic [N_CH-1:0]           in_valid,
  input  logic [N_CH-1:0][TS_W-1:0] in_ts,
  output logic [N_CH-1:0]           out_valid,
  output logic [N_CH-1:0][TS_W-1:0] out_ts,
  output logic [15:0]               dropped
);
  logic [5:0] since [N_ROC_CH];   // cycles since last accepted hit, saturating

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      for (int c = 0; c < N_ROC_CH; c++) since[c] <= '1;
      out_valid <= '0; out_ts <= '0;
      if (rst) dropped <= '0;
    end else begin
      logic [5:0] ndrop;
      ndrop = '0;
      out_ts <= in_ts;
      for (int c = 0; c < N_CH; c++) begin
        if (c < N_ROC_CH) begin
          if (in_valid[c] && (dead_time == 0 || since[c] >= dead_time)) begin
            out_valid[c] <= 1'b1;
            since[c] <= 6'd1;
          end else begin
            out_valid[c] <= 1'b0;
            if (in_valid[c]) ndrop = ndrop + 1'b1;
            if (since[c] != '1) since[c] <= since[c] + 1'b1;
          end
        end else out_valid[c] <= in_valid[c];
      end
      dropped <= dropped + 16'(ndrop);
    end
  end
endmodule
