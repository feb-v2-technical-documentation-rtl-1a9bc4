// strip_cluster: strip clustering on one data bus of the concentrator.
//
// Every bus word is held for one cycle. If the held word is the direct end of
// a strip (channel 15-s) and the next word is the return end of the same
// strip (channel 16+s), the two become one strip record: strip ID
// fpga*16 + s, the direct end's timestamp, and the 16-bit difference
// direct - return (the return timestamp can be rebuilt from it). Otherwise
// the held word leaves as a single-channel record, or is dropped if
// clustering is on and remove_single is set for this bus; BC0 and Resync
// words are never dropped. With clustering off, every word is a single
// record. The readout puts the two ends of a pair on consecutive cycles,
// which is what makes them meet here. Latency one cycle.
module strip_cluster
  import feb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       flush,
  input  logic       cluster_en,
  input  logic       remove_single,
  input  logic       in_valid,
  input  tdc_word_t  in_word,
  output logic       out_valid,
  output rec_t       out_rec
);
  logic      hv;
  tdc_word_t hw;
  logic      partner;
  assign partner = cluster_en && hv && in_valid && hw.ch < 6'd16 && in_word.ch == 6'd31 - hw.ch
                   && in_word.dev == hw.dev;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      hv <= 1'b0; hw <= '0; out_valid <= 1'b0; out_rec <= '0;
    end else begin
      out_valid <= 1'b0;
      out_rec   <= '0;
      if (partner) begin
        out_valid     <= 1'b1;
        out_rec.strip <= 1'b1;
        out_rec.w.dev <= hw.dev;
        out_rec.w.ch  <= {hw.dev, 4'(6'd15 - hw.ch)};
        out_rec.w.ts  <= hw.ts;
        out_rec.diff  <= hw.ts[15:0] - in_word.ts[15:0];
        hv <= 1'b0;
      end else begin
        if (hv && !(cluster_en && remove_single && hw.ch < 6'(N_ROC_CH))) begin
          out_valid <= 1'b1;
          out_rec.w <= hw;
        end
        hv <= in_valid;
        hw <= in_word;
      end
    end
  end
endmodule
