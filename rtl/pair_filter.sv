// pair_filter: channel pair filtering of the 16 strips of an FPGA.
//
// Strip s is read at both ends: the direct end on TDC channel 15-s and the
// return end on channel 16+s. For a strip whose enable bit is set, the first
// timestamp of the pair is held until the other end arrives; then
// diff = direct - return (low 16 bits) is checked against the strip's
// [diff_min, diff_max] range (unsigned). If it fits, both words leave together
// as one pair on the direct channel's slot (w0 direct, w1 return); if not, both
// are dropped. A held timestamp that waits more than max_wait bus cycles is
// dropped, and a second timestamp of the same end replaces the held one.
// Channels of strips not enabled, and the BC0 and Resync channels, pass
// straight through as single words. Latency one cycle.
// The document gives the matching, the range check and the joint write; it
// expects the direct end first, this design accepts either order. The wait
// limit reuses the readout's maximum time disparity.
module pair_filter
  import feb_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      flush,
  input  logic [1:0]                fpga_id,
  input  logic [15:0]               pair_en,
  input  logic [15:0][15:0]         diff_min,
  input  logic [15:0][15:0]         diff_max,
  input  logic [6:0]                max_wait,
  input  logic [N_CH-1:0]           in_valid,
  input  logic [N_CH-1:0][TS_W-1:0] in_ts,
  output ch_slot_t [N_CH-1:0]       out,
  output logic [15:0]               pairs_ok,
  output logic [15:0]               pairs_rejected
);
  logic [15:0]           pend_v, pend_dir;
  logic [15:0][TS_W-1:0] pend_ts;
  logic [15:0][6:0]      pend_age;

  function automatic tdc_word_t mk(input logic [1:0] dev, input logic [5:0] ch, input logic [TS_W-1:0] t);
    mk.dev = dev; mk.ch = ch; mk.ts = t;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      pend_v <= '0; pend_dir <= '0; pend_ts <= '0; pend_age <= '0; out <= '0;
      if (rst) begin pairs_ok <= '0; pairs_rejected <= '0; end
    end else begin
      for (int c = 0; c < N_CH; c++) begin
        out[c].valid <= in_valid[c];
        out[c].pair  <= 1'b0;
        out[c].w0    <= mk(fpga_id, 6'(c), in_ts[c]);
        out[c].w1    <= '0;
      end
      for (int s = 0; s < N_STRIP; s++) begin
        automatic int d = 15 - s;
        automatic int r = 16 + s;
        if (pair_en[s]) begin
          logic have_d, have_r;
          logic [TS_W-1:0] td, tr;
          logic [15:0] diff;
          out[d].valid <= 1'b0;
          out[r].valid <= 1'b0;
          have_d = in_valid[d] || (pend_v[s] && pend_dir[s]);
          have_r = in_valid[r] || (pend_v[s] && !pend_dir[s]);
          td = in_valid[d] ? in_ts[d] : pend_ts[s];
          tr = in_valid[r] ? in_ts[r] : pend_ts[s];
          diff = td[15:0] - tr[15:0];
          if (have_d && have_r) begin
            pend_v[s] <= 1'b0;
            if (diff >= diff_min[s] && diff <= diff_max[s]) begin
              out[d].valid <= 1'b1;
              out[d].pair  <= 1'b1;
              out[d].w0    <= mk(fpga_id, 6'(d), td);
              out[d].w1    <= mk(fpga_id, 6'(r), tr);
              pairs_ok <= pairs_ok + 1'b1;
            end else pairs_rejected <= pairs_rejected + 1'b1;
          end else if (in_valid[d] || in_valid[r]) begin
            pend_v[s]   <= 1'b1;
            pend_dir[s] <= in_valid[d];
            pend_ts[s]  <= in_valid[d] ? in_ts[d] : in_ts[r];
            pend_age[s] <= '0;
          end else if (pend_v[s]) begin
            if (pend_age[s] >= max_wait) pend_v[s] <= 1'b0;
            else pend_age[s] <= pend_age[s] + 1'b1;
          end
        end else pend_v[s] <= 1'b0;
      end
    end
  end
endmodule
