// delay_buffer: configurable delay on the middle FPGA's data bus.
//
// The middle FPGA's own readout reaches the concentrator without crossing an
// inter-FPGA link, so it is delayed to line up with the data of the left and
// right FPGAs. A circular buffer of DEPTH bus beats is written every cycle;
// the output is the beat written "delay" cycles earlier, registered, so the
// total latency is delay+1 cycles (delay < DEPTH). FlushDataPath empties it;
// the delay is meant to be set before data taking, since changing it with
// data in flight repeats or skips beats until a flush.
// The document gives the purpose and the 6-bit delay register.
module delay_buffer
  import feb_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       flush,
  input  logic [$clog2(DEPTH)-1:0] delay,
  input  logic       in_valid,
  input  tdc_word_t  in_word,
  output logic       out_valid,
  output tdc_word_t  out_word
);
  localparam int AW = $clog2(DEPTH);
  logic [DEPTH-1:0] v;
  tdc_word_t        mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  assign rp = wp - delay;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      v <= '0; wp <= '0; out_valid <= 1'b0; out_word <= '0;
    end else begin
      v[wp]   <= in_valid;
      mem[wp] <= in_word;
      wp <= wp + 1'b1;
      if (delay == 0) begin
        out_valid <= in_valid; out_word <= in_word;
      end else begin
        out_valid <= v[rp]; out_word <= mem[rp];
      end
    end
  end
endmodule
