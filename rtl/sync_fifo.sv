// sync_fifo: single-clock first-word-fall-through FIFO.
//
// dout shows the oldest entry whenever empty is low; pop removes it. A push
// when full is ignored unless the same cycle pops (callers check full). clear empties the FIFO in one
// cycle (used by the FlushDataPath and ResetSCPath fast controls). Storage
// is a plain array, count is the number of stored entries.
module sync_fifo #(
  parameter int W     = 16,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign empty = (count == 0);
  assign full  = (count == DEPTH);
  assign dout  = mem[rp];

  wire do_push = push && (!full || pop);   // a full FIFO accepts a word in the cycle it pops one
  wire do_pop  = pop && !empty;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) begin
        mem[wp] <= din;
        wp <= inc(wp);
      end
      if (do_pop) rp <= inc(rp);
      count <= count + (do_push ? 1'b1 : 1'b0) - (do_pop ? 1'b1 : 1'b0);
    end
  end
endmodule
