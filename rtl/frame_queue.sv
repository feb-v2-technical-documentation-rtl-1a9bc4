// frame_queue: output frame queue of the data concentrator (latency
// regulation).
//
// Written by the frame merger at the 120 MHz bus rate, read once per GBT
// frame (40 MHz). It holds at most max_size frames (1..DEPTH-1): a frame
// written while it is at that limit pushes out the oldest frame, which is
// lost, and raises overflow for a cycle. The queueing latency is thus bounded
// by max_size GBT frames. Read side: first-word-fall-through (head, empty,
// pop). The document gives the limit register and the drop-oldest rule.
module frame_queue #(
  parameter int DEPTH = 64,
  parameter int W     = 112
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         flush,
  input  logic [$clog2(DEPTH)-1:0] max_size,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] head,
  output logic         empty,
  output logic         overflow,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_pop, drop;
  logic [AW:0]   lim, after_pop;

  assign empty     = (count == 0);
  assign head      = mem[rp];
  assign do_pop    = pop && !empty;
  assign lim       = (max_size == 0) ? (AW+1)'(1) : {1'b0, max_size};
  assign after_pop = count - (do_pop ? 1'b1 : 1'b0);
  assign drop      = push && (after_pop >= lim);

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else begin
      overflow <= drop;
      if (push) begin
        mem[wp] <= din;
        wp <= wp + 1'b1;
      end
      rp    <= rp + (AW)'(do_pop) + (AW)'(drop);
      count <= after_pop + (push ? 1'b1 : 1'b0) - (drop ? 1'b1 : 1'b0);
    end
  end
endmodule
