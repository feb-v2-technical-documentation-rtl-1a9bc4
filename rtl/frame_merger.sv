// frame_merger: merges the records of the three data buses into uplink data
// frames.
//
// Each bus has an input FIFO of IN_DEPTH records. Every bus cycle the heads
// are visited in round-robin order starting from a pointer that advances
// after each frame, so that no FPGA is favoured; up to three records are
// taken, one per bus, and placed in slots A (G3&G2), B (G1&G0) and C
// (G6&G5). A strip record needs its 16-bit difference in G6 (slot A) or G5
// (slot B), so when a strip is among the records slot C stays empty and the
// third record waits. The frame (112 bits, with IsStrip and DataValid set in
// the G4 header and the status flags left for the uplink builder) is emitted
// at once, full or not. A record arriving at a full input FIFO is lost and
// raises overflow. The frame formats are the document's; the round-robin
// policy and emitting partly filled frames are this design's choices.
// Header bits [79:70] and [67] (status flags and reserved) are always zero
// here; the uplink builder fills in the flags.
module frame_merger
  import feb_pkg::*;
#(
  parameter int IN_DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             flush,
  input  logic [2:0]       in_valid,
  input  rec_t [2:0]       in_rec,
  output logic             frame_valid,
  output logic [111:0]     frame,
  output logic             overflow
);
  rec_t [2:0] head;
  logic [2:0] empty, full, pop;
  logic [1:0] rr;

  for (genvar b = 0; b < 3; b++) begin : g_in
    sync_fifo #(.W($bits(rec_t)), .DEPTH(IN_DEPTH)) u_fifo (
      .clk, .rst, .clear(flush), .push(in_valid[b]), .din(in_rec[b]), .pop(pop[b]),
      .dout(head[b]), .empty(empty[b]), .full(full[b]), .count()
    );
  end

  // choose records
  logic [1:0] n;
  rec_t [2:0] pick;
  always_comb begin
    logic any_strip;
    n = '0; pick = '0; pop = '0; any_strip = 1'b0;
    for (int k = 0; k < 3; k++) begin
      automatic int b = (int'(rr) + k) % 3;
      if (!empty[b]) begin
        if (!(n == 2'd2 && (any_strip || head[b].strip))) begin
          pick[n] = head[b];
          any_strip = any_strip || head[b].strip;
          pop[b] = 1'b1;
          n = n + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      rr <= '0; frame_valid <= 1'b0; frame <= '0; overflow <= 1'b0;
    end else begin
      overflow <= |(in_valid & full & ~pop);
      frame_valid <= (n != 0);
      frame <= '0;
      if (n != 0) begin
        rr <= (rr == 2'd2) ? 2'd0 : rr + 1'b1;
        frame[63:32] <= pick[0].w;
        frame[31:0]  <= pick[1].w;
        frame[69]    <= pick[0].strip;      // IsStrip, slot A
        frame[68]    <= pick[1].strip;      // IsStrip, slot B
        frame[66:64] <= (n == 2'd1) ? 3'b100 : (n == 2'd2) ? 3'b110 : 3'b111;
        if (n == 2'd3) frame[111:80] <= pick[2].w;
        else begin
          frame[111:96] <= pick[0].strip ? pick[0].diff : 16'd0;
          frame[95:80]  <= pick[1].strip ? pick[1].diff : 16'd0;
        end
      end
    end
  end
endmodule
