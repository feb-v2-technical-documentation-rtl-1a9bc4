// readout_buffer: data buffering, multiplexing and time disparity control of
// the TDC readout.
//
// Every channel slot has a one-entry holding register, stamped with the bus
// cycle of its arrival. Each cycle a constant-priority encoder (Resync, BC0,
// then the strips alternating direct/return ends, even strips before odd
// ones, feb_pkg::PRIO) moves the most urgent held entry into a FIFO of DEPTH
// entries. The FIFO feeds the FPGA's data bus, one 32-bit word per cycle; a
// strip pair takes two consecutive cycles (direct end, then return end).
// An entry whose age, in a holding register or at the head of the FIFO,
// exceeds max_disparity bus cycles is dropped, as is new data for a channel
// whose holding register is still full (and not stale); each drop is counted
// and raises the overflow pulse, which feeds the TDC_Readout_Overflow
// status flag. The age limit bounds the latency through the readout.
// The priority order, the FIFO and the disparity limit follow the document;
// the holding registers, FIFO depth and the drop rules are this design's.
module readout_buffer
  import feb_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                flush,
  input  logic [6:0]          max_disparity,
  input  ch_slot_t [N_CH-1:0] in,
  output logic                bus_valid,
  output tdc_word_t           bus_word,
  output logic                overflow,
  output logic [15:0]         dropped
);
  localparam int SW = 10;  // arrival stamp width
  typedef struct packed {
    logic          pair;
    tdc_word_t     w0;
    tdc_word_t     w1;
    logic [SW-1:0] stamp;
  } entry_t;

  logic [SW-1:0]  now;
  logic [N_CH-1:0] hold_v;
  entry_t         hold [N_CH];

  // priority encoder
  logic                   sel_v;
  logic [$clog2(N_CH)-1:0] sel_ch;
  always_comb begin
    sel_v  = 1'b0;
    sel_ch = '0;
    for (int i = N_CH - 1; i >= 0; i--)
      if (hold_v[PRIO[i]]) begin
        sel_v = 1'b1; sel_ch = ($clog2(N_CH))'(PRIO[i]);
      end
  end

  logic   f_push, f_pop, f_empty, f_full;
  entry_t f_out;
  assign f_push = sel_v && !f_full;

  sync_fifo #(.W($bits(entry_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst, .clear(flush), .push(f_push), .din(hold[sel_ch]), .pop(f_pop),
    .dout(f_out), .empty(f_empty), .full(f_full), .count()
  );

  logic second;   // emitting the return word of a pair
  logic too_old;
  assign too_old = (now - f_out.stamp) > SW'(max_disparity);
  assign f_pop   = !f_empty && (too_old || !f_out.pair || second);

  always_ff @(posedge clk) begin
    logic [5:0] ndrop;
    if (rst || flush) begin
      now <= '0; hold_v <= '0; second <= 1'b0; bus_valid <= 1'b0; bus_word <= '0;
      overflow <= 1'b0;
      if (rst) dropped <= '0;
    end else begin
      now <= now + 1'b1;
      ndrop = '0;
      for (int c = 0; c < N_CH; c++) begin
        logic freed, stale;
        freed = f_push && (sel_ch == c[$clog2(N_CH)-1:0]);
        stale = hold_v[c] && !freed && (now - hold[c].stamp) > SW'(max_disparity);
        if (stale) ndrop = ndrop + 1'b1;
        if (in[c].valid) begin
          if (hold_v[c] && !freed && !stale) ndrop = ndrop + 1'b1;
          else begin
            hold_v[c] <= 1'b1;
            hold[c]   <= '{pair: in[c].pair, w0: in[c].w0, w1: in[c].w1, stamp: now};
          end
        end else if (freed || stale) hold_v[c] <= 1'b0;
      end
      bus_valid <= 1'b0;
      if (!f_empty) begin
        if (too_old && !second) begin
          ndrop = ndrop + 1'b1;
        end else begin
          bus_valid <= 1'b1;
          bus_word  <= second ? f_out.w1 : f_out.w0;
          second    <= f_out.pair && !second;
        end
      end
      overflow <= (ndrop != 0);
      dropped  <= dropped + 16'(ndrop);
    end
  end
endmodule
