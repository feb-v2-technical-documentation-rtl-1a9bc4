// sc_master: slow-control bus master of one FPGA.
//
// Takes operations from sc_frame_decoder and plays them on the SC bus, one
// word per cycle with an incrementing address: a write of n words is n write
// cycles, a read of n words is n read cycles. The OR of the slaves' read data
// is sampled on the cycle after each read and pushed into the reply FIFO
// (REPLY_DEPTH words), from which the uplink frame builder takes the words in
// order. A read stalls while the reply FIFO could overflow. ResetSCPath
// aborts the current operation and empties the reply FIFO.
module sc_master
  import feb_pkg::*;
#(
  parameter int REPLY_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        reset_sc,
  input  logic        op_valid,
  input  logic        op_we,
  input  logic [15:0] op_addr,
  input  logic [8:0]  op_len,
  input  logic [3:0][15:0] op_data,
  output logic        op_pop,
  output sc_req_t     req,
  input  logic [15:0] rdata,        // OR of the slaves' answers
  output logic        reply_valid,
  output logic [15:0] reply_data,
  input  logic        reply_pop
);
  logic [8:0] idx;
  logic       rd_d;
  logic       rf_full, rf_empty;
  logic [$clog2(REPLY_DEPTH+1)-1:0] rf_count;
  logic       can_read;

  assign can_read = (rf_count < ($clog2(REPLY_DEPTH+1))'(REPLY_DEPTH - 2));

  always_comb begin
    req    = '0;
    op_pop = 1'b0;
    if (op_valid) begin
      req.addr  = op_addr + 16'(idx);
      req.wdata = op_data[idx[1:0]];
      if (op_we) req.wr = 1'b1;
      else       req.rd = can_read;
      op_pop = (idx == op_len - 9'd1) && (op_we || can_read);
    end
  end

  always_ff @(posedge clk) begin
    if (rst || reset_sc) begin
      idx  <= '0;
      rd_d <= 1'b0;
    end else begin
      rd_d <= req.rd;
      if (op_pop) begin
        idx  <= '0;
      end else if (req.wr || req.rd) begin
        idx <= idx + 1'b1;
      end
    end
  end

  sync_fifo #(.W(16), .DEPTH(REPLY_DEPTH)) u_reply (
    .clk, .rst, .clear(reset_sc), .push(rd_d), .din(rdata), .pop(reply_pop),
    .dout(reply_data), .empty(rf_empty), .full(rf_full), .count(rf_count)
  );
  assign reply_valid = !rf_empty;
endmodule
