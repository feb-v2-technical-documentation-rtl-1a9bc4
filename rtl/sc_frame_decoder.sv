// sc_frame_decoder: slow-control request/payload frame state machine of one
// FPGA.
//
// The first frame addressed to the FPGA is a request frame:
//   G3 = {7'b reserved, WrReq, BurstAdditionnalWords}, G2 = Address,
//   G1 = WrData0, G0 = WrData1.
// A read request (WrReq=0) becomes one read operation of Burst+1 words. A
// write request carries up to two words; if Burst+1 > 2 the following frames
// addressed to this FPGA are payload frames of up to four words (G3..G0),
// until all Burst+1 words have arrived; the frame after that is a request
// again. Frames for other FPGAs, or no frame, may come in between.
// Each frame becomes at most one operation, pushed into a FIFO of depth
// OP_DEPTH: {we, address of its first word, number of words (1..4, or 1..256
// for a read), up to four data words}. If the FIFO is full the operation is
// lost (and the overflowed counter is bumped); ResetSCPath clears the FIFO
// and returns the state machine to the request state.
// The operation FIFO's fill count is not needed and is left open.
module sc_frame_decoder
  import feb_pkg::*;
#(
  parameter int OP_DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        reset_sc,     // ResetSCPath fast control
  input  logic        frame_valid,  // payload for this FPGA
  input  logic [63:0] payload,      // G3..G0
  // operation stream to the bus master
  output logic        op_valid,
  output logic        op_we,
  output logic [15:0] op_addr,
  output logic [8:0]  op_len,       // number of words, 1..256
  output logic [3:0][15:0] op_data, // [0] is the first word
  input  logic        op_pop,
  output logic [15:0] lost_ops
);
  typedef struct packed {
    logic             we;
    logic [15:0]      addr;
    logic [8:0]       len;
    logic [3:0][15:0] data;
  } op_t;

  logic        in_burst;      // waiting for payload frames
  logic [8:0]  remaining;     // words still expected
  logic [15:0] next_addr;
  op_t         op_in, op_out;
  logic        push, empty, full;

  always_comb begin
    op_in = '0;
    push  = 1'b0;
    if (frame_valid) begin
      push = 1'b1;
      if (!in_burst) begin
        op_in.we   = payload[56];
        op_in.addr = payload[47:32];
        if (payload[56]) begin
          op_in.len     = ({1'b0, payload[55:48]} >= 9'd1) ? 9'd2 : 9'd1;
          op_in.data[0] = payload[31:16];
          op_in.data[1] = payload[15:0];
        end else begin
          op_in.len = {1'b0, payload[55:48]} + 9'd1;
        end
      end else begin
        op_in.we      = 1'b1;
        op_in.addr    = next_addr;
        op_in.len     = (remaining > 9'd4) ? 9'd4 : remaining;
        op_in.data[0] = payload[63:48];
        op_in.data[1] = payload[47:32];
        op_in.data[2] = payload[31:16];
        op_in.data[3] = payload[15:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || reset_sc) begin
      in_burst  <= 1'b0;
      remaining <= '0;
      next_addr <= '0;
      lost_ops  <= '0;
    end else if (frame_valid) begin
      if (full) lost_ops <= lost_ops + 1'b1;
      if (!in_burst) begin
        if (payload[56] && payload[55:48] > 8'd1) begin
          in_burst  <= 1'b1;
          remaining <= {1'b0, payload[55:48]} - 9'd1;  // total minus the two sent
          next_addr <= payload[47:32] + 16'd2;
        end
      end else begin
        if (remaining <= 9'd4) in_burst <= 1'b0;
        remaining <= (remaining > 9'd4) ? remaining - 9'd4 : 9'd0;
        next_addr <= next_addr + 16'd4;
      end
    end
  end

  sync_fifo #(.W($bits(op_t)), .DEPTH(OP_DEPTH)) u_fifo (
    .clk, .rst, .clear(reset_sc), .push, .din(op_in), .pop(op_pop),
    .dout(op_out), .empty, .full, .count()
  );

  assign op_valid = !empty;
  assign op_we    = op_out.we;
  assign op_addr  = op_out.addr;
  assign op_len   = op_out.len;
  assign op_data  = op_out.data;
endmodule
