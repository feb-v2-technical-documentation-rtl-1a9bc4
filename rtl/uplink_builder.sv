// uplink_builder: builds the 112-bit uplink GBT frame (wide mode) once per
// frame_stb.
//
// Header (G4, bits [79:64]): [15] Resync loopback, [14] BC0 loopback,
// [13] frame overflow, [12:10] TDC readout overflow of FPGA 0,1,2, [6] SCFrame;
// for a data frame [5:4] IsStrip and [2:0] DataValid, for a slow-control frame
// [5:0] DataValid. Loopback and overflow flags report what happened since the
// previous frame.
// Data always has priority: if the concentrator's frame queue holds a frame
// it is sent. Otherwise, if slow-control read replies are staged, a
// slow-control frame is sent: two reply words per FPGA, FPGA 0 in G3/G2,
// FPGA 1 in G1/G0, FPGA 2 in G6/G5, DataValid bit 5-2k / 4-2k marking word N
// / N+1 of FPGA k. Otherwise an empty frame with only the header flags goes
// out. Replies are moved from the FPGAs' reply FIFOs into the staging
// registers in the cycles between frames. Field layout is the document's; bit
// order inside the header and the staging scheme are this design's.
module uplink_builder (
  input  logic               clk,
  input  logic               rst,
  input  logic               frame_stb,
  input  logic               resync,
  input  logic               bc0,
  input  logic               frame_ovf,
  input  logic [2:0]         tdc_ovf,
  input  logic [111:0]       q_head,
  input  logic               q_empty,
  output logic               q_pop,
  input  logic [2:0]         reply_valid,
  input  logic [2:0][15:0]   reply_data,
  output logic [2:0]         reply_pop,
  output logic [111:0]       tx_frame,
  output logic [1:0]         frame_type    // 0 empty, 1 data, 2 slow control
);
  logic       lb_rs, lb_b0, f_ovf;
  logic [2:0] t_ovf;
  logic [2:0][1:0][15:0] st_w;
  logic [2:0][1:0]       st_v;

  assign q_pop = frame_stb && !q_empty;

  always_comb begin
    reply_pop = '0;
    if (!frame_stb)
      for (int f = 0; f < 3; f++)
        if (reply_valid[f] && !st_v[f][1]) reply_pop[f] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lb_rs <= 1'b0; lb_b0 <= 1'b0; f_ovf <= 1'b0; t_ovf <= '0;
      st_w <= '0; st_v <= '0; tx_frame <= '0; frame_type <= '0;
    end else begin
      for (int f = 0; f < 3; f++)
        if (reply_pop[f]) begin
          if (!st_v[f][0]) begin st_w[f][0] <= reply_data[f]; st_v[f][0] <= 1'b1; end
          else begin st_w[f][1] <= reply_data[f]; st_v[f][1] <= 1'b1; end
        end
      if (frame_stb) begin
        logic [15:0] hdr;
        hdr = '0;
        hdr[15] = lb_rs | resync;
        hdr[14] = lb_b0 | bc0;
        hdr[13] = f_ovf | frame_ovf;
        hdr[12] = t_ovf[0] | tdc_ovf[0];
        hdr[11] = t_ovf[1] | tdc_ovf[1];
        hdr[10] = t_ovf[2] | tdc_ovf[2];
        lb_rs <= 1'b0; lb_b0 <= 1'b0; f_ovf <= 1'b0; t_ovf <= '0;
        if (!q_empty) begin
          tx_frame <= {q_head[111:80], hdr | q_head[79:64], q_head[63:0]};
          frame_type <= 2'd1;
        end else if (st_v != '0) begin
          hdr[6] = 1'b1;
          hdr[5:0] = {st_v[0][0], st_v[0][1], st_v[1][0], st_v[1][1], st_v[2][0], st_v[2][1]};
          tx_frame <= {st_w[2][0], st_w[2][1], hdr, st_w[0][0], st_w[0][1], st_w[1][0], st_w[1][1]};
          frame_type <= 2'd2;
          st_v <= '0;
        end else begin
          tx_frame <= {32'd0, hdr, 64'd0};
          frame_type <= 2'd0;
        end
      end else begin
        lb_rs <= lb_rs | resync;
        lb_b0 <= lb_b0 | bc0;
        f_ovf <= f_ovf | frame_ovf;
        t_ovf <= t_ovf | tdc_ovf;
      end
    end
  end
endmodule
