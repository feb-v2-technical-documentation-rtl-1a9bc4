// dp_ctrl_slave: "Data Path Control" slow-control slave (base 0x29).
//
//   0x00 [5:0] middle FPGA bus extra delay (reset 0x0D)
//   0x01 [5:0] output frame queue maximum size (reset 0x3F)
//   0x02 [0]   strip clustering enable
//   0x03 [2:0] remove single channel data, one bit per FPGA
//   0x04 [6:0] readout maximum time disparity (reset 0x7F)
//   0x05 [5:0] channel dead time
//   0x06 [15:0] pair filtering enable, one bit per strip
//   0x08-0x17 pair timestamp difference minimum, strips 0-15 (reset 0)
//   0x18-0x27 pair timestamp difference maximum, strips 0-15 (reset 0xFFFF)
//   0x28 [3:0] retrigger mitigation counter threshold
//   0x29 [7:0] retrigger mitigation counter decrement time
//   0x2A [7:0] retrigger mitigation PETIROC mute duration
// Times are in 120 MHz bus cycles. Registers 0-3 only matter in the middle
// FPGA. Addresses, widths and reset values are the documented ones.
module dp_ctrl_slave
  import feb_pkg::*;
#(
  parameter logic [7:0] BASE = SC_DATAPATH
) (
  input  logic        clk,
  input  logic        rst,
  input  sc_req_t     req,
  output logic [15:0] rdata,
  output dp_cfg_t     cfg
);
  wire       sel = (req.addr[15:8] == BASE);
  wire [7:0] a   = req.addr[7:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg <= '0;
      cfg.mid_delay     <= 6'h0D;
      cfg.queue_max     <= 6'h3F;
      cfg.max_disparity <= 7'h7F;
      for (int s = 0; s < 16; s++) cfg.diff_max[s] <= 16'hFFFF;
      rdata <= '0;
    end else begin
      if (sel && req.wr) begin
        unique case (a) inside
          8'h00: cfg.mid_delay     <= req.wdata[5:0];
          8'h01: cfg.queue_max     <= req.wdata[5:0];
          8'h02: cfg.cluster_en    <= req.wdata[0];
          8'h03: cfg.remove_single <= req.wdata[2:0];
          8'h04: cfg.max_disparity <= req.wdata[6:0];
          8'h05: cfg.dead_time     <= req.wdata[5:0];
          8'h06: cfg.pair_en       <= req.wdata;
          [8'h08:8'h17]: cfg.diff_min[a[3:0] - 4'h8] <= req.wdata;
          [8'h18:8'h27]: cfg.diff_max[a[3:0] - 4'h8] <= req.wdata;
          8'h28: cfg.retrig_thr    <= req.wdata[3:0];
          8'h29: cfg.retrig_dec    <= req.wdata[7:0];
          8'h2A: cfg.retrig_mute   <= req.wdata[7:0];
          default: ;
        endcase
      end
      rdata <= '0;
      if (sel && req.rd) begin
        unique case (a) inside
          8'h00: rdata <= {10'd0, cfg.mid_delay};
          8'h01: rdata <= {10'd0, cfg.queue_max};
          8'h02: rdata <= {15'd0, cfg.cluster_en};
          8'h03: rdata <= {13'd0, cfg.remove_single};
          8'h04: rdata <= {9'd0, cfg.max_disparity};
          8'h05: rdata <= {10'd0, cfg.dead_time};
          8'h06: rdata <= cfg.pair_en;
          [8'h08:8'h17]: rdata <= cfg.diff_min[a[3:0] - 4'h8];
          [8'h18:8'h27]: rdata <= cfg.diff_max[a[3:0] - 4'h8];
          8'h28: rdata <= {12'd0, cfg.retrig_thr};
          8'h29: rdata <= {8'd0, cfg.retrig_dec};
          8'h2A: rdata <= {8'd0, cfg.retrig_mute};
          default: rdata <= '0;
        endcase
      end
    end
  end
endmodule
