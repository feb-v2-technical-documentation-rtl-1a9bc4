// i2c_fpga_slave: I2C slave of one FPGA for the e-link settings that cannot
// travel over the GBT link itself (loopback, word alignment, test patterns).
//
// The slave answers the 7-bit device address I2C_BASE | fpga_id and holds
// 8-bit registers on an 8-bit register address:
//   0x00 [0] e-link loopback, [1] uplink debug pattern, [2] debug pattern
//        toggle, [3] TDC bus pattern injection, [4] slow-control bus pattern
//        injection                                              (reset 0x00)
//   0x01-0x0E uplink pattern of e-links 0..13                   (reset 0xAB)
//   0x0F [0] automatic word alignment request (reads 0, gives a one-cycle
//        align_req pulse)
//   0x10 [2:0] Rx bitslip bank 7A, [4] use it                    (reset 0x13)
//   0x11 [2:0] Rx bitslip bank 4A, [4] use it                    (reset 0x13)
//   0x12 [2:0] Tx bitslip of every uplink e-link                 (reset 0x04)
//   0x13 [0] force the transceivers in locked mode               (reset 0x00)
//   0x20 automatic word alignment result (read only, from align_result)
// Other addresses read 0xFF and ignore writes.
// Writing is START, address+W, register address, data bytes, STOP; reading is
// a write of the register address, then a (repeated) START, address+R and
// data bytes until the master answers NACK. The register pointer advances
// after each data byte.
// scl and sda are sampled with two flip-flops in the 120 MHz clock and their
// edges are detected there, which suits standard and fast mode. sda_oe = 1
// pulls the open-drain SDA line low: the slave changes it only a few cycles
// after SCL falls, and samples SDA on the rising edge of SCL.
// The register map and the 8-bit addressing follow the document; the device
// address, auto-increment and the read-only value of unused registers are
// this design's choices. The e-link logic driven by these registers belongs
// to the link transceivers and is outside this RTL.
module i2c_fpga_slave
  import feb_pkg::*;
#(
  parameter logic [6:0] I2C_BASE = 7'h20
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  fpga_id,
  input  logic        scl_in,
  input  logic        sda_in,
  output logic        sda_oe,
  output elink_cfg_t  cfg,
  output logic        align_req,
  input  logic [7:0]  align_result
);
  typedef enum logic [2:0] {IDLE, ADDR, ACK_OUT, REG, WDATA, RDATA, RACK} st_t;
  st_t        st, nxt;
  logic [1:0] scl_sync, sda_sync;
  logic       scl_d, sda_d;
  logic [7:0] sh, ptr;
  logic [3:0] bitcnt;
  logic       master_ack;

  logic [4:0]       ctrl;
  logic [7:0]       tx_slip, gxb;
  logic [7:0]       slip7a, slip4a;
  logic [13:0][7:0] pattern;

  wire scl   = scl_sync[1];
  wire sda   = sda_sync[1];
  wire rise  = scl && !scl_d;
  wire fall  = !scl && scl_d;
  wire start = scl && scl_d && sda_d && !sda;
  wire stop  = scl && scl_d && !sda_d && sda;
  wire [6:0] my_addr = I2C_BASE | {5'd0, fpga_id};

  function automatic logic [7:0] rd(input logic [7:0] a);
    if (a == 8'h00)                   return {3'd0, ctrl};
    else if (a >= 8'h01 && a <= 8'h0E) return pattern[a[3:0] - 4'd1];
    else if (a == 8'h0F)              return 8'h00;
    else if (a == 8'h10)              return slip7a;
    else if (a == 8'h11)              return slip4a;
    else if (a == 8'h12)              return tx_slip;
    else if (a == 8'h13)              return gxb;
    else if (a == 8'h20)              return align_result;
    else                              return 8'hFF;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      scl_sync <= 2'b11; sda_sync <= 2'b11; scl_d <= 1'b1; sda_d <= 1'b1;
    end else begin
      scl_sync <= {scl_sync[0], scl_in};
      sda_sync <= {sda_sync[0], sda_in};
      scl_d <= scl; sda_d <= sda;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= IDLE; nxt <= IDLE; sh <= '0; ptr <= '0; bitcnt <= '0;
      sda_oe <= 1'b0; master_ack <= 1'b0; align_req <= 1'b0;
      ctrl <= '0; slip7a <= 8'h13; slip4a <= 8'h13; tx_slip <= 8'h04; gxb <= 8'h00;
      pattern <= {14{8'hAB}};
    end else begin
      align_req <= 1'b0;
      if (start) begin
        st <= ADDR; bitcnt <= '0; sda_oe <= 1'b0;
      end else if (stop) begin
        st <= IDLE; sda_oe <= 1'b0;
      end else begin
        unique case (st)
          IDLE: ;
          ADDR, REG, WDATA: begin
            if (rise) begin
              sh <= {sh[6:0], sda};
              bitcnt <= bitcnt + 4'd1;
            end else if (fall && bitcnt == 4'd8) begin
              st <= ACK_OUT; sda_oe <= 1'b1;
              if (st == ADDR) begin
                if (sh[7:1] != my_addr) begin
                  st <= IDLE; sda_oe <= 1'b0;
                end
                nxt <= sh[0] ? RDATA : REG;
              end else if (st == REG) begin
                ptr <= sh; nxt <= WDATA;
              end else begin
                nxt <= WDATA;
                ptr <= ptr + 8'd1;
                if (ptr == 8'h00) ctrl <= sh[4:0];
                else if (ptr >= 8'h01 && ptr <= 8'h0E) pattern[ptr[3:0] - 4'd1] <= sh;
                else if (ptr == 8'h0F) align_req <= sh[0];
                else if (ptr == 8'h10) slip7a <= {3'd0, sh[4], 1'b0, sh[2:0]};
                else if (ptr == 8'h11) slip4a <= {3'd0, sh[4], 1'b0, sh[2:0]};
                else if (ptr == 8'h12) tx_slip <= {5'd0, sh[2:0]};
                else if (ptr == 8'h13) gxb <= {7'd0, sh[0]};
              end
            end
          end
          ACK_OUT: begin
            if (fall) begin
              bitcnt <= '0;
              st <= nxt;
              sda_oe <= 1'b0;
              if (nxt == RDATA) begin
                sh <= rd(ptr); ptr <= ptr + 8'd1;
                sda_oe <= !rd(ptr)[7];
              end
            end
          end
          RDATA: begin
            if (rise) bitcnt <= bitcnt + 4'd1;
            else if (fall) begin
              if (bitcnt == 4'd8) begin
                sda_oe <= 1'b0; st <= RACK;
              end else begin
                sh <= {sh[6:0], 1'b0};
                sda_oe <= !sh[6];
              end
            end
          end
          RACK: begin
            if (rise) master_ack <= !sda;
            else if (fall) begin
              if (master_ack) begin
                sh <= rd(ptr); ptr <= ptr + 8'd1;
                sda_oe <= !rd(ptr)[7];
                bitcnt <= '0; st <= RDATA;
              end else begin
                st <= IDLE;
              end
            end
          end
          default: st <= IDLE;
        endcase
      end
    end
  end

  assign cfg.loopback      = ctrl[0];
  assign cfg.dbg_pattern   = ctrl[1];
  assign cfg.dbg_toggle    = ctrl[2];
  assign cfg.tdc_pat_inj   = ctrl[3];
  assign cfg.sc_pat_inj    = ctrl[4];
  assign cfg.pattern       = pattern;
  assign cfg.rx_slip_7a    = slip7a[2:0];
  assign cfg.rx_slip_7a_en = slip7a[4];
  assign cfg.rx_slip_4a    = slip4a[2:0];
  assign cfg.rx_slip_4a_en = slip4a[4];
  assign cfg.tx_slip       = tx_slip[2:0];
  assign cfg.gxb_force     = gxb[0];
endmodule
