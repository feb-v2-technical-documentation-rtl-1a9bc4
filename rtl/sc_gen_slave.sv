// sc_gen_slave: "FPGA General Control" slow-control slave (base 0x00).
//
// Registers 0x00-0x0F are read/write scratch registers with no effect, used
// to test the slow-control path. 0x10 returns the FPGA ID (0 left, 1 middle,
// 2 right) in bits [1:0], 0x11 and 0x12 the major and minor firmware
// revision, 0x13-0x16 the 64-bit chip ID from most to least significant
// word. Other addresses read as zero. Read data appears the cycle after rd.
module sc_gen_slave
  import feb_pkg::*;
#(
  parameter logic [7:0]  BASE      = SC_GEN,
  parameter logic [15:0] REV_MAJOR = 16'd4,
  parameter logic [15:0] REV_MINOR = 16'd8
) (
  input  logic        clk,
  input  logic        rst,
  input  sc_req_t     req,
  output logic [15:0] rdata,
  input  logic [1:0]  fpga_id,
  input  logic [63:0] chip_id
);
  logic [15:0] test_reg [16];
  wire sel = (req.addr[15:8] == BASE);
  wire [7:0] a = req.addr[7:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 16; i++) test_reg[i] <= '0;
      rdata <= '0;
    end else begin
      if (sel && req.wr && a < 8'h10) test_reg[a[3:0]] <= req.wdata;
      rdata <= '0;
      if (sel && req.rd) begin
        unique case (a) inside
          [8'h00:8'h0F]: rdata <= test_reg[a[3:0]];
          8'h10:         rdata <= {14'd0, fpga_id};
          8'h11:         rdata <= REV_MAJOR;
          8'h12:         rdata <= REV_MINOR;
          8'h13:         rdata <= chip_id[63:48];
          8'h14:         rdata <= chip_id[47:32];
          8'h15:         rdata <= chip_id[31:16];
          8'h16:         rdata <= chip_id[15:0];
          default:       rdata <= '0;
        endcase
      end
    end
  end
endmodule
