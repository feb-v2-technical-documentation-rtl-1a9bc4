// remote_update_slave: "Remote Update Control" slow-control slave (base 0x27).
//
// Bridges slow-control registers to the CSR port of the FPGA's remote update
// controller (a vendor block), which can jump from the golden to the
// application firmware:
//   0x00/0x01 csr_writedata [31:16]/[15:0]   0x02 [2:0] csr_address
//   0x03 [0] writing 1 launches a CSR write   0x04 [0] writing 1 launches a read
//   0x10 [0] csr_waitrequest   0x11/0x12 last csr_readdata [31:16]/[15:0]
// The write/read bits clear themselves. Register map from the document; the
// Avalon-MM handshake is this design's assumption about the vendor port.
module remote_update_slave
  import feb_pkg::*;
#(
  parameter logic [7:0] BASE = SC_REMOTE
) (
  input  logic        clk,
  input  logic        rst,
  input  sc_req_t     req,
  output logic [15:0] rdata,
  output logic [2:0]  csr_address,
  output logic        csr_write,
  output logic        csr_read,
  output logic [31:0] csr_writedata,
  input  logic        csr_waitrequest,
  input  logic [31:0] csr_readdata,
  input  logic        csr_readdatavalid
);
  wire       sel = (req.addr[15:8] == BASE);
  wire [7:0] a   = req.addr[7:0];
  logic [31:0] wd, rq;
  logic [2:0]  ad;
  wire wr_start = sel && req.wr && a == 8'h03 && req.wdata[0];
  wire rd_start = sel && req.wr && a == 8'h04 && req.wdata[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      wd <= '0; ad <= '0; rdata <= '0;
    end else begin
      if (sel && req.wr) begin
        unique case (a)
          8'h00: wd[31:16] <= req.wdata;
          8'h01: wd[15:0]  <= req.wdata;
          8'h02: ad        <= req.wdata[2:0];
          default: ;
        endcase
      end
      rdata <= '0;
      if (sel && req.rd) begin
        unique case (a)
          8'h00: rdata <= wd[31:16];
          8'h01: rdata <= wd[15:0];
          8'h02: rdata <= {13'd0, ad};
          8'h10: rdata <= {15'd0, csr_waitrequest};
          8'h11: rdata <= rq[31:16];
          8'h12: rdata <= rq[15:0];
          default: rdata <= '0;
        endcase
      end
    end
  end

  avl_csr_master #(.AW(3)) u_csr (
    .clk, .rst, .wr_start, .rd_start, .addr_in(ad), .wdata_in(wd),
    .address(csr_address), .write(csr_write), .read(csr_read), .writedata(csr_writedata),
    .waitrequest(csr_waitrequest), .readdata(csr_readdata), .readdatavalid(csr_readdatavalid),
    .rdata_q(rq)
  );
endmodule
