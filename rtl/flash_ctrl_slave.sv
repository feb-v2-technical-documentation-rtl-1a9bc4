// flash_ctrl_slave: "Serial Flash Control" slow-control slave (base 0x26).
//
// Bridges slow-control registers to the two Avalon-MM ports of the serial
// flash controller (a vendor block driving the EPCQ flash):
//  CSR port (protection, erase, status)
//   0x00/0x01 csr_writedata [31:16]/[15:0]   0x02 [5:0] csr_address
//   0x03 [0] writing 1 launches a CSR write   0x04 [0] writing 1 launches a read
//   0x80 [0] csr_waitrequest   0x81/0x82 last csr_readdata [31:16]/[15:0]
//  memory port (32-bit words, bursts of up to 32 words)
//   0x05 [6:0] burst count   0x06 [3:0] byte enable
//   0x07+2k/0x08+2k write word k [31:16]/[15:0] (k = 0..31)
//   0x47 [5:0] word address [21:16]   0x48 word address [15:0]
//   0x49 [0] writing 1 launches a burst write, 0x4A [0] a burst read
//   0x83 [0] mem_waitrequest   0x84+2k/0x85+2k read word k [31:16]/[15:0]
// A burst write presents the burst count's words one after another, each
// held until waitrequest is low. A burst read issues one read command and
// stores the words returned with readdatavalid, in order. Launch bits clear
// themselves. The register map is the document's; the Avalon-MM burst
// protocol is this design's assumption about the vendor ports.
module flash_ctrl_slave
  import feb_pkg::*;
#(
  parameter logic [7:0] BASE = SC_FLASH
) (
  input  logic        clk,
  input  logic        rst,
  input  sc_req_t     req,
  output logic [15:0] rdata,
  // CSR port
  output logic [5:0]  csr_address,
  output logic        csr_write,
  output logic        csr_read,
  output logic [31:0] csr_writedata,
  input  logic        csr_waitrequest,
  input  logic [31:0] csr_readdata,
  input  logic        csr_readdatavalid,
  // memory port
  output logic [21:0] mem_address,
  output logic        mem_write,
  output logic        mem_read,
  output logic [6:0]  mem_burstcount,
  output logic [3:0]  mem_byteenable,
  output logic [31:0] mem_writedata,
  input  logic        mem_waitrequest,
  input  logic [31:0] mem_readdata,
  input  logic        mem_readdatavalid
);
  wire       sel = (req.addr[15:8] == BASE);
  wire [7:0] a   = req.addr[7:0];
  logic [31:0] cwd, crq;
  logic [5:0]  cad;
  logic [6:0]  burst;
  logic [3:0]  be;
  logic [31:0] wbuf [32];
  logic [31:0] rbuf [32];
  logic [21:0] maddr;
  logic [6:0]  widx, ridx;
  logic        reading;

  wire c_wr = sel && req.wr && a == 8'h03 && req.wdata[0];
  wire c_rd = sel && req.wr && a == 8'h04 && req.wdata[0];
  wire m_wr = sel && req.wr && a == 8'h49 && req.wdata[0];
  wire m_rd = sel && req.wr && a == 8'h4A && req.wdata[0];
  wire [4:0] wk = 5'((a - 8'h07) >> 1);
  wire [4:0] rk = 5'((a - 8'h84) >> 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      cwd <= '0; cad <= '0; burst <= '0; be <= '0; maddr <= '0; rdata <= '0;
    end else begin
      if (sel && req.wr) begin
        unique case (a) inside
          8'h00: cwd[31:16] <= req.wdata;
          8'h01: cwd[15:0]  <= req.wdata;
          8'h02: cad   <= req.wdata[5:0];
          8'h05: burst <= req.wdata[6:0];
          8'h06: be    <= req.wdata[3:0];
          [8'h07:8'h46]: if (a[0]) wbuf[wk][31:16] <= req.wdata;
                         else      wbuf[wk][15:0]  <= req.wdata;
          8'h47: maddr[21:16] <= req.wdata[5:0];
          8'h48: maddr[15:0]  <= req.wdata;
          default: ;
        endcase
      end
      rdata <= '0;
      if (sel && req.rd) begin
        unique case (a) inside
          8'h00: rdata <= cwd[31:16];
          8'h01: rdata <= cwd[15:0];
          8'h02: rdata <= {10'd0, cad};
          8'h05: rdata <= {9'd0, burst};
          8'h06: rdata <= {12'd0, be};
          [8'h07:8'h46]: rdata <= a[0] ? wbuf[wk][31:16] : wbuf[wk][15:0];
          8'h47: rdata <= {10'd0, maddr[21:16]};
          8'h48: rdata <= maddr[15:0];
          8'h80: rdata <= {15'd0, csr_waitrequest};
          8'h81: rdata <= crq[31:16];
          8'h82: rdata <= crq[15:0];
          8'h83: rdata <= {15'd0, mem_waitrequest};
          [8'h84:8'hC3]: rdata <= a[0] ? rbuf[rk][15:0] : rbuf[rk][31:16];
          default: rdata <= '0;
        endcase
      end
    end
  end

  avl_csr_master #(.AW(6)) u_csr (
    .clk, .rst, .wr_start(c_wr), .rd_start(c_rd), .addr_in(cad), .wdata_in(cwd),
    .address(csr_address), .write(csr_write), .read(csr_read), .writedata(csr_writedata),
    .waitrequest(csr_waitrequest), .readdata(csr_readdata), .readdatavalid(csr_readdatavalid),
    .rdata_q(crq)
  );

  // memory burst engine
  assign mem_writedata = wbuf[widx[4:0]];
  always_ff @(posedge clk) begin
    if (rst) begin
      mem_write <= 1'b0; mem_read <= 1'b0; mem_address <= '0; mem_burstcount <= '0;
      mem_byteenable <= '0; widx <= '0; ridx <= '0; reading <= 1'b0;
    end else begin
      if (mem_write && !mem_waitrequest) begin
        if (widx + 1 >= mem_burstcount) mem_write <= 1'b0;
        widx <= widx + 1'b1;
      end
      if (mem_read && !mem_waitrequest) mem_read <= 1'b0;
      if (reading && mem_readdatavalid) begin
        rbuf[ridx[4:0]] <= mem_readdata;
        ridx <= ridx + 1'b1;
        if (ridx + 1 >= mem_burstcount) reading <= 1'b0;
      end
      if (!mem_write && !mem_read && !reading) begin
        if (m_wr && burst != 0) begin
          mem_write <= 1'b1; widx <= '0;
          mem_address <= maddr; mem_burstcount <= burst; mem_byteenable <= be;
        end else if (m_rd && burst != 0) begin
          mem_read <= 1'b1; reading <= 1'b1; ridx <= '0;
          mem_address <= maddr; mem_burstcount <= burst; mem_byteenable <= be;
        end
      end
    end
  end
endmodule
