// avl_csr_master: single-word Avalon-MM master used by the slow-control
// slaves that front the flash and remote-update controllers.
//
// A one-cycle wr_start (or rd_start) raises write (or read) with the given
// address and data and holds it until the slave drops waitrequest. Read data
// is taken when readdatavalid is high and kept in rdata_q until the next
// read. AW is the address width.
module avl_csr_master #(
  parameter int AW = 6
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr_start,
  input  logic          rd_start,
  input  logic [AW-1:0] addr_in,
  input  logic [31:0]   wdata_in,
  output logic [AW-1:0] address,
  output logic          write,
  output logic          read,
  output logic [31:0]   writedata,
  input  logic          waitrequest,
  input  logic [31:0]   readdata,
  input  logic          readdatavalid,
  output logic [31:0]   rdata_q
);
  always_ff @(posedge clk) begin
    if (rst) begin
      write <= 1'b0; read <= 1'b0; address <= '0; writedata <= '0; rdata_q <= '0;
    end else begin
      if ((write || read) && !waitrequest) begin
        write <= 1'b0; read <= 1'b0;
      end
      if (!write && !read) begin
        if (wr_start) begin
          write <= 1'b1; address <= addr_in; writedata <= wdata_in;
        end else if (rd_start) begin
          read <= 1'b1; address <= addr_in;
        end
      end
      if (readdatavalid) rdata_q <= readdata;
    end
  end
endmodule
