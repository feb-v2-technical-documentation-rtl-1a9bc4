// tb_remote_update_slave: CSR write and read through the register interface
// against an Avalon-MM slave model with wait states; the documented
// application-firmware jump sequence; register read-back, self-clearing
// launch bits and address decoding.
module tb_remote_update_slave;
  import feb_pkg::*;
  logic clk = 0, rst = 1;
  sc_req_t req = '0;
  logic [15:0] rdata;
  logic [2:0] csr_address;
  logic csr_write, csr_read, csr_waitrequest, csr_readdatavalid = 0;
  logic [31:0] csr_writedata, csr_readdata = 0;
  logic [31:0] regs [8];
  int checks = 0, failures = 0, nwrites = 0, wait_cnt = 0;

  remote_update_slave dut (.clk, .rst, .req, .rdata, .csr_address, .csr_write, .csr_read,
    .csr_writedata, .csr_waitrequest, .csr_readdata, .csr_readdatavalid);
  always #4 clk = ~clk;

  // slave model: 2 wait states on each access, read data one cycle later
  assign csr_waitrequest = (csr_write || csr_read) && wait_cnt < 2;
  always_ff @(posedge clk) begin
    csr_readdatavalid <= 1'b0;
    if (csr_write || csr_read) wait_cnt <= csr_waitrequest ? wait_cnt + 1 : 0;
    if (csr_write && !csr_waitrequest) begin regs[csr_address] <= csr_writedata; nwrites++; end
    if (csr_read && !csr_waitrequest) begin csr_readdata <= regs[csr_address]; csr_readdatavalid <= 1'b1; end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [15:0] a, d);
    @(negedge clk); req = '{wr: 1, rd: 0, addr: a, wdata: d}; @(negedge clk); req = '0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk); req = '{wr: 0, rd: 1, addr: a, wdata: 0}; @(negedge clk); req = '0; d = rdata;
  endtask
  task automatic csr_wr(input logic [31:0] v, input logic [2:0] a);
    wr(16'h2700, v[31:16]); wr(16'h2701, v[15:0]); wr(16'h2702, 16'(a)); wr(16'h2703, 16'h1);
    repeat (6) @(negedge clk);
  endtask
  task automatic csr_rd(input logic [2:0] a, output logic [31:0] v);
    logic [15:0] hi, lo;
    wr(16'h2702, 16'(a)); wr(16'h2704, 16'h1);
    repeat (6) @(negedge clk);
    rd(16'h2711, hi); rd(16'h2712, lo); v = {hi, lo};
  endtask

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    for (int i = 0; i < 8; i++) regs[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    csr_wr(32'h0080_0000, 3'h3);   // application firmware base address
    csr_wr(32'h1, 3'h4);           // firmware control bit
    csr_wr(32'h1, 3'h6);           // jump request
    check(regs[3] == 32'h0080_0000 && regs[4] == 1 && regs[6] == 1, "CSR writes reach the controller");
    check(nwrites == 3, "each launch bit gives exactly one write");
    regs[4] = 32'hCAFE_0001;
    csr_rd(3'h4, v);
    check(v == 32'hCAFE_0001, "CSR read data returned in 0x11/0x12");
    regs[6] = 32'h0000_00F3;
    csr_rd(3'h6, v);
    check(v == 32'h0000_00F3, "second CSR read returns the new address's data");
    // register read-back and self-clearing launch bits
    wr(16'h2700, 16'h1234); wr(16'h2701, 16'h5678); wr(16'h2702, 16'hFFFD);
    begin
      logic [15:0] d;
      rd(16'h2700, d); check(d == 16'h1234, "writedata MSB register reads back");
      rd(16'h2701, d); check(d == 16'h5678, "writedata LSB register reads back");
      rd(16'h2702, d); check(d == 16'h0005, "address register keeps 3 bits");
      rd(16'h2703, d); check(d == 16'h0000, "write launch bit clears itself");
      rd(16'h2704, d); check(d == 16'h0000, "read launch bit clears itself");
      rd(16'h2710, d); check(d == 16'h0000, "waitrequest low when idle");
      rd(16'h2602, d); check(d == 16'h0000, "another slave's address reads zero here");
      wr(16'h2603, 16'h1);
      repeat (6) @(negedge clk);
      check(nwrites == 3, "writes to another slave's base launch nothing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
