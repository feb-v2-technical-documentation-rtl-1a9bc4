// tb_flash_ctrl_slave: CSR write/read and 32-word burst write and read of the
// memory interface, following the documented register sequences, against an
// Avalon-MM flash-controller model with wait states.
module tb_flash_ctrl_slave;
  import feb_pkg::*;
  logic clk = 0, rst = 1;
  sc_req_t req = '0;
  logic [15:0] rdata;
  logic [5:0]  csr_address;
  logic        csr_write, csr_read, csr_waitrequest, csr_readdatavalid = 0;
  logic [31:0] csr_writedata, csr_readdata = 0;
  logic [21:0] mem_address;
  logic        mem_write, mem_read, mem_waitrequest, mem_readdatavalid = 0;
  logic [6:0]  mem_burstcount;
  logic [3:0]  mem_byteenable;
  logic [31:0] mem_writedata, mem_readdata = 0;
  logic [31:0] csr [64];
  logic [31:0] flash [logic [21:0]];
  int checks = 0, failures = 0, ws = 0, wbeat = 0;
  logic [21:0] rd_addr;
  int rd_left = 0;

  flash_ctrl_slave dut (.clk, .rst, .req, .rdata, .csr_address, .csr_write, .csr_read,
    .csr_writedata, .csr_waitrequest, .csr_readdata, .csr_readdatavalid, .mem_address, .mem_write,
    .mem_read, .mem_burstcount, .mem_byteenable, .mem_writedata, .mem_waitrequest, .mem_readdata,
    .mem_readdatavalid);
  always #4 clk = ~clk;

  // controller model: every second cycle of an access is a wait state
  assign csr_waitrequest = 1'b0;
  assign mem_waitrequest = (mem_write || mem_read) && ws[0];
  always_ff @(posedge clk) begin
    csr_readdatavalid <= 1'b0;
    mem_readdatavalid <= 1'b0;
    ws <= ws + 1;
    if (csr_write) csr[csr_address] <= csr_writedata;
    if (csr_read) begin csr_readdata <= csr[csr_address]; csr_readdatavalid <= 1'b1; end
    if (mem_write && !mem_waitrequest) begin
      flash[mem_address + 22'(wbeat)] = mem_writedata;
      wbeat = (wbeat + 1 == mem_burstcount) ? 0 : wbeat + 1;
    end
    if (mem_read && !mem_waitrequest) begin rd_addr <= mem_address; rd_left <= mem_burstcount; end
    else if (rd_left > 0 && ws[1]) begin
      mem_readdata <= flash.exists(rd_addr) ? flash[rd_addr] : 32'hFFFF_FFFF;
      mem_readdatavalid <= 1'b1;
      rd_addr <= rd_addr + 1;
      rd_left <= rd_left - 1;
    end
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

  function automatic logic [31:0] pattern(input int k);
    return 32'h1000_0000 * 32'(k % 16) + 32'(k * 32'h0101_0101 + 7);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] hi, lo;
    for (int i = 0; i < 64; i++) csr[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // CSR write 0x1001 to address 0x7
    wr(16'h2600, 16'h0000); wr(16'h2601, 16'h1001); wr(16'h2602, 16'h0007); wr(16'h2603, 16'h0001);
    repeat (4) @(negedge clk);
    check(csr[7] == 32'h1001, "CSR write");
    csr[9] = 32'h00AB_CDEF;
    wr(16'h2602, 16'h0009); wr(16'h2604, 16'h0001);
    repeat (4) @(negedge clk);
    rd(16'h2681, hi); rd(16'h2682, lo);
    check({hi, lo} == 32'h00AB_CDEF, "CSR read");
    // burst write of 32 words at word address 0x200000
    wr(16'h2605, 16'd32); wr(16'h2606, 16'hF);
    for (int k = 0; k < 32; k++) begin
      wr(16'h2607 + 16'(2 * k), pattern(k)[31:16]); wr(16'h2608 + 16'(2 * k), pattern(k)[15:0]);
    end
    wr(16'h2647, 16'h0020); wr(16'h2648, 16'h0000); wr(16'h2649, 16'h0001);
    repeat (100) @(negedge clk);
    for (int k = 0; k < 32; k++)
      check(flash.exists(22'h200000 + 22'(k)) && flash[22'h200000 + 22'(k)] == pattern(k),
            $sformatf("flash word %0d written", k));
    check(mem_byteenable == 4'hF, "byte enable");
    // burst read back
    wr(16'h264A, 16'h0001);
    repeat (200) @(negedge clk);
    for (int k = 0; k < 32; k++) begin
      rd(16'h2684 + 16'(2 * k), hi); rd(16'h2685 + 16'(2 * k), lo);
      check({hi, lo} == pattern(k), $sformatf("read word %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
