// tb_sc_gen_slave: scratch registers, identification registers, address
// decoding against another slave's base.
module tb_sc_gen_slave;
  import feb_pkg::*;
  logic clk = 0, rst = 1;
  sc_req_t req = '0;
  logic [15:0] rdata;
  int checks = 0, failures = 0;

  sc_gen_slave dut (.clk, .rst, .req, .rdata, .fpga_id(2'd2), .chip_id(64'h0123_4567_89AB_CDEF));
  always #4 clk = ~clk;

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

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 16; i++) wr(16'(i), 16'(16'hA000 + i * 17));
    wr(16'h0105, 16'hFFFF);   // other slave: must not touch register 5
    for (int i = 0; i < 16; i++) begin
      rd(16'(i), d); check(d == 16'(16'hA000 + i * 17), $sformatf("test reg %0d", i));
    end
    rd(16'h0010, d); check(d == 16'd2, "FPGA ID");
    rd(16'h0011, d); check(d == 16'd4, "major revision");
    rd(16'h0012, d); check(d == 16'd8, "minor revision");
    rd(16'h0013, d); check(d == 16'h0123, "chip id 63:48");
    rd(16'h0016, d); check(d == 16'hCDEF, "chip id 15:0");
    rd(16'h0110, d); check(d == 16'h0, "other slave's address reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
