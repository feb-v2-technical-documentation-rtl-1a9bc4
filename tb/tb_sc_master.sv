// tb_sc_master: bus master writes and burst reads against a register-file
// model of the slaves; read data comes back in order through the reply FIFO.
module tb_sc_master;
  import feb_pkg::*;
  logic clk = 0, rst = 1, reset_sc = 0;
  logic op_valid = 0, op_we = 0, op_pop;
  logic [15:0] op_addr = 0;
  logic [8:0] op_len = 0;
  logic [3:0][15:0] op_data = '0;
  sc_req_t req;
  logic [15:0] rdata, reply_data;
  logic reply_valid, reply_pop = 0;
  logic [15:0] mem [256];
  int checks = 0, failures = 0, wr_cycles = 0;

  sc_master #(.REPLY_DEPTH(16)) dut (.clk, .rst, .reset_sc, .op_valid, .op_we, .op_addr, .op_len,
    .op_data, .op_pop, .req, .rdata, .reply_valid, .reply_data, .reply_pop);
  always #4 clk = ~clk;

  // slave model: registered read, 256 words at 0x1200..0x12FF
  always_ff @(posedge clk) begin
    rdata <= '0;
    if (req.wr && req.addr[15:8] == 8'h12) begin mem[req.addr[7:0]] <= req.wdata; wr_cycles++; end
    if (req.rd && req.addr[15:8] == 8'h12) rdata <= mem[req.addr[7:0]];
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic do_op(input logic we, input logic [15:0] a, input int n, input logic [3:0][15:0] d);
    @(negedge clk);
    op_valid = 1; op_we = we; op_addr = a; op_len = 9'(n); op_data = d;
    do @(posedge clk); while (!op_pop);
    @(negedge clk); op_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 16'(i * 7 + 3);
    repeat (3) @(negedge clk);
    rst = 0;
    do_op(1, 16'h1210, 4, {16'hD, 16'hC, 16'hB, 16'hA});
    repeat (2) @(negedge clk);
    check(mem[8'h10] == 16'hA && mem[8'h11] == 16'hB && mem[8'h12] == 16'hC && mem[8'h13] == 16'hD,
          "4-word write lands at consecutive addresses");
    check(wr_cycles == 4, "one bus cycle per written word");
    // read 10 words starting at 0x120E (crosses the written ones)
    do_op(0, 16'h120E, 10, '0);
    repeat (3) @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      check(reply_valid, "reply available");
      check(reply_data == mem[8'h0E + i], $sformatf("reply word %0d", i));
      reply_pop = 1; @(negedge clk); reply_pop = 0;
    end
    check(!reply_valid, "reply FIFO empty");
    // a 20-word read with a 16-deep reply FIFO: master must stall, not lose
    fork
      do_op(0, 16'h1240, 20, '0);
      begin
        repeat (40) @(negedge clk);
        for (int i = 0; i < 20; i++) begin
          while (!reply_valid) @(negedge clk);
          check(reply_data == mem[8'h40 + i], $sformatf("stalled read word %0d", i));
          reply_pop = 1; @(negedge clk); reply_pop = 0;
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
