// tb_sc_frame_decoder: the documented 4-word burst write example (request
// frame + payload frame with a pause), a burst read request, a single write,
// and ResetSCPath recovery from a half-received burst.
module tb_sc_frame_decoder;
  import feb_pkg::*;
  logic clk = 0, rst = 1, reset_sc = 0, fv = 0, op_pop = 0;
  logic [63:0] pl = '0;
  logic op_valid, op_we;
  logic [15:0] op_addr, lost;
  logic [8:0] op_len;
  logic [3:0][15:0] op_data;
  int checks = 0, failures = 0;

  sc_frame_decoder dut (.clk, .rst, .reset_sc, .frame_valid(fv), .payload(pl), .op_valid, .op_we,
                        .op_addr, .op_len, .op_data, .op_pop, .lost_ops(lost));
  always #4 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [63:0] reqf(input logic we, input logic [7:0] burst,
                                       input logic [15:0] addr, input logic [15:0] d0, d1);
    return {7'd0, we, burst, addr, d0, d1};
  endfunction
  task automatic frame(input logic [63:0] p);
    @(negedge clk); fv = 1; pl = p;
    @(negedge clk); fv = 0;
  endtask
  task automatic expect_op(input logic we, input logic [15:0] addr, input int len,
                           input logic [15:0] d0, d1, d2, d3, input string what);
    @(negedge clk);
    check(op_valid, {what, ": op present"});
    check(op_we == we && op_addr == addr && op_len == 9'(len), {what, ": we/addr/len"});
    if (we) begin
      check(op_data[0] == d0 && (len < 2 || op_data[1] == d1) &&
            (len < 3 || op_data[2] == d2) && (len < 4 || op_data[3] == d3), {what, ": data"});
    end
    op_pop = 1; @(negedge clk); op_pop = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // write 0x0A..0x0D to 0x0010..0x0013: request + payload frame, with a pause
    frame(reqf(1, 8'h03, 16'h0010, 16'h000A, 16'h000B));
    repeat (10) @(negedge clk);
    frame({16'h000C, 16'h000D, 16'hFFFF, 16'hFFFF});
    expect_op(1, 16'h0010, 2, 16'h0A, 16'h0B, 0, 0, "request frame");
    expect_op(1, 16'h0012, 2, 16'h0C, 16'h0D, 0, 0, "payload frame");
    check(!op_valid, "no further op");
    // the next frame is a request again: burst read of 64 words
    frame(reqf(0, 8'd63, 16'h2684, 16'h1111, 16'h2222));
    expect_op(0, 16'h2684, 64, 0, 0, 0, 0, "burst read");
    // single write
    frame(reqf(1, 8'h00, 16'h0005, 16'h0042, 16'h9999));
    expect_op(1, 16'h0005, 1, 16'h42, 0, 0, 0, "single write");
    // 7-word write: 2 + 4 + 1
    frame(reqf(1, 8'd6, 16'h0100, 16'h1, 16'h2));
    frame({16'h3, 16'h4, 16'h5, 16'h6});
    frame({16'h7, 16'h0, 16'h0, 16'h0});
    expect_op(1, 16'h0100, 2, 1, 2, 0, 0, "7w req");
    expect_op(1, 16'h0102, 4, 3, 4, 5, 6, "7w payload 1");
    expect_op(1, 16'h0106, 1, 7, 0, 0, 0, "7w payload 2");
    // half a burst, then ResetSCPath: the next frame must be a request
    frame(reqf(1, 8'd9, 16'h0200, 16'h1, 16'h2));
    @(negedge clk); reset_sc = 1; @(negedge clk); reset_sc = 0;
    check(!op_valid, "reset_sc clears queued ops");
    frame(reqf(0, 8'd0, 16'h0011, 0, 0));
    expect_op(0, 16'h0011, 1, 0, 0, 0, 0, "request after reset_sc");
    // overflow: more frames than the op FIFO holds are counted as lost
    for (int i = 0; i < 40; i++) frame(reqf(1, 8'd0, 16'(i), 16'(i), 0));
    check(lost == 16'd8, "8 of 40 ops lost with a 32-entry FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
