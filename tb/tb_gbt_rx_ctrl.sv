// tb_gbt_rx_ctrl: checks that frames are ignored until RxDataValid, that
// TxDataValid follows link-up, and the decoding of every fast-control field.
module tb_gbt_rx_ctrl;
  import feb_pkg::*;
  logic clk = 0, rst = 1, frame_stb = 0, rx_dv = 0, fe_ready = 1;
  logic [79:0] rx_frame = '0;
  logic tx_dv, link_up;
  fc_t fc;
  logic [2:0] sc_valid;
  logic [63:0] sc_payload;
  int checks = 0, failures = 0;

  gbt_rx_ctrl dut (.clk, .rst, .frame_stb, .rx_frame, .rx_data_valid(rx_dv), .fe_ready,
                   .tx_data_valid(tx_dv), .link_up, .fc, .sc_valid, .sc_payload);

  always #4 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send one frame and look at the decoded outputs in the following cycle
  task automatic send(input logic [15:0] hdr, input logic [63:0] pl);
    @(negedge clk);
    rx_frame = {hdr, pl}; frame_stb = 1;
    @(negedge clk);
    frame_stb = 0;
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
    // before RxDataValid: ignored
    send(16'hFFFF, 64'h1234);
    check(!fc.resync && !fc.bc0 && sc_valid == 0 && !link_up, "frame ignored before link up");
    @(negedge clk); check(!tx_dv, "no TxDataValid before link up");
    rx_dv = 1;
    send({1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 8'h00, 3'b000}, 64'h0);
    check(fc.resync && !fc.bc0, "resync decoded");
    @(negedge clk);
    check(!fc.resync, "resync is a one-cycle pulse");
    check(link_up && tx_dv, "link up and TxDataValid");
    rx_dv = 0;  // link stays up
    send({1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 8'hA5, 3'b101}, 64'hDEAD_BEEF_0123_4567);
    check(fc.bc0 && fc.mute && fc.misc == 8'hA5 && sc_valid == 3'b101, "bc0/mute/misc/fpgasel");
    check(sc_payload == 64'hDEAD_BEEF_0123_4567, "payload forwarded");
    @(negedge clk);
    check(!fc.bc0 && fc.mute && sc_valid == 0, "mute held, bc0 and sc_valid pulses");
    send({2'b00, 1'b1, 1'b1, 1'b0, 8'h00, 3'b010}, 64'h0);
    check(fc.reset_sc && fc.flush && !fc.mute && sc_valid == 3'b010, "resetsc/flush/unmute");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
