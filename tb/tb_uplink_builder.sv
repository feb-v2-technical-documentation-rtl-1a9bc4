// tb_uplink_builder: uplink frame building. frame_stb comes every third
// cycle (40 MHz in the 120 MHz clock). Checks: one frame per strobe; the
// loopback and overflow header flags report events since the previous frame
// and then clear; a queued data frame goes out first and is popped exactly
// on the strobe; slow-control replies go out in the next free frame with the
// documented slot layout and DataValid bits; an idle link sends empty frames.
module tb_uplink_builder;
  import feb_pkg::*;
  logic clk = 0, rst = 1, frame_stb = 0, resync = 0, bc0 = 0, frame_ovf = 0;
  logic [2:0] tdc_ovf = '0;
  logic [111:0] q_head = '0, tx_frame;
  logic q_empty = 1, q_pop;
  logic [2:0] reply_valid, reply_pop;
  logic [2:0][15:0] reply_data;
  logic [1:0] frame_type;
  int checks = 0, failures = 0, cyc = 0;
  logic [15:0] rq [3][$];
  logic [111:0] dq [$];

  uplink_builder dut (.*);
  always #4 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    frame_stb <= (cyc % 3 == 0);
    for (int f = 0; f < 3; f++) if (reply_pop[f]) void'(rq[f].pop_front());
    if (q_pop) begin
      check(frame_stb, "queue popped only on a strobe");
      void'(dq.pop_front());
    end
  end
  always_comb for (int f = 0; f < 3; f++) begin
    reply_valid[f] = rq[f].size() > 0;
    reply_data[f]  = rq[f].size() > 0 ? rq[f][0] : 16'h0;
  end
  always_comb begin
    q_empty = dq.size() == 0;
    q_head  = dq.size() > 0 ? dq[0] : '0;
  end

  function automatic void check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction
  // wait for the frame produced by the next strobe
  task automatic next_frame();
    @(posedge clk iff frame_stb); @(negedge clk);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] h;
    repeat (4) @(negedge clk);
    rst = 0;
    next_frame();
    check(frame_type == 0 && tx_frame == 0, "idle link: empty frame");
    // resync and a TDC overflow of FPGA 2 between two strobes
    @(negedge clk iff !frame_stb); resync = 1; tdc_ovf = 3'b100; @(negedge clk); resync = 0; tdc_ovf = 0;
    next_frame();
    h = tx_frame[79:64];
    check(h[15] && !h[14] && h[10] && !h[13], "Resync loopback and FPGA 2 TDC overflow flags");
    next_frame();
    check(tx_frame[79:64] == 0, "flags clear after one frame");
    // a data frame and replies at the same time
    dq.push_back({32'hCCCC_CCCC, 16'h0007, 64'hAAAA_AAAA_BBBB_BBBB});
    rq[0].push_back(16'h0101); rq[0].push_back(16'h0102); rq[1].push_back(16'h0201);
    next_frame();
    check(frame_type == 1 && tx_frame[63:0] == 64'hAAAA_AAAA_BBBB_BBBB && tx_frame[66:64] == 3'b111, "data frame first");
    next_frame();
    check(frame_type == 2, "then the slow-control frame");
    h = tx_frame[79:64];
    check(h[6] && h[5:0] == 6'b111000, $sformatf("SCFrame and DataValid %b", h[5:0]));
    check(tx_frame[63:48] == 16'h0101 && tx_frame[47:32] == 16'h0102 && tx_frame[31:16] == 16'h0201, "reply slots");
    next_frame();
    check(frame_type == 0, "idle again");
    // FPGA 2 alone
    rq[2].push_back(16'h0301); rq[2].push_back(16'h0302); rq[2].push_back(16'h0303);
    next_frame();
    check(frame_type == 2 && tx_frame[111:96] == 16'h0301 && tx_frame[95:80] == 16'h0302 && tx_frame[69:64] == 6'b000011,
          "FPGA 2 replies in G6/G5");
    next_frame();
    check(frame_type == 2 && tx_frame[111:96] == 16'h0303 && tx_frame[69:64] == 6'b000010, "third word in the next frame");
    // 50 queued data frames leave at one per strobe: 150 cycles
    for (int i = 0; i < 50; i++) dq.push_back(112'(i + 1));
    repeat (149) @(negedge clk);
    check(dq.size() == 1 || dq.size() == 0, $sformatf("%0d frames left after 149 cycles", dq.size()));
    repeat (4) @(negedge clk);
    check(dq.size() == 0, "all 50 sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
