// tb_frame_queue: the concentrator's frame queue. Frames written at the bus
// rate and read at one per three cycles; with max_size = 5 the queue never
// holds more than 5 frames, keeps the newest ones (the oldest are dropped
// with an overflow pulse each) and returns them in order.
module tb_frame_queue;
  logic clk = 0, rst = 1, flush = 0;
  logic [5:0] max_size = 5;
  logic push = 0, pop = 0, empty, overflow;
  logic [111:0] din = '0, head;
  logic [6:0] count;
  int checks = 0, failures = 0, n_ovf = 0, max_cnt = 0;
  int got [$];

  frame_queue dut (.*);
  always #4 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (overflow) n_ovf++;
    if (count > max_cnt) max_cnt = count;
    if (pop && !empty) got.push_back(int'(head[31:0]));
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // 30 frames, one per cycle, reads one cycle in three
    for (int i = 0; i < 30; i++) begin
      @(negedge clk); push = 1; din = 112'(i); pop = (i % 3 == 2);
    end
    @(negedge clk); push = 0; pop = 1;
    repeat (10) @(negedge clk);
    pop = 0;
    check(max_cnt <= 5, $sformatf("queue never above 5 (%0d)", max_cnt));
    check(got.size() + n_ovf == 30, $sformatf("read %0d + dropped %0d = 30", got.size(), n_ovf));
    check(got.size() > 0 && got[got.size() - 1] == 29, "newest frame kept");
    begin
      logic inorder; inorder = 1;
      for (int i = 1; i < got.size(); i++) if (got[i] <= got[i - 1]) inorder = 0;
      check(inorder, "frames in order");
    end
    check(got[got.size() - 5] == 25, "last five frames are the newest five");
    check(empty, "empty at the end");
    // flush
    @(negedge clk); push = 1; @(negedge clk); push = 0; flush = 1; @(negedge clk); flush = 0;
    check(empty, "flush empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
