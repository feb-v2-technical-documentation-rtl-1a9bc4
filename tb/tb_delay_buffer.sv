// tb_delay_buffer: the middle bus delay. For delays 0, 1, 7 and 63 a random
// stream of words must come out unchanged exactly delay+1 cycles later;
// flush empties the buffer.
module tb_delay_buffer;
  import feb_pkg::*;
  logic clk = 0, rst = 1, flush = 0;
  logic [5:0] delay = 0;
  logic in_valid = 0, out_valid;
  tdc_word_t in_word = '0, out_word;
  int checks = 0, failures = 0;
  logic      hv [$];
  tdc_word_t hw [$];

  delay_buffer dut (.*);
  always #4 clk = ~clk;

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
    int dl [4] = '{0, 1, 7, 63};
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (dl[k]) begin
      int bad;
      bad = 0;
      delay = 6'(dl[k]);
      @(negedge clk); flush = 1; @(negedge clk); flush = 0;
      hv.delete(); hw.delete();
      for (int i = 0; i < 200; i++) begin
        in_valid = 1'($urandom); in_word = $urandom;
        hv.push_back(in_valid); hw.push_back(in_word);
        @(negedge clk);
        // what went in delay+1 cycles ago (history index i - delay)
        if (i >= dl[k]) begin
          if (out_valid != hv[i - dl[k]] || (out_valid && out_word != hw[i - dl[k]])) bad++;
        end else if (out_valid) bad++;
      end
      check(bad == 0, $sformatf("delay %0d: %0d mismatches", dl[k], bad));
    end
    in_valid = 1; @(negedge clk); in_valid = 0; flush = 1; @(negedge clk); flush = 0;
    repeat (70) begin @(negedge clk); if (out_valid) failures++; end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
