// tb_strip_cluster: strip clustering on one bus. Direct end (channel 15-s)
// followed on the next cycle by the return end (16+s) of the same FPGA
// becomes one strip record with strip ID fpga*16+s and diff = direct -
// return; unmatched words become single records, or disappear with
// remove_single (BC0 never); with clustering off every word is a single.
module tb_strip_cluster;
  import feb_pkg::*;
  logic clk = 0, rst = 1, flush = 0, cluster_en = 1, remove_single = 0;
  logic in_valid = 0, out_valid;
  tdc_word_t in_word = '0;
  rec_t out_rec;
  int checks = 0, failures = 0;
  rec_t got [$];

  strip_cluster dut (.*);
  always #4 clk = ~clk;
  always @(posedge clk) if (!rst && out_valid) got.push_back(out_rec);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic send(input logic [1:0] dev, input int ch, input int t);
    @(negedge clk); in_valid = 1; in_word = {dev, 6'(ch), 24'(t)};
  endtask
  task automatic idle(int n);
    repeat (n) begin @(negedge clk); in_valid = 0; end
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
    send(2, 12, 5000); send(2, 19, 4800);   // strip 3 of FPGA 2, diff 200
    send(2, 5, 100);                         // lone channel
    send(1, 15, 70000); send(1, 16, 70010);  // strip 0 of FPGA 1, diff -10
    send(2, 32, 9);                          // BC0
    idle(4);
    check(got.size() == 4, $sformatf("4 records (%0d)", got.size()));
    if (got.size() == 4) begin
      check(got[0].strip && got[0].w.ch == 6'd35 && got[0].w.dev == 2 && got[0].w.ts == 5000 && got[0].diff == 200, "strip 35 record");
      check(!got[1].strip && got[1].w == {2'd2, 6'd5, 24'd100}, "single record");
      check(got[2].strip && got[2].w.ch == 6'd16 && got[2].diff == 16'hFFF6, "strip 16, negative difference");
      check(!got[3].strip && got[3].w.ch == 32, "BC0 single");
    end
    got.delete();
    // non-consecutive ends, ends of different strips or FPGAs do not merge
    send(0, 15, 1); idle(1); send(0, 16, 2);
    send(0, 14, 3); send(0, 16, 4);
    send(1, 13, 5); send(0, 18, 6);
    idle(3);
    check(got.size() == 6 && !got[0].strip && !got[2].strip && !got[4].strip, "no false clusters");
    got.delete();
    remove_single = 1;
    send(0, 8, 1); send(0, 7, 2); send(0, 24, 3); send(0, 33, 4);
    idle(3);
    check(got.size() == 2 && got[0].strip && got[0].w.ch == 8 && got[1].w.ch == 33, "singles removed, strip and Resync kept");
    got.delete();
    cluster_en = 0;
    send(0, 7, 1); send(0, 24, 3);
    idle(3);
    check(got.size() == 2 && !got[0].strip && !got[1].strip, "clustering off: singles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
