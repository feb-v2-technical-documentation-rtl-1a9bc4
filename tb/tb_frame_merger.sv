// tb_frame_merger: merging the three buses into data frames. Checks the slot
// placement (A = G3&G2, B = G1&G0, C = G6&G5), the DataValid codes 100/110/
// 111, the IsStrip bits and the strip differences in G6 (slot A) and G5
// (slot B), that a strip keeps slot C empty, that round-robin serves every
// bus equally under load, that no record is lost or duplicated, and the
// overflow pulse when an input FIFO is full.
module tb_frame_merger;
  import feb_pkg::*;
  logic clk = 0, rst = 1, flush = 0;
  logic [2:0] in_valid = '0;
  rec_t [2:0] in_rec = '0;
  logic frame_valid, overflow;
  logic [111:0] frame;
  int checks = 0, failures = 0, n_ovf = 0;
  logic [111:0] got [$];

  frame_merger dut (.*);
  always #4 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (frame_valid) got.push_back(frame);
    if (overflow) n_ovf++;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic rec_t single(int b, int t);
    single = '0; single.w = {2'(b), 6'd3, 24'(t)};
  endfunction
  function automatic rec_t strip(int b, int t, int d);
    strip = '0; strip.strip = 1; strip.w = {2'(b), 6'd20, 24'(t)}; strip.diff = 16'(d);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // three singles in one cycle: one full frame
    @(negedge clk); in_valid = 3'b111; in_rec[0] = single(0, 10); in_rec[1] = single(1, 11); in_rec[2] = single(2, 12);
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    check(got.size() == 1, $sformatf("one frame for three singles (%0d)", got.size()));
    if (got.size() == 1) begin
      check(got[0][66:64] == 3'b111 && got[0][69:68] == 2'b00, "DataValid 111, no strips");
      check(got[0][63:32] == in_rec[0].w && got[0][31:0] == in_rec[1].w && got[0][111:80] == in_rec[2].w, "slots A, B, C");
    end
    got.delete();
    // single record: DataValid 100
    @(negedge clk); in_valid = 3'b010; in_rec[1] = single(1, 5);
    @(negedge clk); in_valid = 0; repeat (3) @(negedge clk);
    check(got.size() == 1 && got[0][66:64] == 3'b100 && got[0][63:32] == in_rec[1].w, "one record in slot A, DataValid 100");
    got.delete();
    // two strips and a single, three times so that the round-robin pointer
    // puts the strips in different slots; the single may wait a frame
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk); in_valid = 3'b111; in_rec[0] = strip(0, 100, 16'h1234); in_rec[1] = strip(1, 200, 16'h5678); in_rec[2] = single(2, 300);
      @(negedge clk); in_valid = 0; repeat (4) @(negedge clk);
      check(got.size() == 2, $sformatf("two frames (%0d)", got.size()));
      if (got.size() == 2) begin
        check(got[0][66:64] == 3'b110 && got[0][69:68] != 2'b00, "strip frame holds two records");
        begin
          logic [111:0] f; f = got[0];
          for (int s = 0; s < 2; s++) begin
            logic [31:0] w; logic isst; logic [15:0] df;
            w = s == 0 ? f[63:32] : f[31:0]; isst = s == 0 ? f[69] : f[68]; df = s == 0 ? f[111:96] : f[95:80];
            if (isst) check(df == (w[31:30] == 2'd0 ? 16'h1234 : 16'h5678), $sformatf("slot %0d difference matches its strip", s));
          end
        end
        check(got[1][66:64] == 3'b100 || got[1][66:64] == 3'b110, "leftover record in the next frame");
      end
      got.delete();
    end
    // fairness under load: every bus sends every cycle for 300 cycles
    begin
      int per_bus [3] = '{0, 0, 0};
      int total_in = 0, total_out = 0;
      for (int i = 0; i < 300; i++) begin
        @(negedge clk); in_valid = 3'b111;
        for (int b = 0; b < 3; b++) in_rec[b] = single(b, i);
        total_in += 3;
      end
      @(negedge clk); in_valid = 0; repeat (20) @(negedge clk);
      foreach (got[i]) for (int s = 0; s < 3; s++) begin
        logic [31:0] w;
        if (got[i][66:64] & (3'b100 >> s)) begin
          w = s == 0 ? got[i][63:32] : s == 1 ? got[i][31:0] : got[i][111:80];
          per_bus[w[31:30]]++; total_out++;
        end
      end
      check(total_out == total_in && n_ovf == 0, $sformatf("all %0d records out (%0d), no overflow", total_in, total_out));
      check(per_bus[0] == 300 && per_bus[1] == 300 && per_bus[2] == 300, "each bus served");
    end
    got.delete();
    // strips at full rate on all three buses overflow the inputs
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); in_valid = 3'b111;
      for (int b = 0; b < 3; b++) in_rec[b] = strip(b, i, i);
    end
    @(negedge clk); in_valid = 0; repeat (20) @(negedge clk);
    check(n_ovf > 0, "input overflow reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
