// tb_ts_corr: timestamp correction. Writes per-channel offsets through the
// slow-control slave, sends a BC0 and hits, and checks
// out = raw - bc0_ref - offset (modulo 2^24) with one cycle of latency, the
// bc0_corr_en and bc0_drop controls, the offset read-back and flush.
module tb_ts_corr;
  import feb_pkg::*;
  logic clk = 0, rst = 1, flush = 0, bc0_corr_en = 1, bc0_drop = 0;
  sc_req_t req = '0;
  logic [15:0] rdata;
  logic [N_CH-1:0] in_valid = '0, out_valid;
  logic [N_CH-1:0][TS_W-1:0] in_ts = '0, out_ts;
  logic [TS_W-1:0] off [N_CH];
  int checks = 0, failures = 0;

  ts_corr dut (.*);
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
  // present hits for one cycle, check the output one cycle later
  task automatic send(input logic [N_CH-1:0] v, input logic [TS_W-1:0] t, input logic [TS_W-1:0] ref_);
    @(negedge clk);
    in_valid = v;
    for (int c = 0; c < N_CH; c++) in_ts[c] = t + TS_W'(c);
    @(negedge clk);
    in_valid = '0;
    for (int c = 0; c < N_CH; c++)
      if (v[c] && !(c == CH_BC0 && bc0_drop))
        check(out_valid[c] && out_ts[c] == t + TS_W'(c) - ref_ - off[c], $sformatf("channel %0d corrected", c));
      else check(!out_valid[c], $sformatf("channel %0d silent", c));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < N_CH; c++) begin
      off[c] = TS_W'($urandom);
      wr(16'h2800 + 16'(2 * c), off[c][15:0]);
      wr(16'h2801 + 16'(2 * c), {8'd0, off[c][23:16]});
    end
    rd(16'h2800 + 16'd14, d); check(d == off[7][15:0], "offset 7 low read-back");
    rd(16'h2801 + 16'd66, d); check(d == {8'd0, off[33][23:16]}, "offset 33 high read-back");
    // BC0 at raw time 0x100000 + 32 sets the reference
    send(34'h1_0000_0000, 24'h100000, 0);
    send('1, 24'h123456, 24'h100020);
    // the BC0 of that frame (raw 0x123476) is the new reference
    send(34'h0_0000_0F0F, 24'h000010, 24'h123476);   // wraps modulo 2^24
    bc0_corr_en = 0;
    send(34'h0_FFFF_0000, 24'h200000, 0);
    bc0_corr_en = 1; bc0_drop = 1;
    send(34'h1_0000_0001, 24'h300000, 24'h123476);
    bc0_drop = 0;
    // the dropped BC0 still moved the reference to 0x300020
    send(34'h0_0000_0002, 24'h400000, 24'h300020);
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    send(34'h0_0000_0004, 24'h500000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
