// tb_dp_ctrl_slave: reset values and write/read of every register group.
module tb_dp_ctrl_slave;
  import feb_pkg::*;
  logic clk = 0, rst = 1;
  sc_req_t req = '0;
  logic [15:0] rdata;
  dp_cfg_t cfg;
  int checks = 0, failures = 0;

  dp_ctrl_slave dut (.clk, .rst, .req, .rdata, .cfg);
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
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    repeat (3) @(negedge clk);
    rst = 0;
    rd(16'h2900, d); check(d == 16'h000D, "reset extra delay");
    rd(16'h2901, d); check(d == 16'h003F, "reset queue max");
    rd(16'h2904, d); check(d == 16'h007F, "reset max disparity");
    rd(16'h2918, d); check(d == 16'hFFFF, "reset diff max strip 0");
    check(cfg.diff_max[15] == 16'hFFFF && cfg.diff_min[3] == 0, "cfg reset");
    wr(16'h2900, 16'h0005); wr(16'h2901, 16'h0010); wr(16'h2902, 16'h0001);
    wr(16'h2903, 16'h0005); wr(16'h2904, 16'h0020); wr(16'h2905, 16'h0007);
    wr(16'h2906, 16'hA5A5);
    for (int s = 0; s < 16; s++) begin
      wr(16'h2908 + 16'(s), 16'(100 + s)); wr(16'h2918 + 16'(s), 16'(900 + s));
    end
    wr(16'h2928, 16'h0003); wr(16'h2929, 16'h0040); wr(16'h292A, 16'h0050);
    check(cfg.mid_delay == 5 && cfg.queue_max == 16 && cfg.cluster_en && cfg.remove_single == 3'b101,
          "concentrator fields");
    check(cfg.max_disparity == 32 && cfg.dead_time == 7 && cfg.pair_en == 16'hA5A5, "readout fields");
    check(cfg.retrig_thr == 3 && cfg.retrig_dec == 8'h40 && cfg.retrig_mute == 8'h50, "retrig fields");
    for (int s = 0; s < 16; s++) begin
      check(cfg.diff_min[s] == 16'(100 + s) && cfg.diff_max[s] == 16'(900 + s), $sformatf("strip %0d range", s));
      rd(16'h2908 + 16'(s), d); check(d == 16'(100 + s), "read diff min");
      rd(16'h2918 + 16'(s), d); check(d == 16'(900 + s), "read diff max");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
