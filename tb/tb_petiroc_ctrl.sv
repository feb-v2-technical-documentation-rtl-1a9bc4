// tb_petiroc_ctrl: loads a 664-bit configuration into a shift-register model
// of the PETIROC, reloads it after flipping bits in the model and checks the
// bitflip counter and the read-back words, checks the reset sequence, the
// periodic reconfiguration and that busy covers the load.
module tb_petiroc_ctrl;
  import feb_pkg::*;
  localparam int NB = 664;
  logic clk = 0, rst = 1;
  sc_req_t req = '0;
  logic [15:0] rdata;
  logic sr_ck, sr_in, sr_rstb, sr_out, digital_rstb, inject, hold_ext, busy;
  logic [3:0] stage_off;
  logic [NB-1:0] cfg;
  int checks = 0, failures = 0, loads = 0;

  petiroc_ctrl #(.BASE(SC_ROC_BOT)) dut (.clk, .rst, .req, .rdata, .sr_ck, .sr_in, .sr_rstb, .sr_out,
    .stage_off, .digital_rstb, .inject, .hold_ext, .busy);
  petiroc_model #(.NBITS(NB)) roc (.sr_ck, .sr_in, .sr_rstb, .sr_out);
  always #4 clk = ~clk;
  always @(posedge busy) loads++;

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
  task automatic write_cfg();
    for (int k = 0; k < 41; k++) wr(16'h0216 + 16'(k), cfg[NB-1-16*k -: 16]);
    wr(16'h023F, {cfg[7:0], 8'h00});
  endtask
  task automatic load_and_wait();
    wr(16'h0200, 16'h0001);
    @(negedge clk);
    check(busy, "busy during load");
    while (busy) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d, lo;
    for (int i = 0; i < NB; i++) cfg[i] = 1'($urandom);
    repeat (3) @(negedge clk);
    rst = 0;
    write_cfg();
    rd(16'h0216, d); check(d == cfg[NB-1 -: 16], "config word 0 readable");
    load_and_wait();
    check(roc.sr == cfg, "configuration shifted into the ASIC");
    rd(16'h0240, d); check(d == 0, "no bitflips counted on the first load");
    // three single-event upsets in the ASIC register
    roc.sr[5] = ~roc.sr[5]; roc.sr[300] = ~roc.sr[300]; roc.sr[663] = ~roc.sr[663];
    load_and_wait();
    rd(16'h0240, d); rd(16'h0241, lo);
    check(d == 16'd3 && lo == 0, "bitflip counter counts 3 upsets");
    check(roc.sr == cfg, "configuration restored");
    // read-back holds what the ASIC contained (with the upsets)
    begin
      logic [NB-1:0] exp;
      exp = cfg; exp[5] = ~exp[5]; exp[300] = ~exp[300]; exp[663] = ~exp[663];
      rd(16'h0263, d); check(d == exp[663:648], "read-back word 0");
      rd(16'h0263 + 16'd22, d); check(d == exp[663-16*22 -: 16], "read-back word 22 (bit 300)");
      rd(16'h028C, d); check(d == {exp[7:0], 8'h00}, "read-back word 41");
    end
    wr(16'h0209, 16'h0001); wr(16'h0209, 16'h0000);
    rd(16'h0240, d); check(d == 0, "bitflip counter reset");
    // control pins
    wr(16'h0202, 16'h001A); wr(16'h0203, 16'h0003);
    check(stage_off == 4'hA && digital_rstb && inject && hold_ext, "pin registers");
    // reset sequence
    wr(16'h0201, 16'h0001);
    repeat (3) @(negedge clk);
    check(!sr_rstb && busy, "reset sequence drives sr_rstb low");
    repeat (20) @(negedge clk);
    check(sr_rstb && !busy && roc.sr == 0, "reset sequence ends, register cleared");
    // periodic reconfiguration every 6000 cycles
    loads = 0;
    wr(16'h020A, 16'd6000); wr(16'h020B, 0); wr(16'h020C, 0);
    wr(16'h0200, 16'h0002);
    repeat (20000) @(negedge clk);
    while (busy) @(negedge clk);
    check(loads == 3, $sformatf("3 periodic loads in 20000 cycles (saw %0d)", loads));
    check(roc.sr == cfg, "periodic load restores the configuration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
