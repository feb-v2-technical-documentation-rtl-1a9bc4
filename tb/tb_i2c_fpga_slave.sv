// tb_i2c_fpga_slave: drives the FPGA I2C slave from a bit-level I2C master
// (100 kHz scaled to 12 bus cycles per SCL half period) on an open-drain
// SDA line. Checks reset values read over I2C, single and auto-increment
// writes and reads, the read-only result register, the alignment request
// pulse, the NACK on a foreign device address and the cfg outputs.
module tb_i2c_fpga_slave;
  import feb_pkg::*;
  logic clk = 0, rst = 1;
  logic scl = 1, sda_m = 1;
  logic sda_oe, align_req;
  logic [7:0] align_result = 8'hA5;
  elink_cfg_t cfg;
  wire sda = sda_m & !sda_oe;
  int checks = 0, failures = 0, align_pulses = 0;
  localparam int H = 12;

  i2c_fpga_slave dut (.clk, .rst, .fpga_id(2'd2), .scl_in(scl), .sda_in(sda),
                      .sda_oe, .cfg, .align_req, .align_result);

  always #5 clk = !clk;
  always @(posedge clk) if (align_req) align_pulses++;

  task automatic chk(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic half(); repeat (H) @(posedge clk); endtask
  task automatic i2c_start(); sda_m = 1; half(); scl = 1; half(); sda_m = 0; half(); scl = 0; half(); endtask
  task automatic i2c_stop(); sda_m = 0; half(); scl = 1; half(); sda_m = 1; half(); endtask
  task automatic put_byte(input logic [7:0] b, output logic ack);
    for (int i = 7; i >= 0; i--) begin
      sda_m = b[i]; half(); scl = 1; half(); scl = 0;
    end
    sda_m = 1; half(); scl = 1; half(); ack = !sda; scl = 0; half();
  endtask
  task automatic get_byte(input logic ack_it, output logic [7:0] b);
    sda_m = 1;
    for (int i = 7; i >= 0; i--) begin
      half(); scl = 1; half(); b[i] = sda; scl = 0;
    end
    sda_m = !ack_it; half(); scl = 1; half(); scl = 0; half(); sda_m = 1;
  endtask

  task automatic wr(input logic [6:0] dev, input logic [7:0] a, input logic [7:0] d[], output logic ack);
    logic k;
    i2c_start();
    put_byte({dev, 1'b0}, ack);
    if (ack) begin
      put_byte(a, k);
      foreach (d[i]) put_byte(d[i], k);
    end
    i2c_stop();
  endtask

  task automatic rdn(input logic [6:0] dev, input logic [7:0] a, input int n, output logic [7:0] q[]);
    logic k;
    q = new[n];
    i2c_start(); put_byte({dev, 1'b0}, k); put_byte(a, k);
    i2c_start(); put_byte({dev, 1'b1}, k);
    for (int i = 0; i < n; i++) get_byte(i != n - 1, q[i]);
    i2c_stop();
  endtask

  localparam logic [6:0] DEV = 7'h22;
  logic [7:0] q[];
  logic ack;
  logic [7:0] exp_rst[] = '{8'h00, 8'hAB, 8'hAB};
  initial begin
    repeat (5) @(posedge clk); rst = 0; repeat (5) @(posedge clk);
    // reset values
    rdn(DEV, 8'h00, 3, q);
    foreach (exp_rst[i]) chk($sformatf("reset reg %0d", i), q[i], exp_rst[i]);
    rdn(DEV, 8'h10, 4, q);
    chk("reset 0x10", q[0], 8'h13); chk("reset 0x11", q[1], 8'h13);
    chk("reset 0x12", q[2], 8'h04); chk("reset 0x13", q[3], 8'h00);
    rdn(DEV, 8'h20, 1, q);
    chk("align result", q[0], 8'hA5);
    // foreign address is not acknowledged
    wr(7'h21, 8'h00, '{8'h1F}, ack);
    chk("foreign address NACK", ack, 0);
    chk("foreign write ignored", cfg.loopback, 0);
    // single write, then auto-increment write of three patterns
    wr(DEV, 8'h00, '{8'hFF}, ack);
    chk("own address ACK", ack, 1);
    chk("ctrl readback via cfg", {cfg.sc_pat_inj, cfg.tdc_pat_inj, cfg.dbg_toggle, cfg.dbg_pattern, cfg.loopback}, 5'h1F);
    wr(DEV, 8'h0C, '{8'h11, 8'h22, 8'h33}, ack);
    chk("pattern 11", cfg.pattern[11], 8'h11);
    chk("pattern 12", cfg.pattern[12], 8'h22);
    chk("pattern 13", cfg.pattern[13], 8'h33);
    rdn(DEV, 8'h0B, 4, q);
    chk("read pattern 10", q[0], 8'hAB); chk("read pattern 11", q[1], 8'h11);
    chk("read pattern 12", q[2], 8'h22); chk("read pattern 13", q[3], 8'h33);
    rdn(DEV, 8'h00, 1, q);
    chk("ctrl masked to 5 bits", q[0], 8'h1F);
    // bitslip registers
    wr(DEV, 8'h10, '{8'hFD, 8'h05, 8'h06, 8'h01}, ack);
    chk("slip 7a", {cfg.rx_slip_7a_en, cfg.rx_slip_7a}, 4'b1101);
    chk("slip 4a", {cfg.rx_slip_4a_en, cfg.rx_slip_4a}, 4'b0101);
    chk("tx slip", cfg.tx_slip, 3'd6);
    chk("gxb force", cfg.gxb_force, 1);
    rdn(DEV, 8'h10, 2, q);
    chk("read 0x10", q[0], 8'h15); chk("read 0x11", q[1], 8'h05);
    // alignment request
    wr(DEV, 8'h0F, '{8'h01}, ack);
    chk("align request pulses", align_pulses, 1);
    rdn(DEV, 8'h0F, 1, q);
    chk("align request reads 0", q[0], 8'h00);
    rdn(DEV, 8'h30, 1, q);
    chk("unused reads FF", q[0], 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
