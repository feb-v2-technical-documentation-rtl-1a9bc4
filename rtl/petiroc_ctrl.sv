// petiroc_ctrl: "PETIROC Control" slow-control slave with the configuration
// loader of one PETIROC (base 0x01 for the top ASIC, 0x02 for the bottom).
//
// Registers (word address within the slave):
//   0x00 [0] load request (self-clearing), [1] periodic reconfiguration enable
//   0x01 [0] reset sequence request (self-clearing)
//   0x02 [3:0] force digital/analog/ADC/DAC stage off, [4] digital reset (low active)
//   0x03 [0] inject on every channel, [1] hold_ext
//   0x09 [0] hold the bitflip counter at zero
//   0x0A-0x0C reconfiguration period [15:0],[31:16],[47:32] in bus clock cycles
//   0x16-0x3F configuration words 0..41: word k = register bits [663-16k -: 16],
//             word 41 bits [15:8] = register bits [7:0]
//   0x40-0x41 bitflip counter [15:0],[31:16] (read only)
//   0x63-0x8C configuration read back from the ASIC, same layout (read only)
// A load serialises the NBITS configuration bits, most significant first, on
// sr_in with a slow clock sr_ck (SR_DIV bus cycles low then SR_DIV high; sr_in
// changes while sr_ck is low). What the ASIC shifts out on sr_out is the
// previous content: it is sampled at the end of each low phase, stored as the
// read-back words and, once a load has been done, compared bit by bit with
// what was loaded last time; each difference increments the bitflip counter.
// With periodic reconfiguration enabled a load starts every "period" cycles.
// A reset request drives sr_rstb low for RST_CYCLES cycles. busy is high
// during a load or reset so that VAL_EVT can be held low. The register map
// follows the documented one; the serial timing, bit order and reset length
// are this design's choices.
module petiroc_ctrl
  import feb_pkg::*;
#(
  parameter logic [7:0] BASE       = SC_ROC_TOP,
  parameter int         NBITS      = 664,
  parameter int         SR_DIV     = 4,
  parameter int         RST_CYCLES = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  sc_req_t     req,
  output logic [15:0] rdata,
  // PETIROC slow-control interface
  output logic        sr_ck,
  output logic        sr_in,
  output logic        sr_rstb,
  input  logic        sr_out,
  output logic [3:0]  stage_off,     // digital, analog, ADC, DAC
  output logic        digital_rstb,
  output logic        inject,
  output logic        hold_ext,
  output logic        busy
);
  localparam int NW = (NBITS + 15) / 16;   // 42 words

  logic [1:0]  load_ctrl;
  logic [4:0]  pins;
  logic [1:0]  inj;
  logic        bf_rst;
  logic [47:0] period;
  logic [NW-1:0][15:0] cfg_w;
  logic [NBITS-1:0] shadow, tx, rb;
  logic [31:0] bitflips;
  logic        loaded_once;

  wire       sel = (req.addr[15:8] == BASE);
  wire [7:0] a   = req.addr[7:0];

  // configuration vector from the registers
  logic [NBITS-1:0] cfg_vec;
  always_comb begin
    logic [NW*16-1:0] flat;
    for (int k = 0; k < NW; k++) flat[(NW-1-k)*16 +: 16] = cfg_w[k];
    cfg_vec = flat[NW*16-1 -: NBITS];   // the padding bits of the last word are never shifted out
  end
  logic [NW*16-1:0] rb_flat;
  assign rb_flat = {rb, {(NW*16-NBITS){1'b0}}};

  typedef enum logic [1:0] {IDLE, SHIFT, RESET} state_t;
  state_t state;
  logic [$clog2(NBITS+1)-1:0] bit_cnt;
  logic [$clog2(2*SR_DIV+1)-1:0] ph;
  logic [$clog2(RST_CYCLES+1)-1:0] rst_cnt;
  logic [47:0] timer;
  logic        load_req, reset_req;

  assign busy = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      load_ctrl <= '0; pins <= '0; inj <= '0; bf_rst <= 1'b0; period <= '0;
      cfg_w <= '0; rdata <= '0; load_req <= 1'b0; reset_req <= 1'b0;
    end else begin
      if (state == SHIFT) load_req  <= 1'b0;
      if (state == RESET) reset_req <= 1'b0;
      load_ctrl[0] <= 1'b0;
      if (load_ctrl[1] && period != 0 && timer >= period - 1) load_req <= 1'b1;
      if (sel && req.wr) begin
        unique case (a) inside
          8'h00: begin load_ctrl <= req.wdata[1:0]; if (req.wdata[0]) load_req <= 1'b1; end
          8'h01: if (req.wdata[0]) reset_req <= 1'b1;
          8'h02: pins <= req.wdata[4:0];
          8'h03: inj  <= req.wdata[1:0];
          8'h09: bf_rst <= req.wdata[0];
          8'h0A: period[15:0]  <= req.wdata;
          8'h0B: period[31:16] <= req.wdata;
          8'h0C: period[47:32] <= req.wdata;
          [8'h16:8'h3F]: cfg_w[a - 8'h16] <= req.wdata;
          default: ;
        endcase
      end
      rdata <= '0;
      if (sel && req.rd) begin
        unique case (a) inside
          8'h00: rdata <= {14'd0, load_ctrl};
          8'h02: rdata <= {11'd0, pins};
          8'h03: rdata <= {14'd0, inj};
          8'h09: rdata <= {15'd0, bf_rst};
          8'h0A: rdata <= period[15:0];
          8'h0B: rdata <= period[31:16];
          8'h0C: rdata <= period[47:32];
          [8'h16:8'h3F]: rdata <= cfg_w[a - 8'h16];
          8'h40: rdata <= bitflips[15:0];
          8'h41: rdata <= bitflips[31:16];
          [8'h63:8'h8C]: rdata <= rb_flat[(NW-1-(a-8'h63))*16 +: 16];
          default: rdata <= '0;
        endcase
      end
    end
  end

  // load / reset sequencer
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; bit_cnt <= '0; ph <= '0; rst_cnt <= '0; timer <= '0;
      sr_ck <= 1'b0; sr_rstb <= 1'b1; tx <= '0; shadow <= '0; rb <= '0;
      bitflips <= '0; loaded_once <= 1'b0;
    end else begin
      if (!load_ctrl[1] || (period != 0 && timer >= period - 1)) timer <= '0;
      else timer <= timer + 1'b1;
      if (bf_rst) bitflips <= '0;
      unique case (state)
        IDLE: begin
          sr_ck <= 1'b0;
          sr_rstb <= 1'b1;
          if (reset_req) begin
            state <= RESET; rst_cnt <= '0; sr_rstb <= 1'b0;
          end else if (load_req) begin
            state <= SHIFT; tx <= cfg_vec; bit_cnt <= '0; ph <= '0;
          end
        end
        SHIFT: begin
          ph <= ph + 1'b1;
          if (ph == SR_DIV - 1) begin
            // end of the low phase: sample the ASIC output, then raise sr_ck
            rb <= {rb[NBITS-2:0], sr_out};
            if (loaded_once && !bf_rst && sr_out != shadow[NBITS-1]) bitflips <= bitflips + 1'b1;
            sr_ck <= 1'b1;
          end else if (ph == 2*SR_DIV - 1) begin
            sr_ck  <= 1'b0;
            ph     <= '0;
            shadow <= {shadow[NBITS-2:0], tx[NBITS-1]};
            tx     <= {tx[NBITS-2:0], 1'b0};
            bit_cnt <= bit_cnt + 1'b1;
            if (bit_cnt == NBITS - 1) begin
              state <= IDLE; loaded_once <= 1'b1;
            end
          end
        end
        RESET: begin
          rst_cnt <= rst_cnt + 1'b1;
          if (rst_cnt == RST_CYCLES - 1) begin
            state <= IDLE; sr_rstb <= 1'b1; loaded_once <= 1'b0;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign sr_in        = tx[NBITS-1];
  assign stage_off    = pins[3:0];
  assign digital_rstb = pins[4];
  assign inject       = inj[0];
  assign hold_ext     = inj[1];
endmodule
