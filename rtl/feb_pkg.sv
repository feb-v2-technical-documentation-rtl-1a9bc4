// feb_pkg: types and constants shared by the FEB v2 FPGA firmware.
//
// The slow-control (SC) bus is 16-bit data on a 16-bit address: the upper
// byte selects a slave, the lower byte a register. A request is one cycle
// (wr or rd); a slave answers a read with its data on the cycle after rd and
// drives zero otherwise, so the answers of all slaves are OR-ed together.
// TDC data words are 32 bits: 2-bit device (FPGA) address, 6-bit channel or
// strip ID and a 24-bit timestamp (16-bit coarse count at 400 MHz and 8-bit
// fine time). Downlink frames are 80 bits (groups G4..G0), uplink frames 112
// bits (groups G6..G0), group Gn occupying bits [16n+15:16n].
package feb_pkg;

  localparam int N_CH     = 34;   // TDC channels per FPGA
  localparam int N_ROC_CH = 32;   // channels wired to PETIROC triggers
  localparam int CH_BC0   = 32;   // TDC channel of the BC0 loopback
  localparam int CH_RESYNC = 33;  // TDC channel of the Resync loopback
  localparam int N_STRIP  = 16;   // strips per FPGA
  localparam int TS_W     = 24;   // timestamp width
  localparam int FINE_W   = 8;    // fine time width
  localparam int COARSE_W = TS_W - FINE_W;

  // SC slave base addresses (address bits [15:8])
  localparam logic [7:0] SC_GEN      = 8'h00;
  localparam logic [7:0] SC_ROC_TOP  = 8'h01;
  localparam logic [7:0] SC_ROC_BOT  = 8'h02;
  localparam logic [7:0] SC_TDC      = 8'h03;
  localparam logic [7:0] SC_LUT0     = 8'h04;  // LUTs of channels 0..33 at 0x04..0x25
  localparam logic [7:0] SC_FLASH    = 8'h26;
  localparam logic [7:0] SC_REMOTE   = 8'h27;
  localparam logic [7:0] SC_TSCORR   = 8'h28;
  localparam logic [7:0] SC_DATAPATH = 8'h29;

  typedef struct packed {
    logic        wr;
    logic        rd;
    logic [15:0] addr;
    logic [15:0] wdata;
  } sc_req_t;

  // Fast-control bits of a downlink frame header (G4)
  typedef struct packed {
    logic       resync;
    logic       bc0;
    logic       reset_sc;
    logic       flush;
    logic       mute;
    logic [7:0] misc;
  } fc_t;

  typedef struct packed {
    logic [1:0]      dev;
    logic [5:0]      ch;
    logic [TS_W-1:0] ts;
  } tdc_word_t;

  // Per-channel slot after pair filtering: one word, or a strip pair
  // (w0 = direct end, w1 = return end) to be written together.
  typedef struct packed {
    logic      valid;
    logic      pair;
    tdc_word_t w0;
    tdc_word_t w1;
  } ch_slot_t;

  // Record entering the frame merger: a single channel or a clustered strip
  typedef struct packed {
    logic        strip;
    tdc_word_t   w;     // for a strip, ch holds the strip ID
    logic [15:0] diff;  // direct minus return timestamp (strip only)
  } rec_t;

  // Data-path configuration (Data Path Control slave)
  typedef struct packed {
    logic [5:0]  mid_delay;       // reg 0
    logic [5:0]  queue_max;       // reg 1
    logic        cluster_en;      // reg 2
    logic [2:0]  remove_single;   // reg 3
    logic [6:0]  max_disparity;   // reg 4
    logic [5:0]  dead_time;       // reg 5
    logic [15:0] pair_en;         // reg 6
    logic [15:0][15:0] diff_min;  // regs 8..23
    logic [15:0][15:0] diff_max;  // regs 24..39
    logic [3:0]  retrig_thr;      // reg 40
    logic [7:0]  retrig_dec;      // reg 41
    logic [7:0]  retrig_mute;     // reg 42
  } dp_cfg_t;

  // Priority of the readout multiplexer, most urgent first (channel IDs)
  localparam int PRIO [N_CH] = '{33, 32,
    15, 16, 13, 18, 11, 20, 9, 22, 7, 24, 5, 26, 3, 28, 1, 30,
    14, 17, 12, 19, 10, 21, 8, 23, 6, 25, 4, 27, 2, 29, 0, 31};

  // Strip index of a PETIROC channel: direct end 15-s, return end 16+s
  function automatic logic [3:0] strip_of(input logic [5:0] ch);
    return (ch < 6'd16) ? 4'(6'd15 - ch) : 4'(ch - 6'd16);
  endfunction

  // E-link settings held by the FPGA I2C slave
  typedef struct packed {
    logic             loopback;
    logic             dbg_pattern;
    logic             dbg_toggle;
    logic             tdc_pat_inj;
    logic             sc_pat_inj;
    logic [13:0][7:0] pattern;
    logic [2:0]       rx_slip_7a;
    logic             rx_slip_7a_en;
    logic [2:0]       rx_slip_4a;
    logic             rx_slip_4a_en;
    logic [2:0]       tx_slip;
    logic             gxb_force;
  } elink_cfg_t;
endpackage
