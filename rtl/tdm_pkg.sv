// tdm_pkg: sizes, I/O address map, control-word layout and clock-tick bundle shared by the
// thruster driver module. The 1 MHz system clock, the 0100H base address, the counts of
// thrusters (16), serial digital channels (18), history words (8) and the clock rates follow the
// published design. The exact register map (which chip select and which read address holds what,
// and the bit layout of the control word) is this design's own choice.
package tdm_pkg;

  localparam int unsigned CLK_HZ      = 1_000_000;  // global synchronising clock
  localparam int unsigned NUM_THR     = 16;         // thruster drivers
  localparam int unsigned NUM_SDC     = 18;         // serial digital channels
  localparam int unsigned NUM_HIS     = NUM_THR / 2; // 16-bit history words, two counters each
  localparam int unsigned NUM_DRDY    = 6;          // data-ready inputs
  localparam int unsigned NUM_CS      = 25;         // chip selects for 0100H..0118H
  localparam int unsigned NUM_RD      = 31;         // input-port words (31:1 mux)
  localparam int unsigned SPARE_IN_W  = 36;         // spare input lines
  localparam int unsigned SPARE_OUT_W = 59;         // spare output lines

  localparam logic [11:0] IO_BASE = 12'h100;

  // Write map: chip-select index = address - 0100H
  localparam int unsigned CS_DIRECT = 0;   // thruster direct latch
  localparam int unsigned CS_L1CMD  = 1;   // link 1 command word
  localparam int unsigned CS_L2CMD  = 2;   // link 2 command word
  localparam int unsigned CS_CTRL   = 3;   // control word (ctrl_t)
  localparam int unsigned CS_SPARE0 = 4;   // spare outputs 15:0 .. CS_SPARE0+3 holds 58:48
  localparam int unsigned CS_TIMER  = 8;   // thruster timer value (ms)
  localparam int unsigned CS_PSC0   = 9;   // 9..24: serial-mode word of thruster 0..15

  // Read map: word index = address - 0100H
  localparam int unsigned RD_SDC0    = 0;   // 0..17  serial digital channel words
  localparam int unsigned RD_HIS0    = 18;  // 18..25 history words
  localparam int unsigned RD_THR_STS = 26;  // thruster status lines
  localparam int unsigned RD_SPARE0  = 27;  // spare inputs 15:0
  localparam int unsigned RD_STATUS  = 28;  // status_t
  localparam int unsigned RD_SPARE1  = 29;  // spare inputs 31:16
  localparam int unsigned RD_SPARE2  = 30;  // spare inputs 35:32

  // Clock used to shift serial-mode thrusters and to count thruster history
  typedef enum logic [1:0] {
    CLKSEL_1K  = 2'd0,  // 1 kHz
    CLKSEL_2MS = 2'd1,  // 500 Hz
    CLKSEL_4MS = 2'd2,  // 250 Hz
    CLKSEL_8MS = 2'd3   // 125 Hz
  } clk_sel_e;

  // Control word written at 0103H
  typedef struct packed {
    logic [2:0] rsvd;
    logic [5:0] dt_clr;        // clear data-ready latches while 1
    logic       sdc_src_sel;   // 0: internal 40 kHz clock/mode, 1: external pair
    logic       his_mon_lp;    // falling edge latches and restarts history counters
    clk_sel_e   clk_sel;
    logic       sel_thr;       // 1: direct mode
    logic       thr_timer_en;  // with sel_thr=0: 1 timer mode, 0 serial mode
    logic       rdinh;         // enables the serial digital channel interface
  } ctrl_t;

  // Status word read at 011CH
  typedef struct packed {
    logic       thr_ored_sts;
    logic       thr_en;
    logic [7:0] cmd;
    logic [5:0] drdy;
  } status_t;

  // One-cycle enables derived from the 1 MHz clock
  typedef struct packed {
    logic t1k;
    logic t20k;
    logic t40k;
    logic t500;
    logic t250;
    logic t125;
    logic tmode;
  } ticks_t;

endpackage
