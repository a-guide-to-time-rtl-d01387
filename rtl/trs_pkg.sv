// trs_pkg: constants and types shared by the Time ReSolved (TRS) superframe
// controller.
//
// The TRS logic runs from one 10 MHz master clock (M_CLK). The slower clocks
// of the original schematic (5 MHz S_CLK, 1 MHz T_CLK, 10 kHz R_CLK) are
// one-cycle clock-enable ticks here. All timer lengths below are in ticks of
// the clock named in their comment. The values are the ones stated for the
// original circuit; the packaging into enables and structs is this design's.
package trs_pkg;

  // Bus register addresses, kept for documentation and software. The register
  // bank itself is selected by dedicated strobes, not by an address decoder.
  localparam logic [15:0] ADDR_MUT = 16'd2164;  // multi-task control register
  localparam logic [15:0] ADDR_LIM = 16'd2166;  // limit window (LL preload, UL offset)
  localparam logic [15:0] ADDR_DLY = 16'd2168;  // EFA delay, 10 us units
  localparam logic [15:0] ADDR_LTH = 16'd2170;  // EFA length, 10 us units
  localparam logic [15:0] ADDR_SFM = 16'd2172;  // superframe length minus one

  // Register index used by the read/write strobe vectors.
  typedef enum logic [2:0] {
    REG_MUT = 3'd0,
    REG_LIM = 3'd1,
    REG_DLY = 3'd2,
    REG_LTH = 3'd3,
    REG_SFM = 3'd4
  } reg_idx_e;
  localparam int unsigned NUM_REGS = 5;

  // Bit positions of the control lines in register 2164 (bits 0..5 unused).
  localparam int unsigned BIT_SR = 6;   //    64 superperiod mode
  localparam int unsigned BIT_RN = 7;   //   128 EFA allowed without RUN_DAE
  localparam int unsigned BIT_LN = 8;   //   256 limit generator free-running (test)
  localparam int unsigned BIT_FA = 9;   //   512 permanent EFA
  localparam int unsigned BIT_MO = 10;  //  1024 TRS enabled (0 = master override)
  localparam int unsigned BIT_IS = 11;  //  2048 simulate ISIS failure (test)
  localparam int unsigned BIT_DO = 12;  //  4096 zero EFA delay
  localparam int unsigned BIT_EO = 13;  //  8192 EFA disabled
  localparam int unsigned BIT_LO = 14;  // 16384 limit generator and comparator off
  localparam int unsigned BIT_SM = 15;  // 32768 superframe of one ISIS frame

  // Decoded control lines of register 2164.
  typedef struct packed {
    logic sr;  // superperiod mode
    logic rn;  // EFA run-enable override
    logic ln;  // limit generator free-running
    logic fa;  // permanent field
    logic mo;  // TRS enabled
    logic is;  // block ISIS input
    logic do_; // zero delay
    logic eo;  // EFA disabled
    logic lo;  // limit generator off (also forced by sr)
    logic sm;  // one-frame superframes
  } trs_ctrl_t;

  // Clock division from the 10 MHz master clock.
  localparam int unsigned S_CLK_DIV = 2;     // 5 MHz
  localparam int unsigned T_CLK_DIV = 10;    // 1 MHz
  localparam int unsigned R_CLK_DIV = 1000;  // 10 kHz (T_CLK divided by 100)

  // Pulse and timer lengths of the original circuit.
  localparam int unsigned LL_PERIOD_DEF  = 99999; // S_CLK ticks, 19999.8 us
  localparam int unsigned LL_WIDTH_T     = 100;   // T_CLK ticks, 100 us
  localparam int unsigned UL_WIDTH_T     = 150;   // T_CLK ticks, 150 us
  localparam int unsigned GRST_WIDTH_T   = 90;    // T_CLK ticks, 90 us (also IFC tail)
  localparam int unsigned PRESF_WIDTH_T  = 10;    // T_CLK ticks, 10 us
  localparam int unsigned LOADLL_WIDTH_T = 10;    // T_CLK ticks, 10 us
  localparam int unsigned GATE_CLOSE_T   = 4;     // T_CLK ticks after SFC
  localparam int unsigned WDA_CLEAR_T    = 4;     // T_CLK ticks after SFC
  localparam int unsigned IOFF_COUNT_DEF = 300;   // R_CLK ticks, 30 ms
  localparam int unsigned WDB_PULSES_DEF = 10;    // ISIS pulses, 200 ms
  localparam int unsigned EFA_STEP_DEF   = 50;    // S_CLK ticks, 10 us

  // Internal signals brought out as monitor points, as on the original
  // top-level schematic.
  typedef struct packed {
    logic isis_int;
    logic itp;
    logic load_ll;
    logic l_clk_en;
    logic ll;
    logic ul;
    logic ifc;
    logic pre_sf;
    logic sfc;
    logic grst;
    logic ioff;
    logic wdog_a;
    logic wdog_b;
    logic start_ul;
    logic stop_efa;
    logic s_tick;
    logic t_tick;
    logic r_tick;
  } trs_mon_t;

endpackage
