// trs_top: Time ReSolved (TRS) superframe controller for a pulsed neutron
// source.
//
// The TRS sits in the path of the 50 Hz ISIS master pulse between the proton
// pulse sensor and the instrument's data acquisition electronics (DAE). In
// superframe mode it lets only the first pulse of every N through to the DAE,
// so the DAE records one long frame of N x 20 ms; in superperiod mode it
// passes every pulse but still counts N-frame cycles. Each cycle start (SFC)
// triggers EFA, the external field trigger, after a programmed delay and for
// a programmed length. Every pulse inside a superframe is checked against a
// limit window; a pulse outside it, or loss of the source, vetoes the
// superframe (VETO), resets the DAE period counter in superperiod mode
// (F2P_RST, active low), switches the field off and restarts only after two
// good dummy superframes (and, after a source loss, 10 good pulses).
//
// Blocks: clock distribution, register control, system control, limit
// generator, comparator, superframe register, external field control and
// watchdog, wired as in the original FPGA. All logic runs on the 10 MHz
// M_CLK; the slower clocks are enables. The data bus of the original is
// split into data_in / data_out / data_oe. rst_n is a power-on reset
// (the original starts from its configuration state).
//
// Timing: dae, sfc and the EFA delay follow the ISIS pin through a 2-cycle
// synchroniser. Register writes take effect 3 cycles after the write strobe
// ends.
module trs_top
  import trs_pkg::*;
#(
  parameter int unsigned LL_PERIOD  = LL_PERIOD_DEF,   // S_CLK ticks per ISIS period
  parameter int unsigned IOFF_COUNT = IOFF_COUNT_DEF,  // R_CLK ticks without ISIS
  parameter int unsigned WDB_PULSES = WDB_PULSES_DEF,  // good pulses to leave standby
  parameter int unsigned EFA_STEP   = EFA_STEP_DEF     // S_CLK ticks per EFA step
) (
  input  logic                m_clk,
  input  logic                rst_n,
  input  logic                isis,
  input  logic                run_dae,
  input  logic [NUM_REGS-1:0] write_pin,
  input  logic [NUM_REGS-1:0] read_pin,
  input  logic [15:0]         data_in,
  output logic [15:0]         data_out,
  output logic                data_oe,
  output logic                dae,
  output logic                veto,
  output logic                f2p_rst_n,
  output logic                efa,
  output trs_mon_t            mon
);
  logic s_tick, t_tick, r_tick;
  logic [15:0] reg_mut, reg_lim, reg_dly, reg_lth, reg_sfm;
  trs_ctrl_t ctrl;
  logic isis_on, isis_int, itp, load_ll, l_clk_en, ioff;
  logic ll, ul, cycle_mon, ifc, grst, pre_sf, sfc, wdog_a, wdog_b;
  logic start_ul, stop_efa;
  logic [15:0] frame_count;
  logic [$clog2(WDB_PULSES+1)-1:0] b_count;

  trs_clk_div u_clk (
    .m_clk, .rst_n, .s_tick, .t_tick, .r_tick
  );

  trs_reg_ctrl u_reg (
    .m_clk, .rst_n, .write_pin, .read_pin, .data_in, .data_out, .data_oe,
    .reg_mut, .reg_lim, .reg_dly, .reg_lth, .reg_sfm, .ctrl
  );

  trs_sys_ctrl #(.IOFF_COUNT(IOFF_COUNT)) u_sys (
    .m_clk, .rst_n, .t_tick, .r_tick, .isis, .run_dae, .ctrl,
    .wdog_a, .wdog_b, .grst, .pre_sf,
    .isis_on, .isis_int, .itp, .load_ll, .l_clk_en, .ioff
  );

  trs_limit_gen #(.PERIOD(LL_PERIOD)) u_lim (
    .m_clk, .rst_n, .s_tick, .t_tick, .l_clk_en, .load_ll, .lim(reg_lim),
    .ll, .ul, .cycle_mon
  );

  trs_comparator u_cmp (
    .m_clk, .rst_n, .t_tick, .itp, .ll, .ul, .pre_sf, .sfc, .ioff,
    .ifc, .grst, .veto
  );

  trs_superframe_reg u_sfr (
    .m_clk, .rst_n, .t_tick, .isis_on, .isis_int, .ifc, .grst, .wdog_a, .ctrl,
    .reg_sfm, .dae, .sfc, .pre_sf, .f2p_rst_n, .frame_count
  );

  trs_efc #(.STEP(EFA_STEP)) u_efc (
    .m_clk, .rst_n, .s_tick, .t_tick, .sfc, .wdog_a, .run_dae, .ctrl,
    .reg_dly, .reg_lth, .efa, .start_ul, .stop_efa
  );

  trs_watchdog #(.PULSES(WDB_PULSES)) u_wdg (
    .m_clk, .rst_n, .t_tick, .grst, .sfc, .ioff, .isis_on, .load_ll,
    .wdog_a, .wdog_b, .b_count
  );

  always_comb begin
    mon.isis_int = isis_int;
    mon.itp      = itp;
    mon.load_ll  = load_ll;
    mon.l_clk_en = l_clk_en;
    mon.ll       = cycle_mon;
    mon.ul       = ul;
    mon.ifc      = ifc;
    mon.pre_sf   = pre_sf;
    mon.sfc      = sfc;
    mon.grst     = grst;
    mon.ioff     = ioff;
    mon.wdog_a   = wdog_a;
    mon.wdog_b   = wdog_b;
    mon.start_ul = start_ul;
    mon.stop_efa = stop_efa;
    mon.s_tick   = s_tick;
    mon.t_tick   = t_tick;
    mon.r_tick   = r_tick;
  end
endmodule
