// fpp_pkg: shared types and constants of the flexible parallel port (FPP).
//
// An FPP is built from one-bit "lanes". Every lane has the same six data
// terminals: FPP_PRI and FPP_SEC (bidirectional, towards the previous and the
// next die), FPP_TO_SIDE / FPP_FROM_SIDE (to and from another lane of the same
// die) and FPP_TO_CORE / FPP_FROM_CORE (to and from the core under test). A
// non-registered lane can also drive FPP_CLK_OUT. A lane implements a set of
// "paths", each from one source terminal to one destination terminal.
//
// The terminal codes below are the numbers the FPP specification language
// gives its SourceList and DestList enumerations. The lane modules index
// their parameter arrays with the dense SRC_* / DST_* indices instead.
//
// A lane is configured at elaboration time by a two-dimensional array,
// [destination][source], of path descriptors. For registered lanes a path
// carries its multiplexer select value, its number of pipeline registers,
// the trigger edge of each (P or N) and whether a pipeline bypass exists:
// these are the fields muxCtrlVal, plRegs, plTriggerEdges and plBypass of the
// specification language. The widths MAX_PL and MUX_W are this design's
// choice; the language leaves them open.
//
// The package also holds the lane descriptions of the Test@First example
// (UpLane, DownLane, ClkLane) and the layout of its 4-bit configuration
// register (BYPASS, TURN, SEC_UP_OE, PRI_DOWN_OE).
package fpp_pkg;

  // Terminal codes of the specification language.
  typedef enum logic [2:0] {
    FPP_PRI       = 3'd0,
    FPP_SEC       = 3'd1,
    FPP_TO_SIDE   = 3'd2,
    FPP_FROM_SIDE = 3'd3,
    FPP_TO_CORE   = 3'd4,
    FPP_FROM_CORE = 3'd5,
    FPP_CLK_OUT   = 3'd6
  } fpp_terminal_e;

  // Dense source indices (the four input-capable terminals).
  localparam int unsigned NUM_SRC       = 4;
  localparam int unsigned SRC_PRI       = 0;
  localparam int unsigned SRC_SEC       = 1;
  localparam int unsigned SRC_FROM_SIDE = 2;
  localparam int unsigned SRC_FROM_CORE = 3;

  // Dense destination indices. Registered lanes use the first four,
  // non-registered lanes all five.
  localparam int unsigned NUM_REG_DST    = 4;
  localparam int unsigned NUM_NONREG_DST = 5;
  localparam int unsigned DST_PRI        = 0;
  localparam int unsigned DST_SEC        = 1;
  localparam int unsigned DST_TO_SIDE    = 2;
  localparam int unsigned DST_TO_CORE    = 3;
  localparam int unsigned DST_CLK_OUT    = 4;

  // Largest number of pipeline registers on one path, and the number of
  // multiplexer control bits per destination (enough for four sources).
  localparam int unsigned MAX_PL = 4;
  localparam int unsigned MUX_W  = 2;

  typedef logic [MUX_W-1:0] mux_ctrl_t;

  // One path of a registered lane.
  typedef struct packed {
    logic              en;         // path exists
    mux_ctrl_t         mux_val;    // muxCtrlVal that selects this path
    logic [2:0]        pl_regs;    // plRegs, 0..MAX_PL
    logic [MAX_PL-1:0] pl_pos;     // plTriggerEdges, bit i = stage i: 1 = P, 0 = N
    logic              pl_bypass;  // plBypass control exists for this path
  } reg_path_t;

  // One path of a non-registered lane.
  typedef struct packed {
    logic      en;
    mux_ctrl_t mux_val;
  } nonreg_path_t;

  typedef reg_path_t    [NUM_REG_DST-1:0][NUM_SRC-1:0]    reg_lane_cfg_t;
  typedef nonreg_path_t [NUM_NONREG_DST-1:0][NUM_SRC-1:0] nonreg_lane_cfg_t;

  // Test@First configuration register; bit 0 is the first bit listed.
  localparam int unsigned TAF_CFG_BITS = 4;
  typedef struct packed {
    logic pri_down_oe;  // output enable of the down channel's FPP_PRI drivers
    logic sec_up_oe;    // output enable of the up channel's and clock lane's FPP_SEC drivers
    logic turn;         // 1: route the up data back down in this die
    logic bypass;       // 1: bypass the core, 0: route the data through the core
  } taf_cfg_t;

  function automatic reg_path_t reg_path(input mux_ctrl_t val, input int unsigned regs,
                                         input logic [MAX_PL-1:0] pos, input logic byp);
    reg_path_t p;
    p.en        = 1'b1;
    p.mux_val   = val;
    p.pl_regs   = 3'(regs);
    p.pl_pos    = pos;
    p.pl_bypass = byp;
    return p;
  endfunction

  // UpLane (also the lane of the five-path example): PRI->TO_CORE unregistered;
  // SEC and TO_SIDE each select PRI through one P register (select 0) or
  // FROM_CORE (select 1).
  function automatic reg_lane_cfg_t up_lane_cfg();
    reg_lane_cfg_t c = '0;
    c[DST_TO_CORE][SRC_PRI]       = reg_path(2'd0, 0, '0, 1'b0);
    c[DST_SEC][SRC_PRI]           = reg_path(2'd0, 1, 4'b0001, 1'b0);
    c[DST_SEC][SRC_FROM_CORE]     = reg_path(2'd1, 0, '0, 1'b0);
    c[DST_TO_SIDE][SRC_PRI]       = reg_path(2'd0, 1, 4'b0001, 1'b0);
    c[DST_TO_SIDE][SRC_FROM_CORE] = reg_path(2'd1, 0, '0, 1'b0);
    return c;
  endfunction

  // DownLane: PRI selects FROM_SIDE unregistered (select 0) or SEC through
  // one P register (select 1).
  function automatic reg_lane_cfg_t down_lane_cfg();
    reg_lane_cfg_t c = '0;
    c[DST_PRI][SRC_FROM_SIDE] = reg_path(2'd0, 0, '0, 1'b0);
    c[DST_PRI][SRC_SEC]       = reg_path(2'd1, 1, 4'b0001, 1'b0);
    return c;
  endfunction

  // ClkLane: PRI feeds both FPP_CLK_OUT and FPP_SEC.
  function automatic nonreg_lane_cfg_t clk_lane_cfg();
    nonreg_lane_cfg_t c = '0;
    c[DST_CLK_OUT][SRC_PRI] = '{en: 1'b1, mux_val: 2'd0};
    c[DST_SEC][SRC_PRI]     = '{en: 1'b1, mux_val: 2'd0};
    return c;
  endfunction

  localparam reg_lane_cfg_t    UP_LANE_CFG   = up_lane_cfg();
  localparam reg_lane_cfg_t    DOWN_LANE_CFG = down_lane_cfg();
  localparam nonreg_lane_cfg_t CLK_LANE_CFG  = clk_lane_cfg();

endpackage
