// sbus_pkg: types and constants shared by the system-bus interface column
// of the programmable logic core.
//
// The column is configured, not programmed with logic: every register bit
// carries three configuration bits (the selects of its multiplexers) and
// the interface control carries a small set of protocol settings. The
// register bit types (RW, RO, WIC, RWS, IND) and the settings for timing,
// byte lanes and address interpretation follow the source architecture;
// the encodings, widths and the range of each delay setting are choices of
// this implementation.
package sbus_pkg;

  // Bus data path width and byte lanes.
  localparam int unsigned DATA_W  = 32;
  localparam int unsigned LANES   = DATA_W / 8;

  // Baseline cluster: four 4-input LUTs, 10 inputs, 4 outputs.
  localparam int unsigned CLB_N   = 4;   // LUTs per cluster
  localparam int unsigned CLB_K   = 4;   // inputs per LUT
  localparam int unsigned CLB_I   = 10;  // cluster input pins
  localparam int unsigned CLB_SEL_W = 4; // select width for I+N = 14 local sources
  // A modified CLB has eight output pins instead of four.
  localparam int unsigned MCLB_O  = 8;
  // The interface control spreads over five modified CLBs.
  localparam int unsigned CTRL_CLBS = 5;

  // Register bit types.
  typedef enum logic [2:0] {
    BT_RW  = 3'd0,  // read/write by the master
    BT_RO  = 3'd1,  // read only: the master reads the design's input
    BT_WIC = 3'd2,  // set by a design event, cleared by writing 1
    BT_RWS = 3'd3,  // read/write, sticky set by the design
    BT_IND = 3'd4   // writing 1 produces a one-cycle action pulse
  } bit_type_e;

  // Configuration of one register bit: the three multiplexer selects.
  typedef struct packed {
    logic wr_clear;   // 0: en=write_en, d=data_in; 1: en=write_en&data_in, d=~data_in
    logic rd_input;   // 0: master reads the flip-flop; 1: master reads in_j[k]
    logic out_pulse;  // 0: out_j[k] is the flip-flop; 1: out_j[k] is the write enable
  } bit_cfg_t;

  // Map a bit type onto its multiplexer selects.
  function automatic bit_cfg_t bit_type_cfg(bit_type_e t);
    bit_cfg_t c;
    c = '0;
    case (t)
      BT_RW, BT_RWS: c = '{wr_clear: 1'b0, rd_input: 1'b0, out_pulse: 1'b0};
      BT_RO:         c = '{wr_clear: 1'b0, rd_input: 1'b1, out_pulse: 1'b0};
      BT_WIC:        c = '{wr_clear: 1'b1, rd_input: 1'b0, out_pulse: 1'b0};
      BT_IND:        c = '{wr_clear: 1'b1, rd_input: 1'b0, out_pulse: 1'b1};
      default:       c = '0;
    endcase
    return c;
  endfunction

  // Address interpretation.
  typedef enum logic {
    AM_BYTE_ENABLE = 1'b0, // word-aligned address, lanes from byte_enable
    AM_SIZE        = 1'b1  // byte address, lanes from address[1:0] and size
  } addr_mode_e;

  // Transfer size encoding used in AM_SIZE mode.
  localparam logic [1:0] SZ_BYTE = 2'b00;
  localparam logic [1:0] SZ_HALF = 2'b01;
  localparam logic [1:0] SZ_WORD = 2'b10;

  // Protocol settings of the interface control.
  typedef struct packed {
    logic [1:0] ctrl_dly;   // register stages on select/read/write/address/lanes
    logic [1:0] wdata_dly;  // register stages on the write data
    logic [1:0] rd_wait;    // wait cycles before a read is acknowledged
    logic [1:0] wr_wait;    // wait cycles before a write is acknowledged
    addr_mode_e addr_mode;  // byte enables or size indication
    logic       big_endian; // byte offset 0 on data lane 3 instead of lane 0
    logic       rd_reg;     // read data and its acknowledge registered one cycle
  } ctrl_cfg_t;

  // Configuration of one baseline cluster.
  typedef struct packed {
    logic [CLB_K-1:0][CLB_SEL_W-1:0] in_sel; // local source of each LUT input
    logic [(1<<CLB_K)-1:0]           mask;   // LUT truth table
    logic                            use_ff; // output registered
  } ble_cfg_t;

  typedef ble_cfg_t [CLB_N-1:0] clb_cfg_t;

endpackage
