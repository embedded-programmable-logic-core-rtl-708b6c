// sbus_plc_column: the column of modified CLBs that gives a programmable
// logic core a fast, configurable system-bus slave interface.
//
// A bus slave built from LUTs is slow and a fixed one is inflexible and
// floods the fabric's routing with register bits. This column splits a
// mostly fixed slave interface into CLB-sized pieces: five control tiles
// hold the interface control (decode, lane and timing configuration), and
// each register tile above them holds one byte of eight configurable
// register bits. Byte enables and the 32-bit write and read data buses run
// hard-wired along the column; only the bus signals and the register bits'
// fabric connections use the programmable routing. Every tile keeps its
// normal LUT cluster as a shadow and can be used as an ordinary CLB when its
// sbus_en configuration bit is low.
//
// Tile order: the control tiles are at the bottom; register tile j is byte
// address j (word j div 4, lane j mod 4). The write data bus goes up the
// column from the control; the read data bus is an OR chain that comes down
// from the top tile to the control.
//
// Ports are the pins of the tiles as seen by the routing fabric, plus their
// configuration memory, which is presented as static inputs. Timing: see
// sbus_if_ctrl; a transfer without wait cycles completes in the cycle in
// which the (delayed) request is seen.
//
// Defaults: a 6-bit byte address and 64 register bytes (512 register bits),
// as on the control's address pins of the source architecture.
module sbus_plc_column
  import sbus_pkg::*;
#(
  parameter int unsigned ADDR_W   = 6,
  parameter int unsigned NUM_REGS = 64
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  // control tiles
  input  logic                                    ctrl_sbus_en,
  input  ctrl_cfg_t                               ctrl_cfg,
  input  clb_cfg_t [CTRL_CLBS-1:0]                ctrl_lut_cfg,
  input  logic [CTRL_CLBS*CLB_I-1:0]              ctrl_pin_in,
  output logic [CTRL_CLBS*MCLB_O-1:0]             ctrl_pin_out,
  // register tiles
  input  logic [NUM_REGS-1:0]                     reg_sbus_en,
  input  clb_cfg_t [NUM_REGS-1:0]                 reg_lut_cfg,
  input  bit_cfg_t [NUM_REGS-1:0][7:0]            reg_bit_cfg,
  input  logic [NUM_REGS-1:0][CLB_I-1:0]          reg_pin_in,
  output logic [NUM_REGS-1:0][MCLB_O-1:0]         reg_pin_out
);

  logic [NUM_REGS-1:0]            write_en, read_en;
  logic [NUM_REGS:0][DATA_W-1:0]  wbus;   // wbus[j] enters tile j
  logic [NUM_REGS:0][DATA_W-1:0]  rbus;   // rbus[j] leaves tile j downward

  mod_ctrl_clbs #(.ADDR_W(ADDR_W), .NUM_REGS(NUM_REGS)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .sbus_en  (ctrl_sbus_en),
    .ctrl_cfg (ctrl_cfg),
    .lut_cfg  (ctrl_lut_cfg),
    .pin_in   (ctrl_pin_in),
    .pin_out  (ctrl_pin_out),
    .write_en (write_en),
    .read_en  (read_en),
    .data_in  (wbus[0]),
    .data_out (rbus[0])
  );

  assign rbus[NUM_REGS] = '0;

  for (genvar j = 0; j < NUM_REGS; j++) begin : g_reg
    mod_reg_clb #(.LANE(j % LANES)) u_tile (
      .clk           (clk),
      .rst_n         (rst_n),
      .sbus_en       (reg_sbus_en[j]),
      .lut_cfg       (reg_lut_cfg[j]),
      .reg_cfg       (reg_bit_cfg[j]),
      .pin_in        (reg_pin_in[j]),
      .pin_out       (reg_pin_out[j]),
      .write_en      (write_en[j]),
      .read_en       (read_en[j]),
      .data_in       (wbus[j]),
      .data_in_next  (wbus[j+1]),
      .data_out_prev (rbus[j+1]),
      .data_out      (rbus[j])
    );
  end

endmodule
