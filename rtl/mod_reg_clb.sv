// mod_reg_clb: a register-type modified CLB of the interface column.
//
// The tile holds a normal cluster of four 4-LUTs and, as a shadow of it, the
// eight configurable interface register bits of one byte. One configuration
// bit, sbus_en, chooses which of the two owns the tile's pins. With sbus_en
// low the tile is an ordinary CLB: the cluster sees the ten input pins and
// drives output pins 3..0 (pins 7..4 are low), and the register byte is
// inert (no writes, no read data, no sets from the fabric). With sbus_en
// high the cluster's inputs are held low, input pins 7..0 become in_j of the
// register bits and the eight output pins carry out_j. The byte enables and
// the two column data buses are hard-wired from the interface control and
// do not use the programmable routing.
//
// Timing: as sbus_reg_clb and lut_cluster; the pin multiplexers are
// combinational. The shadow arrangement and the eight output pins follow
// the source architecture; the pin assignment and the gating of the unused
// half are choices of this implementation.
module mod_reg_clb
  import sbus_pkg::*;
#(
  parameter int unsigned LANE = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sbus_en,
  input  clb_cfg_t             lut_cfg,
  input  bit_cfg_t [7:0]       reg_cfg,
  input  logic [CLB_I-1:0]     pin_in,
  output logic [MCLB_O-1:0]    pin_out,
  input  logic                 write_en,
  input  logic                 read_en,
  input  logic [DATA_W-1:0]    data_in,
  output logic [DATA_W-1:0]    data_in_next,
  input  logic [DATA_W-1:0]    data_out_prev,
  output logic [DATA_W-1:0]    data_out
);

  logic [CLB_N-1:0] lut_out;
  logic [7:0]       out_j;

  lut_cluster u_cluster (
    .clk   (clk),
    .rst_n (rst_n),
    .cfg   (lut_cfg),
    .in    (sbus_en ? '0 : pin_in),
    .out   (lut_out)
  );

  sbus_reg_clb #(.LANE(LANE)) u_regs (
    .clk           (clk),
    .rst_n         (rst_n),
    .cfg           (reg_cfg),
    .write_en      (write_en & sbus_en),
    .read_en       (read_en & sbus_en),
    .data_in       (data_in),
    .data_in_next  (data_in_next),
    .data_out_prev (data_out_prev),
    .data_out      (data_out),
    .in_j          (sbus_en ? pin_in[7:0] : 8'h00),
    .out_j         (out_j)
  );

  assign pin_out = sbus_en ? out_j : {{(MCLB_O-CLB_N){1'b0}}, lut_out};

endmodule
