// sbus_reg_clb: the interface register circuit of one register-type CLB.
//
// Eight configurable register bits form one byte of the interface address
// map. They share one write enable and one read enable, since a byte is the
// smallest addressable unit. The byte sits on one of the four lanes of the
// 32-bit data bus, fixed by its address (LANE = byte address mod 4). The
// write data bus passes through the CLB unchanged to the next CLB of the
// column; the read data bus arriving from the previous CLB is ORed with this
// byte's read data on its lane, so the column forms an OR chain that needs
// no multiplexer: only the addressed byte drives non-zero data.
//
// Interface: data_in/data_in_next and data_out_prev/data_out are the
// hard-wired column buses; in_j/out_j connect to the programmable fabric.
// Timing: purely combinational apart from the eight flip-flops.
//
// The structure follows the source architecture; the lane numbering (lane n
// on bits 8n+7..8n) is a choice of this implementation.
module sbus_reg_clb
  import sbus_pkg::*;
#(
  parameter int unsigned LANE = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  bit_cfg_t [7:0]       cfg,
  input  logic                 write_en,
  input  logic                 read_en,
  input  logic [DATA_W-1:0]    data_in,
  output logic [DATA_W-1:0]    data_in_next,
  input  logic [DATA_W-1:0]    data_out_prev,
  output logic [DATA_W-1:0]    data_out,
  input  logic [7:0]           in_j,
  output logic [7:0]           out_j
);

  logic [7:0] rd_byte;

  for (genvar k = 0; k < 8; k++) begin : g_bit
    sbus_reg_bit u_bit (
      .clk      (clk),
      .rst_n    (rst_n),
      .cfg      (cfg[k]),
      .write_en (write_en),
      .read_en  (read_en),
      .data_in  (data_in[8*LANE + k]),
      .data_out (rd_byte[k]),
      .in_bit   (in_j[k]),
      .out_bit  (out_j[k])
    );
  end

  assign data_in_next = data_in;

  always_comb begin
    data_out = data_out_prev;
    data_out[8*LANE +: 8] = data_out_prev[8*LANE +: 8] | rd_byte;
  end

endmodule
