// mod_ctrl_clbs: the five control-type modified CLBs of the interface column.
//
// Five ordinary clusters of four 4-LUTs share their pins with the interface
// control circuit, selected by one configuration bit, sbus_en. The five
// tiles give 50 input pins and 40 output pins (eight per modified tile).
// With sbus_en high the control circuit takes them, in this order:
//   inputs  0 select, 1 read, 2 write, 6..3 byte_enable,
//           7+ADDR_W-1..7 address, then size[1:0], then din[31:0];
//   outputs 31..0 dout, 35..32 byte_ack, 36 trans_ack, the rest low.
// With sbus_en low tile t is an ordinary CLB on input pins 10t+9..10t and
// output pins 8t+3..8t (8t+7..8t+4 low), and the control sees an idle bus.
// The bus signals reach these pins through the ordinary programmable
// routing, so the fabric can adapt them (for example, combine select with
// a protocol's enable) before they enter the control.
//
// The pin counts and signal set follow the source architecture; the pin
// order is a choice of this implementation. ADDR_W may be at most 9.
module mod_ctrl_clbs
  import sbus_pkg::*;
#(
  parameter int unsigned ADDR_W   = 6,
  parameter int unsigned NUM_REGS = 64
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            sbus_en,
  input  ctrl_cfg_t                       ctrl_cfg,
  input  clb_cfg_t [CTRL_CLBS-1:0]        lut_cfg,
  input  logic [CTRL_CLBS*CLB_I-1:0]      pin_in,
  output logic [CTRL_CLBS*MCLB_O-1:0]     pin_out,
  // register column side
  output logic [NUM_REGS-1:0]             write_en,
  output logic [NUM_REGS-1:0]             read_en,
  output logic [DATA_W-1:0]               data_in,
  input  logic [DATA_W-1:0]               data_out
);

  localparam int unsigned P_BE   = 3;
  localparam int unsigned P_ADDR = P_BE + LANES;
  localparam int unsigned P_SIZE = P_ADDR + ADDR_W;
  localparam int unsigned P_DIN  = P_SIZE + 2;

  if (P_DIN + DATA_W > CTRL_CLBS * CLB_I) begin : g_pin_check
    $error("mod_ctrl_clbs: ADDR_W too large for the control input pins");
  end

  logic [CTRL_CLBS*CLB_I-1:0] ctl_in;
  logic [DATA_W-1:0]          dout;
  logic [LANES-1:0]           byte_ack;
  logic                       trans_ack;
  logic [CTRL_CLBS*MCLB_O-1:0] lut_pins;

  assign ctl_in = sbus_en ? pin_in : '0;

  sbus_if_ctrl #(.ADDR_W(ADDR_W), .NUM_REGS(NUM_REGS)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .cfg         (ctrl_cfg),
    .select      (ctl_in[0]),
    .read        (ctl_in[1]),
    .write       (ctl_in[2]),
    .byte_enable (ctl_in[P_BE +: LANES]),
    .address     (ctl_in[P_ADDR +: ADDR_W]),
    .size        (ctl_in[P_SIZE +: 2]),
    .din         (ctl_in[P_DIN +: DATA_W]),
    .dout        (dout),
    .byte_ack    (byte_ack),
    .trans_ack   (trans_ack),
    .write_en    (write_en),
    .read_en     (read_en),
    .data_in     (data_in),
    .data_out    (data_out)
  );

  for (genvar t = 0; t < CTRL_CLBS; t++) begin : g_clb
    logic [CLB_N-1:0] lut_out;
    lut_cluster u_cluster (
      .clk   (clk),
      .rst_n (rst_n),
      .cfg   (lut_cfg[t]),
      .in    (sbus_en ? '0 : pin_in[CLB_I*t +: CLB_I]),
      .out   (lut_out)
    );
    assign lut_pins[MCLB_O*t +: MCLB_O] = {{(MCLB_O-CLB_N){1'b0}}, lut_out};
  end

  always_comb begin
    if (sbus_en) begin
      pin_out = '0;
      pin_out[DATA_W-1:0]           = dout;
      pin_out[DATA_W +: LANES]      = byte_ack;
      pin_out[DATA_W + LANES]       = trans_ack;
    end else begin
      pin_out = lut_pins;
    end
  end

endmodule
