// sbus_if_ctrl: interface control of the system-bus slave interface.
//
// Translates a generic bus request (select, read, write, byte enables,
// address, size, write data) into one write enable and one read enable per
// register byte, drives the write data bus of the register column, returns
// the ORed read data and acknowledges the transfer. It is mostly fixed
// logic; a few configuration settings adapt it to a given protocol:
//   ctrl_dly   0..3 register stages on the control and address signals, so
//              that protocols whose data phase follows the address phase
//              (AHB) see control and data in the same cycle;
//   wdata_dly  0..3 register stages on the write data;
//   rd_wait,   0..3 wait cycles before a read or write is performed and
//   wr_wait    acknowledged, for protocols with an acknowledge handshake;
//   addr_mode  lanes taken from byte_enable with a word-aligned address, or
//              from the low address bits and the size (byte, half, word);
//   big_endian byte offset 0 of a word on data lane 3 instead of lane 0;
//   rd_reg     read data, byte_ack and trans_ack of a read registered for
//              one cycle, which takes the register column off the bus's
//              read-data path at the cost of one more cycle per read.
//
// Timing: a request is the delayed select together with read or write.
// With no wait cycles configured it is performed in the cycle in which it
// appears: the enables are high, the read data appears combinationally on
// dout and trans_ack and byte_ack are high, so bursts run at one transfer
// per clock. With N wait cycles the request is captured and performed N
// cycles later; the control inputs are ignored until then, so a request
// held by the master until its acknowledge is performed once, and a
// pipelined master may present its address for a single cycle. The write
// data is taken in the cycle of the access. A request that is both read and
// write is a write. With rd_reg set, a read's enables fire in the access
// cycle and its data and acknowledge follow one cycle later; requests in
// that cycle are ignored.
// Bytes of a register are addressed at byte address j; byte j sits on
// offset j mod 4 of word j div 4.
//
// The signal set, the split into control and register CLBs and the kinds of
// configurability follow the source architecture; the delay ranges, the
// wait-cycle counter, the size encoding (00 byte, 01 half, 10 word, 11 no
// lanes) and the reset values are choices of this implementation.
module sbus_if_ctrl
  import sbus_pkg::*;
#(
  parameter int unsigned ADDR_W   = 6,
  parameter int unsigned NUM_REGS = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  ctrl_cfg_t            cfg,
  // generic bus side
  input  logic                 select,
  input  logic                 read,
  input  logic                 write,
  input  logic [LANES-1:0]     byte_enable,
  input  logic [ADDR_W-1:0]    address,
  input  logic [1:0]           size,
  input  logic [DATA_W-1:0]    din,
  output logic [DATA_W-1:0]    dout,
  output logic [LANES-1:0]     byte_ack,
  output logic                 trans_ack,
  // register column side
  output logic [NUM_REGS-1:0]  write_en,
  output logic [NUM_REGS-1:0]  read_en,
  output logic [DATA_W-1:0]    data_in,
  input  logic [DATA_W-1:0]    data_out
);

  localparam int unsigned CTRL_W = 3 + LANES + ADDR_W + 2;

  logic               sel_d, rd_d, wr_d;
  logic [LANES-1:0]   be_d;
  logic [ADDR_W-1:0]  addr_d;
  logic [1:0]         size_d;
  logic [DATA_W-1:0]  din_d;

  cfg_delay #(.W(CTRL_W), .MAX_DLY(3)) u_ctrl_dly (
    .clk (clk), .rst_n (rst_n), .dly (cfg.ctrl_dly),
    .d   ({select, read, write, byte_enable, address, size}),
    .q   ({sel_d, rd_d, wr_d, be_d, addr_d, size_d})
  );

  cfg_delay #(.W(DATA_W), .MAX_DLY(3)) u_wdata_dly (
    .clk (clk), .rst_n (rst_n), .dly (cfg.wdata_dly),
    .d   (din), .q (din_d)
  );

  // Wait cycles. A request that needs no wait is performed in the cycle in
  // which it appears. Otherwise it is captured and the captured copy is
  // performed after the configured number of cycles; requests arriving in
  // between are ignored (the master is being held off by the missing ack).
  typedef struct packed {
    logic              rd, wr;
    logic [LANES-1:0]  be;
    logic [ADDR_W-1:0] addr;
    logic [1:0]        size;
  } req_t;

  req_t       in_req, held, cur;
  logic       busy;
  logic       rd_hold;        // registered read response pending
  logic [1:0] wait_cnt, wait_target;
  logic       req, is_wr, access;

  always_comb begin
    in_req      = '{rd: rd_d, wr: wr_d, be: be_d, addr: addr_d, size: size_d};
    cur         = busy ? held : in_req;
    req         = ~rd_hold & (busy | (sel_d & (rd_d | wr_d)));
    is_wr       = cur.wr;
    wait_target = is_wr ? cfg.wr_wait : cfg.rd_wait;
    access      = req && (busy ? (wait_cnt == wait_target) : (wait_target == 2'd0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      held     <= '0;
      wait_cnt <= '0;
    end else if (access) begin
      busy     <= 1'b0;
      wait_cnt <= '0;
    end else if (req) begin
      if (!busy) held <= in_req;
      busy     <= 1'b1;
      wait_cnt <= wait_cnt + 2'd1;
    end
  end

  // Byte lanes. off_mask is indexed by the byte offset inside the word;
  // bus_lanes by the data lane on the bus.
  function automatic logic [LANES-1:0] reverse_lanes(logic [LANES-1:0] m);
    logic [LANES-1:0] r;
    for (int unsigned i = 0; i < LANES; i++) r[i] = m[LANES-1-i];
    return r;
  endfunction

  function automatic logic [DATA_W-1:0] swap_bytes(logic [DATA_W-1:0] v);
    logic [DATA_W-1:0] r;
    for (int unsigned i = 0; i < LANES; i++) r[8*i +: 8] = v[8*(LANES-1-i) +: 8];
    return r;
  endfunction

  logic [LANES-1:0] off_mask, bus_lanes;

  always_comb begin
    if (cfg.addr_mode == AM_BYTE_ENABLE) begin
      bus_lanes = cur.be;
      off_mask  = cfg.big_endian ? reverse_lanes(cur.be) : cur.be;
    end else begin
      case (cur.size)
        SZ_BYTE: off_mask = 4'b0001 << cur.addr[1:0];
        SZ_HALF: off_mask = 4'b0011 << {cur.addr[1], 1'b0};
        SZ_WORD: off_mask = 4'b1111;
        default: off_mask = 4'b0000;
      endcase
      bus_lanes = cfg.big_endian ? reverse_lanes(off_mask) : off_mask;
    end
  end

  // Per-byte enables.
  always_comb begin
    for (int unsigned j = 0; j < NUM_REGS; j++) begin
      write_en[j] = access &  is_wr & (cur.addr[ADDR_W-1:2] == (ADDR_W-2)'(j >> 2)) & off_mask[j % 4];
      read_en[j]  = access & ~is_wr & (cur.addr[ADDR_W-1:2] == (ADDR_W-2)'(j >> 2)) & off_mask[j % 4];
    end
  end

  // Handshake rules: a byte is enabled only in an acknowledged cycle, never
  // for read and write at once, and the wait counter stays within range.
  a_enable_needs_ack: assert property (@(posedge clk) disable iff (!rst_n)
    (|write_en || |read_en) |-> (trans_ack || cfg.rd_reg));
  a_read_xor_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(|write_en && |read_en));
  a_wait_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (wait_cnt <= wait_target));

  assign data_in   = cfg.big_endian ? swap_bytes(din_d) : din_d;
  // Read response, direct or registered.
  logic              acc_rd_reg, acc_now;
  logic [DATA_W-1:0] rd_word, dout_q;
  logic [LANES-1:0]  lanes_q;

  assign rd_word    = cfg.big_endian ? swap_bytes(data_out) : data_out;
  assign acc_rd_reg = access & ~is_wr & cfg.rd_reg;
  assign acc_now    = access & ~acc_rd_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_hold <= 1'b0;
      dout_q  <= '0;
      lanes_q <= '0;
    end else begin
      rd_hold <= acc_rd_reg;
      if (acc_rd_reg) begin
        dout_q  <= rd_word;
        lanes_q <= bus_lanes;
      end
    end
  end

  assign dout      = rd_hold ? dout_q : rd_word;
  assign trans_ack = acc_now | rd_hold;
  assign byte_ack  = rd_hold ? lanes_q : (acc_now ? bus_lanes : '0);

endmodule
