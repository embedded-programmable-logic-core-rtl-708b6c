// tb_sbus_plc_column: end-to-end test of the interface column at its default
// size (6-bit address, 64 register bytes, five control tiles).
//
// The bench plays the system-bus master, the soft glue logic the fabric
// would hold in front of the control tiles (for example select = PSEL &
// PENABLE), and a small user design in the fabric behind the register
// tiles. The register map used:
//   word 0     bytes 0..3    RW   operands of the user design
//   word 1     bytes 4..7    RO   results: b0+b1, b0^b2, ~b3, 8'h5A
//   word 2     bytes 8..11   WIC  interrupt status, set by design events
//   word 3     bytes 12..15  RWS  status, written by the master, set by design
//   word 4     bytes 16..19  IND  writing 1 pulses the action output
//   words 5-15 bytes 20..62  RW   scratch
//   byte 63                       tile in CLB mode (LUT buffers), not a register
// The same column is then reconfigured for five bus protocols:
//   APB        held request, access phase after a setup cycle, 1 read wait;
//   AHB        control delayed one cycle, size addressing, bursts at one
//              transfer per clock;
//   OPB        byte enables, big endian, 1 write wait;
//   Wishbone   registered write and read data, 2 wait cycles, byte enables;
//   DCR        word transfers, big endian, 1 wait cycle each way.
// Every read is compared with a reference model of the map, every
// acknowledge with the configured latency, and the action pulses and
// interrupt pins with their expected values. Each mechanism is counted and
// one that never happened is a failure.
module tb_sbus_plc_column;
  import sbus_pkg::*;

  localparam int unsigned NR = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ctrl_sbus_en;
  ctrl_cfg_t ctrl_cfg;
  clb_cfg_t [4:0] ctrl_lut_cfg;
  logic [49:0] ctrl_pin_in;
  logic [39:0] ctrl_pin_out;
  logic [NR-1:0] reg_sbus_en;
  clb_cfg_t [NR-1:0] reg_lut_cfg;
  bit_cfg_t [NR-1:0][7:0] reg_bit_cfg;
  logic [NR-1:0][9:0] reg_pin_in;
  logic [NR-1:0][7:0] reg_pin_out;
  int checks = 0, failures = 0;

  sbus_plc_column dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h t=%0t", what, got, exp, $time);
    end
  endtask

  // ---------------------------------------------------------------- fabric side
  logic [7:0] ev [8:15];        // design events into WIC / RWS bytes
  logic [9:0] lut_pins;         // inputs of the CLB-mode tile
  always_comb begin
    for (int j = 0; j < NR; j++) reg_pin_in[j] = '0;
    reg_pin_in[4][7:0] = reg_pin_out[0] + reg_pin_out[1];
    reg_pin_in[5][7:0] = reg_pin_out[0] ^ reg_pin_out[2];
    reg_pin_in[6][7:0] = ~reg_pin_out[3];
    reg_pin_in[7][7:0] = 8'h5A;
    for (int j = 8; j < 16; j++) reg_pin_in[j][7:0] = ev[j];
    reg_pin_in[63] = lut_pins;
  end

  // action pulses seen on the IND bytes
  int ind_seen [16:19][8];
  int ind_exp  [16:19][8];
  always @(posedge clk)
    for (int j = 16; j < 20; j++)
      for (int k = 0; k < 8; k++)
        if (reg_pin_out[j][k]) ind_seen[j][k]++;

  // ---------------------------------------------------------------- reference
  logic [7:0] mem [NR];          // RW, WIC, RWS, IND state
  function automatic logic [7:0] exp_byte(int j);
    if (j >= 4 && j < 8) begin
      case (j)
        4: return mem[0] + mem[1];
        5: return mem[0] ^ mem[2];
        6: return ~mem[3];
        default: return 8'h5A;
      endcase
    end
    if (j >= 16 && j < 20) return 8'h00;
    if (j == 63) return 8'h00;
    return mem[j];
  endfunction

  int n_apb, n_ahb, n_opb, n_wb, n_dcr, n_rdreg, n_wait, n_burst, n_big, n_size, n_be, n_wdly;
  int n_wic_set, n_wic_clr, n_rws_set, n_ind, n_ro, n_clb, n_sub;

  task automatic apply_write(int j, logic [7:0] v);
    if (j >= 8 && j < 12) begin
      if ((mem[j] & v) != 0) n_wic_clr++;
      mem[j] &= ~v;
    end else if (j >= 16 && j < 20) begin
      for (int k = 0; k < 8; k++) if (v[k]) begin ind_exp[j][k]++; n_ind++; end
    end else if (j >= 4 && j < 8) begin
      // read only: the master cannot change it
    end else if (j != 63) begin
      mem[j] = v;
    end
  endtask

  // one cycle of design events on the WIC and RWS bytes
  task automatic design_events();
    @(negedge clk);
    for (int j = 8; j < 16; j++) begin
      ev[j] = ($urandom_range(0, 3) == 0) ? 8'(1 << $urandom_range(0, 7)) : 8'h00;
      if (ev[j] != 0) begin
        if (j < 12) n_wic_set++; else n_rws_set++;
        mem[j] |= ev[j];
      end
    end
    @(negedge clk);
    for (int j = 8; j < 16; j++) ev[j] = 8'h00;
    #1;
    for (int j = 8; j < 12; j++) chk(reg_pin_out[j], mem[j], "interrupt pins");
  endtask

  // ---------------------------------------------------------------- bus side
  function automatic int lane_of(int o);
    return ctrl_cfg.big_endian ? 3 - o : o;
  endfunction

  // a random access of word w: offsets touched, as encodable in the mode
  function automatic logic [3:0] rand_offs();
    logic [3:0] m;
    if (ctrl_cfg.addr_mode == AM_BYTE_ENABLE) m = 4'($urandom_range(1, 15));
    else case ($urandom_range(0, 2))
      0: m = 4'b0001 << $urandom_range(0, 3);
      1: m = $urandom_range(0, 1) ? 4'b1100 : 4'b0011;
      default: m = 4'b1111;
    endcase
    return m;
  endfunction

  // drive the control pins of one request
  task automatic drive_req(logic sel, logic wr, int w, logic [3:0] offs, logic [31:0] wd);
    logic [3:0] be; logic [5:0] a; logic [1:0] sz;
    be = '0;
    for (int o = 0; o < 4; o++) if (offs[o]) be[lane_of(o)] = 1'b1;
    a = 6'(w * 4);
    sz = 2'b10;
    if (ctrl_cfg.addr_mode == AM_SIZE) begin
      case (offs)
        4'b0001: begin sz = 2'b00; a[1:0] = 2'd0; end
        4'b0010: begin sz = 2'b00; a[1:0] = 2'd1; end
        4'b0100: begin sz = 2'b00; a[1:0] = 2'd2; end
        4'b1000: begin sz = 2'b00; a[1:0] = 2'd3; end
        4'b0011: begin sz = 2'b01; a[1:0] = 2'd0; end
        4'b1100: begin sz = 2'b01; a[1:0] = 2'd2; end
        default: sz = 2'b10;
      endcase
      if (sz != 2'b10) n_sub++;
    end
    ctrl_pin_in = '0;
    ctrl_pin_in[0] = sel;
    ctrl_pin_in[1] = sel & ~wr;
    ctrl_pin_in[2] = sel & wr;
    ctrl_pin_in[6:3] = be;
    ctrl_pin_in[12:7] = a;
    ctrl_pin_in[14:13] = sz;
    ctrl_pin_in[46:15] = wd;
  endtask

  // checks in the acknowledge cycle
  task automatic ack_checks(logic wr, int w, logic [3:0] offs, logic [31:0] wd);
    logic [31:0] rd; logic [3:0] lanes;
    rd = '0; lanes = '0;
    for (int o = 0; o < 4; o++) if (offs[o]) begin
      lanes[lane_of(o)] = 1'b1;
      rd[8*lane_of(o) +: 8] = exp_byte(w*4 + o);
    end
    chk(ctrl_pin_out[36], 1'b1, "trans_ack");
    chk(ctrl_pin_out[35:32], lanes, "byte_ack");
    if (!wr) begin
      chk(ctrl_pin_out[31:0], rd, "read data");
      if (w == 1) n_ro++;
      if (w == 15 && offs[3]) n_clb++;
    end else begin
      for (int o = 0; o < 4; o++) if (offs[o]) apply_write(w*4 + o, wd[8*lane_of(o) +: 8]);
    end
  endtask

  // held request: optional setup cycle (APB), then held until acknowledged
  task automatic held_xfer(logic setup, logic wr, int w, logic [3:0] offs, logic [31:0] wd);
    int lat, exp_lat;
    exp_lat = wr ? int'(ctrl_cfg.wr_wait) : int'(ctrl_cfg.rd_wait) + int'(ctrl_cfg.rd_reg);
    if (exp_lat > 0) n_wait++;
    if (ctrl_cfg.rd_reg && !wr) n_rdreg++;
    if (ctrl_cfg.big_endian) n_big++;
    if (ctrl_cfg.addr_mode == AM_SIZE) n_size++; else n_be++;
    if (ctrl_cfg.wdata_dly != 0 && wr) n_wdly++;
    @(negedge clk);
    if (setup) begin
      drive_req(1'b0, wr, w, offs, wd);   // PSEL without PENABLE: no select
      @(negedge clk);
    end
    drive_req(1'b1, wr, w, offs, wd);
    lat = 0; #1;
    while (!ctrl_pin_out[36] && lat < 10) begin @(negedge clk); lat++; #1; end
    chk(lat, exp_lat, "acknowledge latency");
    ack_checks(wr, w, offs, wd);
    @(negedge clk);
    ctrl_pin_in = '0;
  endtask

  // pipelined burst (control delayed one cycle, no waits)
  task automatic pipe_burst(int n, logic wr, int w0, logic incr);
    int w [16]; logic [3:0] offs [16]; logic [31:0] wd [16];
    int start;
    for (int i = 0; i < n; i++) begin
      w[i] = incr ? (w0 + i) % 16 : $urandom_range(0, 15);
      offs[i] = incr ? 4'b1111 : rand_offs();
      wd[i] = $urandom;
    end
    if (n > 1) n_burst++;
    n_size++;
    @(negedge clk);
    start = int'($time);
    for (int i = 0; i <= n; i++) begin
      if (i < n) drive_req(1'b1, wr, w[i], offs[i], 32'h0);
      else       drive_req(1'b0, 1'b0, 0, 4'h0, 32'h0);
      if (i > 0) begin
        ctrl_pin_in[46:15] = wd[i-1];
        #1;
        ack_checks(wr, w[i-1], offs[i-1], wd[i-1]);
      end
      @(negedge clk);
    end
    chk((int'($time) - start) / 10, n + 1, "burst cycles");
    ctrl_pin_in = '0;
  endtask

  task automatic set_cfg(int unsigned cd, int unsigned wdd, int unsigned rw, int unsigned ww,
                         addr_mode_e am, logic be);
    @(negedge clk);
    ctrl_cfg.ctrl_dly = 2'(cd); ctrl_cfg.wdata_dly = 2'(wdd);
    ctrl_cfg.rd_wait = 2'(rw); ctrl_cfg.wr_wait = 2'(ww);
    ctrl_cfg.addr_mode = am; ctrl_cfg.big_endian = be;
    repeat (4) @(negedge clk);
  endtask

  task automatic random_held(logic setup, int n);
    for (int i = 0; i < n; i++) begin
      logic wr; int w;
      wr = $urandom_range(0, 1);
      w  = $urandom_range(0, 15);
      held_xfer(setup, wr, w, rand_offs(), $urandom);
      if (i % 4 == 0) design_events();
    end
  endtask

  task automatic read_back_all();
    for (int w = 0; w < 16; w++) held_xfer(1'b0, 1'b0, w, 4'b1111, 32'h0);
  endtask

  initial begin
    n_apb = 0; n_ahb = 0; n_opb = 0; n_wb = 0; n_dcr = 0; n_rdreg = 0; n_wait = 0; n_burst = 0; n_big = 0;
    n_size = 0; n_be = 0; n_wdly = 0; n_wic_set = 0; n_wic_clr = 0; n_rws_set = 0;
    n_ind = 0; n_ro = 0; n_clb = 0; n_sub = 0;
    for (int j = 8; j < 16; j++) ev[j] = 8'h00;
    for (int j = 16; j < 20; j++) for (int k = 0; k < 8; k++) begin ind_seen[j][k] = 0; ind_exp[j][k] = 0; end
    for (int j = 0; j < NR; j++) mem[j] = 8'h00;
    lut_pins = '0;
    ctrl_pin_in = '0;
    ctrl_sbus_en = 1'b1;
    ctrl_cfg = '0;
    ctrl_lut_cfg = '0;
    // register map
    for (int j = 0; j < NR; j++) begin
      bit_type_e t;
      t = (j < 4) ? BT_RW : (j < 8) ? BT_RO : (j < 12) ? BT_WIC : (j < 16) ? BT_RWS :
          (j < 20) ? BT_IND : BT_RW;
      for (int k = 0; k < 8; k++) reg_bit_cfg[j][k] = bit_type_cfg(t);
      reg_sbus_en[j] = (j != 63);
    end
    // the CLB-mode tile: LUT b buffers pin b
    reg_lut_cfg = '0;
    for (int b = 0; b < 4; b++) begin
      for (int k = 0; k < 4; k++) reg_lut_cfg[63][b].in_sel[k] = 4'(b);
      reg_lut_cfg[63][b].mask = 16'hAAAA;
    end
    repeat (2) @(negedge clk); rst_n = 1;

    // APB: setup + access phase, one read wait
    set_cfg(0, 0, 1, 0, AM_BYTE_ENABLE, 1'b0);
    for (int i = 0; i < 150; i++) begin
      held_xfer(1'b1, $urandom_range(0, 1), $urandom_range(0, 15), 4'b1111, $urandom);
      n_apb++;
      if (i % 4 == 0) design_events();
    end
    // AHB: control one cycle ahead of data, size addressing, bursts
    set_cfg(1, 0, 0, 0, AM_SIZE, 1'b0);
    for (int i = 0; i < 40; i++) begin
      pipe_burst($urandom_range(1, 8), $urandom_range(0, 1), $urandom_range(0, 15), $urandom_range(0, 1));
      n_ahb++;
      design_events();
    end
    // OPB-like: byte enables, big endian, one write wait
    set_cfg(0, 0, 0, 1, AM_BYTE_ENABLE, 1'b1);
    random_held(1'b0, 150);
    n_opb += 150;
    // Wishbone-like: registered write and read data, two waits
    set_cfg(0, 1, 2, 2, AM_BYTE_ENABLE, 1'b0);
    ctrl_cfg.rd_reg = 1'b1;
    random_held(1'b0, 150);
    n_wb += 150;
    // DCR-like: word transfers, big endian, one wait cycle each way
    set_cfg(0, 0, 1, 1, AM_BYTE_ENABLE, 1'b1);
    ctrl_cfg.rd_reg = 1'b0;
    for (int i = 0; i < 100; i++) begin
      held_xfer(1'b0, $urandom_range(0, 1), $urandom_range(0, 15), 4'b1111, $urandom);
      n_dcr++;
      if (i % 4 == 0) design_events();
    end
    // the CLB-mode tile works as logic
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); lut_pins = 10'($urandom); #1;
      chk(reg_pin_out[63], {4'h0, lut_pins[3:0]}, "CLB-mode tile");
    end
    lut_pins = '0;
    read_back_all();
    // action pulses
    repeat (2) @(negedge clk);
    for (int j = 16; j < 20; j++)
      for (int k = 0; k < 8; k++) chk(ind_seen[j][k], ind_exp[j][k], "action pulse count");

    $display("mechanisms: apb=%0d ahb=%0d opb=%0d wb=%0d dcr=%0d wait=%0d burst=%0d big_endian=%0d size=%0d subword=%0d byte_en=%0d wdata_dly=%0d rd_reg=%0d",
             n_apb, n_ahb, n_opb, n_wb, n_dcr, n_wait, n_burst, n_big, n_size, n_sub, n_be, n_wdly, n_rdreg);
    $display("mechanisms: wic_set=%0d wic_clear=%0d rws_set=%0d ind_pulse=%0d ro_read=%0d clb_mode=%0d",
             n_wic_set, n_wic_clr, n_rws_set, n_ind, n_ro, n_clb);
    if (n_apb == 0 || n_ahb == 0 || n_opb == 0 || n_wb == 0 || n_dcr == 0 || n_wait == 0 || n_burst == 0 ||
        n_big == 0 || n_size == 0 || n_sub == 0 || n_be == 0 || n_wdly == 0 || n_rdreg == 0 || n_wic_set == 0 ||
        n_wic_clr == 0 || n_rws_set == 0 || n_ind == 0 || n_ro == 0 || n_clb == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
