// tb_sbus_if_ctrl: self-checking test of the interface control.
//
// A behavioural register column (64 bytes, byte j on lane j mod 4) answers
// the byte enables. Two kinds of master drive the control:
//   held       select/read/write/address/data are held until trans_ack
//              (APB access phase, Wishbone classic); random wait cycles,
//              byte-enable and size addressing, little and big endian,
//              direct and registered read data;
//              with wdata_dly = 1 the data is presented one cycle early;
//   pipelined  ctrl_dly = 1: the address phase lasts one cycle and the data
//              follows in the next cycle (AHB); with no wait cycles the next
//              address phase overlaps the data phase, a burst at one
//              transfer per clock.
// Every transfer is checked against a reference memory: the exact set of
// byte enables, the read data, byte_ack, and the acknowledge latency
// (ctrl_dly + wait cycles from the first request cycle).
module tb_sbus_if_ctrl;
  import sbus_pkg::*;

  localparam int unsigned AW = 6;
  localparam int unsigned NR = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  ctrl_cfg_t cfg;
  logic select, read, write;
  logic [3:0] byte_enable;
  logic [AW-1:0] address;
  logic [1:0] size;
  logic [31:0] din, dout;
  logic [3:0] byte_ack;
  logic trans_ack;
  logic [NR-1:0] write_en, read_en;
  logic [31:0] data_in, data_out;
  int checks = 0, failures = 0;

  sbus_if_ctrl #(.ADDR_W(AW), .NUM_REGS(NR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural register column
  logic [7:0] col [NR];
  always_comb begin
    data_out = '0;
    for (int j = 0; j < NR; j++)
      if (read_en[j]) data_out[8*(j%4) +: 8] |= col[j];
  end
  always_ff @(posedge clk)
    for (int j = 0; j < NR; j++)
      if (write_en[j]) col[j] <= data_in[8*(j%4) +: 8];

  // reference
  logic [7:0] ref_mem [NR];
  int n_wait, n_burst, n_big, n_size, n_be, n_wdly, n_rdreg;

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h t=%0t", what, got, exp, $time);
    end
  endtask

  // offsets of the word touched by a transfer, and the bus lane of each
  function automatic logic [3:0] exp_offsets(logic [AW-1:0] a, logic [3:0] be, logic [1:0] sz);
    logic [3:0] m;
    if (cfg.addr_mode == AM_BYTE_ENABLE) begin
      m = cfg.big_endian ? {be[0], be[1], be[2], be[3]} : be;
    end else begin
      case (sz)
        2'b00: m = 4'b0001 << a[1:0];
        2'b01: m = a[1] ? 4'b1100 : 4'b0011;
        2'b10: m = 4'b1111;
        default: m = 4'b0000;
      endcase
    end
    return m;
  endfunction

  function automatic int lane_of(int o);
    return cfg.big_endian ? 3 - o : o;
  endfunction

  // expected effect of one transfer, checked in its access cycle
  logic [NR-1:0] prev_read_en;   // read enables of the cycle before the ack
  task automatic check_access(input logic wr, input logic [AW-1:0] a, input logic [3:0] be,
                              input logic [1:0] sz, input logic [31:0] wd, input logic regd);
    logic [3:0] offs, lanes;
    logic [NR-1:0] en;
    logic [31:0] rd;
    offs = exp_offsets(a, be, sz);
    en = '0; rd = '0; lanes = '0;
    for (int o = 0; o < 4; o++) if (offs[o]) begin
      en[{a[AW-1:2], 2'(o)}] = 1'b1;
      lanes[lane_of(o)] = 1'b1;
      rd[8*lane_of(o) +: 8] = ref_mem[{a[AW-1:2], 2'(o)}];
    end
    chk(trans_ack, 1, "trans_ack");
    chk(byte_ack, lanes, "byte_ack");
    if (wr) begin
      chk(write_en, en, "write_en");
      chk(read_en, 0, "read_en during write");
      for (int o = 0; o < 4; o++) if (offs[o])
        ref_mem[{a[AW-1:2], 2'(o)}] = wd[8*lane_of(o) +: 8];
    end else begin
      if (regd) begin
        chk(prev_read_en, en, "read_en one cycle before registered ack");
        chk(read_en, 0, "no read_en in registered ack cycle");
        n_rdreg++;
      end else
        chk(read_en, en, "read_en");
      chk(write_en, 0, "write_en during read");
      chk(dout, rd, "dout");
    end
  endtask

  task automatic random_req(output logic wr, output logic [AW-1:0] a, output logic [3:0] be,
                            output logic [1:0] sz, output logic [31:0] wd);
    wr = $urandom_range(0, 1);
    a  = AW'($urandom);
    be = 4'($urandom);
    sz = 2'($urandom_range(0, 2));
    if (cfg.addr_mode == AM_BYTE_ENABLE) a[1:0] = 2'b00;
    else if (sz == 2'b01) a[0] = 1'b0;
    else if (sz == 2'b10) a[1:0] = 2'b00;
    wd = $urandom;
  endtask

  // held master: one transfer
  task automatic held_xfer();
    logic wr; logic [AW-1:0] a; logic [3:0] be; logic [1:0] sz; logic [31:0] wd;
    int lat, exp_lat;
    random_req(wr, a, be, sz, wd);
    exp_lat = wr ? int'(cfg.wr_wait) : int'(cfg.rd_wait) + int'(cfg.rd_reg);
    if (exp_lat > 0) n_wait++;
    if (cfg.big_endian) n_big++;
    if (cfg.addr_mode == AM_SIZE) n_size++; else n_be++;
    @(negedge clk);
    din = wd;
    if (cfg.wdata_dly != 0) begin
      n_wdly++;
      repeat (int'(cfg.wdata_dly)) @(negedge clk);
    end
    select = 1; write = wr; read = ~wr; address = a; byte_enable = be; size = sz;
    lat = 0;
    #1;
    prev_read_en = '0;
    while (!trans_ack && lat < 10) begin
      if (!(cfg.rd_reg && !wr && lat == exp_lat - 1))
        chk(write_en | read_en, 0, "no enable before ack");
      prev_read_en = read_en;
      @(negedge clk); lat++; #1;
    end
    chk(lat, exp_lat, "held latency");
    check_access(wr, a, be, sz, wd, cfg.rd_reg && !wr);
    @(negedge clk);
    select = 0; write = 0; read = 0;
  endtask

  // pipelined master: a burst of n transfers (AHB-like, ctrl_dly = 1)
  task automatic pipe_burst(input int n);
    logic wr [8]; logic [AW-1:0] a [8]; logic [3:0] be [8]; logic [1:0] sz [8]; logic [31:0] wd [8];
    int lat, exp_lat, start, stop;
    for (int i = 0; i < n; i++) random_req(wr[i], a[i], be[i], sz[i], wd[i]);
    if (n > 1) n_burst++;
    @(negedge clk);
    start = $time;
    for (int i = 0; i <= n; i++) begin
      // address phase of i, data phase of i-1
      if (i < n) begin
        select = 1; write = wr[i]; read = ~wr[i]; address = a[i]; byte_enable = be[i]; size = sz[i];
      end else begin
        select = 0; write = 0; read = 0;
      end
      if (i > 0) begin
        din = wd[i-1];
        exp_lat = wr[i-1] ? int'(cfg.wr_wait) : int'(cfg.rd_wait);
        if (exp_lat > 0) n_wait++;
        lat = 0;
        #1;
        while (!trans_ack && lat < 10) begin
          @(negedge clk); lat++;
          // address phase is not repeated while the slave waits
          select = 0; write = 0; read = 0;
          #1;
        end
        chk(lat, exp_lat, "pipelined latency");
        check_access(wr[i-1], a[i-1], be[i-1], sz[i-1], wd[i-1], 1'b0);
        if (lat > 0 && i < n) begin
          // re-issue the next address phase after a stall
          select = 1; write = wr[i]; read = ~wr[i]; address = a[i]; byte_enable = be[i]; size = sz[i];
        end
      end
      @(negedge clk);
    end
    stop = $time;
    if (cfg.wr_wait == 0 && cfg.rd_wait == 0)
      chk((stop - start) / 10, n + 1, "burst cycles (one per transfer plus address phase)");
  endtask

  initial begin
    select = 0; read = 0; write = 0; byte_enable = 0; address = 0; size = 0; din = 0;
    cfg = '0;
    n_wait = 0; n_burst = 0; n_big = 0; n_size = 0; n_be = 0; n_wdly = 0; n_rdreg = 0;
    for (int j = 0; j < NR; j++) begin col[j] = 8'h00; ref_mem[j] = 8'h00; end
    repeat (2) @(negedge clk); rst_n = 1;
    // held master over many configurations
    for (int c = 0; c < 40; c++) begin
      cfg.ctrl_dly   = 0;
      cfg.wdata_dly  = 2'($urandom_range(0, 1));
      cfg.rd_wait    = 2'($urandom_range(0, 3));
      cfg.wr_wait    = 2'($urandom_range(0, 3));
      cfg.addr_mode  = addr_mode_e'(c % 2);
      cfg.big_endian = (c / 2) % 2;
      cfg.rd_reg     = (c / 4) % 2;
      for (int i = 0; i < 25; i++) held_xfer();
    end
    // pipelined master
    for (int c = 0; c < 24; c++) begin
      cfg.ctrl_dly   = 1;
      cfg.wdata_dly  = 0;
      cfg.rd_wait    = (c < 12) ? 2'd0 : 2'($urandom_range(0, 2));
      cfg.wr_wait    = (c < 12) ? 2'd0 : 2'($urandom_range(0, 2));
      cfg.addr_mode  = addr_mode_e'(c % 2);
      cfg.big_endian = (c / 2) % 2;
      cfg.rd_reg     = 1'b0;
      for (int i = 0; i < 10; i++) pipe_burst($urandom_range(1, 8));
    end
    // final read-back of the whole map through the column model
    for (int j = 0; j < NR; j++) chk(col[j], ref_mem[j], "column contents");
    if (n_wait == 0 || n_burst == 0 || n_big == 0 || n_size == 0 || n_be == 0 || n_wdly == 0 ||
        n_rdreg == 0) begin
      failures++;
      $display("FAIL coverage wait=%0d burst=%0d big=%0d size=%0d be=%0d wdly=%0d",
               n_wait, n_burst, n_big, n_size, n_be, n_wdly);
    end
    $display("coverage wait=%0d burst=%0d big=%0d size=%0d be=%0d wdly=%0d rdreg=%0d",
             n_wait, n_burst, n_big, n_size, n_be, n_wdly, n_rdreg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
