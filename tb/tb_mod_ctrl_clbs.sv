// tb_mod_ctrl_clbs: self-checking test of the five control tiles.
//
// CLB mode: LUT b of tile t buffers input pin 10t+b; the bench checks output
// pins 8t+3..8t against it, pins 8t+7..8t+4 low, and that no byte enable
// is raised whatever the pins carry. Interface mode: bus transfers are
// driven on the pin positions of the control signals (select 0, read 1,
// write 2, byte_enable 6..3, address 12..7, size 14..13, din 46..15) with a
// behavioural register column behind the tiles, and dout (pins 31..0),
// byte_ack (35..32) and trans_ack (36) are checked.
module tb_mod_ctrl_clbs;
  import sbus_pkg::*;

  localparam int unsigned AW = 6;
  localparam int unsigned NR = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sbus_en;
  ctrl_cfg_t ctrl_cfg;
  clb_cfg_t [4:0] lut_cfg;
  logic [49:0] pin_in;
  logic [39:0] pin_out;
  logic [NR-1:0] write_en, read_en;
  logic [31:0] data_in, data_out;
  int checks = 0, failures = 0;
  int n_lut, n_wr, n_rd;

  mod_ctrl_clbs #(.ADDR_W(AW), .NUM_REGS(NR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] col [NR];
  always_comb begin
    data_out = '0;
    for (int j = 0; j < NR; j++)
      if (read_en[j]) data_out[8*(j%4) +: 8] |= col[j];
  end
  always_ff @(posedge clk)
    for (int j = 0; j < NR; j++)
      if (write_en[j]) col[j] <= data_in[8*(j%4) +: 8];

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h t=%0t", what, got, exp, $time);
    end
  endtask

  logic [7:0] ref_mem [NR];

  initial begin
    n_lut = 0; n_wr = 0; n_rd = 0;
    for (int t = 0; t < 5; t++)
      for (int b = 0; b < 4; b++) begin
        for (int k = 0; k < 4; k++) lut_cfg[t][b].in_sel[k] = 4'(b);
        lut_cfg[t][b].mask   = 16'hAAAA;
        lut_cfg[t][b].use_ff = 1'b0;
      end
    ctrl_cfg = '0;
    ctrl_cfg.addr_mode = AM_BYTE_ENABLE;
    sbus_en = 0; pin_in = '0;
    for (int j = 0; j < NR; j++) begin col[j] = 8'h00; ref_mem[j] = 8'h00; end
    @(negedge clk); rst_n = 1;
    // CLB mode
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      pin_in = {$urandom, $urandom};
      #1;
      n_lut++;
      for (int t = 0; t < 5; t++)
        chk(pin_out[8*t +: 8], {4'h0, pin_in[10*t +: 4]}, "CLB mode pins");
      chk(write_en | read_en, 0, "no enables in CLB mode");
    end
    // interface mode, single-cycle transfers with byte enables
    @(negedge clk); sbus_en = 1; pin_in = '0;
    for (int i = 0; i < 600; i++) begin
      logic wr; logic [5:0] a; logic [3:0] be; logic [31:0] wd, rd;
      wr = $urandom_range(0, 1); a = 6'($urandom) & 6'h3C; be = 4'($urandom); wd = $urandom;
      @(negedge clk);
      pin_in = '0;
      pin_in[0] = 1'b1; pin_in[1] = ~wr; pin_in[2] = wr;
      pin_in[6:3] = be; pin_in[12:7] = a; pin_in[14:13] = 2'b10; pin_in[46:15] = wd;
      pin_in[49:47] = 3'($urandom);
      #1;
      rd = '0;
      for (int o = 0; o < 4; o++) if (be[o]) begin
        rd[8*o +: 8] = ref_mem[a + 6'(o)];
        if (wr) ref_mem[a + 6'(o)] = wd[8*o +: 8];
      end
      chk(pin_out[36], 1'b1, "trans_ack pin");
      chk(pin_out[35:32], be, "byte_ack pins");
      chk(pin_out[39:37], 3'b000, "unused pins");
      if (!wr) begin chk(pin_out[31:0], rd, "dout pins"); n_rd++; end
      else n_wr++;
    end
    @(negedge clk); pin_in = '0; #1;
    chk(pin_out[36], 1'b0, "no ack when idle");
    if (n_lut == 0 || n_wr == 0 || n_rd == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
