// tb_mod_reg_clb: self-checking test of a register-type modified CLB.
//
// The tile (lane 1) is switched between its two uses:
//   CLB mode        LUT b is configured as a buffer of input pin b; the bench
//                   checks pins 3..0 follow the inputs, pins 7..4 are low,
//                   bus writes do not reach the register byte and bus reads
//                   add nothing to the read chain;
//   interface mode  all eight bits are RW: bus writes appear on the output
//                   pins, bus reads return the byte on lane 1 of the chain,
//                   and WIC bits set from the input pins.
module tb_mod_reg_clb;
  import sbus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sbus_en;
  clb_cfg_t lut_cfg;
  bit_cfg_t [7:0] reg_cfg;
  logic [9:0] pin_in;
  logic [7:0] pin_out;
  logic write_en, read_en;
  logic [31:0] data_in, data_in_next, data_out_prev, data_out;
  int checks = 0, failures = 0;
  int n_lut, n_sbus;

  mod_reg_clb #(.LANE(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h t=%0t", what, got, exp, $time);
    end
  endtask

  logic [7:0] m_byte;

  initial begin
    n_lut = 0; n_sbus = 0;
    for (int b = 0; b < 4; b++) begin
      for (int k = 0; k < 4; k++) lut_cfg[b].in_sel[k] = 4'(b);
      lut_cfg[b].mask   = 16'hAAAA;   // output = LUT input 0
      lut_cfg[b].use_ff = 1'b0;
    end
    for (int k = 0; k < 8; k++) reg_cfg[k] = bit_type_cfg(BT_RW);
    sbus_en = 0; pin_in = 0; write_en = 0; read_en = 0; data_in = 0; data_out_prev = 0;
    m_byte = 8'h00;
    @(negedge clk); rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      @(negedge clk); pin_in = 0; write_en = 0; sbus_en = round % 2;
      for (int i = 0; i < 50; i++) begin
        @(negedge clk);
        pin_in = 10'($urandom);
        if (sbus_en) pin_in[7:0] = 8'h00;
        write_en = $urandom_range(0, 1);
        read_en  = $urandom_range(0, 1);
        data_in  = $urandom;
        data_out_prev = $urandom;
        #1;
        chk(data_in_next, data_in, "data_in_next");
        if (!sbus_en) begin
          n_lut++;
          chk(pin_out, {4'h0, pin_in[3:0]}, "CLB mode pins");
          chk(data_out, data_out_prev, "CLB mode read chain");
        end else begin
          n_sbus++;
          chk(pin_out, m_byte, "interface mode pins");
          chk(data_out, data_out_prev | (read_en ? {16'h0, m_byte, 8'h00} : 32'h0), "interface read chain");
          if (write_en) m_byte = data_in[15:8];
        end
      end
    end
    // WIC bits set from the fabric in interface mode
    for (int k = 0; k < 8; k++) reg_cfg[k] = bit_type_cfg(BT_WIC);
    @(negedge clk); write_en = 1; data_in = 32'hFFFF_FFFF; read_en = 0;
    @(negedge clk); write_en = 0; pin_in = 10'h0A5;
    @(negedge clk); pin_in = 0; #1;
    chk(pin_out, 8'hA5, "WIC set from pins");
    if (n_lut == 0 || n_sbus == 0) begin failures++; $display("FAIL mode coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
