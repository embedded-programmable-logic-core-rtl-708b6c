// tb_sbus_reg_clb: self-checking test of the register byte of one tile.
//
// The tile sits on lane 2. Each bit gets a random type; random writes,
// reads and fabric inputs are applied and the bench checks that only lane 2
// of the write data is stored, that the read data is ORed into lane 2 of
// the chain and nowhere else, that the write data passes through unchanged
// and that out_j follows the per-bit reference model.
module tb_sbus_reg_clb;
  import sbus_pkg::*;

  localparam int unsigned LANE = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  bit_cfg_t [7:0] cfg;
  logic write_en, read_en;
  logic [31:0] data_in, data_in_next, data_out_prev, data_out;
  logic [7:0] in_j, out_j;
  int checks = 0, failures = 0;

  sbus_reg_clb #(.LANE(LANE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit_type_e t [8];
  logic [7:0] m_q;
  logic [7:0] exp_rd, exp_out;
  logic [31:0] exp_do;

  task automatic check32(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    write_en = 0; read_en = 0; data_in = 0; data_out_prev = 0; in_j = 0;
    for (int k = 0; k < 8; k++) begin
      t[k] = bit_type_e'(k % 5);
      cfg[k] = bit_type_cfg(t[k]);
    end
    @(negedge clk); rst_n = 1; m_q = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i % 500 == 0)
        for (int k = 0; k < 8; k++) begin
          t[k] = bit_type_e'($urandom_range(0, 4));
          cfg[k] = bit_type_cfg(t[k]);
        end
      write_en = $urandom_range(0, 1);
      read_en  = $urandom_range(0, 1);
      data_in  = $urandom;
      data_out_prev = $urandom;
      for (int k = 0; k < 8; k++)
        in_j[k] = (t[k] == BT_RO) ? 1'($urandom_range(0, 1)) : ($urandom_range(0, 7) == 0);
      #1;
      for (int k = 0; k < 8; k++) begin
        exp_rd[k]  = read_en & ((t[k] == BT_RO) ? in_j[k] : m_q[k]);
        exp_out[k] = (t[k] == BT_IND) ? (write_en & data_in[8*LANE + k]) : m_q[k];
      end
      exp_do = data_out_prev;
      exp_do[8*LANE +: 8] |= exp_rd;
      check32(data_out, exp_do, "data_out");
      check32({24'h0, out_j}, {24'h0, exp_out}, "out_j");
      check32(data_in_next, data_in, "data_in_next");
      for (int k = 0; k < 8; k++) begin
        if (in_j[k]) m_q[k] = 1'b1;
        else if (write_en) begin
          if (t[k] == BT_WIC || t[k] == BT_IND) begin
            if (data_in[8*LANE + k]) m_q[k] = 1'b0;
          end else m_q[k] = data_in[8*LANE + k];
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
