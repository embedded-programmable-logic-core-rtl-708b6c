// tb_sbus_reg_bit: self-checking test of one configurable register bit.
//
// For each of the five bit types the bench applies random writes, reads and
// fabric set pulses and compares data_out, out_bit and the stored value with
// a reference model written from the bit-type definitions:
//   RW/RWS  a write stores the data bit; a set from the fabric stores 1;
//   RO      a read returns the fabric input;
//   WIC     writing 1 clears, writing 0 does nothing, the fabric sets;
//   IND     writing 1 gives a one-cycle pulse on out_bit and reads as 0.
// A set in the same cycle as a clearing write wins.
module tb_sbus_reg_bit;
  import sbus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  bit_cfg_t cfg;
  logic write_en, read_en, data_in, in_bit;
  logic data_out, out_bit;
  int checks = 0, failures = 0;

  sbus_reg_bit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit_type_e t;
  logic m_q;
  int n_pulse, n_clear, n_set;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s type=%s got=%b exp=%b", what, t.name(), got, exp);
    end
  endtask

  initial begin
    write_en = 0; read_en = 0; data_in = 0; in_bit = 0;
    t = BT_RW; cfg = bit_type_cfg(t);
    n_pulse = 0; n_clear = 0; n_set = 0;
    repeat (2) @(posedge clk);
    for (int ti = 0; ti < 5; ti++) begin
      t = bit_type_e'(ti);
      cfg = bit_type_cfg(t);
      // reset between types
      rst_n = 0; @(negedge clk); rst_n = 1; m_q = 0;
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        write_en = $urandom_range(0, 1);
        read_en  = $urandom_range(0, 1);
        data_in  = $urandom_range(0, 1);
        in_bit   = ($urandom_range(0, 5) == 0);
        #1;
        // combinational outputs
        check(data_out, read_en & ((t == BT_RO) ? in_bit : m_q), "data_out");
        if (t == BT_IND) begin
          check(out_bit, write_en & data_in, "out_bit pulse");
          if (write_en & data_in) n_pulse++;
        end else begin
          check(out_bit, m_q, "out_bit");
        end
        // next state
        if (in_bit) begin
          m_q = 1'b1; n_set++;
        end else if (write_en) begin
          if (t == BT_WIC || t == BT_IND) begin
            if (data_in) begin m_q = 1'b0; n_clear++; end
          end else begin
            m_q = data_in;
          end
        end
        @(posedge clk); #1;
        if (t != BT_RO && t != BT_IND) check(dut.q, m_q, "stored");
      end
    end
    if (n_pulse == 0 || n_clear == 0 || n_set == 0) begin
      failures++; $display("FAIL coverage pulse=%0d clear=%0d set=%0d", n_pulse, n_clear, n_set);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
