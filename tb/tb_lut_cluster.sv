// tb_lut_cluster: self-checking test of the four-LUT logic cluster.
//
// Random configurations (input selects over the 10 pins, the 4 flip-flop
// feedbacks and the two constant codes, random truth tables, random
// flip-flop use) are applied with random inputs. A reference model keeps
// its own copy of the four flip-flops and evaluates each LUT by indexing its
// truth table with the selected sources.
module tb_lut_cluster;
  import sbus_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  clb_cfg_t cfg;
  logic [9:0] in;
  logic [3:0] out;
  int checks = 0, failures = 0;

  lut_cluster dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] m_ff, m_lut, m_out;
  int n_fb;

  function automatic logic src_val(int s);
    if (s < 10) return in[s];
    if (s < 14) return m_ff[s-10];
    return 1'b0;
  endfunction

  initial begin
    cfg = '0; in = '0; m_ff = '0; n_fb = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i % 50 == 0)
        for (int b = 0; b < 4; b++) begin
          for (int k = 0; k < 4; k++) cfg[b].in_sel[k] = 4'($urandom);
          cfg[b].mask   = 16'($urandom);
          cfg[b].use_ff = $urandom_range(0, 1);
        end
      in = 10'($urandom);
      #1;
      for (int b = 0; b < 4; b++) begin
        logic [3:0] idx;
        for (int k = 0; k < 4; k++) begin
          idx[k] = src_val(int'(cfg[b].in_sel[k]));
          if (cfg[b].in_sel[k] inside {[10:13]}) n_fb++;
        end
        m_lut[b] = cfg[b].mask[idx];
        m_out[b] = cfg[b].use_ff ? m_ff[b] : m_lut[b];
      end
      checks++;
      if (out !== m_out) begin
        failures++;
        $display("FAIL out=%b exp=%b", out, m_out);
      end
      @(posedge clk);
      m_ff = m_lut;
    end
    if (n_fb == 0) begin failures++; $display("FAIL no feedback exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
