// tb_apb_benchmark: the column used the way the evaluation circuits use it.
//
// A circuit in the fabric takes its inputs from register bits and returns
// its outputs through register bits that the master reads; some bits are
// interrupt status. The register map is sized like the largest evaluation
// circuit (459 register bits) on the default 64-byte column:
//   bytes  0..28  RW   232 circuit inputs
//   bytes 29..50  RO   171 circuit outputs (the last 5 bits of byte 50 unused)
//   bytes 51..57  WIC  56 interrupt bits raised by the circuit
//   bytes 58..63       tiles left in CLB mode
// The stand-in circuit is out[k] = in[3k] ^ (in[5k+1] & in[7k+2]), indices
// mod 232, and it raises interrupt bit i when out[i] rises. All accesses are
// APB word transfers (setup cycle, access cycle, PREADY = trans_ack, no
// waits). Each round writes random inputs, reads all outputs, reads the
// interrupt status and clears what it read; everything is compared with a
// reference that knows only what the master wrote.
module tb_apb_benchmark;
  import sbus_pkg::*;

  localparam int unsigned NR    = 64;
  localparam int unsigned N_IN  = 232;
  localparam int unsigned N_OUT = 171;
  localparam int unsigned N_INT = 56;
  localparam int unsigned B_OUT = 29;
  localparam int unsigned B_INT = 51;
  localparam int unsigned B_END = 58;

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
    repeat (100000) @(posedge clk);
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

  function automatic logic circuit_out(logic [N_IN-1:0] x, int k);
    return x[(3*k) % N_IN] ^ (x[(5*k+1) % N_IN] & x[(7*k+2) % N_IN]);
  endfunction

  // the circuit in the fabric
  logic [N_IN-1:0]  c_in;
  logic [N_OUT-1:0] c_out, c_out_q;
  logic [N_INT-1:0] c_irq;
  always_comb begin
    for (int i = 0; i < N_IN; i++) c_in[i] = reg_pin_out[i/8][i%8];
    for (int k = 0; k < N_OUT; k++) c_out[k] = circuit_out(c_in, k);
    for (int i = 0; i < N_INT; i++) c_irq[i] = c_out[i] & ~c_out_q[i];
    for (int j = 0; j < NR; j++) reg_pin_in[j] = '0;
    for (int k = 0; k < N_OUT; k++) reg_pin_in[B_OUT + k/8][k%8] = c_out[k];
    for (int i = 0; i < N_INT; i++) reg_pin_in[B_INT + i/8][i%8] = c_irq[i];
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) c_out_q <= '0;
    else        c_out_q <= c_out;

  // reference
  logic [N_IN-1:0]  r_in, r_in_prev;
  logic [N_INT-1:0] r_irq;
  int n_irq, n_clear, n_xfer;

  task automatic apb(logic wr, int w, logic [31:0] wd, output logic [31:0] rd);
    int lat;
    @(negedge clk);
    ctrl_pin_in = '0;                        // setup phase: PSEL only
    ctrl_pin_in[2] = wr; ctrl_pin_in[1] = ~wr;
    ctrl_pin_in[12:7] = 6'(w*4); ctrl_pin_in[6:3] = 4'hF; ctrl_pin_in[46:15] = wd;
    ctrl_pin_in[1] = 1'b0; ctrl_pin_in[2] = 1'b0;
    @(negedge clk);
    ctrl_pin_in[0] = 1'b1; ctrl_pin_in[1] = ~wr; ctrl_pin_in[2] = wr;   // access phase
    lat = 0; #1;
    while (!ctrl_pin_out[36] && lat < 5) begin @(negedge clk); lat++; #1; end
    chk(lat, 0, "APB access without wait");
    rd = ctrl_pin_out[31:0];
    n_xfer++;
    @(negedge clk);
    ctrl_pin_in = '0;
  endtask

  function automatic logic [7:0] exp_byte(int j);
    logic [7:0] v;
    v = '0;
    if (j < B_OUT) for (int b = 0; b < 8; b++) v[b] = r_in[8*j + b];
    else if (j < B_INT) begin
      for (int b = 0; b < 8; b++)
        if (8*(j-B_OUT) + b < N_OUT) v[b] = circuit_out(r_in, 8*(j-B_OUT) + b);
    end else if (j < B_END) for (int b = 0; b < 8; b++) v[b] = r_irq[8*(j-B_INT) + b];
    return v;
  endfunction

  initial begin
    logic [31:0] rd, wd;
    n_irq = 0; n_clear = 0; n_xfer = 0;
    ctrl_sbus_en = 1'b1; ctrl_cfg = '0; ctrl_cfg.addr_mode = AM_BYTE_ENABLE;
    ctrl_lut_cfg = '0; reg_lut_cfg = '0; ctrl_pin_in = '0;
    for (int j = 0; j < NR; j++) begin
      bit_type_e t;
      t = (j < B_OUT) ? BT_RW : (j < B_INT) ? BT_RO : BT_WIC;
      for (int k = 0; k < 8; k++) reg_bit_cfg[j][k] = bit_type_cfg(t);
      reg_sbus_en[j] = (j < B_END);
    end
    // bits of the last output byte beyond N_OUT are never driven
    r_in = '0; r_irq = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 12; round++) begin
      // write the inputs, word by word; interrupts follow the circuit
      for (int w = 0; w < (B_OUT + 3) / 4; w++) begin
        wd = $urandom;
        r_in_prev = r_in;
        for (int o = 0; o < 4; o++)
          if (4*w + o < B_OUT)
            for (int b = 0; b < 8; b++) r_in[8*(4*w+o) + b] = wd[8*o + b];
        apb(1'b1, w, wd, rd);
        for (int i = 0; i < N_INT; i++)
          if (circuit_out(r_in, i) && !circuit_out(r_in_prev, i)) begin
            if (!r_irq[i]) n_irq++;
            r_irq[i] = 1'b1;
          end
      end
      // read everything back
      for (int w = 0; w < B_END / 4 + 1; w++) begin
        logic [31:0] e;
        apb(1'b0, w, 32'h0, rd);
        for (int o = 0; o < 4; o++) e[8*o +: 8] = (4*w + o < B_END) ? exp_byte(4*w + o) : 8'h00;
        chk(rd, e, "read word");
      end
      // acknowledge the interrupts that were read
      for (int w = B_INT / 4; w <= (B_END - 1) / 4; w++) begin
        logic [31:0] clr;
        clr = '0;
        for (int o = 0; o < 4; o++)
          if (4*w + o >= B_INT && 4*w + o < B_END) begin
            clr[8*o +: 8] = exp_byte(4*w + o);
            for (int b = 0; b < 8; b++)
              if (clr[8*o + b]) begin r_irq[8*(4*w + o - B_INT) + b] = 1'b0; n_clear++; end
          end
        apb(1'b1, w, clr, rd);
      end
    end
    $display("APB transfers=%0d interrupts=%0d cleared=%0d", n_xfer, n_irq, n_clear);
    if (n_irq == 0 || n_clear == 0) begin failures++; $display("FAIL no interrupts exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
