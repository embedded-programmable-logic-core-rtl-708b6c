// lut_cluster: the baseline logic cluster of the programmable logic core.
//
// Four basic logic elements, each a 4-input look-up table followed by an
// optional flip-flop. The cluster has ten input pins and four output pins.
// Every LUT input is chosen by a local multiplexer from the ten input pins
// and the four BLE flip-flops (local feedback), fourteen sources in all;
// select codes 14 and 15 give a constant 0. A BLE output is the registered
// LUT output when use_ff is set and the LUT output itself otherwise.
//
// Interface: clk/rst_n for the BLE flip-flops, cfg holds the configuration
// (input selects, truth tables, flip-flop use), in/out are the cluster pins.
// Timing: combinational BLEs settle within the cycle; registered BLEs update
// at the rising edge. Feedback is taken from the flip-flops, so no
// configuration can build a combinational loop inside the cluster.
//
// The cluster size (four 4-LUTs, 10 inputs, 4 outputs) is that of the
// baseline architecture; the fully connected local multiplexers, the
// registered feedback, the select encoding and the flip-flop reset are
// choices of this implementation.
module lut_cluster
  import sbus_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  clb_cfg_t         cfg,
  input  logic [CLB_I-1:0] in,
  output logic [CLB_N-1:0] out
);

  localparam int unsigned SRCS = CLB_I + CLB_N;

  logic [SRCS-1:0]  src;
  logic [CLB_N-1:0] lut_o;
  logic [CLB_N-1:0] ff_q;

  assign src = {ff_q, in};

  for (genvar b = 0; b < CLB_N; b++) begin : g_ble
    logic [CLB_K-1:0] lin;
    always_comb begin
      for (int unsigned k = 0; k < CLB_K; k++) begin
        lin[k] = 1'b0;
        for (int unsigned s = 0; s < SRCS; s++)
          if (32'(cfg[b].in_sel[k]) == s) lin[k] = src[s];
      end
      lut_o[b] = cfg[b].mask[lin];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ff_q[b] <= 1'b0;
      else        ff_q[b] <= lut_o[b];
    end

    assign out[b] = cfg[b].use_ff ? ff_q[b] : lut_o[b];
  end

endmodule
