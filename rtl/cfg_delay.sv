// cfg_delay: a delay line whose length is chosen by configuration.
//
// The input passes through up to MAX_DLY register stages; dly selects how
// many of them are used, 0 meaning a combinational path. The interface
// control uses it to line up control, address and data for bus protocols
// whose phases are offset by whole clock cycles. Stages reset to zero.
module cfg_delay #(
  parameter int unsigned W       = 1,
  parameter int unsigned MAX_DLY = 3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(MAX_DLY+1)-1:0] dly,
  input  logic [W-1:0]                 d,
  output logic [W-1:0]                 q
);

  logic [MAX_DLY:0][W-1:0] stage;

  assign stage[0] = d;

  for (genvar s = 1; s <= MAX_DLY; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) stage[s] <= '0;
      else        stage[s] <= stage[s-1];
    end
  end

  always_comb begin
    q = stage[0];
    for (int unsigned s = 0; s <= MAX_DLY; s++)
      if (s == 32'(dly)) q = stage[s];
  end

endmodule
