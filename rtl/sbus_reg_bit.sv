// sbus_reg_bit: one configurable interface register bit.
//
// A single flip-flop and a few multiplexers give the five register bit
// types. The write-enable select picks either the byte write enable (normal
// write) or the write enable ANDed with the data bit, and the same select
// picks either the data bit or its inverse as the flip-flop input, so that
// writing 1 clears the bit (WIC, IND). The design in the programmable logic
// can set the flip-flop through in_bit (interrupt events for WIC, sticky
// status for RWS). The read select returns either the flip-flop or in_bit
// directly (RO); the read value is ANDed with read_en so that all bits of a
// bus lane can be ORed together. The output select drives out_bit with either
// the flip-flop or the write enable itself, a one-cycle pulse that triggers
// an action in the design (IND).
//
// Interface: write_en/read_en are the byte enables from the interface
// control, data_in/data_out the bit's position on the data bus, in_bit and
// out_bit the connections to the programmable fabric, cfg the three selects.
// Timing: the flip-flop updates at the rising clock edge in the cycle in
// which write_en is high; data_out is combinational.
//
// The multiplexer structure follows the source architecture. Choices of
// this implementation: the set from in_bit is synchronous and wins over a
// clearing write in the same cycle, so that no event is lost; an
// asynchronous active-low reset clears the flip-flop; RW and RWS use the same
// selects and differ only in whether the design drives in_bit.
module sbus_reg_bit
  import sbus_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bit_cfg_t cfg,
  input  logic     write_en,
  input  logic     read_en,
  input  logic     data_in,
  output logic     data_out,
  input  logic     in_bit,
  output logic     out_bit
);

  logic q;
  logic en;
  logic d;
  logic rd_val;

  always_comb begin
    en     = cfg.wr_clear ? (write_en & data_in) : write_en;
    d      = cfg.wr_clear ? ~data_in : data_in;
    rd_val = cfg.rd_input ? in_bit : q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= 1'b0;
    else if (in_bit) q <= 1'b1;
    else if (en)     q <= d;
  end

  assign data_out = read_en & rd_val;
  assign out_bit  = cfg.out_pulse ? en : q;

endmodule
