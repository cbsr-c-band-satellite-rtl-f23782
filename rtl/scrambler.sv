// Data scrambler: XOR of each bit with an x^20 + x^17 + 1 PN sequence.
//
// The PN generator is held at its initial state while valid_in is low and
// advances one step per valid bit, so every contiguous burst of valid bits
// (one subframe) is scrambled with the same sequence from its start. The XOR
// and the valid pass-through are combinational; only the PN register holds
// state. The reset-on-invalid structure follows the description; the initial
// state 1 is this design's choice.
module scrambler
  import cbsr_pkg::*;
#(
  parameter logic [19:0] SEED = 20'h00001
) (
  input  logic clk,
  input  logic rst,
  input  logic bit_in,
  input  logic valid_in,
  output logic bit_out,
  output logic valid_out
);
  logic [19:0] state;

  assign bit_out   = bit_in ^ state[19];
  assign valid_out = valid_in;

  always_ff @(posedge clk) begin
    if (rst || !valid_in) state <= SEED;
    else                  state <= pn_step(state);
  end
endmodule
