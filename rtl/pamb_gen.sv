// Phase-midamble generator: counter plus lookup table of Zadoff-Chu midambles.
//
// Each of the 8 CRI values (0..6 coding rates, 7 end of transmission) has
// its own 166-entry midamble, a cyclic shift of one Zadoff-Chu sequence, so
// the receiver can tell the coding rate from the midamble. Entry 2m holds
// zc[(m + SHIFT_STEP*cri) mod 83] scaled to 16384, with
// zc[n] = exp(-j*pi*ZC_ROOT*n*(n+1)/83); odd entries are zero (2 samples per
// symbol). sample shows the entry at the counter for the given cri; en
// advances the counter, which wraps after entry 165; clr returns to 0. The
// cyclic-shift scheme follows the description; length 83, root and shift step
// are this design's choices. The table is computed at elaboration.
module pamb_gen
  import cbsr_pkg::*;
#(
  parameter int unsigned ZC_ROOT    = 1,
  parameter int unsigned SHIFT_STEP = 10
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic       clr,
  input  logic [2:0] cri,
  output iq16_t      sample
);
  typedef logic [31:0] table_t [8*P_LEN];

  function automatic table_t make_table();
    table_t t;
    for (int c = 0; c < 8; c++)
      for (int k = 0; k < P_LEN; k++)
        t[c*P_LEN + k] = 32'(zc_entry(k, c * SHIFT_STEP, ZC_ROOT));
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  logic [7:0]  idx;
  logic [10:0] addr;

  assign addr   = 11'(cri) * 11'(P_LEN) + 11'(idx);
  assign sample = iq16_t'(TABLE[addr]);

  always_ff @(posedge clk) begin
    if (rst || clr) idx <= '0;
    else if (en)    idx <= (idx == 8'(P_LEN - 1)) ? 8'd0 : idx + 8'd1;
  end
endmodule
