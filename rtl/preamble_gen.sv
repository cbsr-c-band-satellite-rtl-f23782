// Preamble generator: counter plus lookup table of G_AMB followed by T_AMB.
//
// The table holds 768 complex entries at 2 samples per symbol: 256 of G_AMB
// (for the receiver's gain control) and 512 of T_AMB (time synchronisation).
// sample shows the entry at the counter (asynchronous read); each en advances
// the counter, which wraps from the last entry to 0, or to the start of T_AMB
// when loop_t is high (used to repeat T_AMB in the continuous-preamble mode).
// clr returns to entry 0. The counter-plus-table structure follows the
// description; the table contents are this design's choice: OQPSK-mapped bits
// of the x^20+x^17+1 PN sequence (state 0x5A5A5 for G_AMB, 0x0ACE1 for
// T_AMB), amplitude +/-16384.
module preamble_gen
  import cbsr_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  logic  clr,
  input  logic  loop_t,
  output iq16_t sample
);
  typedef logic [31:0] table_t [PRE_LEN];

  function automatic table_t make_table();
    table_t      t;
    logic [19:0] s;
    s = 20'h5A5A5;
    for (int k = 0; k < PRE_LEN; k++) begin
      if (k == G_LEN) s = 20'h0ACE1;
      t[k] = 32'(pn_oqpsk_sample(s[19], k[0]));
      s    = pn_step(s);
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  logic [9:0] idx;

  assign sample = iq16_t'(TABLE[idx]);

  always_ff @(posedge clk) begin
    if (rst || clr)  idx <= '0;
    else if (en) begin
      if (idx == 10'(PRE_LEN - 1)) idx <= loop_t ? 10'(G_LEN) : 10'd0;
      else                         idx <= idx + 10'd1;
    end
  end
endmodule
