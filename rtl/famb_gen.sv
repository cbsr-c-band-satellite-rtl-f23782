// F_AMB generator: counter plus lookup table of the frequency-offset preamble.
//
// The table holds 2080 complex entries; the selected length len (544, 1056 or
// 2080) is read, the counter wrapping to 0 after entry len-1. sample shows
// the entry at the counter (asynchronous read), en advances it, clr returns
// to entry 0. Structure and lengths follow the description; the contents are
// this design's choice: OQPSK-mapped bits of the x^20+x^17+1 PN sequence from
// state 0x31337, amplitude +/-16384.
module famb_gen
  import cbsr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        clr,
  input  logic [11:0] len,
  output iq16_t       sample
);
  typedef logic [31:0] table_t [F_MAX_LEN];

  function automatic table_t make_table();
    table_t      t;
    logic [19:0] s;
    s = 20'h31337;
    for (int k = 0; k < F_MAX_LEN; k++) begin
      t[k] = 32'(pn_oqpsk_sample(s[19], k[0]));
      s    = pn_step(s);
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  logic [11:0] idx;

  assign sample = iq16_t'(TABLE[idx]);

  always_ff @(posedge clk) begin
    if (rst || clr) idx <= '0;
    else if (en)    idx <= (idx >= len - 12'd1) ? 12'd0 : idx + 12'd1;
  end
endmodule
