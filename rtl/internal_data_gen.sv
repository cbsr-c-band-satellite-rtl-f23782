// Internal data source: 32-bit words of an x^20 + x^17 + 1 PN sequence.
//
// Each cycle with request_in high produces one word, presented on data_out
// with valid_out one cycle later. A word packs the next 32 PN bits, the
// earliest in bit 0, so the LSB-first unpacker reproduces the PN sequence.
// The generator restarts from its initial state whenever no request was seen
// in the previous 4 cycles; a burst of requests therefore always yields the
// same words, which keeps the internally generated subframes repeatable.
// Structure (restart after 4 idle cycles, output and valid registered) follows
// the description; initial state 1 and the bit packing are this design's choice.
module internal_data_gen
  import cbsr_pkg::*;
#(
  parameter logic [19:0] SEED = 20'h00001
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        request_in,
  output logic [31:0] data_out,
  output logic        valid_out
);
  logic [3:0]  req_hist;      // request_in of the last 4 cycles
  logic        pn_rst;
  logic [19:0] state;
  logic [19:0] start_state;
  logic [19:0] next_state;
  logic [31:0] word;

  assign pn_rst      = (req_hist == 4'b0000);
  assign start_state = pn_rst ? SEED : state;

  // 32 LFSR steps, one output bit per step.
  always_comb begin
    logic [19:0] s;
    s = start_state;
    for (int k = 0; k < 32; k++) begin
      word[k] = s[19];
      s       = pn_step(s);
    end
    next_state = s;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      req_hist  <= '0;
      state     <= SEED;
      data_out  <= '0;
      valid_out <= 1'b0;
    end else begin
      req_hist  <= {req_hist[2:0], request_in};
      valid_out <= request_in;
      if (request_in) begin
        data_out <= word;
        state    <= next_state;
      end else if (pn_rst) begin
        state    <= SEED;
      end
    end
  end
endmodule
