// OQPSK mapper at two samples per symbol.
//
// Bits arrive one per cycle at most and are grouped in pairs; the first bit
// of a pair is the in-phase bit a, the second the quadrature bit b. Each bit
// is mapped to +1 (bit 0) or -1 (bit 1), the mapping of appending a constant
// 1 below the bit and reading the result as a signed 2-bit number. Both
// branches are upsampled by 2 with zero insertion and the Q branch is delayed
// by one sample (half a symbol), so one pair yields two samples: (a, 0) one
// cycle after b arrives and (0, b) one cycle after that. sample_out packs
// {I[1:0], Q[1:0]} as two's complement. clr drops a half-received pair.
// Mapping, upsampling and Q delay follow the description; the pair order
// (first bit on I) is this design's choice.
module oqpsk_mod (
  input  logic       clk,
  input  logic       rst,
  input  logic       clr,
  input  logic       bit_in,
  input  logic       valid_in,
  output logic [3:0] sample_out,
  output logic       valid_out
);
  logic       have_a;
  logic       a_bit;
  logic       b_bit;
  logic [1:0] phase;   // 0: idle, 1: emitting (a,0), 2: emitting (0,b)

  function automatic logic [1:0] map(input logic b);
    return {b, 1'b1};  // 0 -> +1 (01), 1 -> -1 (11)
  endfunction

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      have_a <= 1'b0;
      a_bit  <= 1'b0;
      b_bit  <= 1'b0;
      phase  <= '0;
    end else begin
      phase <= (phase == 2'd1) ? 2'd2 : 2'd0;
      if (valid_in) begin
        if (!have_a) begin
          a_bit  <= bit_in;
          have_a <= 1'b1;
        end else begin
          b_bit  <= bit_in;
          have_a <= 1'b0;
          phase  <= 2'd1;
        end
      end
    end
  end

  always_comb begin
    case (phase)
      2'd1:    sample_out = {map(a_bit), 2'b00};
      2'd2:    sample_out = {2'b00, map(b_bit)};
      default: sample_out = '0;
    endcase
    valid_out = (phase != 2'd0);
  end

  a_pair_spacing: assert property (@(posedge clk) disable iff (rst)
    (valid_in && have_a) |=> !(valid_in && have_a));
endmodule
