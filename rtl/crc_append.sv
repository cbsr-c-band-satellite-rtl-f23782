// CRC-32 insertion: appends a 32-bit CRC to each block of DATA_BITS bits.
//
// Serial, one bit per cycle. Data bits are passed on with one cycle of
// latency while the CRC register is updated (generator polynomial
// x^32+x^31+x^24+x^22+x^16+x^14+x^8+x^7+x^5+x^3+x+1, from the description).
// After the last data bit the 32 CRC bits follow immediately, most
// significant first, so a block of DATA_BITS + 32 = 6016 bits leaves without
// gaps; first_out marks its first bit. The input must stay idle during the
// 32 CRC cycles (the unpacker does not start a new subframe before the coding
// chain is ready). Register start value 0, no reflection and no final
// inversion are this design's choices; the description gives only the
// polynomial.
module crc_append
  import cbsr_pkg::*;
#(
  parameter int unsigned DATA_BITS_P = DATA_BITS
) (
  input  logic clk,
  input  logic rst,
  input  logic bit_in,
  input  logic valid_in,
  output logic bit_out,
  output logic valid_out,
  output logic first_out,
  output logic busy
);
  localparam int unsigned CW = $clog2(DATA_BITS_P + 1);

  logic [31:0]   crc;
  logic [CW-1:0] cnt;        // data bits of the current block seen so far
  logic [5:0]    crc_left;   // CRC bits still to send
  logic          fb;

  assign fb   = crc[31] ^ bit_in;
  assign busy = (cnt != '0) || (crc_left != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      crc       <= '0;
      cnt       <= '0;
      crc_left  <= '0;
      bit_out   <= 1'b0;
      valid_out <= 1'b0;
      first_out <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      first_out <= 1'b0;
      if (crc_left != '0) begin
        bit_out   <= crc[31];
        valid_out <= 1'b1;
        crc       <= {crc[30:0], 1'b0};
        crc_left  <= crc_left - 1'b1;
      end else if (valid_in) begin
        bit_out   <= bit_in;
        valid_out <= 1'b1;
        first_out <= (cnt == '0);
        crc       <= {crc[30:0], 1'b0} ^ (fb ? CRC_POLY : 32'h0);
        if (cnt == CW'(DATA_BITS_P - 1)) begin
          cnt      <= '0;
          crc_left <= 6'd32;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      if (crc_left == 6'd1) crc <= '0;
    end
  end

  a_idle_during_crc: assert property (@(posedge clk) disable iff (rst) (crc_left != '0) |-> !valid_in);
endmodule
