// Word buffer and unpacker: turns 32-bit words into a serial bit stream.
//
// Incoming words are pushed into a FIFO. Each data_start pulse announces that
// one complete subframe (WORDS words) is in the FIFO; the read FSM then pops
// one word every 32 cycles and shifts it out LSB first, one bit per cycle,
// until the subframe's WORDS x 32 bits have left (bit_valid high throughout,
// no gaps). data_start pulses that arrive while a subframe is being unpacked
// are counted and served in turn. busy is high while bits are being sent.
// The FIFO, the 32-cycle pop rhythm and the right-shift of the word follow
// the description; waiting for a whole subframe is this design's choice.
module word_unpacker #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WORDS = 187
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] word_in,
  input  logic        word_valid,
  input  logic        data_start,
  output logic        bit_out,
  output logic        bit_valid,
  output logic        busy
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned WW = $clog2(WORDS + 1);

  logic [31:0]   head;
  logic          empty, full;
  logic [AW:0]   count;
  logic          pop;
  logic [31:0]   shreg;
  logic [4:0]    bit_idx;
  logic [WW-1:0] words_left;
  logic [3:0]    pending;

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst, .push(word_valid), .din(word_in), .pop,
    .dout(head), .empty, .full, .count
  );

  // Pop a word when starting a subframe or when the previous word is done.
  assign pop = !empty && (((words_left == '0) && (pending != 0)) ||
                          ((words_left != '0) && (bit_idx == 5'd31) && (words_left != WW'(1))));

  assign busy      = bit_valid;
  assign bit_out   = shreg[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg      <= '0;
      bit_idx    <= '0;
      words_left <= '0;
      pending    <= '0;
      bit_valid  <= 1'b0;
    end else begin
      pending <= pending + 4'(data_start) - 4'((words_left == '0) && (pending != 0) && pop);
      if (words_left == '0) begin
        bit_valid <= 1'b0;
        if (pop) begin
          shreg      <= head;
          bit_idx    <= '0;
          words_left <= WW'(WORDS);
          bit_valid  <= 1'b1;
        end
      end else if (bit_idx == 5'd31) begin
        bit_idx <= '0;
        if (words_left == WW'(1)) begin
          words_left <= '0;
          bit_valid  <= 1'b0;
        end else begin
          words_left <= words_left - 1'b1;
          shreg      <= head;
        end
      end else begin
        bit_idx <= bit_idx + 1'b1;
        shreg   <= {1'b0, shreg[31:1]};
      end
    end
  end

  a_word_present: assert property (@(posedge clk) disable iff (rst)
    (words_left != '0 && bit_idx == 5'd31 && words_left != WW'(1)) |-> !empty);
endmodule
