// Behavioural stand-in for one turbo coder, for simulation only (not a turbo
// code). It takes a block of BLOCK bits (first bit marked by in_first, the
// coding-rate index in_cri sampled with it), waits LATENCY cycles after the
// last bit, and then returns cw_len(cri) bits: the block itself followed by
// its bits inverted, repeated as often as needed. Output bits are held while
// out_ready is low. busy is high from the first input bit to the last output
// bit. Only the lengths and the handshake matter to the transmitter core.
module turbo_coder_model
  import cbsr_pkg::*;
#(
  parameter int BLOCK   = 6016,
  parameter int LATENCY = 200
) (
  input  logic       clk,
  input  logic       in_bit,
  input  logic       in_valid,
  input  logic       in_first,
  input  logic [2:0] in_cri,
  output logic       out_bit,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       busy
);
  bit   blk [$];
  int   cri_l = 0;
  int   total = 0;
  int   sent  = 0;
  int   wait_cnt = 0;
  bit   sending = 0;

  function automatic bit cw_bit(input int k);
    int r;
    r = k % (2 * BLOCK);
    return (r < BLOCK) ? blk[r] : !blk[r - BLOCK];
  endfunction

  assign out_valid = sending;
  assign out_bit   = sending ? cw_bit(sent) : 1'b0;
  assign busy      = sending || (blk.size() != 0);

  initial blk.delete();

  always @(posedge clk) begin
    if (in_valid) begin
      if (in_first) begin
        blk.delete();
        cri_l = int'(in_cri);
      end
      blk.push_back(in_bit);
      if (blk.size() == BLOCK) wait_cnt = LATENCY;
    end else if (!sending && blk.size() == BLOCK) begin
      if (wait_cnt > 0) wait_cnt--;
      else begin
        sending <= 1;
        sent    <= 0;
        total   = cw_len(3'(cri_l));
      end
    end
    if (sending && out_ready) begin
      if (sent == total - 1) begin
        sending <= 0;
        blk.delete();
      end
      sent <= sent + 1;
    end
  end
endmodule
