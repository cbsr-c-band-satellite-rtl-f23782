// AXI4-Lite control/status register block of the transmitter core.
//
// The processor configures the core through 32-bit registers, one control
// field per register, each at its own byte address:
//   0x000  W   core reset: writing 1 to bit 0 gives a one-clock soft_rst
//              pulse (the core is reset by a bus write once the transceiver
//              is calibrated)
//   0x100  RW  enable register: bit 0 tx_enable, bit 1 inject_fake
//   0x108  R   number of transmitted subframes (subframe_count input)
//   0x148  RW  cri_sel [2:0]       coding-rate index 0..6
//   0x150  RW  tx_mode [1:0]       transmission mode 0..3
//   0x158  RW  flen_sel [1:0]      F_AMB length select 0..2
//   0x160  RW  alpha_sel [0]       RRC roll-off select (1: 0.22, 0: 0.35)
//   0x168  RW  num_subframes [7:0] subframes per radio frame (reset 1)
//   0x200  RW  test bit mask, 32 bits, stored and read back only
//   0x208  RW  test fixed-point value, 32 bits, stored and read back only
// Unmapped addresses read as 0 and ignore writes; every response is OKAY.
// Bits above a field's width are dropped on write and read as 0.
// Protocol: a write is accepted when both AW and W are valid and no write
// response is pending (awready = wready, one clock); the response follows
// on the next clock and is held until bready. A read is accepted when AR is
// valid and no read response is pending; data follow one clock later and
// are held until rready. Write strobes are ignored (whole-register writes).
// The bus and the core share one clock; clock-domain crossing, if needed, is
// left to the interconnect in front of this block.
// The addresses 0x100, 0x148, 0x150, 0x158, 0x200 and 0x208 and the
// one-field-per-register layout follow the description; the bit positions
// in the enable register, the addresses 0x000, 0x108, 0x160 and 0x168 and
// the reset values are this design's choices.
module axi_regs #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // register fields
  output logic              soft_rst,
  output logic              tx_enable,
  output logic              inject_fake,
  output logic [2:0]        cri_sel,
  output logic [1:0]        tx_mode,
  output logic [1:0]        flen_sel,
  output logic              alpha_sel,
  output logic [7:0]        num_subframes,
  output logic [31:0]       test_bit_mask,
  output logic [31:0]       test_fixed_point,
  input  logic [31:0]       subframe_count
);
  localparam logic [ADDR_W-1:0] A_RESET  = ADDR_W'('h000);
  localparam logic [ADDR_W-1:0] A_ENABLE = ADDR_W'('h100);
  localparam logic [ADDR_W-1:0] A_SFCNT  = ADDR_W'('h108);
  localparam logic [ADDR_W-1:0] A_CRI    = ADDR_W'('h148);
  localparam logic [ADDR_W-1:0] A_MODE   = ADDR_W'('h150);
  localparam logic [ADDR_W-1:0] A_FLEN   = ADDR_W'('h158);
  localparam logic [ADDR_W-1:0] A_ALPHA  = ADDR_W'('h160);
  localparam logic [ADDR_W-1:0] A_NSUB   = ADDR_W'('h168);
  localparam logic [ADDR_W-1:0] A_MASK   = ADDR_W'('h200);
  localparam logic [ADDR_W-1:0] A_FIXP   = ADDR_W'('h208);

  logic do_wr, do_rd;
  logic [31:0] rd_val;

  assign do_wr     = s_awvalid && s_wvalid && !s_bvalid;
  assign do_rd     = s_arvalid && !s_rvalid;
  assign s_awready = do_wr;
  assign s_wready  = do_wr;
  assign s_arready = do_rd;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  always_comb begin
    case (s_araddr)
      A_ENABLE: rd_val = {30'd0, inject_fake, tx_enable};
      A_SFCNT:  rd_val = subframe_count;
      A_CRI:    rd_val = {29'd0, cri_sel};
      A_MODE:   rd_val = {30'd0, tx_mode};
      A_FLEN:   rd_val = {30'd0, flen_sel};
      A_ALPHA:  rd_val = {31'd0, alpha_sel};
      A_NSUB:   rd_val = {24'd0, num_subframes};
      A_MASK:   rd_val = test_bit_mask;
      A_FIXP:   rd_val = test_fixed_point;
      default:  rd_val = 32'd0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      soft_rst         <= 1'b0;
      tx_enable        <= 1'b0;
      inject_fake      <= 1'b0;
      cri_sel          <= 3'd0;
      tx_mode          <= 2'd0;
      flen_sel         <= 2'd0;
      alpha_sel        <= 1'b1;
      num_subframes    <= 8'd1;
      test_bit_mask    <= '0;
      test_fixed_point <= '0;
      s_bvalid         <= 1'b0;
      s_rvalid         <= 1'b0;
      s_rdata          <= '0;
    end else begin
      soft_rst <= do_wr && (s_awaddr == A_RESET) && s_wdata[0];
      if (do_wr) begin
        case (s_awaddr)
          A_ENABLE: {inject_fake, tx_enable} <= s_wdata[1:0];
          A_CRI:    cri_sel                  <= s_wdata[2:0];
          A_MODE:   tx_mode                  <= s_wdata[1:0];
          A_FLEN:   flen_sel                 <= s_wdata[1:0];
          A_ALPHA:  alpha_sel                <= s_wdata[0];
          A_NSUB:   num_subframes            <= s_wdata[7:0];
          A_MASK:   test_bit_mask            <= s_wdata;
          A_FIXP:   test_fixed_point         <= s_wdata;
          default:  ;
        endcase
      end
      if (do_wr)                      s_bvalid <= 1'b1;
      else if (s_bvalid && s_bready)  s_bvalid <= 1'b0;
      if (do_rd) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rd_val;
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end
endmodule
