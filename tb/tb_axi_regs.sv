// Testbench of axi_regs: random AXI4-Lite writes and reads (including
// unmapped addresses, out-of-width data, delayed and simultaneous AW/W, and
// random bready/rready stalls) against a register model. Checks read data,
// the field outputs after every write, the read-only subframe counter, the
// one-clock soft-reset pulse and that responses are held until accepted.
module tb_axi_regs;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic [15:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata, subframe_count, test_bit_mask, test_fixed_point;
  logic [1:0] bresp, rresp, tx_mode, flen_sel;
  logic soft_rst, tx_enable, inject_fake, alpha_sel;
  logic [2:0] cri_sel;
  logic [7:0] num_subframes;

  axi_regs dut (.clk, .rst, .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata),
    .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp),
    .s_rvalid(rvalid), .s_rready(rready), .soft_rst, .tx_enable, .inject_fake, .cri_sel, .tx_mode,
    .flen_sel, .alpha_sel, .num_subframes, .test_bit_mask, .test_fixed_point, .subframe_count);

  // register model: address -> readable value
  logic [31:0] model [int];
  int rst_pulses;
  function automatic logic [31:0] mask_of(input int a);
    case (a)
      'h100: return 32'h3;
      'h148: return 32'h7;
      'h150, 'h158: return 32'h3;
      'h160: return 32'h1;
      'h168: return 32'hFF;
      'h200, 'h208: return 32'hFFFF_FFFF;
      default: return 32'h0;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic axi_write(input int a, input logic [31:0] d);
    int d_aw, d_w, n;
    d_aw = $urandom_range(0, 2); d_w = $urandom_range(0, 2);
    @(negedge clk);
    n = 0;
    awaddr = 16'(a); wdata = d;
    while (1) begin
      bit hs;
      awvalid = (n >= d_aw); wvalid = (n >= d_w);
      #1;
      hs = awvalid && wvalid && awready && wready;
      check(!(awready && !(awvalid && wvalid)), "awready without both valids");
      @(posedge clk);
      if (hs) break;
      @(negedge clk);
      n++;
    end
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    if ((a & 'hFFC) == 0 && d[0]) rst_pulses++;
    if (mask_of(a) != 0) model[a] = d & mask_of(a);
    // response held until bready
    repeat ($urandom_range(0, 3)) begin
      check(bvalid && bresp == 2'b00, "write response held");
      @(negedge clk);
    end
    bready = 1;
    @(posedge clk);
    #1;
    bready = 0;
  endtask

  task automatic axi_read(input int a, output logic [31:0] d);
    @(negedge clk);
    araddr = 16'(a); arvalid = 1;
    #1;
    check(arready, "arready");
    @(posedge clk);
    @(negedge clk);
    arvalid = 0;
    araddr = 16'($urandom);
    repeat ($urandom_range(0, 3)) begin
      check(rvalid && rresp == 2'b00, "read response held");
      @(negedge clk);
    end
    d = rdata;
    rready = 1;
    @(posedge clk);
    #1;
    rready = 0;
  endtask

  task automatic check_fields();
    check(tx_enable == model['h100][0] && inject_fake == model['h100][1], "enable fields");
    check(cri_sel == model['h148][2:0], "cri_sel");
    check(tx_mode == model['h150][1:0], "tx_mode");
    check(flen_sel == model['h158][1:0], "flen_sel");
    check(alpha_sel == model['h160][0], "alpha_sel");
    check(num_subframes == model['h168][7:0], "num_subframes");
    check(test_bit_mask == model['h200] && test_fixed_point == model['h208], "test registers");
  endtask

  int seen_pulses;
  always @(posedge clk) if (!rst && soft_rst) seen_pulses++;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int addrs [12] = '{'h000, 'h100, 'h108, 'h148, 'h150, 'h158, 'h160, 'h168, 'h200, 'h208, 'h104, 'h300};
    logic [31:0] d;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0; awaddr = 0; araddr = 0; wdata = 0;
    subframe_count = 0; rst_pulses = 0; seen_pulses = 0;
    model['h100] = 0; model['h148] = 0; model['h150] = 0; model['h158] = 0; model['h160] = 1;
    model['h168] = 1; model['h200] = 0; model['h208] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check_fields();
    for (int it = 0; it < 600; it++) begin
      int a;
      a = addrs[$urandom_range(0, 11)];
      subframe_count = $urandom;
      if ($urandom_range(0, 1) == 1) begin
        axi_write(a, $urandom);
        check_fields();
      end else begin
        axi_read(a, d);
        if (a == 'h108) check(d == subframe_count, "subframe counter read");
        else if (mask_of(a) == 0) check(d == 0, $sformatf("unmapped read %h", a));
        else check(d == model[a], $sformatf("read %h: %h, expected %h", a, d, model[a]));
      end
    end
    check(rst_pulses > 0 && seen_pulses == rst_pulses, $sformatf("soft reset pulses %0d of %0d", seen_pulses, rst_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
