// Testbench of cfg_regs. Checks the reset values, full and byte-masked
// writes to all four registers (read back over AXI-Lite and seen on the
// dq_cfg/q_cfg outputs), the field widths, SLVERR on unaligned addresses,
// address and data arriving in different cycles, and a write response held
// while BREADY is low.
module tb_cfg_regs;
  import mpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0]  s_awaddr, s_araddr;
  logic        s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic        s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  dir_cfg_t    dq_cfg, q_cfg;
  int checks = 0, failures = 0;

  cfg_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // Write; the address may lead the data by `skew` cycles; bready is held
  // low for `bwait` cycles after the response appears.
  task automatic axi_write(input logic [3:0] a, input logic [31:0] d, input logic [3:0] strb,
                           input int skew, input int bwait, output logic [1:0] resp);
    @(negedge clk);
    s_awaddr = a; s_awvalid = 1'b1;
    s_wdata = d; s_wstrb = strb;
    repeat (skew) @(negedge clk);
    s_wvalid = 1'b1;
    do @(posedge clk); while (!(s_awready && s_wready));
    @(negedge clk);
    s_awvalid = 1'b0; s_wvalid = 1'b0;
    s_bready = 1'b0;
    while (!s_bvalid) @(negedge clk);
    repeat (bwait) begin
      @(negedge clk);
      check("bvalid held", 32'(s_bvalid), 32'd1);
    end
    resp = s_bresp;
    s_bready = 1'b1;
    @(negedge clk);
    s_bready = 1'b0;
  endtask

  task automatic axi_read(input logic [3:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    s_araddr = a; s_arvalid = 1'b1; s_rready = 1'b1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk);
    s_arvalid = 1'b0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata; resp = s_rresp;
    @(negedge clk);
    s_rready = 1'b0;
  endtask

  logic [31:0] shadow [4];
  logic [31:0] rd;
  logic [1:0]  resp;

  initial begin
    s_awaddr = '0; s_awvalid = 0; s_wdata = '0; s_wstrb = '0; s_wvalid = 0; s_bready = 0;
    s_araddr = '0; s_arvalid = 0; s_rready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    shadow = '{32'd16, 32'h3F80, 32'd16, 32'h3F80};
    for (int r = 0; r < 4; r++) begin
      axi_read(4'(r * 4), rd, resp);
      check("reset value", rd, shadow[r]);
      check("read resp", 32'(resp), 32'd0);
    end
    for (int t = 0; t < 200; t++) begin
      int r;
      logic [31:0] d;
      logic [3:0]  strb;
      r    = $urandom_range(3);
      d    = $urandom;
      strb = (t % 4 == 0) ? 4'hF : 4'($urandom);
      axi_write(4'(r * 4), d, strb, $urandom_range(2), $urandom_range(2), resp);
      check("write resp", 32'(resp), 32'd0);
      for (int b = 0; b < 4; b++) if (strb[b]) shadow[r][b*8 +: 8] = d[b*8 +: 8];
      shadow[r] &= (r % 2 == 0) ? 32'h1F : 32'hFFFF;
      axi_read(4'(r * 4), rd, resp);
      check("read back", rd, shadow[r]);
      check("dq bits",  32'(dq_cfg.bits),  shadow[0]);
      check("dq scale", 32'(dq_cfg.scale), shadow[1]);
      check("q bits",   32'(q_cfg.bits),   shadow[2]);
      check("q scale",  32'(q_cfg.scale),  shadow[3]);
    end
    // unaligned addresses
    axi_write(4'h2, 32'hFFFF_FFFF, 4'hF, 0, 0, resp);
    check("unaligned write resp", 32'(resp), 32'h2);
    axi_read(4'h5, rd, resp);
    check("unaligned read resp", 32'(resp), 32'h2);
    check("unaligned read data", rd, 32'd0);
    for (int r = 0; r < 4; r++) begin
      axi_read(4'(r * 4), rd, resp);
      check("unchanged after bad write", rd, shadow[r]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
