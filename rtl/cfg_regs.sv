// Configuration registers of the number converter, AXI-Lite slave.
//
// An external controller (a CPU) sets, at runtime and between layers, the
// integer precision and the scale factor of each conversion direction:
//   0x00 DQ_BITS  [4:0]  precision of integers read from memory (2..16)
//   0x04 DQ_SCALE [15:0] S, bfloat16, multiplied onto dequantised values
//   0x08 Q_BITS   [4:0]  precision of integers written to memory (2..16)
//   0x0C Q_SCALE  [15:0] 1/S, bfloat16, multiplied onto values to quantise
// Addresses not on a 32-bit boundary answer SLVERR and read as 0. Values outside 2..16 are
// stored as written and clamped by the datapath. Reset: 16 bits, scale 1.0.
// The datapath samples these registers at the start of each tensor, so a
// write while a tensor streams affects the next tensor.
//
// Handshake: a write is accepted when address and data are both valid and no
// response is pending (AWREADY and WREADY rise together for one cycle); the
// response follows one cycle later. A read is accepted when no read response
// is pending; the data follows one cycle later.
// That precision and scales are set over AXI-Lite follows the published
// design; the register map is this implementation's choice.
module cfg_regs
  import mpc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [3:0]        s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  output dir_cfg_t          dq_cfg,
  output dir_cfg_t          q_cfg
);

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

  typedef enum logic [1:0] {
    REG_DQ_BITS  = 2'd0,
    REG_DQ_SCALE = 2'd1,
    REG_Q_BITS   = 2'd2,
    REG_Q_SCALE  = 2'd3
  } reg_e;

  logic [31:0] regs [4];
  logic        do_wr, do_rd;
  logic        aw_ok, ar_ok;

  assign do_wr     = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = do_wr;
  assign s_wready  = do_wr;
  assign s_arready = !s_rvalid;
  assign do_rd     = s_arvalid && s_arready;
  assign aw_ok     = s_awaddr[1:0] == 2'b00;
  assign ar_ok     = s_araddr[1:0] == 2'b00;

  // Register widths: precision registers keep 5 bits, scales 16 bits.
  function automatic logic [31:0] field_mask(input logic [1:0] idx);
    return (idx == REG_DQ_BITS || idx == REG_Q_BITS) ? 32'h1F : 32'hFFFF;
  endfunction

  // Byte-lane merge of a write into the addressed register.
  logic [31:0] wr_val;
  always_comb begin
    wr_val = regs[s_awaddr[3:2]];
    for (int b = 0; b < 4; b++)
      if (s_wstrb[b]) wr_val[b*8 +: 8] = s_wdata[b*8 +: 8];
    wr_val = wr_val & field_mask(s_awaddr[3:2]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs[REG_DQ_BITS]  <= 32'(INT_W);
      regs[REG_DQ_SCALE] <= 32'(BF16_ONE);
      regs[REG_Q_BITS]   <= 32'(INT_W);
      regs[REG_Q_SCALE]  <= 32'(BF16_ONE);
      s_bvalid <= 1'b0;
      s_bresp  <= RESP_OKAY;
      s_rvalid <= 1'b0;
      s_rresp  <= RESP_OKAY;
      s_rdata  <= '0;
    end else begin
      if (do_wr) begin
        s_bvalid <= 1'b1;
        s_bresp  <= aw_ok ? RESP_OKAY : RESP_SLVERR;
        if (aw_ok) regs[s_awaddr[3:2]] <= wr_val;
      end else if (s_bready) begin
        s_bvalid <= 1'b0;
      end
      if (do_rd) begin
        s_rvalid <= 1'b1;
        s_rresp  <= ar_ok ? RESP_OKAY : RESP_SLVERR;
        s_rdata  <= ar_ok ? regs[s_araddr[3:2]] : 32'd0;
      end else if (s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  assign dq_cfg = '{bits: prec_t'(regs[REG_DQ_BITS]),  scale: bf16_t'(regs[REG_DQ_SCALE])};
  assign q_cfg  = '{bits: prec_t'(regs[REG_Q_BITS]),   scale: bf16_t'(regs[REG_Q_SCALE])};

  a_bresp_hold : assert property (@(posedge clk) disable iff (!rst_n)
                                  s_bvalid && !s_bready |=> s_bvalid);

endmodule
