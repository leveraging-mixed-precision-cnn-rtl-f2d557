// Mixed-precision number converter between off-chip memory and a bfloat16
// DNN accelerator.
//
// The accelerator computes in bfloat16 only. Off-chip memory holds weights
// and intermediate results as signed integers of any precision from 2 to 16
// bits, chosen per layer and per tensor, which shrinks memory traffic. This
// block sits in the data path between the two and converts on the fly:
//
//   memory --256b--> extractor --> N_UNITS x dequant_unit --N_UNITS x 16b--> accelerator
//   memory <--256b-- compressor <-- N_UNITS x quant_unit <--N_UNITS x 16b-- accelerator
//
// Memory -> accelerator: the extractor unpacks `bits`-wide integers from
// 256-bit words, N_UNITS per cycle; each dequantisation unit turns one into
// bfloat16 and multiplies it by S. Accelerator -> memory: each quantisation
// unit multiplies a bfloat16 value by 1/S and rounds/saturates it to `bits`
// bits; the compressor packs the results densely into 256-bit words. cfg_regs
// holds precision and scale of each direction and is written over AXI-Lite by
// an external controller; each direction samples them at the start of a
// tensor (first beat after a tlast), so they can change between layers.
//
// Streams are AXI-Stream. tlast ends a tensor. On the memory side tkeep marks
// valid bytes of the last word; on the accelerator side tkeep marks valid
// 16-bit lanes (two bits per lane, contiguous from lane 0) of the last beat.
// Each direction has a latency of 12 cycles (2 + 10) and converts N_UNITS
// values per cycle at every precision; with narrower integers the memory
// side needs proportionally fewer words. A stalled output (tready low)
// freezes that direction's whole pipeline. Because all units of a direction
// share one enable, their valid flags are identical and only unit 0's is
// read; the others are left unused.
// Unit count, bus width, the structure and the latencies follow the published
// design; stream framing and the register map are this implementation's.
module number_converter
  import mpc_pkg::*;
#(
  parameter int unsigned N_UNITS    = 16,
  parameter int unsigned RING_WORDS = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // AXI-Lite configuration slave
  input  logic [3:0]             s_axil_awaddr,
  input  logic                   s_axil_awvalid,
  output logic                   s_axil_awready,
  input  logic [31:0]            s_axil_wdata,
  input  logic [3:0]             s_axil_wstrb,
  input  logic                   s_axil_wvalid,
  output logic                   s_axil_wready,
  output logic [1:0]             s_axil_bresp,
  output logic                   s_axil_bvalid,
  input  logic                   s_axil_bready,
  input  logic [3:0]             s_axil_araddr,
  input  logic                   s_axil_arvalid,
  output logic                   s_axil_arready,
  output logic [31:0]            s_axil_rdata,
  output logic [1:0]             s_axil_rresp,
  output logic                   s_axil_rvalid,
  input  logic                   s_axil_rready,
  // integers from memory
  input  logic [BUS_W-1:0]       s_mem_tdata,
  input  logic [BUS_W/8-1:0]     s_mem_tkeep,
  input  logic                   s_mem_tlast,
  input  logic                   s_mem_tvalid,
  output logic                   s_mem_tready,
  // bfloat16 to the accelerator
  output logic [N_UNITS*16-1:0]  m_acc_tdata,
  output logic [N_UNITS*2-1:0]   m_acc_tkeep,
  output logic                   m_acc_tlast,
  output logic                   m_acc_tvalid,
  input  logic                   m_acc_tready,
  // bfloat16 from the accelerator
  input  logic [N_UNITS*16-1:0]  s_acc_tdata,
  input  logic [N_UNITS*2-1:0]   s_acc_tkeep,
  input  logic                   s_acc_tlast,
  input  logic                   s_acc_tvalid,
  output logic                   s_acc_tready,
  // integers to memory
  output logic [BUS_W-1:0]       m_mem_tdata,
  output logic [BUS_W/8-1:0]     m_mem_tkeep,
  output logic                   m_mem_tlast,
  output logic                   m_mem_tvalid,
  input  logic                   m_mem_tready
);

  localparam int unsigned LW   = $clog2(N_UNITS+1);
  localparam int unsigned PIPE = 10;   // stages of a (de)quantisation unit

  dir_cfg_t dq_cfg, q_cfg;

  cfg_regs u_cfg (
    .clk, .rst_n,
    .s_awaddr (s_axil_awaddr),  .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready),
    .s_wdata  (s_axil_wdata),   .s_wstrb  (s_axil_wstrb),
    .s_wvalid (s_axil_wvalid),  .s_wready (s_axil_wready),
    .s_bresp  (s_axil_bresp),   .s_bvalid (s_axil_bvalid),  .s_bready (s_axil_bready),
    .s_araddr (s_axil_araddr),  .s_arvalid(s_axil_arvalid), .s_arready(s_axil_arready),
    .s_rdata  (s_axil_rdata),   .s_rresp  (s_axil_rresp),
    .s_rvalid (s_axil_rvalid),  .s_rready (s_axil_rready),
    .dq_cfg, .q_cfg
  );

  // ======================================================================
  // Memory -> accelerator: extractor and dequantisation units
  // ======================================================================
  logic                    x_valid, x_last, en_d;
  logic signed [INT_W-1:0] x_data [N_UNITS];
  logic [LW-1:0]           x_lanes;
  bf16_t                   x_scale;
  logic [N_UNITS-1:0]      d_valid;
  bf16_t                   d_data [N_UNITS];

  extractor #(.N_UNITS(N_UNITS), .RING_WORDS(RING_WORDS)) u_ext (
    .clk, .rst_n,
    .cfg_bits (dq_cfg.bits), .cfg_scale(dq_cfg.scale),
    .s_tdata  (s_mem_tdata), .s_tkeep  (s_mem_tkeep), .s_tlast(s_mem_tlast),
    .s_tvalid (s_mem_tvalid), .s_tready(s_mem_tready),
    .m_valid  (x_valid), .m_ready(en_d), .m_data(x_data),
    .m_lanes  (x_lanes), .m_last (x_last), .m_scale(x_scale)
  );

  // The whole dequantisation pipeline advances unless its output is stuck.
  assign en_d = !d_valid[0] || m_acc_tready;

  for (genvar i = 0; i < N_UNITS; i++) begin : g_dq
    dequant_unit u_dq (
      .clk, .rst_n, .en(en_d),
      .in_valid (x_valid), .in_data(x_data[i]), .in_scale(x_scale),
      .out_valid(d_valid[i]), .out_data(d_data[i])
    );
    assign m_acc_tdata[i*16 +: 16] = d_data[i];
  end

  // Lane count and tlast travel beside the units.
  logic [LW-1:0] d_lanes_p [PIPE];
  logic          d_last_p  [PIPE];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < PIPE; s++) begin
        d_lanes_p[s] <= '0;
        d_last_p[s]  <= 1'b0;
      end
    end else if (en_d) begin
      d_lanes_p[0] <= x_lanes;
      d_last_p[0]  <= x_last;
      for (int s = 1; s < PIPE; s++) begin
        d_lanes_p[s] <= d_lanes_p[s-1];
        d_last_p[s]  <= d_last_p[s-1];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N_UNITS; i++)
      m_acc_tkeep[i*2 +: 2] = (i < int'(d_lanes_p[PIPE-1])) ? 2'b11 : 2'b00;
  end
  assign m_acc_tvalid = d_valid[0];
  assign m_acc_tlast  = d_last_p[PIPE-1];

  // ======================================================================
  // Accelerator -> memory: quantisation units and compressor
  // ======================================================================
  logic               en_q, c_ready, q_in_stream;
  dir_cfg_t           q_cfg_lat, q_cfg_use;
  logic [LW-1:0]      a_lanes;
  logic [N_UNITS-1:0] q_valid;
  logic signed [INT_W-1:0] q_data [N_UNITS];

  assign en_q         = !q_valid[0] || c_ready;
  assign s_acc_tready = en_q;
  assign q_cfg_use    = q_in_stream ? q_cfg_lat : q_cfg;

  always_comb begin
    a_lanes = '0;
    for (int i = 0; i < N_UNITS; i++)
      if (s_acc_tkeep[i*2]) a_lanes = a_lanes + LW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_in_stream <= 1'b0;
      q_cfg_lat   <= '0;
    end else if (s_acc_tvalid && s_acc_tready) begin
      if (!q_in_stream) q_cfg_lat <= q_cfg;
      q_in_stream <= !s_acc_tlast;
    end
  end

  for (genvar i = 0; i < N_UNITS; i++) begin : g_q
    quant_unit u_q (
      .clk, .rst_n, .en(en_q),
      .in_valid (s_acc_tvalid), .in_data(s_acc_tdata[i*16 +: 16]),
      .in_scale (q_cfg_use.scale), .in_bits(q_cfg_use.bits),
      .out_valid(q_valid[i]), .out_data(q_data[i])
    );
  end

  logic [LW-1:0] q_lanes_p [PIPE];
  logic          q_last_p  [PIPE];
  prec_t         q_bits_p  [PIPE];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < PIPE; s++) begin
        q_lanes_p[s] <= '0;
        q_last_p[s]  <= 1'b0;
        q_bits_p[s]  <= '0;
      end
    end else if (en_q) begin
      q_lanes_p[0] <= a_lanes;
      q_last_p[0]  <= s_acc_tlast;
      q_bits_p[0]  <= q_cfg_use.bits;
      for (int s = 1; s < PIPE; s++) begin
        q_lanes_p[s] <= q_lanes_p[s-1];
        q_last_p[s]  <= q_last_p[s-1];
        q_bits_p[s]  <= q_bits_p[s-1];
      end
    end
  end

  compressor #(.N_UNITS(N_UNITS), .RING_WORDS(RING_WORDS)) u_cmp (
    .clk, .rst_n,
    .s_valid (q_valid[0]), .s_ready(c_ready), .s_data(q_data),
    .s_lanes (q_lanes_p[PIPE-1]), .s_bits(q_bits_p[PIPE-1]), .s_last(q_last_p[PIPE-1]),
    .m_tdata (m_mem_tdata), .m_tkeep(m_mem_tkeep), .m_tlast(m_mem_tlast),
    .m_tvalid(m_mem_tvalid), .m_tready(m_mem_tready)
  );

endmodule
