// Compressor: packs N_UNITS quantised integers per cycle into 256-bit memory
// words.
//
// Each input beat carries up to N_UNITS signed integers (s_lanes of them are
// valid, starting at lane 0) that already fit the configured precision. The
// low `bits` bits of each are concatenated, lane 0 in the least significant
// bits, and written at a bit-granular write pointer into a ring buffer of
// RING_WORDS words, wrapping around its end. Whenever a whole word is in the
// ring it is read out, word-aligned, to the AXI-Stream master towards memory,
// so the memory receives a dense, aligned bit string of the tensor: the same
// layout the extractor reads.
//
// Stream framing: s_last marks the last beat of a tensor. After it, the
// remaining bits leave in a final word whose unused bits are zero, with
// m_tkeep covering the bytes that hold data and m_tlast set; the ring pointers
// then return to zero. Input is held off until that word has been formed.
// The precision is taken from s_bits on the first beat of a tensor and held
// to its end.
//
// Timing: a beat accepted at a clock edge can complete a word that is loaded
// into the output register at the next edge (latency 2). With bits = 16 one
// beat enters and one word leaves per cycle. s_ready does not depend on
// m_tready.
// The ring buffer that packs arbitrary widths into 256-bit reads and the
// latency follow the published design; framing, tkeep use and ring size are
// this implementation's choices.
module compressor
  import mpc_pkg::*;
#(
  parameter int unsigned N_UNITS    = 16,
  parameter int unsigned RING_WORDS = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // quantised integers from the quantisation units
  input  logic                          s_valid,
  output logic                          s_ready,
  input  logic signed [INT_W-1:0]       s_data [N_UNITS],
  input  logic [$clog2(N_UNITS+1)-1:0]  s_lanes,
  input  prec_t                         s_bits,
  input  logic                          s_last,
  // AXI-Stream to memory
  output logic [BUS_W-1:0]              m_tdata,
  output logic [BUS_W/8-1:0]            m_tkeep,
  output logic                          m_tlast,
  output logic                          m_tvalid,
  input  logic                          m_tready
);

  localparam int unsigned CAP = RING_WORDS * BUS_W;
  localparam int unsigned WIN = N_UNITS * INT_W;
  localparam int unsigned PW  = $clog2(CAP);
  localparam int unsigned WW  = (RING_WORDS > 1) ? $clog2(RING_WORDS) : 1;

  logic [CAP-1:0] ring;
  logic [PW-1:0]  wr_ptr;
  logic [WW-1:0]  rd_word;
  logic [PW:0]    fill;
  logic           in_stream, flush_pending;
  prec_t          bits_q;

  // ---- write side --------------------------------------------------------
  prec_t            bits_use;
  logic [WIN-1:0]   packed_bits;
  logic [PW:0]      wbits;
  logic [CAP-1:0]   wd_ext, wm_ext, wd_rot, wm_rot;
  logic [2*CAP-1:0] wd_dbl, wm_dbl;
  logic             wr;

  assign bits_use = in_stream ? bits_q : clamp_prec(s_bits);

  always_comb begin
    packed_bits = '0;
    for (int i = 0; i < N_UNITS; i++) begin
      logic [INT_W-1:0] m;
      m = (INT_W'(1) << bits_use) - INT_W'(1);
      if (bits_use >= prec_t'(INT_W)) m = '1;
      if (i < int'(s_lanes))
        packed_bits = packed_bits | (WIN'(s_data[i] & m) << (i * bits_use));
    end
    wbits  = (PW+1)'(s_lanes) * (PW+1)'(bits_use);
    wd_ext = CAP'(packed_bits);
    wm_ext = (CAP'(1) << wbits) - CAP'(1);
    wd_dbl = {wd_ext, wd_ext} << wr_ptr;
    wm_dbl = {wm_ext, wm_ext} << wr_ptr;
    wd_rot = wd_dbl[2*CAP-1:CAP];
    wm_rot = wm_dbl[2*CAP-1:CAP];
  end

  assign s_ready = !flush_pending && (fill + (PW+1)'(WIN) <= (PW+1)'(CAP));
  assign wr      = s_valid && s_ready;

  // ---- read side ---------------------------------------------------------
  logic             have_full, have_tail, load, ending;
  logic [BUS_W-1:0] rword, tail_mask;
  logic [BUS_W/8-1:0] tail_keep;

  assign rword     = ring[rd_word*BUS_W +: BUS_W];
  assign have_full = fill >= (PW+1)'(BUS_W);
  assign have_tail = flush_pending && !have_full;
  // The tensor ends with this read: its last beat is in, or arrives now
  // adding no bits.
  assign ending    = flush_pending || (wr && s_last && wbits == '0);
  assign load      = (have_full || have_tail) && (!m_tvalid || m_tready);
  always_comb begin
    tail_mask = (BUS_W'(1) << fill) - BUS_W'(1);
    tail_keep = '0;
    for (int i = 0; i < BUS_W/8; i++)
      tail_keep[i] = (PW+1)'(i * 8) < fill;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ring          <= '0;
      wr_ptr        <= '0;
      rd_word       <= '0;
      fill          <= '0;
      in_stream     <= 1'b0;
      flush_pending <= 1'b0;
      bits_q        <= prec_t'(INT_W);
      m_tdata       <= '0;
      m_tkeep       <= '0;
      m_tlast       <= 1'b0;
      m_tvalid      <= 1'b0;
    end else begin
      if (wr) begin
        ring   <= (ring & ~wm_rot) | (wd_rot & wm_rot);
        wr_ptr <= wr_ptr + PW'(wbits);
        if (!in_stream) bits_q <= bits_use;
        in_stream <= !s_last;
        if (s_last) flush_pending <= 1'b1;
      end
      fill <= fill + (wr ? wbits : '0) - (load ? (have_full ? (PW+1)'(BUS_W) : fill) : '0);
      if (load) begin
        m_tvalid <= 1'b1;
        if (have_full) begin
          m_tdata <= rword;
          m_tkeep <= '1;
          m_tlast <= ending && fill == (PW+1)'(BUS_W);
          rd_word <= (rd_word == WW'(RING_WORDS-1)) ? '0 : rd_word + WW'(1);
        end else begin
          m_tdata <= rword & tail_mask;
          m_tkeep <= tail_keep;
          m_tlast <= 1'b1;
        end
        if (ending && (!have_full || fill == (PW+1)'(BUS_W))) begin
          // Tensor done: restart both pointers at word 0.
          flush_pending <= 1'b0;
          wr_ptr        <= '0;
          rd_word       <= '0;
        end
      end else if (m_tready) begin
        m_tvalid <= 1'b0;
      end
    end
  end

  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata));

endmodule
