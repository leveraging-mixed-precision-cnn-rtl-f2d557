// Extractor: unpacks 256-bit memory words into N_UNITS integers per cycle.
//
// Off-chip memory holds a tensor as a dense bit string of `bits`-wide signed
// integers (2..16 bits, element 0 in the least significant bits of the first
// word, no padding between elements). Words arrive on an AXI-Stream slave and
// are written, one whole word per cycle, into a ring buffer of RING_WORDS
// words. A read pointer with bit granularity takes N_UNITS * bits bits per
// cycle out of the ring (wrapping around its end), cuts them into N_UNITS
// chunks and sign-extends each chunk to 16 bits for the dequantisation units.
//
// Stream framing: tlast marks the last word of a tensor; tkeep (contiguous
// low bytes, used on the last word only) says how many bytes of it are data.
// After the last word has entered, no new word is accepted until the ring has
// been emptied. If fewer than N_UNITS * bits bits remain at the end, a final
// short beat carries floor(remaining / bits) values (m_lanes) and the unused
// lanes are zero (a last word without data bytes gives an empty beat). The
// beat that ends the tensor has m_last set. Precision and
// scale are taken from cfg_* when the first word of a tensor is accepted and
// held for the whole tensor; the scale leaves with every beat.
//
// Timing: a word accepted at a clock edge can leave in the output register at
// the next edge, so values appear two cycles after the word is presented
// (latency 2). With bits = 16 one word enters and N_UNITS values leave every
// cycle. s_tready does not depend on m_ready.
// The ring buffer, the multi-chunk read and the latency follow the published
// design; the framing with tlast/tkeep and the ring size are this
// implementation's choices.
module extractor
  import mpc_pkg::*;
#(
  parameter int unsigned N_UNITS    = 16,
  parameter int unsigned RING_WORDS = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // settings, sampled at the start of each tensor
  input  prec_t                         cfg_bits,
  input  bf16_t                         cfg_scale,
  // AXI-Stream from memory
  input  logic [BUS_W-1:0]              s_tdata,
  input  logic [BUS_W/8-1:0]            s_tkeep,
  input  logic                          s_tlast,
  input  logic                          s_tvalid,
  output logic                          s_tready,
  // N_UNITS sign-extended integers to the dequantisation units
  output logic                          m_valid,
  input  logic                          m_ready,
  output logic signed [INT_W-1:0]       m_data [N_UNITS],
  output logic [$clog2(N_UNITS+1)-1:0]  m_lanes,
  output logic                          m_last,
  output bf16_t                         m_scale
);

  localparam int unsigned CAP  = RING_WORDS * BUS_W;
  localparam int unsigned WIN  = N_UNITS * INT_W;
  localparam int unsigned PW   = $clog2(CAP);
  localparam int unsigned WW   = (RING_WORDS > 1) ? $clog2(RING_WORDS) : 1;
  localparam int unsigned LW   = $clog2(N_UNITS+1);

  logic [CAP-1:0]   ring;
  logic [WW-1:0]    wr_word;
  logic [PW-1:0]    rd_ptr;
  logic [PW:0]      fill;
  logic             in_stream, last_in_buf;
  prec_t            bits_q;
  bf16_t            scale_q;

  // ---- write side --------------------------------------------------------
  logic          wr;
  logic [PW:0]   wbits;
  logic [BUS_W-1:0] wdata;
  always_comb begin
    wbits = '0;
    for (int i = 0; i < BUS_W/8; i++) begin
      wdata[i*8 +: 8] = s_tkeep[i] ? s_tdata[i*8 +: 8] : 8'h00;
      if (s_tkeep[i]) wbits = wbits + (PW+1)'(8);
    end
  end
  assign s_tready = !last_in_buf && (fill + (PW+1)'(BUS_W) <= (PW+1)'(CAP));
  assign wr       = s_tvalid && s_tready;

  // ---- read side ---------------------------------------------------------
  prec_t             bits_use;
  logic [PW:0]       need;
  logic [2*CAP-1:0]  dbl;
  logic [WIN-1:0]    win;
  logic              have_full, have_tail, load;
  logic [PW:0]       rbits;
  logic [LW-1:0]     lanes;
  logic              beat_last;
  logic signed [INT_W-1:0] vals [N_UNITS];

  assign bits_use  = bits_q;
  assign need      = (PW+1)'(N_UNITS) * (PW+1)'(bits_use);
  assign have_full = fill >= need;
  assign have_tail = last_in_buf && !have_full;
  assign load      = (have_full || have_tail) && (!m_valid || m_ready);
  assign dbl       = {ring, ring} >> rd_ptr;
  assign win       = dbl[WIN-1:0];

  always_comb begin
    rbits     = have_full ? need : fill;
    beat_last = last_in_buf && (rbits == fill);
    lanes     = '0;
    for (int i = 0; i < N_UNITS; i++) begin
      logic [INT_W-1:0] chunk;
      chunk = INT_W'(win >> (i * bits_use));
      // keep `bits` bits and sign-extend them
      chunk = (chunk << (INT_W - 32'(bits_use)));
      vals[i] = $signed(chunk) >>> (INT_W - 32'(bits_use));
      if ((PW+1)'(i + 1) * (PW+1)'(bits_use) <= rbits)
        lanes = lanes + LW'(1);
      else
        vals[i] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ring        <= '0;
      wr_word     <= '0;
      rd_ptr      <= '0;
      fill        <= '0;
      in_stream   <= 1'b0;
      last_in_buf <= 1'b0;
      bits_q      <= prec_t'(INT_W);
      scale_q     <= BF16_ONE;
      m_valid     <= 1'b0;
      m_lanes     <= '0;
      m_last      <= 1'b0;
      m_scale     <= '0;
      for (int i = 0; i < N_UNITS; i++) m_data[i] <= '0;
    end else begin
      if (wr) begin
        ring[wr_word*BUS_W +: BUS_W] <= wdata;
        wr_word <= (wr_word == WW'(RING_WORDS-1)) ? '0 : wr_word + WW'(1);
        if (!in_stream) begin
          bits_q  <= clamp_prec(cfg_bits);
          scale_q <= cfg_scale;
        end
        in_stream <= !s_tlast;
        if (s_tlast) last_in_buf <= 1'b1;
      end
      fill <= fill + (wr ? wbits : '0) - (load ? rbits : '0);
      if (load) begin
        m_valid <= 1'b1;
        m_data  <= vals;
        m_lanes <= lanes;
        m_last  <= beat_last;
        m_scale <= scale_q;
        if (beat_last) begin
          // Tensor done: drop padding, realign to the next word.
          last_in_buf <= 1'b0;
          rd_ptr      <= PW'(wr_word) * PW'(BUS_W);
        end else begin
          rd_ptr <= rd_ptr + PW'(rbits);
        end
      end else if (m_ready) begin
        m_valid <= 1'b0;
      end
    end
  end

  // An offered beat stays put until it is taken.
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            m_valid && !m_ready |=> m_valid && $stable(m_lanes));

endmodule
