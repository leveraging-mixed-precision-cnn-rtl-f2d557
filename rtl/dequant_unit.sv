// Dequantisation unit: signed integer -> bfloat16, times the scale S.
//
// One unit converts one value per cycle in a ten-stage pipeline, as in the
// published design: a sign stage, eight exponent stages and the scale
// multiplication.
//   stage 1     : take the sign and the magnitude (two's complement negate)
//   stages 2..9 : one stage per bfloat16 exponent bit, from bit 7 down to
//                 bit 0. Stage k shifts the magnitude left by 2^k when its top
//                 2^k bits are all zero and adds 2^k to the leading-zero count,
//                 so after stage 9 the magnitude is normalised and
//                 exponent = 127 + 15 - leading_zeros.
//   stage 10    : round the 16-bit normalised magnitude to the 8-bit bfloat16
//                 significand (round to nearest, ties to even), then multiply
//                 by S (bfloat16, round to nearest even).
// The input is the integer already sign-extended to 16 bits, so the unit is
// independent of the configured precision. The scale travels through the
// pipeline with its value, so a new scale never affects values in flight.
//
// Interface: in_valid/in_data/in_scale are sampled when en is high; out_valid
// and out_data appear 10 enabled cycles later. en stalls every stage at once
// (the surrounding datapath holds all units in lockstep).
// The stage split and the latency of 10 follow the published design; the
// rounding mode and the zero handling are this implementation's choices.
module dequant_unit
  import mpc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    in_valid,
  input  logic signed [INT_W-1:0] in_data,
  input  bf16_t                   in_scale,
  output logic                    out_valid,
  output bf16_t                   out_data
);

  localparam int unsigned NSH = 8;   // exponent stages

  typedef struct packed {
    logic             valid;
    logic             sign;
    logic [INT_W-1:0] mag;
    logic [7:0]       lz;
    bf16_t            scale;
  } st_t;

  st_t s1;
  st_t sh [NSH];
  logic  v10;
  bf16_t d10;

  // Stage 1: sign check.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1 <= '0;
    else if (en) begin
      s1.valid <= in_valid;
      s1.sign  <= in_data[INT_W-1];
      s1.mag   <= in_data[INT_W-1] ? INT_W'(-in_data) : INT_W'(in_data);
      s1.lz    <= '0;
      s1.scale <= in_scale;
    end
  end

  // Stages 2..9: exponent bit 7 down to 0.
  for (genvar i = 0; i < NSH; i++) begin : g_norm
    localparam int unsigned K   = NSH - 1 - i;
    localparam int unsigned AMT = 1 << K;
    st_t prev, nxt;
    if (i == 0) begin : g_first
      assign prev = s1;
    end else begin : g_next
      assign prev = sh[i-1];
    end
    if (AMT >= INT_W) begin : g_wide
      // A shift of the whole word or more: only a zero magnitude qualifies.
      always_comb begin
        nxt = prev;
        if (prev.mag == '0) nxt.lz = prev.lz + 8'(AMT);
      end
    end else begin : g_shift
      always_comb begin
        nxt = prev;
        if (prev.mag[INT_W-1 -: AMT] == '0) begin
          nxt.mag = prev.mag << AMT;
          nxt.lz  = prev.lz + 8'(AMT);
        end
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sh[i] <= '0;
      else if (en) sh[i] <= nxt;
    end
  end

  // Stage 10: round to bfloat16 and apply the scale.
  st_t   last;
  bf16_t conv;
  logic [8:0] mr;
  logic [7:0] ex;
  logic       up;
  assign last = sh[NSH-1];
  always_comb begin
    up = last.mag[7] & ((|last.mag[6:0]) | last.mag[8]);
    mr = {1'b0, last.mag[15:8]} + 9'(up);
    ex = 8'(127 + INT_W - 1) - last.lz;
    if (mr[8]) begin
      mr = mr >> 1;
      ex = ex + 8'd1;
    end
    if (last.mag == '0) conv = '0;
    else                conv = {last.sign, ex, mr[6:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v10 <= 1'b0;
      d10 <= '0;
    end else if (en) begin
      v10 <= last.valid;
      d10 <= bf16_mul(conv, last.scale);
    end
  end

  assign out_valid = v10;
  assign out_data  = d10;

endmodule
