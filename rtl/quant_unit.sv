// Quantisation unit: bfloat16 times the inverse scale 1/S -> signed integer
// of 2..16 bits.
//
// One unit converts one value per cycle in a ten-stage pipeline, the mirror
// image of the dequantisation unit:
//   stage 1     : multiply the bfloat16 input by 1/S (bfloat16, round to
//                 nearest even); the division of the quantisation formula is
//                 thereby a multiplication
//   stages 2..9 : place the 8-bit significand in a 25-bit fixed-point word
//                 (16 integer bits, 9 fraction bits) and shift it right by
//                 142 - exponent, one stage per bit of that shift amount, from
//                 bit 7 down to bit 0
//   stage 10    : round to nearest with ties away from zero, apply the sign
//                 and saturate to the configured precision, giving
//                 [-2^(bits-1), 2^(bits-1)-1].
// NaN becomes 0, infinity saturates. The result leaves sign-extended to 16
// bits; the compressor keeps its low `bits` bits.
//
// Interface: in_valid/in_data/in_scale/in_bits are sampled when en is high;
// out_valid/out_data appear 10 enabled cycles later. en stalls all stages.
// The latency of 10 and the multiply-then-convert order follow the published
// design; the stage split, rounding and saturation are this implementation's
// choices.
module quant_unit
  import mpc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    in_valid,
  input  bf16_t                   in_data,
  input  bf16_t                   in_scale,
  input  prec_t                   in_bits,
  output logic                    out_valid,
  output logic signed [INT_W-1:0] out_data
);

  localparam int unsigned NSH = 8;
  localparam int unsigned FW  = INT_W + 9;   // 16 integer + 9 fraction bits

  // Stage 1 result: the scaled bfloat16 value.
  typedef struct packed {
    logic  valid;
    bf16_t val;
    prec_t bits;
  } s1_t;

  // Shift stages: fixed-point magnitude and the remaining shift amount.
  typedef struct packed {
    logic          valid;
    logic          sign;
    logic          ovf;     // magnitude certainly above 2^15
    logic          zero;    // NaN or zero
    logic [7:0]    amt;
    logic [FW-1:0] fx;
    prec_t         bits;
  } sh_t;

  s1_t s1;
  sh_t sh [NSH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1 <= '0;
    else if (en) begin
      s1.valid <= in_valid;
      s1.val   <= bf16_mul(in_data, in_scale);
      s1.bits  <= in_bits;
    end
  end

  // Unpack the product into the shifter's starting word.
  sh_t  init;
  logic [7:0] e;
  always_comb begin
    e         = s1.val[14:7];
    init      = '0;
    init.valid = s1.valid;
    init.sign = s1.val[15];
    init.bits = s1.bits;
    init.zero = (e == 8'd0) || (e == 8'hFF && s1.val[6:0] != 7'd0);
    init.ovf  = (e > 8'd142) && !init.zero;
    init.amt  = init.ovf ? 8'd0 : 8'd142 - e;
    init.fx   = {1'b1, s1.val[6:0], {(FW-8){1'b0}}};  // 1.m x 2^15
  end

  for (genvar i = 0; i < NSH; i++) begin : g_shift
    localparam int unsigned K   = NSH - 1 - i;
    localparam int unsigned AMT = 1 << K;
    sh_t prev, nxt;
    if (i == 0) begin : g_first
      assign prev = init;
    end else begin : g_next
      assign prev = sh[i-1];
    end
    always_comb begin
      nxt = prev;
      if (prev.amt[K]) nxt.fx = (AMT >= FW) ? '0 : prev.fx >> AMT;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sh[i] <= '0;
      else if (en) sh[i] <= nxt;
    end
  end

  // Stage 10: round, sign, saturate.
  sh_t last;
  logic [INT_W:0]           mag;     // up to 2^16
  logic [INT_W:0]           pos_max; // 2^(bits-1) - 1
  logic signed [INT_W-1:0]  res;
  assign last = sh[NSH-1];
  always_comb begin
    mag     = {1'b0, last.fx[FW-1:9]} + (INT_W+1)'(last.fx[8]);
    pos_max = ((INT_W+1)'(1) << (clamp_prec(last.bits) - 1)) - 1;
    if (last.zero)
      res = '0;
    else if (!last.sign)
      res = (last.ovf || mag > pos_max) ? INT_W'(pos_max) : INT_W'(mag);
    else
      res = (last.ovf || mag > pos_max + 1) ? -INT_W'(pos_max + 1) : -INT_W'(mag);
  end

  logic                    v10;
  logic signed [INT_W-1:0] d10;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v10 <= 1'b0;
      d10 <= '0;
    end else if (en) begin
      v10 <= last.valid;
      d10 <= res;
    end
  end

  assign out_valid = v10;
  assign out_data  = d10;

endmodule
