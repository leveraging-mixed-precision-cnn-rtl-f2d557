// Shared types, constants and bfloat16 arithmetic of the mixed-precision
// number converter.
//
// The converter moves tensors between an off-chip memory, which holds
// signed integers of 2 to 16 bits, and a DNN accelerator that computes in
// bfloat16. Quantisation is zero-centred (zero offset 0), so both directions
// reduce to a multiplication by a scale factor:
//   memory -> accelerator : x_float = x_q * S
//   accelerator -> memory : x_q     = x_float * (1/S)
// The 256-bit memory bus, the 2..16-bit range and the use of bfloat16 follow
// the published architecture. Rounding (round-to-nearest-even in bfloat16),
// flushing of subnormal results to zero and the canonical NaN are choices of
// this implementation.
package mpc_pkg;

  localparam int unsigned BUS_W     = 256;  // off-chip memory stream width
  localparam int unsigned INT_W     = 16;   // widest integer precision
  localparam int unsigned MIN_PREC  = 2;    // narrowest integer precision
  localparam int unsigned PREC_W    = 5;    // holds 2..16
  localparam int unsigned BF16_W    = 16;

  typedef logic [BF16_W-1:0] bf16_t;
  typedef logic [PREC_W-1:0] prec_t;

  localparam bf16_t BF16_ONE = 16'h3F80;
  localparam bf16_t BF16_NAN = 16'h7FC0;

  // Settings of one conversion direction.
  typedef struct packed {
    prec_t bits;    // integer precision, 2..16
    bf16_t scale;   // S (dequantisation) or 1/S (quantisation)
  } dir_cfg_t;

  // Clamp a programmed precision into the supported 2..16 range.
  function automatic prec_t clamp_prec(input prec_t p);
    if (p < prec_t'(MIN_PREC)) return prec_t'(MIN_PREC);
    if (p > prec_t'(INT_W))    return prec_t'(INT_W);
    return p;
  endfunction

  // bfloat16 multiplication, round-to-nearest-even. Subnormal operands are
  // read as zero and subnormal results are flushed to signed zero; overflow
  // gives infinity; NaN or inf*0 gives the canonical NaN.
  function automatic bf16_t bf16_mul(input bf16_t a, input bf16_t b);
    logic        s;
    logic [7:0]  ea, eb;
    logic [7:0]  ma, mb;
    logic [15:0] p;
    logic [7:0]  m;
    logic        g, st, up;
    logic [8:0]  mr;
    logic signed [10:0] e;
    s  = a[15] ^ b[15];
    ea = a[14:7];
    eb = b[14:7];
    if ((ea == 8'hFF && a[6:0] != 0) || (eb == 8'hFF && b[6:0] != 0))
      return BF16_NAN;
    if (ea == 8'hFF || eb == 8'hFF) begin
      if (ea == 8'h00 || eb == 8'h00) return BF16_NAN;
      return {s, 8'hFF, 7'd0};
    end
    if (ea == 8'h00 || eb == 8'h00) return {s, 15'd0};
    ma = {1'b1, a[6:0]};
    mb = {1'b1, b[6:0]};
    p  = ma * mb;                       // in [2^14, 2^16)
    e  = 11'(ea) + 11'(eb) - 11'sd127;
    if (p[15]) begin
      m  = p[15:8];
      g  = p[7];
      st = |p[6:0];
      e  = e + 11'sd1;
    end else begin
      m  = p[14:7];
      g  = p[6];
      st = |p[5:0];
    end
    up = g & (st | m[0]);
    mr = {1'b0, m} + 9'(up);
    if (mr[8]) begin
      mr = mr >> 1;
      e  = e + 11'sd1;
    end
    if (e >= 11'sd255) return {s, 8'hFF, 7'd0};
    if (e <= 11'sd0)   return {s, 15'd0};
    return {s, e[7:0], mr[6:0]};
  endfunction

endpackage
