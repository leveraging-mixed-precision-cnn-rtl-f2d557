// Testbench of quant_unit. Drives random bfloat16 values, inverse scales and
// precisions 2..16 (plus zeros, infinities, NaN, ties at .5 and values far
// out of range, which must saturate), first with the enable held high and
// then with random stalls, and compares each result with a double-precision
// reference. With the enable high it checks the 10-cycle latency. It also
// counts how many results saturated and fails if none did.
module tb_quant_unit;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en, in_valid, out_valid;
  bf16_t in_data, in_scale;
  prec_t in_bits;
  logic signed [15:0] out_data;
  int checks = 0, failures = 0, cycle = 0, n_sat = 0;

  quant_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int exp; int t; logic [15:0] x, s; int b; } item_t;
  item_t q[$];
  bit stall_phase = 1'b0;

  always @(posedge clk) if (rst_n && en) begin
    if (out_valid) begin
      item_t it;
      it = q.pop_front();
      checks++;
      if (int'(out_data) != it.exp) begin
        failures++;
        $display("FAIL x=%h s=%h bits=%0d got %0d exp %0d", it.x, it.s, it.b, out_data, it.exp);
      end
      if (it.exp == (1 << (it.b - 1)) - 1 || it.exp == -(1 << (it.b - 1))) n_sat++;
      if (!stall_phase) begin
        checks++;
        if (cycle - it.t != 10) begin
          failures++;
          $display("FAIL latency %0d", cycle - it.t);
        end
      end
    end
    if (in_valid)
      q.push_back('{ref_q(in_data, in_scale, int'(in_bits)), cycle, in_data, in_scale, int'(in_bits)});
  end

  function automatic logic [15:0] pick_val();
    case ($urandom_range(11))
      0: return 16'h0000;
      1: return 16'h7F80;                          // +inf
      2: return 16'hFF80;                          // -inf
      3: return 16'h7FC1;                          // NaN
      4: return {1'($urandom), 8'(126 + $urandom_range(8)), 7'h40}; // x.5 ties
      5: return rand_bf(143, 200);                 // far too large
      default: return rand_bf(110, 142);
    endcase
  endfunction

  function automatic logic [15:0] pick_scale();
    case ($urandom_range(5))
      0: return BF16_ONE;
      1: return {1'b0, 8'(127 + $urandom_range(6) - 3), 7'd0};   // powers of two
      default: return rand_bf(122, 132);
    endcase
  endfunction

  task automatic drive(input bit stalls);
    @(negedge clk);
    en       = stalls ? ($urandom_range(2) != 0) : 1'b1;
    in_valid = ($urandom_range(3) != 0);
    in_data  = pick_val();
    in_scale = pick_scale();
    in_bits  = prec_t'(2 + $urandom_range(14));
  endtask

  initial begin
    en = 1'b0; in_valid = 1'b0; in_data = '0; in_scale = BF16_ONE; in_bits = 5'd16;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) drive(1'b0);
    @(negedge clk);
    stall_phase = 1'b1;
    for (int i = 0; i < 3000; i++) drive(1'b1);
    @(negedge clk);
    in_valid = 1'b0;
    en = 1'b1;
    repeat (15) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d values never came out", q.size());
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL saturation never happened");
    end
    $display("saturated results: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
