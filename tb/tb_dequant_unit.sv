// Testbench of dequant_unit. Drives random 16-bit integers and bfloat16
// scales (including scales that push results into underflow and overflow),
// first with the enable held high, then with random stalls and bubbles, and
// compares each result with a double-precision reference. While the enable
// is held high it also checks the 10-cycle latency of every value.
module tb_dequant_unit;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en, in_valid, out_valid;
  logic signed [15:0] in_data;
  bf16_t in_scale, out_data;
  int checks = 0, failures = 0, cycle = 0;

  dequant_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { logic [15:0] exp; int t; int x; logic [15:0] s; } item_t;
  item_t q[$];
  bit stall_phase = 1'b0;

  // Scoreboard: record accepted inputs, check the outputs as they advance.
  always @(posedge clk) if (rst_n && en) begin
    if (out_valid) begin
      item_t it;
      it = q.pop_front();
      checks++;
      if (out_data !== it.exp) begin
        failures++;
        $display("FAIL x=%0d s=%h got %h exp %h", it.x, it.s, out_data, it.exp);
      end
      if (!stall_phase) begin
        checks++;
        if (cycle - it.t != 10) begin
          failures++;
          $display("FAIL latency %0d", cycle - it.t);
        end
      end
    end
    if (in_valid) q.push_back('{ref_dq(int'(in_data), in_scale), cycle, int'(in_data), in_scale});
  end

  function automatic logic [15:0] pick_scale();
    case ($urandom_range(9))
      0: return BF16_ONE;
      1: return rand_bf(1, 20);      // tiny: many results flush to zero
      2: return rand_bf(230, 254);   // huge: many results overflow
      default: return rand_bf(100, 140);
    endcase
  endfunction

  function automatic logic signed [15:0] pick_int();
    case ($urandom_range(7))
      0: return 16'sh8000;
      1: return 16'sd0;
      2: return 16'(signed'($urandom_range(255)) - 128);
      default: return 16'($urandom);
    endcase
  endfunction

  initial begin
    en = 1'b0; in_valid = 1'b0; in_data = '0; in_scale = BF16_ONE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Random values, enable always high.
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en       = 1'b1;
      in_valid = ($urandom_range(3) != 0);
      in_data  = pick_int();
      in_scale = pick_scale();
    end
    // Random stalls.
    @(negedge clk);
    stall_phase = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en       = ($urandom_range(2) != 0);
      in_valid = ($urandom_range(3) != 0);
      in_data  = pick_int();
      in_scale = pick_scale();
    end
    @(negedge clk);
    in_valid = 1'b0;
    en = 1'b1;
    repeat (15) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d values never came out", q.size());
    end
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
