// Testbench of extractor. Sends tensors of random length and precision
// (2..16 bits), packed densely into 256-bit words with tkeep on the last word,
// with random gaps on the input and random back-pressure on the output, and
// checks every beat (values, lane count, tlast, scale) against a bit-string
// model. It also checks that the settings are held for a whole tensor even
// when they change mid-tensor, the 2-cycle latency from the first word to the
// first beat, and one beat per cycle at 16 bits without stalls.
module tb_extractor;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  prec_t cfg_bits;
  bf16_t cfg_scale;
  logic [BUS_W-1:0]   s_tdata;
  logic [BUS_W/8-1:0] s_tkeep;
  logic s_tlast, s_tvalid, s_tready;
  logic m_valid, m_ready, m_last;
  logic signed [15:0] m_data [N];
  logic [4:0] m_lanes;
  bf16_t m_scale;
  int checks = 0, failures = 0, cycle = 0;

  extractor #(.N_UNITS(N), .RING_WORDS(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int v[N]; int lanes; bit last; } beat_t;
  beat_t exp_q[$];
  bf16_t exp_scale;
  int    out_beats = 0, first_out = -1, last_out = -1;
  bit    rdy_random = 1'b1;

  // Output checker.
  always @(posedge clk) if (rst_n) begin
    m_ready <= rdy_random ? ($urandom_range(3) != 0) : 1'b1;
    if (m_valid && first_out < 0) first_out = cycle;
    if (m_valid && m_ready) begin
      beat_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected beat");
      end else begin
        e = exp_q.pop_front();
        if (m_lanes != 5'(e.lanes) || m_last != e.last || m_scale != exp_scale) begin
          failures++;
          $display("FAIL beat lanes %0d/%0d last %0d/%0d scale %h/%h",
                   m_lanes, e.lanes, m_last, e.last, m_scale, exp_scale);
        end
        for (int i = 0; i < N; i++)
          if (int'(m_data[i]) != e.v[i]) begin
            failures++;
            $display("FAIL lane %0d got %0d exp %0d", i, m_data[i], e.v[i]);
          end
      end
      out_beats++;
      last_out = cycle;
    end
  end

  // Send one tensor of n values of b bits; gaps: random input gaps.
  task automatic send_tensor(input int b, input int n, input bit gaps);
    bit bits_q[$];
    int vals[$];
    int total_bytes, nwords, tbits, pos, first_in;
    bf16_t sc;
    for (int i = 0; i < n; i++) begin
      int v;
      v = int'($urandom_range((1 << b) - 1)) - (1 << (b - 1));
      vals.push_back(v);
      for (int k = 0; k < b; k++) bits_q.push_back(v[k]);
    end
    total_bytes = (n * b + 7) / 8;
    tbits = total_bytes * 8;
    while (bits_q.size() < tbits) bits_q.push_back(1'b0);
    nwords = (total_bytes + 31) / 32;
    // expected beats
    pos = 0;
    while (pos < tbits) begin
      beat_t e;
      int take;
      take = (tbits - pos >= N * b) ? N * b : tbits - pos;
      e.lanes = take / b;
      for (int i = 0; i < N; i++) begin
        int v;
        v = 0;
        if (i < e.lanes) begin
          for (int k = 0; k < b; k++) v[k] = bits_q[pos + i * b + k];
          for (int k = b; k < 32; k++) v[k] = v[b - 1];
        end
        e.v[i] = v;
      end
      pos += take;
      e.last = (pos >= tbits);
      exp_q.push_back(e);
    end
    sc = rand_bf(100, 150);
    exp_scale = sc;
    // drive the words
    first_out = -1;
    first_in  = -1;
    cfg_bits  = prec_t'(b);
    cfg_scale = sc;
    @(negedge clk);
    for (int w = 0; w < nwords; w++) begin
      while (gaps && $urandom_range(3) == 0) begin
        s_tvalid = 1'b0;
        @(negedge clk);
      end
      for (int k = 0; k < BUS_W; k++)
        s_tdata[k] = (w * BUS_W + k < tbits) ? bits_q[w * BUS_W + k] : 1'($urandom);
      s_tkeep  = '1;
      if (w == nwords - 1)
        for (int k = 0; k < 32; k++) s_tkeep[k] = (w * 32 + k < total_bytes);
      s_tlast  = (w == nwords - 1);
      s_tvalid = 1'b1;
      // s_tready only changes at clock edges: sample it half a cycle early
      forever begin
        bit rdy;
        int c;
        rdy = s_tready;
        c   = cycle;
        @(posedge clk);
        if (rdy) begin
          if (first_in < 0) first_in = c;
          break;
        end
        @(negedge clk);
      end
      // a settings change after the first word must not affect this tensor
      @(negedge clk);
      cfg_bits  = prec_t'(2 + $urandom_range(14));
      cfg_scale = rand_bf(100, 150);
      s_tvalid  = 1'b0;
    end
    @(negedge clk);
    s_tvalid = 1'b0;
    while (exp_q.size() != 0) @(posedge clk);
    @(posedge clk);
    checks++;
    if (first_out - first_in != 2) begin
      failures++;
      $display("FAIL first-beat latency %0d", first_out - first_in);
    end
  endtask

  initial begin
    cfg_bits = 5'd16; cfg_scale = BF16_ONE;
    s_tdata = '0; s_tkeep = '0; s_tlast = 1'b0; s_tvalid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // throughput: 16-bit values, no gaps, no back-pressure
    rdy_random = 1'b0;
    repeat (2) @(posedge clk);
    out_beats = 0;
    send_tensor(16, N * 64, 1'b0);
    checks++;
    if (out_beats != 64 || last_out - first_out != 63) begin
      failures++;
      $display("FAIL throughput: %0d beats in %0d cycles", out_beats, last_out - first_out + 1);
    end
    // every precision, random lengths, gaps and back-pressure
    rdy_random = 1'b1;
    for (int t = 0; t < 120; t++)
      send_tensor(2 + (t % 15), 1 + $urandom_range(300), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
