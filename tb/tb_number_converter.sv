// End-to-end testbench of number_converter at its default size (16 units,
// 256-bit memory bus).
//
// For each tensor the testbench programs precision and scale of both
// directions over AXI-Lite, streams densely packed integers in from the
// memory side, and checks every bfloat16 beat towards the accelerator. A
// loop-back model of the accelerator returns each beat unchanged (same lanes,
// same tlast) after a random delay, and the testbench checks every packed
// word written back to memory, computed independently from a double-precision
// reference of dequantisation and quantisation and a bit-string model of the
// packing.
//
// The first tensor runs without stalls at 16 bits and checks the 12-cycle
// latency of each direction and 16 conversions per cycle. The others use
// random precisions, lengths, scales, gaps and back-pressure, and rewrite the
// settings while the tensor streams (which must not affect it). The test
// counts each mechanism: stalls on all four streams, precision changes
// between tensors, short final beats and words, quantiser saturation and
// mid-tensor settings writes; one that never happened counts as a failure.
module tb_number_converter;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0]  s_axil_awaddr, s_axil_araddr;
  logic        s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0]  s_axil_wstrb;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic        s_axil_bvalid, s_axil_bready, s_axil_arvalid, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready;
  logic [BUS_W-1:0]   s_mem_tdata, m_mem_tdata;
  logic [BUS_W/8-1:0] s_mem_tkeep, m_mem_tkeep;
  logic s_mem_tlast, s_mem_tvalid, s_mem_tready;
  logic m_mem_tlast, m_mem_tvalid, m_mem_tready;
  logic [N*16-1:0] m_acc_tdata, s_acc_tdata;
  logic [N*2-1:0]  m_acc_tkeep, s_acc_tkeep;
  logic m_acc_tlast, m_acc_tvalid, m_acc_tready;
  logic s_acc_tlast, s_acc_tvalid, s_acc_tready;

  number_converter dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_acc_stall = 0, n_mem_stall = 0, n_mem_in_bp = 0, n_acc_in_bp = 0;
  int n_prec_switch = 0, n_short_beat = 0, n_short_word = 0, n_sat = 0, n_midcfg = 0;

  // ---------------------------------------------------------------- AXI-Lite
  task automatic axil_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1'b1;
    s_axil_wdata = d; s_axil_wstrb = 4'hF; s_axil_wvalid = 1'b1;
    s_axil_bready = 1'b1;
    @(negedge clk);
    while (!s_axil_bvalid) @(negedge clk);
    s_axil_awvalid = 1'b0; s_axil_wvalid = 1'b0;
    checks++;
    if (s_axil_bresp != 2'b00) begin
      failures++;
      $display("FAIL AXI-Lite write response %0d", s_axil_bresp);
    end
    @(negedge clk);
  endtask

  // ---------------------------------------------------------------- scoreboards
  typedef struct { logic [15:0] v[N]; int lanes; bit last; } abeat_t;
  typedef struct { logic [BUS_W-1:0] d; logic [BUS_W/8-1:0] k; bit last; } word_t;
  abeat_t acc_exp[$], loop_q[$];
  word_t  mem_exp[$];
  bit     random_ready = 1'b0;
  int     mem_hold = 0, acc_hold = 0;
  int     first_acc_out, last_acc_out, acc_beats, first_mem_out, last_mem_out, mem_words;

  // accelerator-side monitor and back-pressure
  always @(posedge clk) if (rst_n) begin
    // random back-pressure, now and then a long stall that fills the pipelines
    if (mem_hold > 0) mem_hold--;
    else if (random_ready && $urandom_range(60) == 0) mem_hold = 20 + $urandom_range(20);
    if (acc_hold > 0) acc_hold--;
    else if (random_ready && $urandom_range(60) == 0) acc_hold = 20 + $urandom_range(20);
    m_acc_tready <= random_ready ? (acc_hold == 0 && $urandom_range(3) != 0) : 1'b1;
    m_mem_tready <= random_ready ? (mem_hold == 0 && $urandom_range(3) != 0) : 1'b1;
    if (m_acc_tvalid && !m_acc_tready) n_acc_stall++;
    if (m_mem_tvalid && !m_mem_tready) n_mem_stall++;
    if (s_mem_tvalid && !s_mem_tready) n_mem_in_bp++;
    if (s_acc_tvalid && !s_acc_tready) n_acc_in_bp++;
    if (m_acc_tvalid && m_acc_tready) begin
      abeat_t e, got;
      int lanes;
      lanes = 0;
      for (int i = 0; i < N; i++) begin
        got.v[i] = m_acc_tdata[i*16 +: 16];
        if (m_acc_tkeep[2*i]) lanes++;
      end
      got.lanes = lanes;
      got.last  = m_acc_tlast;
      if (lanes != N) n_short_beat++;
      loop_q.push_back(got);
      checks++;
      if (acc_exp.size() == 0) begin
        failures++;
        $display("FAIL unexpected accelerator beat");
      end else begin
        e = acc_exp.pop_front();
        if (lanes != e.lanes || m_acc_tlast != e.last) begin
          failures++;
          $display("FAIL acc beat lanes %0d/%0d last %0d/%0d", lanes, e.lanes, m_acc_tlast, e.last);
        end
        for (int i = 0; i < e.lanes; i++)
          if (got.v[i] != e.v[i]) begin
            failures++;
            $display("FAIL acc lane %0d got %h exp %h", i, got.v[i], e.v[i]);
          end
      end
      if (first_acc_out < 0) first_acc_out = cycle;
      last_acc_out = cycle;
      acc_beats++;
    end
    if (m_mem_tvalid && m_mem_tready) begin
      word_t e;
      if (m_mem_tkeep != '1) n_short_word++;
      checks++;
      if (mem_exp.size() == 0) begin
        failures++;
        $display("FAIL unexpected memory word");
      end else begin
        e = mem_exp.pop_front();
        if (m_mem_tdata != e.d || m_mem_tkeep != e.k || m_mem_tlast != e.last) begin
          failures++;
          $display("FAIL mem word keep %h/%h last %0d/%0d\n got %h\n exp %h",
                   m_mem_tkeep, e.k, m_mem_tlast, e.last, m_mem_tdata, e.d);
        end
      end
      if (first_mem_out < 0) first_mem_out = cycle;
      last_mem_out = cycle;
      mem_words++;
    end
  end

  // ---------------------------------------------------------------- one tensor
  int prev_b1 = 16;
  int first_mem_in, first_acc_in;

  task automatic run_tensor(input int b1, input int n, input bf16_t s1,
                            input int b2, input bf16_t s2, input bit stress);
    bit in_bits[$];
    bit out_bits[$];
    int total_bytes, tbits, nwords, pos, nbeats;
    if (b1 != prev_b1) n_prec_switch++;
    prev_b1 = b1;
    axil_write(4'h0, 32'(b1));
    axil_write(4'h4, 32'(s1));
    axil_write(4'h8, 32'(b2));
    axil_write(4'hC, 32'(s2));
    // memory image of the tensor
    for (int i = 0; i < n; i++) begin
      int v;
      v = int'($urandom_range((1 << b1) - 1)) - (1 << (b1 - 1));
      if ($urandom_range(9) == 0) v = -(1 << (b1 - 1));
      for (int k = 0; k < b1; k++) in_bits.push_back(v[k]);
    end
    total_bytes = (n * b1 + 7) / 8;
    tbits = total_bytes * 8;
    while (in_bits.size() < tbits) in_bits.push_back(1'b0);
    nwords = (total_bytes + 31) / 32;
    // expected beats to the accelerator and words back to memory
    pos = 0;
    nbeats = 0;
    while (pos < tbits) begin
      abeat_t e;
      int take;
      take = (tbits - pos >= N * b1) ? N * b1 : tbits - pos;
      e.lanes = take / b1;
      for (int i = 0; i < N; i++) begin
        int v;
        v = 0;
        if (i < e.lanes) begin
          for (int k = 0; k < b1; k++) v[k] = in_bits[pos + i * b1 + k];
          for (int k = b1; k < 32; k++) v[k] = v[b1 - 1];
        end
        e.v[i] = ref_dq(v, s1);
        if (i < e.lanes) begin
          int qv;
          real r;
          qv = ref_q(e.v[i], s2, b2);
          r  = bf2r(e.v[i]) * bf2r(s2);
          if (r > real'((1 << (b2 - 1)) - 1) + 0.5 || r < -real'(1 << (b2 - 1)) - 0.5) n_sat++;
          for (int k = 0; k < b2; k++) out_bits.push_back(qv[k]);
        end
      end
      pos += take;
      e.last = (pos >= tbits);
      acc_exp.push_back(e);
      nbeats++;
    end
    pos = 0;
    do begin
      word_t w;
      w.d = '0;
      w.k = '0;
      for (int k = 0; k < BUS_W && pos + k < out_bits.size(); k++) w.d[k] = out_bits[pos + k];
      for (int k = 0; k < BUS_W / 8; k++) w.k[k] = (pos + k * 8 < out_bits.size());
      pos += BUS_W;
      w.last = (pos >= out_bits.size());
      mem_exp.push_back(w);
    end while (pos < out_bits.size());

    first_mem_in = -1; first_acc_in = -1;
    first_acc_out = -1; first_mem_out = -1;
    acc_beats = 0; mem_words = 0;
    fork
      // memory -> converter
      begin
        @(negedge clk);
        for (int w = 0; w < nwords; w++) begin
          while (stress && $urandom_range(3) == 0) begin
            s_mem_tvalid = 1'b0;
            @(negedge clk);
          end
          for (int k = 0; k < BUS_W; k++)
            s_mem_tdata[k] = (w * BUS_W + k < tbits) ? in_bits[w * BUS_W + k] : 1'($urandom);
          s_mem_tkeep = '1;
          if (w == nwords - 1)
            for (int k = 0; k < 32; k++) s_mem_tkeep[k] = (w * 32 + k < total_bytes);
          s_mem_tlast  = (w == nwords - 1);
          s_mem_tvalid = 1'b1;
          forever begin
            bit rdy;
            int c;
            rdy = s_mem_tready;
            c   = cycle;
            @(posedge clk);
            if (rdy) begin
              if (first_mem_in < 0) first_mem_in = c;
              break;
            end
            @(negedge clk);
          end
          @(negedge clk);
          s_mem_tvalid = 1'b0;
        end
      end
      // loop-back accelerator: converter -> accelerator -> converter
      begin
        @(negedge clk);
        for (int t = 0; t < nbeats; t++) begin
          abeat_t b;
          while (loop_q.size() == 0 || (stress && $urandom_range(2) == 0)) begin
            s_acc_tvalid = 1'b0;
            @(negedge clk);
          end
          b = loop_q.pop_front();
          for (int i = 0; i < N; i++) begin
            s_acc_tdata[i*16 +: 16] = b.v[i];
            s_acc_tkeep[2*i +: 2]   = (i < b.lanes) ? 2'b11 : 2'b00;
          end
          s_acc_tlast  = b.last;
          s_acc_tvalid = 1'b1;
          forever begin
            bit rdy;
            int c;
            rdy = s_acc_tready;
            c   = cycle;
            @(posedge clk);
            if (rdy) begin
              if (first_acc_in < 0) first_acc_in = c;
              break;
            end
            @(negedge clk);
          end
          @(negedge clk);
        end
        s_acc_tvalid = 1'b0;
      end
      // settings rewritten while the tensor streams must not affect it
      if (stress) begin
        while (first_acc_in < 0) @(negedge clk);
        axil_write(4'h0, 32'(2 + $urandom_range(14)));
        axil_write(4'h8, 32'(2 + $urandom_range(14)));
        axil_write(4'hC, 32'(rand_bf(120, 134)));
        n_midcfg++;
      end
    join
    while (mem_exp.size() != 0 || acc_exp.size() != 0) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    s_axil_awaddr = '0; s_axil_awvalid = 0; s_axil_wdata = '0; s_axil_wstrb = '0;
    s_axil_wvalid = 0; s_axil_bready = 0; s_axil_araddr = '0; s_axil_arvalid = 0;
    s_axil_rready = 0;
    s_mem_tdata = '0; s_mem_tkeep = '0; s_mem_tlast = 0; s_mem_tvalid = 0;
    s_acc_tdata = '0; s_acc_tkeep = '0; s_acc_tlast = 0; s_acc_tvalid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1) 16-bit tensor, no stalls: latency and throughput
    run_tensor(16, N * 64, BF16_ONE, 16, BF16_ONE, 1'b0);
    checks++;
    if (first_acc_out - first_mem_in != 12) begin
      failures++;
      $display("FAIL memory->accelerator latency %0d, expected 12", first_acc_out - first_mem_in);
    end
    checks++;
    if (first_mem_out - first_acc_in != 12) begin
      failures++;
      $display("FAIL accelerator->memory latency %0d, expected 12", first_mem_out - first_acc_in);
    end
    checks++;
    if (acc_beats != 64 || last_acc_out - first_acc_out != 63) begin
      failures++;
      $display("FAIL dequantisation rate: %0d beats of 16 in %0d cycles",
               acc_beats, last_acc_out - first_acc_out + 1);
    end
    checks++;
    if (mem_words != 64 || last_mem_out - first_mem_out != 63) begin
      failures++;
      $display("FAIL quantisation rate: %0d words in %0d cycles",
               mem_words, last_mem_out - first_mem_out + 1);
    end

    // 2) random precisions, lengths and scales under stress
    random_ready = 1'b1;
    for (int t = 0; t < 45; t++) begin
      int b1, b2;
      b1 = 2 + (t % 15);
      b2 = 2 + $urandom_range(14);
      run_tensor(b1, 1 + $urandom_range(400), rand_bf(118, 128), b2, rand_bf(122, 134), 1'b1);
    end

    $display("mechanisms: acc_stall=%0d mem_stall=%0d mem_in_backpressure=%0d acc_in_backpressure=%0d",
             n_acc_stall, n_mem_stall, n_mem_in_bp, n_acc_in_bp);
    $display("            precision_switch=%0d short_beat=%0d short_word=%0d saturation=%0d mid_tensor_cfg=%0d",
             n_prec_switch, n_short_beat, n_short_word, n_sat, n_midcfg);
    begin
      int cnt[9];
      cnt = '{n_acc_stall, n_mem_stall, n_mem_in_bp, n_acc_in_bp, n_prec_switch,
              n_short_beat, n_short_word, n_sat, n_midcfg};
      foreach (cnt[i]) begin
        checks++;
        if (cnt[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
