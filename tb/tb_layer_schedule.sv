// Workload testbench: a mixed-precision layer schedule through
// number_converter at its default size.
//
// A CNN layer reads its weights and its input activations from memory and
// writes its output activations back. Each tensor has its own precision and
// scale, set by the controller between tensors. This testbench runs a
// scaled-down schedule of eight such layers (tensor sizes and precisions are
// illustrative, not taken from a real network). Both directions run at the
// same time: while the read side streams the weights and inputs of layer l,
// the write side stores the outputs that a model of the accelerator produces
// for layer l. Settings writes share one AXI-Lite port.
//
// It checks every value in both directions against a double-precision
// reference. For every tensor it checks that the accelerator side moves one
// beat of 16 values per cycle once the tensor flows (no back-pressure is
// applied here), and that the latency is 12 cycles at every precision: from
// the first memory word to the first bfloat16 beat, and from the beat that
// completes the first memory word to that word. It reports the memory words moved against those bfloat16
// storage would need, and checks that they match the packed sizes.
module tb_layer_schedule;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;
  localparam int L = 8;

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

  // schedule: weight, input and output precision per layer
  int wbits [L] = '{8, 4, 4, 2, 5, 6, 3, 16};
  int ibits [L] = '{16, 8, 6, 4, 4, 5, 6, 8};
  int obits [L] = '{8, 6, 4, 4, 5, 6, 8, 16};
  int wlen  [L] = '{432, 2304, 1152, 4608, 2304, 1152, 576, 160};
  int alen  [L] = '{3072, 1024, 1024, 512, 512, 512, 256, 256};

  // traffic accounting
  longint words_read = 0, words_written = 0, words_bf16 = 0;

  // ---------------------------------------------------------------- AXI-Lite
  semaphore axil = new(1);
  task automatic axil_write(input logic [3:0] a, input logic [31:0] d);
    axil.get(1);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1'b1;
    s_axil_wdata = d; s_axil_wstrb = 4'hF; s_axil_wvalid = 1'b1;
    s_axil_bready = 1'b1;
    @(negedge clk);
    while (!s_axil_bvalid) @(negedge clk);
    s_axil_awvalid = 1'b0; s_axil_wvalid = 1'b0;
    @(negedge clk);
    axil.put(1);
  endtask

  // ---------------------------------------------------------------- monitors
  typedef struct { logic [15:0] v[N]; int lanes; bit last; } abeat_t;
  typedef struct { logic [BUS_W-1:0] d; logic [BUS_W/8-1:0] k; bit last; } word_t;
  abeat_t acc_exp[$];
  word_t  mem_exp[$];
  int acc_first, acc_last, acc_count, wacc_first, wacc_last, wacc_count;
  int mem_in_first, mem_out_first;

  always @(posedge clk) if (rst_n) begin
    if (m_acc_tvalid && m_acc_tready) begin
      abeat_t e;
      int lanes;
      lanes = 0;
      for (int i = 0; i < N; i++) if (m_acc_tkeep[2*i]) lanes++;
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
          if (m_acc_tdata[i*16 +: 16] != e.v[i]) begin
            failures++;
            $display("FAIL acc lane %0d got %h exp %h", i, m_acc_tdata[i*16 +: 16], e.v[i]);
          end
      end
      if (acc_first < 0) acc_first = cycle;
      acc_last = cycle;
      acc_count++;
    end
    if (s_mem_tvalid && s_mem_tready && mem_in_first < 0) mem_in_first = cycle;
    if (s_acc_tvalid && s_acc_tready) begin
      if (wacc_first < 0) wacc_first = cycle;
      wacc_last = cycle;
      wacc_count++;
    end
    if (m_mem_tvalid && m_mem_tready) begin
      word_t e;
      checks++;
      words_written++;
      if (mem_out_first < 0) mem_out_first = cycle;
      if (mem_exp.size() == 0) begin
        failures++;
        $display("FAIL unexpected memory word");
      end else begin
        e = mem_exp.pop_front();
        if (m_mem_tdata != e.d || m_mem_tkeep != e.k || m_mem_tlast != e.last) begin
          failures++;
          $display("FAIL mem word keep %h/%h last %0d/%0d", m_mem_tkeep, e.k, m_mem_tlast, e.last);
        end
      end
    end
  end

  // ---------------------------------------------------------------- read side
  task automatic read_tensor(input int b, input int n, input bf16_t s);
    bit in_bits[$];
    int total_bytes, tbits, nwords, pos, nbeats;
    axil_write(4'h0, 32'(b));
    axil_write(4'h4, 32'(s));
    for (int i = 0; i < n; i++) begin
      int v;
      v = int'($urandom_range((1 << b) - 1)) - (1 << (b - 1));
      for (int k = 0; k < b; k++) in_bits.push_back(v[k]);
    end
    total_bytes = (n * b + 7) / 8;
    tbits = total_bytes * 8;
    while (in_bits.size() < tbits) in_bits.push_back(1'b0);
    nwords = (total_bytes + 31) / 32;
    words_read += nwords;
    words_bf16 += (n * 16 + BUS_W - 1) / BUS_W;
    pos = 0;
    nbeats = 0;
    while (pos < tbits) begin
      abeat_t e;
      int take;
      take = (tbits - pos >= N * b) ? N * b : tbits - pos;
      e.lanes = take / b;
      for (int i = 0; i < N; i++) begin
        int v;
        v = 0;
        if (i < e.lanes) begin
          for (int k = 0; k < b; k++) v[k] = in_bits[pos + i * b + k];
          for (int k = b; k < 32; k++) v[k] = v[b - 1];
        end
        e.v[i] = ref_dq(v, s);
      end
      pos += take;
      e.last = (pos >= tbits);
      acc_exp.push_back(e);
      nbeats++;
    end
    acc_first = -1; acc_count = 0; mem_in_first = -1;
    @(negedge clk);
    for (int w = 0; w < nwords; w++) begin
      for (int k = 0; k < BUS_W; k++)
        s_mem_tdata[k] = (w * BUS_W + k < tbits) ? in_bits[w * BUS_W + k] : 1'b0;
      s_mem_tkeep = '1;
      if (w == nwords - 1)
        for (int k = 0; k < 32; k++) s_mem_tkeep[k] = (w * 32 + k < total_bytes);
      s_mem_tlast  = (w == nwords - 1);
      s_mem_tvalid = 1'b1;
      forever begin
        bit rdy;
        rdy = s_mem_tready;
        @(posedge clk);
        if (rdy) break;
        @(negedge clk);
      end
      @(negedge clk);
    end
    s_mem_tvalid = 1'b0;
    while (acc_exp.size() != 0) @(posedge clk);
    @(posedge clk);
    checks++;
    if (acc_count != nbeats || acc_last - acc_first != nbeats - 1) begin
      failures++;
      $display("FAIL read rate: %0d beats in %0d cycles at %0d bits",
               acc_count, acc_last - acc_first + 1, b);
    end
    checks++;
    if (acc_first - mem_in_first != 12) begin
      failures++;
      $display("FAIL read latency %0d at %0d bits", acc_first - mem_in_first, b);
    end
  endtask

  // ---------------------------------------------------------------- write side
  task automatic write_tensor(input int b, input int n, input bf16_t is);
    bit out_bits[$];
    abeat_t beats[$];
    int nbeats, pos, k;
    axil_write(4'h8, 32'(b));
    axil_write(4'hC, 32'(is));
    nbeats = (n + N - 1) / N;
    words_bf16 += (n * 16 + BUS_W - 1) / BUS_W;
    for (int t = 0; t < nbeats; t++) begin
      abeat_t a;
      a.lanes = (t == nbeats - 1) ? n - t * N : N;
      a.last  = (t == nbeats - 1);
      for (int i = 0; i < N; i++) begin
        a.v[i] = rand_bf(118, 133);
        if (i < a.lanes) begin
          int q;
          q = ref_q(a.v[i], is, b);
          for (int k = 0; k < b; k++) out_bits.push_back(q[k]);
        end
      end
      beats.push_back(a);
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
    wacc_first = -1; wacc_count = 0; mem_out_first = -1;
    @(negedge clk);
    foreach (beats[t]) begin
      for (int i = 0; i < N; i++) begin
        s_acc_tdata[i*16 +: 16] = beats[t].v[i];
        s_acc_tkeep[2*i +: 2]   = (i < beats[t].lanes) ? 2'b11 : 2'b00;
      end
      s_acc_tlast  = beats[t].last;
      s_acc_tvalid = 1'b1;
      forever begin
        bit rdy;
        rdy = s_acc_tready;
        @(posedge clk);
        if (rdy) break;
        @(negedge clk);
      end
      @(negedge clk);
    end
    s_acc_tvalid = 1'b0;
    while (mem_exp.size() != 0) @(posedge clk);
    @(posedge clk);
    checks++;
    if (wacc_count != nbeats || wacc_last - wacc_first != nbeats - 1) begin
      failures++;
      $display("FAIL write rate: %0d beats in %0d cycles at %0d bits",
               wacc_count, wacc_last - wacc_first + 1, b);
    end
    // the first word is complete with beat k (counted from 0)
    k = (BUS_W + N * b - 1) / (N * b) - 1;
    if (k < nbeats - 1) begin
      checks++;
      if (mem_out_first - (wacc_first + k) != 12) begin
        failures++;
        $display("FAIL write latency %0d at %0d bits", mem_out_first - (wacc_first + k), b);
      end
    end
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    int t0;
    s_axil_awaddr = '0; s_axil_awvalid = 0; s_axil_wdata = '0; s_axil_wstrb = '0;
    s_axil_wvalid = 0; s_axil_bready = 0; s_axil_araddr = '0; s_axil_arvalid = 0;
    s_axil_rready = 0; m_acc_tready = 1'b1; m_mem_tready = 1'b1;
    s_mem_tdata = '0; s_mem_tkeep = '0; s_mem_tlast = 0; s_mem_tvalid = 0;
    s_acc_tdata = '0; s_acc_tkeep = '0; s_acc_tlast = 0; s_acc_tvalid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t0 = cycle;
    for (int l = 0; l < L; l++) begin
      fork
        begin
          read_tensor(wbits[l], wlen[l], rand_bf(118, 124));
          read_tensor(ibits[l], alen[l], rand_bf(118, 124));
        end
        write_tensor(obits[l], alen[l], {1'b0, 8'(127 + obits[l] - 4), 7'($urandom)});
      join
    end
    checks++;
    if (words_read + words_written >= words_bf16) begin
      failures++;
      $display("FAIL no traffic saved");
    end
    $display("memory words: %0d read + %0d written = %0d, bfloat16 storage: %0d (%0d%% saved), %0d cycles",
             words_read, words_written, words_read + words_written, words_bf16,
             100 - (100 * (words_read + words_written)) / words_bf16, cycle - t0);
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
