// Testbench of compressor. Sends tensors of random precision (2..16 bits)
// as beats with a random number of valid lanes, with random input gaps and
// random back-pressure from memory, and checks every output word (data,
// tkeep, tlast) against a bit-string model of the dense packing. It also
// checks that the precision of the first beat holds for the whole tensor,
// the 2-cycle latency from the first full beat to the first word, and one
// word per cycle at 16 bits without stalls.
module tb_compressor;
  import mpc_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s_valid, s_ready, s_last;
  logic signed [15:0] s_data [N];
  logic [4:0] s_lanes;
  prec_t s_bits;
  logic [BUS_W-1:0]   m_tdata;
  logic [BUS_W/8-1:0] m_tkeep;
  logic m_tlast, m_tvalid, m_tready;
  int checks = 0, failures = 0, cycle = 0;

  compressor #(.N_UNITS(N), .RING_WORDS(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { logic [BUS_W-1:0] d; logic [BUS_W/8-1:0] k; bit last; } word_t;
  word_t exp_q[$];
  int    out_words = 0, first_out = -1, last_out = -1;
  bit    rdy_random = 1'b1;

  always @(posedge clk) if (rst_n) begin
    m_tready <= rdy_random ? ($urandom_range(3) != 0) : 1'b1;
    if (m_tvalid && first_out < 0) first_out = cycle;
    if (m_tvalid && m_tready) begin
      word_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected word");
      end else begin
        e = exp_q.pop_front();
        if (m_tdata != e.d || m_tkeep != e.k || m_tlast != e.last) begin
          failures++;
          $display("FAIL word keep %h/%h last %0d/%0d data\n %h\n %h",
                   m_tkeep, e.k, m_tlast, e.last, m_tdata, e.d);
        end
      end
      out_words++;
      last_out = cycle;
    end
  end

  task automatic send_tensor(input int b, input int nbeats, input bit full, input bit gaps);
    bit bits_q[$];
    int vals[$][N];
    int nl[$];
    int first_in, pos;
    first_in  = -1;
    first_out = -1;
    // make the beats and the expected words first
    for (int t = 0; t < nbeats; t++) begin
      int lanes;
      int row[N];
      lanes = full ? N : int'($urandom_range(N));
      for (int i = 0; i < N; i++) begin
        row[i] = int'($urandom_range((1 << b) - 1)) - (1 << (b - 1));
        if (i < lanes)
          for (int k = 0; k < b; k++) bits_q.push_back(row[i][k]);
      end
      vals.push_back(row);
      nl.push_back(lanes);
    end
    pos = 0;
    do begin
      word_t e;
      e.d = '0;
      e.k = '0;
      for (int k = 0; k < BUS_W && pos + k < bits_q.size(); k++) e.d[k] = bits_q[pos + k];
      for (int k = 0; k < BUS_W / 8; k++) e.k[k] = (pos + k * 8 < bits_q.size());
      pos += BUS_W;
      e.last = (pos >= bits_q.size());
      exp_q.push_back(e);
    end while (pos < bits_q.size());
    // drive them
    @(negedge clk);
    for (int t = 0; t < nbeats; t++) begin
      while (gaps && $urandom_range(3) == 0) begin
        s_valid = 1'b0;
        @(negedge clk);
      end
      for (int i = 0; i < N; i++) s_data[i] = 16'(vals[t][i]);
      s_lanes = 5'(nl[t]);
      s_bits  = (t == 0) ? prec_t'(b) : prec_t'(2 + $urandom_range(14));
      s_last  = (t == nbeats - 1);
      s_valid = 1'b1;
      forever begin
        bit rdy;
        int c;
        rdy = s_ready;
        c   = cycle;
        @(posedge clk);
        if (rdy) begin
          if (first_in < 0) first_in = c;
          break;
        end
        @(negedge clk);
      end
      @(negedge clk);
      s_valid = 1'b0;
    end
    while (exp_q.size() != 0) @(posedge clk);
    @(posedge clk);
    if (full && b == 16) begin
      checks++;
      if (first_out - first_in != 2) begin
        failures++;
        $display("FAIL first-word latency %0d", first_out - first_in);
      end
    end
  endtask

  initial begin
    s_valid = 1'b0; s_last = 1'b0; s_lanes = '0; s_bits = 5'd16;
    for (int i = 0; i < N; i++) s_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    rdy_random = 1'b0;
    repeat (2) @(posedge clk);
    out_words = 0;
    send_tensor(16, 64, 1'b1, 1'b0);
    checks++;
    if (out_words != 64 || last_out - first_out != 63) begin
      failures++;
      $display("FAIL throughput: %0d words in %0d cycles", out_words, last_out - first_out + 1);
    end
    rdy_random = 1'b1;
    for (int t = 0; t < 150; t++)
      send_tensor(2 + (t % 15), 1 + $urandom_range(40), t % 3 == 0, 1'b1);
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
