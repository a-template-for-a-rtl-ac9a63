// tb_axis_width_conv: a 512-to-128 downsizer feeding a 128-to-512 upsizer.
// Random wide beats (full keep, the last of each packet with a random number
// of valid words) go in; the narrow stream in the middle is checked word by
// word against the input (word 0 first, empty pieces skipped, last on the
// final valid piece), and the wide stream at the end must equal the input
// with keep. Random stalls; one narrow beat per cycle when nothing stalls.
module tb_axis_width_conv;
  localparam int WW = 512, NW = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s_valid, s_ready, s_last, n_valid, n_ready, n_last, m_valid, m_ready, m_last;
  logic [WW-1:0] s_data, m_data;
  logic [WW/32-1:0] s_keep, m_keep;
  logic [NW-1:0] n_data;
  logic [NW/32-1:0] n_keep;
  bit stall = 1;

  axis_width_conv #(.IN_W(WW), .OUT_W(NW)) dut_down (
    .clk, .rst_n, .s_valid, .s_ready, .s_data, .s_keep, .s_last,
    .m_valid(n_valid), .m_ready(n_ready), .m_data(n_data), .m_keep(n_keep), .m_last(n_last));
  axis_width_conv #(.IN_W(NW), .OUT_W(WW)) dut_up (
    .clk, .rst_n, .s_valid(n_valid), .s_ready(n_ready), .s_data(n_data), .s_keep(n_keep),
    .s_last(n_last), .m_valid, .m_ready, .m_data, .m_keep, .m_last);

  typedef struct { logic [WW-1:0] d; logic [15:0] k; bit l; } wbeat_t;
  typedef struct { logic [NW-1:0] d; logic [3:0] k; bit l; } nbeat_t;
  wbeat_t in_q[$], out_exp[$];
  nbeat_t mid_exp[$];
  int n_cnt = 0;

  always_ff @(posedge clk) begin
    if (rst_n && n_valid && n_ready) begin
      checks++;
      if (mid_exp.size() == 0 || n_data !== mid_exp[0].d || n_keep !== mid_exp[0].k ||
          n_last !== mid_exp[0].l) begin
        failures++; $display("narrow beat %0d wrong", n_cnt);
      end
      if (mid_exp.size() != 0) void'(mid_exp.pop_front());
      n_cnt++;
    end
    if (rst_n && m_valid && m_ready) begin
      checks++;
      if (out_exp.size() == 0 || m_keep !== out_exp[0].k || m_last !== out_exp[0].l) begin
        failures++; $display("wide keep/last wrong");
      end else begin
        for (int w = 0; w < 16; w++)
          if (m_keep[w] && m_data[w*32 +: 32] !== out_exp[0].d[w*32 +: 32]) begin
            failures++; $display("wide word %0d wrong", w);
          end
      end
      if (out_exp.size() != 0) void'(out_exp.pop_front());
    end
    m_ready <= !stall || ($urandom % 3 != 0);
  end

  // source
  always_ff @(posedge clk) begin
    if (!(s_valid && !s_ready)) begin
      if (s_valid && s_ready) void'(in_q.pop_front());
      if (in_q.size() > 0 && (!stall || $urandom % 3 != 0)) begin
        s_valid <= 1; s_data <= in_q[0].d; s_keep <= in_q[0].k; s_last <= in_q[0].l;
      end else s_valid <= 0;
    end
  end

  task automatic add_packet(int nw);
    for (int b = 0; b < nw; b++) begin
      wbeat_t w;
      int nwords;
      w.d = '0;
      for (int i = 0; i < 16; i++) w.d[i*32 +: 32] = $urandom;
      w.l = (b == nw - 1);
      nwords = w.l ? 1 + int'($urandom % 16) : 16;
      w.k = 16'((32'h1 << nwords) - 1);
      in_q.push_back(w);
      for (int p = 0; p < 4; p++) begin
        nbeat_t n;
        n.d = w.d[p*128 +: 128];
        n.k = w.k[p*4 +: 4];
        n.l = w.l && (p == (nwords - 1) / 4);
        if (n.k != 0) mid_exp.push_back(n);
      end
      begin
        wbeat_t o;
        o = w;
        out_exp.push_back(o);
      end
    end
  endtask

  initial begin
    s_valid = 0; s_data = '0; s_keep = '0; s_last = 0; m_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 20; p++) add_packet(1 + int'($urandom % 5));
    while (out_exp.size() != 0) @(posedge clk);
    checks++;
    if (mid_exp.size() != 0) begin failures++; $display("narrow beats missing"); end
    // rate: 8 full wide beats -> 32 narrow beats in about 32 cycles
    stall = 0;
    @(posedge clk);
    begin
      int c0, c1;
      c0 = n_cnt;
      add_packet(8);
      repeat (36) @(posedge clk);
      c1 = n_cnt;
      checks++;
      if (c1 - c0 < 31) begin failures++; $display("rate: %0d narrow beats in 36 cycles", c1 - c0); end
    end
    repeat (10) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
