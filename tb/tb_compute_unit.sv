// tb_compute_unit: loads each kernel in turn (kernel id, then a CU reset, as
// after an exchange) and runs a short stream through it: FIFO, dual FIFO,
// COPY, cmp range, and, filter, mul, add reduce, count. Outputs and results
// are compared with reference values computed here; unused outputs must stay
// silent.
module tb_compute_unit;
  import overlay_pkg::*;
  logic clk = 0, rst_n = 0, cu_rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  kernel_e kernel;
  logic [N_CFG-1:0][31:0] cfg;
  logic [N_CU_IN-1:0] s_valid, s_ready;
  beat_t [N_CU_IN-1:0] s_data;
  logic [N_CU_OUT-1:0] m_valid, m_ready;
  beat_t [N_CU_OUT-1:0] m_data;
  logic r_valid, r_ready;
  logic [63:0] r_data;
  logic [63:0] res_q[$];

  for (genvar k = 0; k < N_CU_IN; k++) begin : g_src
    tb_src #(.STALL(1)) u (.clk, .valid(s_valid[k]), .ready(s_ready[k]), .data(s_data[k]));
  end
  for (genvar k = 0; k < N_CU_OUT; k++) begin : g_snk
    tb_snk #(.STALL(1)) u (.clk, .rst_n(cu_rst_n), .valid(m_valid[k]), .ready(m_ready[k]), .data(m_data[k]));
  end
  assign r_ready = 1'b1;
  always_ff @(posedge clk) if (cu_rst_n && r_valid) res_q.push_back(r_data);

  compute_unit #(.FIFO_DEPTH(8)) dut (
    .clk, .rst_n(cu_rst_n), .kernel, .cfg, .s_valid, .s_ready, .s_data,
    .m_valid, .m_ready, .m_data, .r_valid, .r_ready, .r_data);

  function automatic beat_t mkbeat(logic [31:0] a, logic [31:0] b, logic [31:0] c,
                                   logic [31:0] d, logic [3:0] k, bit l);
    beat_t x;
    x.data = {d, c, b, a}; x.keep = k; x.last = l;
    return x;
  endfunction

  task automatic load(kernel_e k);
    @(negedge clk);
    kernel = k; cu_rst_n = 0;
    g_snk[0].u.q.delete(); g_snk[1].u.q.delete(); res_q.delete();
    repeat (2) @(negedge clk);
    cu_rst_n = 1;
  endtask

  task automatic wait_out(int n0, int n1, int nr);
    int t;
    t = 0;
    while ((g_snk[0].u.q.size() < n0 || g_snk[1].u.q.size() < n1 || res_q.size() < nr) && t < 500) begin
      @(posedge clk); t++;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (g_snk[0].u.q.size() != n0 || g_snk[1].u.q.size() != n1 || res_q.size() != nr) begin
      failures++;
      $display("kernel %s: outputs %0d/%0d results %0d, expected %0d/%0d/%0d", kernel.name(),
               g_snk[0].u.q.size(), g_snk[1].u.q.size(), res_q.size(), n0, n1, nr);
    end
  endtask

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("kernel %s: %s", kernel.name(), what); end
  endtask

  initial begin
    beat_t a, b, c;
    kernel = KRN_FIFO; cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    a = mkbeat(1, 2, 3, 4, 4'hf, 0); b = mkbeat(5, 6, 7, 8, 4'h3, 1);
    c = mkbeat(10, 20, 30, 40, 4'hf, 1);

    load(KRN_FIFO);
    g_src[0].u.q.push_back(a); g_src[0].u.q.push_back(b); g_src[1].u.q.push_back(c);
    wait_out(2, 0, 0);
    chk(g_snk[0].u.q.size() == 2 && g_snk[0].u.q[0] == a && g_snk[0].u.q[1] == b, "fifo data");
    chk(g_src[1].u.q.size() == 1, "input 1 must not be taken");
    g_src[1].u.q.delete();

    load(KRN_DUAL_FIFO);
    g_src[0].u.q.push_back(a); g_src[1].u.q.push_back(c);
    wait_out(1, 1, 0);
    chk(g_snk[0].u.q[0] == a && g_snk[1].u.q[0] == c, "dual fifo data");

    load(KRN_COPY);
    g_src[0].u.q.push_back(a); g_src[0].u.q.push_back(b);
    wait_out(2, 2, 0);
    chk(g_snk[0].u.q[1] == b && g_snk[1].u.q[0] == a && g_snk[1].u.q[1] == b, "copy data");

    load(KRN_CMP_RANGE);
    cfg[0] = 32'd2; cfg[1] = 32'd6; cfg[2] = 32'd0;       // 2 <= x < 6
    g_src[0].u.q.push_back(a); g_src[0].u.q.push_back(b);  // 1 2 3 4 5 6
    wait_out(1, 0, 0);
    chk(g_snk[0].u.q[0].data[5:0] == 6'b011110 && g_snk[0].u.q[0].last, "cmp mask");

    load(KRN_AND);
    g_src[0].u.q.push_back(mkbeat(32'hff00ff00, 0, 0, 0, 4'h1, 1));
    g_src[1].u.q.push_back(mkbeat(32'h0ff00ff0, 0, 0, 0, 4'h1, 1));
    wait_out(1, 0, 0);
    chk(g_snk[0].u.q[0].data[31:0] == 32'h0f000f00, "and result");

    load(KRN_FILTER);
    g_src[0].u.q.push_back(a); g_src[0].u.q.push_back(b);  // 1..6
    g_src[1].u.q.push_back(mkbeat(32'b101101, 0, 0, 0, 4'h1, 1));
    wait_out(1, 0, 0);
    chk(g_snk[0].u.q[0].data == {32'd6, 32'd4, 32'd3, 32'd1} && g_snk[0].u.q[0].keep == 4'hf
        && g_snk[0].u.q[0].last, "filter result");

    load(KRN_MUL);
    g_src[0].u.q.push_back(a); g_src[1].u.q.push_back(c);
    wait_out(1, 0, 0);
    chk(g_snk[0].u.q[0].data == {32'd160, 32'd90, 32'd40, 32'd10}, "mul result");

    load(KRN_ADD_RED);
    g_src[0].u.q.push_back(a); g_src[0].u.q.push_back(b);
    wait_out(0, 0, 1);
    chk(res_q[0] == 64'd21, "add reduce result");

    load(KRN_COUNT);
    g_src[0].u.q.push_back(a); g_src[0].u.q.push_back(b);
    wait_out(0, 0, 1);
    chk(res_q[0] == 64'd6, "count result");

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
