// tb_prim_filter: random data streams of several lengths (one value, exactly
// 128, 300 values) with random masks at several densities; the output must
// be the selected values in order, packed four per beat, with the remainder
// and last in the final beat. Random stalls on all three sides.
module tb_prim_filter;
  import overlay_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s0_valid, s0_ready, s1_valid, s1_ready, m_valid, m_ready;
  beat_t s0_data, s1_data, m_data;

  tb_src #(.STALL(2)) u_d (.clk, .valid(s0_valid), .ready(s0_ready), .data(s0_data));
  tb_src #(.STALL(3)) u_m (.clk, .valid(s1_valid), .ready(s1_ready), .data(s1_data));
  tb_snk #(.STALL(2)) u_k (.clk, .rst_n, .valid(m_valid), .ready(m_ready), .data(m_data));
  prim_filter dut (.*);

  task automatic run(int n, int dens);
    logic [31:0] vals[$], sel[$];
    logic [127:0] mk;
    int nbeats, got;
    mk = '0;
    for (int i = 0; i < n; i++) begin
      bit b;
      vals.push_back($urandom);
      b = ($urandom % 100) < dens;
      mk[i % 128] = b;
      if (b) sel.push_back(vals[i]);
      if (i % 128 == 127 || i == n - 1) begin
        beat_t x;
        x.data = mk; x.keep = '1; x.last = (i == n - 1);
        u_m.q.push_back(x);
        mk = '0;
      end
    end
    nbeats = (n + 3) / 4;
    for (int b = 0; b < nbeats; b++) begin
      beat_t x;
      x = '0;
      for (int l = 0; l < 4; l++)
        if (b * 4 + l < n) begin x.data[l*32 +: 32] = vals[b*4+l]; x.keep[l] = 1; end
      x.last = (b == nbeats - 1);
      u_d.q.push_back(x);
    end
    // wait for the beat with last
    u_k.q.delete();
    while (u_k.q.size() == 0 || !u_k.q[u_k.q.size()-1].last) @(posedge clk);
    got = 0;
    foreach (u_k.q[b]) begin
      checks++;
      if (b < u_k.q.size() - 1 && u_k.q[b].keep != 4'b1111) begin failures++; $display("partial beat inside stream"); end
      for (int l = 0; l < 4; l++) if (u_k.q[b].keep[l]) begin
        checks++;
        if (got >= sel.size() || u_k.q[b].data[l*32 +: 32] !== sel[got]) begin
          failures++; $display("n=%0d value %0d wrong", n, got);
        end
        got++;
      end
    end
    checks++;
    if (got != sel.size()) begin failures++; $display("n=%0d got %0d values exp %0d", n, got, sel.size()); end
    checks++;
    if (u_k.q.size() != (sel.size() + 4) / 4 && u_k.q.size() != (sel.size() + 3) / 4) begin
      failures++; $display("beats %0d for %0d values", u_k.q.size(), sel.size());
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(300, 50);
    run(128, 90);
    run(1, 100);
    run(1, 0);
    run(300, 10);
    run(257, 100);
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
