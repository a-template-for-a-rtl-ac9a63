// tb_prim_cmp_range: random values through the compare, mask bits checked
// against a reference compare (both bound modes), mask beat count n/128,
// last flag, and one input beat per cycle with an always-ready sink.
module tb_prim_cmp_range;
  import overlay_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] lo, hi;
  logic hi_incl;
  logic s_valid, s_ready, m_valid, m_ready;
  beat_t s_data, m_data;

  tb_src #(.STALL(0)) u_src (.clk, .valid(s_valid), .ready(s_ready), .data(s_data));
  tb_snk #(.STALL(0)) u_snk (.clk, .rst_n, .valid(m_valid), .ready(m_ready), .data(m_data));
  prim_cmp_range dut (.*);

  task automatic run(int n, bit incl, int rng);
    logic [31:0] vals[$];
    int cyc;
    lo = 32'(-10); hi = 32'(rng / 2); hi_incl = incl;
    for (int i = 0; i < n; i++) vals.push_back(32'(int'($urandom % rng) - rng / 4));
    for (int b = 0; b < (n + 3) / 4; b++) begin
      beat_t x;
      x = '0;
      for (int l = 0; l < 4; l++)
        if (b * 4 + l < n) begin x.data[l*32 +: 32] = vals[b*4+l]; x.keep[l] = 1; end
      x.last = (b == (n + 3) / 4 - 1);
      u_src.q.push_back(x);
    end
    u_snk.q.delete();
    cyc = 0;
    while (u_src.q.size() != 0) begin @(posedge clk); cyc++; end
    repeat (3) @(posedge clk);
    checks++;
    if (cyc > (n + 3) / 4 + 2) begin failures++; $display("rate: %0d beats in %0d cycles", (n+3)/4, cyc); end
    checks++;
    if (u_snk.q.size() != (n + 127) / 128) begin
      failures++; $display("mask beats %0d", u_snk.q.size()); foreach (u_snk.q[j]) $display("  %h k=%b l=%b", u_snk.q[j].data, u_snk.q[j].keep, u_snk.q[j].last);
    end else begin
      for (int i = 0; i < n; i++) begin
        logic e; logic signed [31:0] v;
        v = vals[i];
        e = (v >= $signed(lo)) && (incl ? v <= $signed(hi) : v < $signed(hi));
        checks++;
        if (u_snk.q[i / 128].data[i % 128] !== e) begin
          failures++; $display("bit %0d got %b exp %b (v=%0d)", i, u_snk.q[i/128].data[i%128], e, v);
        end
      end
      checks++;
      if (!u_snk.q[u_snk.q.size()-1].last) begin failures++; $display("no last"); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(300, 0, 100);
    run(256, 1, 40);
    run(5, 1, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
