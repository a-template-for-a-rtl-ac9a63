// tb_prim_and: random beats on both inputs with random stalls on every side;
// each output beat is checked against the reference (bitwise AND of two mask streams), plus
// keep/last, beat count, and one beat per cycle when nothing stalls.
module tb_prim_and;
  import overlay_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s0_valid, s0_ready, s1_valid, s1_ready, m_valid, m_ready;
  beat_t s0_data, s1_data, m_data;

  tb_src #(.STALL(2)) u_s0 (.clk, .valid(s0_valid), .ready(s0_ready), .data(s0_data));
  tb_src #(.STALL(3)) u_s1 (.clk, .valid(s1_valid), .ready(s1_ready), .data(s1_data));
  tb_snk #(.STALL(2)) u_snk (.clk, .rst_n, .valid(m_valid), .ready(m_ready), .data(m_data));
  prim_and dut (.*);

  beat_t e0[$], e1[$];

  task automatic gen(int n);
    for (int b = 0; b < n; b++) begin
      beat_t x0, x1;
      x0.data = {$urandom, $urandom, $urandom, $urandom};
      x1.data = {$urandom, $urandom, $urandom, $urandom};
      x0.keep = (b == n - 1) ? 4'b0011 : 4'b1111;
      x1.keep = (b == n - 1) ? 4'b0111 : 4'b1111;
      x0.last = (b == n - 1); x1.last = x0.last;
      u_s0.q.push_back(x0); u_s1.q.push_back(x1);
      e0.push_back(x0); e1.push_back(x1);
    end
  endtask

  task automatic check_all();
    checks++;
    if (u_snk.q.size() != e0.size()) begin
      failures++; $display("beats %0d exp %0d", u_snk.q.size(), e0.size());
    end else foreach (e0[b]) begin
      beat_t x0, x1, g;
      x0 = e0[b]; x1 = e1[b]; g = u_snk.q[b];
      for (int l = 0; l < 4; l++) begin
        logic [31:0] a, bb, ex;
        a = x0.data[l*32 +: 32]; bb = x1.data[l*32 +: 32];
        begin logic [31:0] b; b = bb; ex = 32'(a & b); end
        checks++;
        if (g.data[l*32 +: 32] !== ex) begin failures++; $display("beat %0d lane %0d", b, l); end
      end
      checks++;
      if (g.keep !== (x0.keep) || g.last !== x0.last) begin failures++; $display("keep/last beat %0d", b); end
    end
    e0.delete(); e1.delete(); u_snk.q.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    gen(200);
    while (u_snk.q.size() < 200) @(posedge clk);
    check_all();
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
