// tb_prim_dual_fifo: two independent channels with different stall patterns;
// each output must carry its own input sequence. A stalled channel 1 must not
// block channel 0, and the FIFO must take DEPTH beats before pushing back.
module tb_prim_dual_fifo;
  import overlay_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s0_valid, s0_ready, s1_valid, s1_ready, m0_valid, m0_ready, m1_valid, m1_ready;
  beat_t s0_data, s1_data, m0_data, m1_data;
  beat_t e0[$], e1[$];
  logic m1_hold = 0;
  logic m1_ready_snk;

  tb_src #(.STALL(1)) u_s0 (.clk, .valid(s0_valid), .ready(s0_ready), .data(s0_data));
  tb_src #(.STALL(0)) u_s1 (.clk, .valid(s1_valid), .ready(s1_ready), .data(s1_data));
  tb_snk #(.STALL(2)) u_k0 (.clk, .rst_n, .valid(m0_valid), .ready(m0_ready), .data(m0_data));
  tb_snk #(.STALL(1)) u_k1 (.clk, .rst_n, .valid(m1_valid && !m1_hold), .ready(m1_ready_snk), .data(m1_data));
  assign m1_ready = m1_ready_snk && !m1_hold;
  prim_dual_fifo #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // channel 1 blocked at its output: it must fill to DEPTH and stop,
    // while channel 0 keeps flowing
    m1_hold = 1;
    for (int b = 0; b < 40; b++) begin
      beat_t x;
      x.data = {$urandom, $urandom, $urandom, $urandom}; x.keep = '1; x.last = (b == 39);
      u_s0.q.push_back(x); e0.push_back(x);
      x.data = {$urandom, $urandom, $urandom, $urandom};
      u_s1.q.push_back(x); e1.push_back(x);
    end
    while (u_k0.q.size() < 40) @(posedge clk);
    checks++;
    if (u_s1.sent != DEPTH) begin failures++; $display("channel 1 took %0d", u_s1.sent); end
    m1_hold = 0;
    while (u_k1.q.size() < 40) @(posedge clk);
    repeat (3) @(posedge clk);
    foreach (e0[i]) begin
      checks += 2;
      if (u_k0.q[i] !== e0[i]) begin failures++; $display("ch0 beat %0d", i); end
      if (u_k1.q[i] !== e1[i]) begin failures++; $display("ch1 beat %0d", i); end
    end
    checks++;
    if (u_k0.q.size() != 40 || u_k1.q.size() != 40) begin failures++; $display("counts"); end
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
