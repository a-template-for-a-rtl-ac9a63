// tb_prim_copy: random beats with stalls on the input and on both outputs
// (independently); both outputs must carry the input sequence unchanged.
// Without stalls, one beat per cycle.
module tb_prim_copy;
  import overlay_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s_valid, s_ready, m0_valid, m0_ready, m1_valid, m1_ready;
  beat_t s_data, m0_data, m1_data;
  beat_t exp_q[$];

  tb_src #(.STALL(2)) u_src (.clk, .valid(s_valid), .ready(s_ready), .data(s_data));
  tb_snk #(.STALL(3)) u_k0 (.clk, .rst_n, .valid(m0_valid), .ready(m0_ready), .data(m0_data));
  tb_snk #(.STALL(1)) u_k1 (.clk, .rst_n, .valid(m1_valid), .ready(m1_ready), .data(m1_data));
  prim_copy dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 300; b++) begin
      beat_t x;
      x.data = {$urandom, $urandom, $urandom, $urandom};
      x.keep = 4'($urandom); x.last = ($urandom % 7 == 0);
      u_src.q.push_back(x); exp_q.push_back(x);
    end
    while (u_k0.q.size() < 300 || u_k1.q.size() < 300) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (u_k0.q.size() != 300 || u_k1.q.size() != 300) begin failures++; $display("counts"); end
    foreach (exp_q[i]) begin
      checks += 2;
      if (u_k0.q[i] !== exp_q[i]) begin failures++; $display("out0 beat %0d", i); end
      if (u_k1.q[i] !== exp_q[i]) begin failures++; $display("out1 beat %0d", i); end
    end
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
