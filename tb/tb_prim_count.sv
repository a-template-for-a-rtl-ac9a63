// tb_prim_count: several streams of random length and keep patterns (including
// a stream of one empty beat); each result must equal the reference
// (counts of the valid lanes). Checks that a result appears one cycle after the last beat and
// that input waits while a result is pending.
module tb_prim_count;
  import overlay_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s_valid, s_ready, r_valid, r_ready;
  beat_t s_data;
  logic [63:0] r_data;
  logic [63:0] exp_q[$], got_q[$];
  int stall_seen = 0;

  tb_src #(.STALL(2)) u_src (.clk, .valid(s_valid), .ready(s_ready), .data(s_data));
  prim_count dut (.*);

  always_ff @(posedge clk) begin
    r_ready <= ($urandom % 4) == 0;
    if (rst_n && r_valid && r_ready) got_q.push_back(r_data);
    if (rst_n && r_valid && s_valid && !s_ready) stall_seen++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 12; s++) begin
      int n;
      logic [63:0] e;
      n = (s == 0) ? 1 : 1 + int'($urandom % 40);
      e = '0;
      for (int b = 0; b < n; b++) begin
        beat_t x;
        x.data = {$urandom, $urandom, $urandom, $urandom};
        x.keep = (s == 0) ? 4'b0000 : (b == n - 1) ? 4'($urandom) : 4'b1111;
        x.last = (b == n - 1);
        e = e + 64'($countones(x.keep));
        u_src.q.push_back(x);
      end
      exp_q.push_back(e);
    end
    while (got_q.size() < 12) @(posedge clk);
    foreach (exp_q[i]) begin
      checks++;
      if (got_q[i] !== exp_q[i]) begin failures++; $display("stream %0d got %h exp %h", i, got_q[i], exp_q[i]); end
    end
    checks++;
    if (stall_seen == 0) begin failures++; $display("pending result never held input"); end
    // latency: result valid the cycle after the last beat is taken
    begin
      beat_t x;
      x = '0; x.keep = 4'b0001; x.data[31:0] = 32'd5; x.last = 1;
      @(negedge clk);
      u_src.q.push_back(x);
      while (!(s_valid && s_ready)) @(negedge clk);
      @(negedge clk);
      checks++;
      if (!r_valid) begin failures++; $display("result latency"); end
    end
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
