// tb_axis_fifo: checks order, no loss/duplication under random valid/ready,
// the full and empty flags, and one word per cycle with an always-ready sink.
module tb_axis_fifo;
  localparam int W = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s_valid, s_ready, m_valid, m_ready;
  logic [W-1:0] s_data, m_data;
  logic [$clog2(DEPTH+1)-1:0] level;

  axis_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  logic [W-1:0] q[$];
  int sent = 0, rcvd = 0;
  logic acc_q = 0;
  always @(posedge clk) acc_q <= s_valid && s_ready;

  always_ff @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) q.push_back(s_data);
    if (m_valid && m_ready) begin
      checks++;
      if (q.size() == 0 || q[0] != m_data) begin
        failures++; $display("mismatch got %h", m_data);
      end
      if (q.size() != 0) void'(q.pop_front());
      rcvd++;
    end
    if (level > DEPTH) begin failures++; $display("level overflow"); end
  end

  initial begin
    s_valid = 0; s_data = 0; m_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill until full
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      s_valid = 1; s_data = W'(i + 100); @(negedge clk);
    end
    s_valid = 0;
    checks++; if (s_ready !== 1'b0 || level != DEPTH) begin failures++; $display("not full"); end
    s_valid = 0;
    m_ready = 1;
    repeat (DEPTH) @(negedge clk);
    checks++; if (m_valid !== 1'b0) begin failures++; $display("not empty"); end
    // throughput: 50 words with sink always ready
    begin
      int t0, t1, n0;
      n0 = rcvd;
      t0 = $time;
      for (int i = 0; i < 50; i++) begin
        s_valid = 1; s_data = W'(i); @(negedge clk);
        while (!s_ready) @(negedge clk);
      end
      s_valid = 0;
      @(negedge clk);
      t1 = $time;
      checks++;
      if (rcvd - n0 != 50 || (t1 - t0) / 10 > 52) begin
        failures++; $display("throughput: %0d words in %0d cycles", rcvd - n0, (t1 - t0) / 10);
      end
    end
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      if (!s_valid || acc_q) begin
        s_valid = ($urandom % 3) != 0;
        s_data  = W'($urandom);
      end
      m_ready = ($urandom % 3) != 0;
      @(negedge clk);
    end
    s_valid = 0; m_ready = 1;
    repeat (10) @(negedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("words left: %0d", q.size()); end
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
