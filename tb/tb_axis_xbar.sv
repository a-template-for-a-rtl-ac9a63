// tb_axis_xbar: random selects and handshakes, outputs and readies compared
// with a reference model written from the crossbar's rules (lowest-numbered
// output wins when several select the same input, out-of-range = idle).
module tb_axis_xbar;
  localparam int N_IN = 4, N_OUT = 4, W = 8, SEL_W = 3;
  int checks = 0, failures = 0;

  logic [N_OUT-1:0][SEL_W-1:0] sel;
  logic [N_IN-1:0] s_valid, s_ready;
  logic [N_IN-1:0][W-1:0] s_data;
  logic [N_OUT-1:0] m_valid, m_ready;
  logic [N_OUT-1:0][W-1:0] m_data;

  axis_xbar #(.N_IN(N_IN), .N_OUT(N_OUT), .W(W), .SEL_W(SEL_W)) dut (.*);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [N_IN-1:0] exp_ready;
      bit taken [N_IN];
      for (int d = 0; d < N_OUT; d++) sel[d] = SEL_W'($urandom % 6);
      s_valid = N_IN'($urandom);
      m_ready = N_OUT'($urandom);
      for (int i = 0; i < N_IN; i++) s_data[i] = W'($urandom);
      #1;
      exp_ready = '0;
      for (int i = 0; i < N_IN; i++) taken[i] = 0;
      for (int d = 0; d < N_OUT; d++) begin
        bit ev; logic [W-1:0] ed;
        ev = 0; ed = '0;
        if (sel[d] < N_IN && !taken[sel[d]]) begin
          taken[sel[d]] = 1;
          ev = s_valid[sel[d]];
          ed = s_data[sel[d]];
          exp_ready[sel[d]] = m_ready[d];
        end
        checks++;
        if (m_valid[d] !== ev || (ev && m_data[d] !== ed)) begin
          failures++; $display("out %0d mismatch", d);
        end
      end
      checks++;
      if (s_ready !== exp_ready) begin failures++; $display("ready mismatch"); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
