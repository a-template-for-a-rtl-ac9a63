// tb_tile_rst_ctrl: reset after power-up, then a request; the CU reset must be
// low for exactly RST_CYCLES cycles after each request, busy must follow it.
module tb_tile_rst_ctrl;
  localparam int RST_CYCLES = 5;
  logic clk = 0, rst_n = 0, req = 0, cu_rst_n, busy;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  tile_rst_ctrl #(.RST_CYCLES(RST_CYCLES)) dut (.*);

  task automatic measure(output int low);
    low = 0;
    while (!cu_rst_n) begin
      if (!busy) begin checks++; failures++; $display("busy low during reset"); end
      low++; @(negedge clk);
    end
  endtask

  initial begin
    int low;
    repeat (2) @(negedge clk);
    rst_n = 1;
    measure(low);
    checks++; if (low != RST_CYCLES) begin failures++; $display("power-up low %0d", low); end
    repeat (5) @(negedge clk);
    checks++; if (!cu_rst_n || busy) begin failures++; $display("not released"); end
    for (int n = 0; n < 3; n++) begin
      req = 1; @(negedge clk); req = 0;
      measure(low);
      checks++;
      if (low != RST_CYCLES) begin failures++; $display("request low %0d", low); end
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
