// tb_tile_ctrl: register writes over the network must reach the crossbar
// selects, the kernel and the CU configuration words; reads are answered with
// CMD_STATUS to the sender; an unknown register, an unknown command and a
// write without payload are answered with the matching CMD_ERROR code;
// CMD_RESET gives one rst_req pulse; a CU result leaves as a CMD_RESULT
// packet to the host with the low word first.
module tb_tile_ctrl;
  import overlay_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rx_valid, rx_ready, tx_valid, tx_ready;
  flit_t rx, tx;
  logic [N_CU_IN-1:0][2:0] insel;
  logic [N_DIR-1:0][1:0] outsel;
  kernel_e kernel;
  logic [N_CFG-1:0][31:0] cfg;
  logic rst_req, res_valid, res_ready;
  logic [63:0] res_data;
  int rst_pulses = 0;

  tile_ctrl #(.ROW(2), .COL(3)) dut (.*);

  flit_t got[$];
  always_ff @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) got.push_back(tx);
    if (rst_n && rst_req) rst_pulses++;
    tx_ready <= $urandom % 2 == 0;
  end

  task automatic send(cmd_e c, logic [7:0] r, int nw, logic [31:0] w);
    noc_hdr_t h;
    h.dst = tile_addr(2, 3); h.src = host_addr(); h.cmd = c; h.regn = r;
    @(negedge clk);
    rx_valid = 1; rx.data = 32'(h); rx.last = (nw == 0);
    @(posedge clk); while (!rx_ready) @(posedge clk);
    for (int i = 0; i < nw; i++) begin
      @(negedge clk);
      rx.data = w + 32'(i); rx.last = (i == nw - 1);
      @(posedge clk); while (!rx_ready) @(posedge clk);
    end
    @(negedge clk);
    rx_valid = 0;
  endtask

  task automatic expect_pkt(cmd_e c, node_addr_t dst, logic [7:0] r, logic [31:0] w0);
    int t;
    t = 0;
    while (got.size() < 2 && t < 200) begin @(posedge clk); t++; end
    checks++;
    if (got.size() < 2) begin failures++; $display("no answer"); return; end
    begin
      noc_hdr_t h;
      h = noc_hdr_t'(got[0].data);
      if (h.cmd != c || h.dst != dst || h.src != tile_addr(2, 3) || h.regn != r ||
          got[1].data != w0 || got[0].last) begin
        failures++; $display("answer wrong: cmd %0d data %h", h.cmd, got[1].data);
      end
    end
    void'(got.pop_front()); void'(got.pop_front());
  endtask

  initial begin
    rx_valid = 0; rx = '0; res_valid = 0; res_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // defaults after reset
    checks++;
    if (kernel != KRN_FIFO || insel[0] != 3'd4 || outsel[3] != 2'd2) begin failures++; $display("reset values"); end
    // writes
    send(CMD_WRITE, 8'h00, 1, 32'd3);
    send(CMD_WRITE, 8'h03, 1, 32'd1);
    send(CMD_WRITE, 8'h05, 1, 32'd1);
    send(CMD_WRITE, 8'h08, 1, 32'(KRN_COUNT));
    send(CMD_WRITE, 8'h11, 2, 32'hdead0000);   // second word ignored
    repeat (2) @(negedge clk);
    checks++;
    if (insel[0] != 3'd3 || insel[3] != 3'd1 || outsel[1] != 2'd1 || kernel != KRN_COUNT ||
        cfg[1] != 32'hdead0000) begin failures++; $display("write failed"); end
    checks++;
    if (got.size() != 0) begin failures++; $display("unexpected answer to write"); end
    // read
    send(CMD_READ, 8'h11, 1, 32'd0);
    expect_pkt(CMD_STATUS, host_addr(), 8'h11, 32'hdead0000);
    send(CMD_READ, 8'h08, 1, 32'd0);
    expect_pkt(CMD_STATUS, host_addr(), 8'h08, 32'(KRN_COUNT));
    // errors
    send(CMD_WRITE, 8'h20, 1, 32'd0);
    expect_pkt(CMD_ERROR, host_addr(), 8'h20, ERR_BAD_REG);
    send(cmd_e'(4'd9), 8'h00, 1, 32'd0);
    expect_pkt(CMD_ERROR, host_addr(), 8'h00, ERR_BAD_CMD);
    send(CMD_WRITE, 8'h01, 0, 32'd0);
    expect_pkt(CMD_ERROR, host_addr(), 8'h01, ERR_SHORT);
    // reset
    send(CMD_RESET, 8'h00, 1, 32'd0);
    repeat (3) @(negedge clk);
    checks++;
    if (rst_pulses != 1) begin failures++; $display("reset pulses %0d", rst_pulses); end
    // result
    @(negedge clk);
    res_valid = 1; res_data = 64'h0123_4567_89ab_cdef;
    @(posedge clk); while (!res_ready) @(posedge clk);
    @(negedge clk); res_valid = 0;
    begin
      int t;
      noc_hdr_t h;
      t = 0;
      while (got.size() < 3 && t < 100) begin @(posedge clk); t++; end
      h = noc_hdr_t'(got[0].data);
      checks++;
      if (got.size() != 3 || h.cmd != CMD_RESULT || h.dst != host_addr() || got[1].data != 32'h89abcdef ||
          got[2].data != 32'h01234567 || !got[2].last || got[1].last) begin
        failures++; $display("result packet wrong");
      end
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
