// tb_dma_engine: one DMA engine against the behavioural memory model with
// random stalls on the memory read channel, the overlay stream and the
// network. Checks: a read whose length is not a multiple of the memory width
// delivers exactly that many 128-bit beats in address order with last on the
// final one; a read longer than the receive FIFO (several bursts under a
// stalling consumer) arrives intact; a written stream with a partial last
// beat lands in memory with untouched bytes outside keep; every transfer ends
// with a STATUS packet carrying the beat count; an unknown command and an
// unknown register are answered with ERROR packets.
module tb_dma_engine;
  import overlay_pkg::*;
  localparam int MEM_W = 512;
  localparam int WORDS = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rx_valid = 0, rx_ready, tx_valid, tx_ready;
  flit_t rx = '0, tx;
  logic ar_valid, ar_ready, r_valid, r_ready, r_last;
  logic [31:0] ar_addr, aw_addr;
  logic [7:0] ar_len, aw_len;
  logic [MEM_W-1:0] r_data, w_data;
  logic aw_valid, aw_ready, w_valid, w_ready, w_last, b_valid, b_ready;
  logic [MEM_W/8-1:0] w_strb;
  logic m_valid, m_ready, s_valid = 0, s_ready;
  beat_t m_data, s_data = '0;

  dma_engine #(.IDX(5)) dut (.*);
  tb_mem_model #(.MEM_W(MEM_W), .WORDS(WORDS), .STALL(2)) mem (.*);

  // pattern: lane k of memory word i holds i*16+k
  function automatic logic [31:0] pat(int i, int k);
    return 32'(i * 16 + k);
  endfunction

  flit_t got[$];
  beat_t beats[$];
  always_ff @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) got.push_back(tx);
    if (rst_n && m_valid && m_ready) beats.push_back(m_data);
    tx_ready <= $urandom % 3 != 0;
    m_ready  <= $urandom % 3 != 0;
  end

  task automatic send(cmd_e c, logic [7:0] r, int nw, logic [31:0] w);
    noc_hdr_t h;
    h.dst = dma_addr(5); h.src = host_addr(); h.cmd = c; h.regn = r;
    @(negedge clk);
    rx_valid = 1; rx.data = 32'(h); rx.last = (nw == 0);
    @(posedge clk); while (!rx_ready) @(posedge clk);
    for (int i = 0; i < nw; i++) begin
      @(negedge clk);
      rx.data = w; rx.last = (i == nw - 1);
      @(posedge clk); while (!rx_ready) @(posedge clk);
    end
    @(negedge clk);
    rx_valid = 0;
  endtask

  task automatic expect_pkt(cmd_e c, logic [7:0] r, logic [31:0] w0);
    int t;
    noc_hdr_t h;
    t = 0;
    while (got.size() < 2 && t < 5000) begin @(posedge clk); t++; end
    checks++;
    if (got.size() < 2) begin failures++; $display("no packet (cmd %0d)", c); return; end
    h = noc_hdr_t'(got[0].data);
    if (h.cmd != c || h.dst != host_addr() || h.src != dma_addr(5) || h.regn != r ||
        got[1].data != w0 || got[0].last || !got[1].last) begin
      failures++;
      $display("packet wrong: cmd %0d regn %0d data %0d (want %0d %0d %0d)",
               h.cmd, h.regn, got[1].data, c, r, w0);
    end
    void'(got.pop_front()); void'(got.pop_front());
  endtask

  task automatic run_read(int word, int n);
    int t;
    send(CMD_WRITE, DREG_RADDR, 1, 32'(word * (MEM_W / 8)));
    send(CMD_WRITE, DREG_RLEN, 1, 32'(n));
    send(CMD_WRITE, DREG_CTRL, 1, 32'h1);
    expect_pkt(CMD_STATUS, 8'd0, 32'(n));
    t = 0;
    while (beats.size() < n && t < 1000) begin @(posedge clk); t++; end
    repeat (20) @(posedge clk);
    checks++;
    if (beats.size() != n) begin
      failures++; $display("read %0d beats, want %0d", beats.size(), n);
    end
    for (int j = 0; j < beats.size() && j < n; j++) begin
      logic [DATA_W-1:0] e;
      for (int l = 0; l < LANES; l++)
        e[l*32 +: 32] = pat(word + j / 4, (j % 4) * 4 + l);
      checks++;
      if (beats[j].data != e || beats[j].keep != '1 || beats[j].last != (j == n - 1)) begin
        failures++;
        $display("read beat %0d: %h last %0d, want %h", j, beats[j].data, beats[j].last, e);
      end
    end
    beats.delete();
  endtask

  initial begin
    logic [DATA_W-1:0] wd[$];
    logic [LANES-1:0] wk[$];
    int nw;
    for (int i = 0; i < WORDS; i++)
      for (int k = 0; k < MEM_W / 32; k++) mem.mem[i][k*32 +: 32] = pat(i, k);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    run_read(3, 10);
    run_read(40, 400);   // 100 memory words: more than the receive FIFO holds

    // write: 6 beats, the last with only lanes 0 and 1 valid
    nw = 6;
    send(CMD_WRITE, DREG_WADDR, 1, 32'(600 * (MEM_W / 8)));
    send(CMD_WRITE, DREG_CTRL, 1, 32'h2);
    for (int j = 0; j < nw; j++) begin
      wd.push_back({$urandom, $urandom, $urandom, $urandom});
      wk.push_back(j == nw - 1 ? 4'b0011 : 4'b1111);
    end
    for (int j = 0; j < nw; j++) begin
      @(negedge clk);
      s_valid = 1; s_data.data = wd[j]; s_data.keep = wk[j]; s_data.last = (j == nw - 1);
      @(posedge clk); while (!s_ready) @(posedge clk);
      if ($urandom % 2 == 0) begin @(negedge clk); s_valid = 0; @(posedge clk); end
    end
    @(negedge clk); s_valid = 0;
    expect_pkt(CMD_STATUS, 8'd1, 32'(nw));
    for (int j = 0; j < 8; j++)
      for (int l = 0; l < LANES; l++) begin
        logic [31:0] g, e;
        g = mem.mem[600 + j / 4][((j % 4) * 4 + l) * 32 +: 32];
        e = (j < nw && wk[j][l]) ? wd[j][l*32 +: 32] : pat(600 + j / 4, (j % 4) * 4 + l);
        checks++;
        if (g != e) begin
          failures++; $display("write beat %0d lane %0d: %h want %h", j, l, g, e);
        end
      end

    // errors
    send(CMD_READ, DREG_RLEN, 0, 0);
    expect_pkt(CMD_ERROR, DREG_RLEN, ERR_BAD_CMD);
    send(CMD_WRITE, 8'h07, 1, 32'h5);
    expect_pkt(CMD_ERROR, 8'h07, ERR_BAD_REG);
    send(CMD_WRITE, DREG_RLEN, 0, 0);
    expect_pkt(CMD_ERROR, DREG_RLEN, ERR_SHORT);

    checks++;
    if (mem.r_stalls == 0) begin failures++; $display("memory never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
