// tb_overlay_ipr: the memory-subsystem test case of the prototype,
// "independent parallel reduce": every one of the 11 DMA engines streams its
// own column into the tile next to it, which runs reduce add; all eleven
// sums come back as RESULT packets and are checked against sums computed
// here. The memory models answer without stalls (the ideal case), and the
// test checks that each stream then moves one 128-bit beat per clock cycle
// from its first beat to its last (at least 95% of the cycles).
// Full-size overlay, default parameters.
module tb_overlay_ipr;
  import overlay_pkg::*;
  localparam int N_DMA = 11, MEM_W = 512, WORDS = 1024;
  localparam int BEATS = 2048;                  // per stream: 8192 values
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  host_dn_valid = 0, host_dn_ready, host_up_valid, host_up_ready;
  flit_t host_dn = '0, host_up;
  logic [N_DMA-1:0]              ar_valid, ar_ready, r_valid, r_ready, r_last;
  logic [N_DMA-1:0][31:0]        ar_addr, aw_addr;
  logic [N_DMA-1:0][7:0]         ar_len, aw_len;
  logic [N_DMA-1:0][MEM_W-1:0]   r_data, w_data;
  logic [N_DMA-1:0]              aw_valid, aw_ready, w_valid, w_ready, w_last;
  logic [N_DMA-1:0][MEM_W/8-1:0] w_strb;
  logic [N_DMA-1:0]              b_valid, b_ready;

  overlay_top dut (.*);

  function automatic logic [31:0] val(int k, int i);
    return 32'((i * 7 + k * 1000 + (i >> 3)) % 5003) - 32'd2000;
  endfunction

  for (genvar k = 0; k < N_DMA; k++) begin : g_mem
    tb_mem_model #(.MEM_W(MEM_W), .WORDS(WORDS), .STALL(0)) m (
      .clk,
      .ar_valid(ar_valid[k]), .ar_ready(ar_ready[k]), .ar_addr(ar_addr[k]), .ar_len(ar_len[k]),
      .r_valid(r_valid[k]), .r_ready(r_ready[k]), .r_data(r_data[k]), .r_last(r_last[k]),
      .aw_valid(aw_valid[k]), .aw_ready(aw_ready[k]), .aw_addr(aw_addr[k]), .aw_len(aw_len[k]),
      .w_valid(w_valid[k]), .w_ready(w_ready[k]), .w_data(w_data[k]), .w_strb(w_strb[k]),
      .w_last(w_last[k]), .b_valid(b_valid[k]), .b_ready(b_ready[k]));
    initial
      for (int w = 0; w < WORDS; w++)
        for (int j = 0; j < MEM_W / 32; j++) m.mem[w][j*32 +: 32] = val(k, w * 16 + j);

    // first and last beat handshake and beat count of this DMA's stream
    int first = -1, last_c = 0, n = 0;
    int cyc = 0;
    always_ff @(posedge clk) begin
      cyc <= cyc + 1;
      if (rst_n && dut.dm_valid[k] && dut.dm_ready[k]) begin
        if (first < 0) first <= cyc;
        last_c <= cyc;
        n <= n + 1;
      end
    end
  end

  typedef logic [31:0] words_t[$];
  words_t pkts[$];
  logic [31:0] cur[$];
  always_ff @(posedge clk) begin
    if (rst_n && host_up_valid && host_up_ready) begin
      cur.push_back(host_up.data);
      if (host_up.last) begin pkts.push_back(cur); cur.delete(); end
    end
    host_up_ready <= 1'b1;
  end

  task automatic send(node_addr_t dst, cmd_e c, logic [7:0] r, logic [31:0] w);
    noc_hdr_t h;
    h.dst = dst; h.src = host_addr(); h.cmd = c; h.regn = r;
    @(negedge clk);
    host_dn_valid = 1; host_dn.data = 32'(h); host_dn.last = 0;
    @(posedge clk); while (!host_dn_ready) @(posedge clk);
    @(negedge clk);
    host_dn.data = w; host_dn.last = 1;
    @(posedge clk); while (!host_dn_ready) @(posedge clk);
    @(negedge clk);
    host_dn_valid = 0;
  endtask

  // tile next to DMA k and the direction it sits in from that tile
  function automatic void place(int k, output int r, output int c, output int d);
    if (k < 4)      begin r = k;     c = 0;     d = DIR_W; end
    else if (k < 8) begin r = k - 4; c = 10;    d = DIR_E; end
    else            begin r = 0;     c = k - 7; d = DIR_S; end
  endfunction

  initial begin
    int r, c, d, t;
    longint exp_sum[N_DMA];
    logic got_it[N_DMA];
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int k = 0; k < N_DMA; k++) begin
      place(k, r, c, d);
      send(tile_addr(r, c), CMD_WRITE, REG_KERNEL, 32'(KRN_ADD_RED));
      send(tile_addr(r, c), CMD_WRITE, REG_INSEL + 0, 32'(d));
      send(tile_addr(r, c), CMD_RESET, 8'h00, 32'd0);
      exp_sum[k] = 0;
      got_it[k] = 0;
      for (int i = 0; i < BEATS * LANES; i++) exp_sum[k] += longint'($signed(val(k, i)));
    end
    for (int k = 0; k < N_DMA; k++) begin
      send(dma_addr(k), CMD_WRITE, DREG_RADDR, 32'd0);
      send(dma_addr(k), CMD_WRITE, DREG_RLEN, 32'(BEATS));
    end
    for (int k = 0; k < N_DMA; k++) send(dma_addr(k), CMD_WRITE, DREG_CTRL, 32'h1);

    // 11 results and 11 read completions
    t = 0;
    while (pkts.size() < 2 * N_DMA && t < 50000) begin @(posedge clk); t++; end
    foreach (pkts[i]) begin
      noc_hdr_t h;
      h = noc_hdr_t'(pkts[i][0]);
      if (h.cmd == CMD_RESULT) begin
        for (int k = 0; k < N_DMA; k++) begin
          place(k, r, c, d);
          if (h.src == tile_addr(r, c)) begin
            checks++;
            got_it[k] = 1;
            if ({pkts[i][2], pkts[i][1]} != 64'(exp_sum[k])) begin
              failures++;
              $display("DMA %0d sum %0d, want %0d", k, $signed({pkts[i][2], pkts[i][1]}), exp_sum[k]);
            end
          end
        end
      end
    end
    for (int k = 0; k < N_DMA; k++) begin
      checks++;
      if (!got_it[k]) begin failures++; $display("no result for DMA %0d", k); end
    end
    checks++;
    if (pkts.size() != 2 * N_DMA) begin failures++; $display("%0d packets", pkts.size()); end
    for (int k = 0; k < N_DMA; k++) begin
      int first, last_c, n;
      case (k)
        0: begin first = g_mem[0].first; last_c = g_mem[0].last_c; n = g_mem[0].n; end
        1: begin first = g_mem[1].first; last_c = g_mem[1].last_c; n = g_mem[1].n; end
        2: begin first = g_mem[2].first; last_c = g_mem[2].last_c; n = g_mem[2].n; end
        3: begin first = g_mem[3].first; last_c = g_mem[3].last_c; n = g_mem[3].n; end
        4: begin first = g_mem[4].first; last_c = g_mem[4].last_c; n = g_mem[4].n; end
        5: begin first = g_mem[5].first; last_c = g_mem[5].last_c; n = g_mem[5].n; end
        6: begin first = g_mem[6].first; last_c = g_mem[6].last_c; n = g_mem[6].n; end
        7: begin first = g_mem[7].first; last_c = g_mem[7].last_c; n = g_mem[7].n; end
        8: begin first = g_mem[8].first; last_c = g_mem[8].last_c; n = g_mem[8].n; end
        9: begin first = g_mem[9].first; last_c = g_mem[9].last_c; n = g_mem[9].n; end
        default: begin first = g_mem[10].first; last_c = g_mem[10].last_c; n = g_mem[10].n; end
      endcase
      checks++;
      $display("DMA %0d: %0d beats in %0d cycles", k, n, last_c - first + 1);
      if (n != BEATS || (last_c - first + 1) * 95 > n * 100) begin
        failures++; $display("DMA %0d stream below one beat per cycle", k);
      end
    end
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
