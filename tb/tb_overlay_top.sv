// tb_overlay_top: end-to-end test of the full-size overlay (11 x 4 tiles,
// 11 DMA engines, default parameters) running TPC-H query 6 on generated
// columns, placed on the grid as in the prototype's Q6 floorplan:
//   (0,0) cmp quantity < 24        <- DMA 0      (1,0) cmp shipdate in year <- DMA 1
//   (2,0) copy discount            <- DMA 2      (2,1) cmp 5 <= discount <= 7
//   (1,1) and, (0,1) and           -> (0,2) copy of the final mask
//   (3,0) (3,1) (3,2) (2,2) FIFOs carry discount to the filter at (1,2)
//   (0,3) filter extendedprice     <- DMA 10     (1,3) mul  ->  (2,3) reduce add
// Everything is configured through packets from the host port. Phases:
//   1. Q6: the RESULT packet must equal sum(price * discount) over the
//      selected rows, computed here; four DMA read STATUS packets arrive.
//   2. Mode switch: the sink at (2,3) becomes COUNT and the quantity bound
//      changes, followed by a CU reset; the RESULT must be the row count.
//   3. Tile (0,0) becomes a FIFO looping DMA 0's stream back into DMA 0's
//      write path; the copy in memory must equal the column (read 512 -> 128
//      and write 128 -> 512 width conversion, partial last memory word).
//   4. A bad register and a bad command give ERROR packets.
// Random stalls: memory read data, host network output. Each mechanism
// (stream backpressure, mode switch, CU reset, error packet, width
// conversion, network result) is counted; one that never happened fails.
module tb_overlay_top;
  import overlay_pkg::*;
  localparam int N_DMA = 11, MEM_W = 512, WORDS = 1024;
  localparam int ROWS_Q = 1000;                 // table rows (multiple of 4)
  localparam int BEATS = ROWS_Q / LANES;
  localparam int COPY_WORD = 512;               // target of the phase 3 copy
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

  // ---- memories behind the DMA engines in use; the others stay idle ----
  localparam int N_USED = 4;
  localparam int USED[N_USED] = '{0, 1, 2, 10};
  for (genvar k = 0; k < N_DMA; k++) begin : g_idle
    if (k != 0 && k != 1 && k != 2 && k != 10) begin : g_off
      assign ar_ready[k] = 1'b0; assign r_valid[k] = 1'b0; assign r_data[k] = '0;
      assign r_last[k] = 1'b0;   assign aw_ready[k] = 1'b0; assign w_ready[k] = 1'b0;
      assign b_valid[k] = 1'b0;
    end
  end

  // column values, a pure function of (column, row)
  function automatic int unsigned mix(int col, int row);
    int unsigned x;
    x = 32'(row) * 32'd2654435761 + 32'(col) * 32'd40503 + 32'd12345;
    x ^= x >> 15; x *= 32'd2246822519; x ^= x >> 13;
    return x;
  endfunction
  // DMA 0 quantity 1..50, DMA 1 shipdate (day) 0..2555, DMA 2 discount 0..10
  // (hundredths), DMA 10 extendedprice 1000..100999
  function automatic int colv(int dma, int row);
    case (dma)
      0:  return 1 + int'(mix(0, row) % 50);
      1:  return int'(mix(1, row) % 2556);
      2:  return int'(mix(2, row) % 11);
      default: return 1000 + int'(mix(3, row) % 100000);
    endcase
  endfunction

  for (genvar i = 0; i < N_USED; i++) begin : g_mem
    localparam int K = USED[i];
    tb_mem_model #(.MEM_W(MEM_W), .WORDS(WORDS), .STALL(3)) m (
      .clk,
      .ar_valid(ar_valid[K]), .ar_ready(ar_ready[K]), .ar_addr(ar_addr[K]), .ar_len(ar_len[K]),
      .r_valid(r_valid[K]), .r_ready(r_ready[K]), .r_data(r_data[K]), .r_last(r_last[K]),
      .aw_valid(aw_valid[K]), .aw_ready(aw_ready[K]), .aw_addr(aw_addr[K]), .aw_len(aw_len[K]),
      .w_valid(w_valid[K]), .w_ready(w_ready[K]), .w_data(w_data[K]), .w_strb(w_strb[K]),
      .w_last(w_last[K]), .b_valid(b_valid[K]), .b_ready(b_ready[K]));
    initial begin
      for (int w = 0; w < WORDS; w++) m.mem[w] = '0;
      for (int r = 0; r < ROWS_Q; r++)
        m.mem[r / 16][(r % 16) * 32 +: 32] = 32'(colv(K, r));
    end
  end

  // ---- host network: packets out of the overlay ----
  typedef logic [31:0] words_t[$];
  words_t pkts[$];
  logic [31:0] cur[$];
  int host_stalls = 0, stream_stalls = 0, cu_resets = 0;
  logic prev_cu_rst = 1'b1;
  always_ff @(posedge clk) begin
    if (rst_n && host_up_valid && host_up_ready) begin
      cur.push_back(host_up.data);
      if (host_up.last) begin pkts.push_back(cur); cur.delete(); end
    end
    if (rst_n && host_up_valid && !host_up_ready) host_stalls++;
    if (rst_n && |(dut.to_valid & ~dut.to_ready)) stream_stalls++;
    prev_cu_rst <= dut.g_row[2].g_col[3].u_tile.cu_rst_n;
    if (rst_n && prev_cu_rst && !dut.g_row[2].g_col[3].u_tile.cu_rst_n) cu_resets++;
    host_up_ready <= $urandom % 4 != 0;
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

  task automatic wr(int r, int c, logic [7:0] rg, logic [31:0] v);
    send(tile_addr(r, c), CMD_WRITE, rg, v);
  endtask

  // CU input k <- direction din[k] (4 = none); direction d <- CU output
  task automatic tile(int r, int c, kernel_e k, int in0, int in1, int o_n, int o_e,
                      int o_s, int o_w);
    wr(r, c, REG_KERNEL, 32'(k));
    wr(r, c, REG_INSEL + 0, 32'(in0));
    wr(r, c, REG_INSEL + 1, 32'(in1));
    wr(r, c, REG_OUTSEL + DIR_N, 32'(o_n));
    wr(r, c, REG_OUTSEL + DIR_E, 32'(o_e));
    wr(r, c, REG_OUTSEL + DIR_S, 32'(o_s));
    wr(r, c, REG_OUTSEL + DIR_W, 32'(o_w));
    send(tile_addr(r, c), CMD_RESET, 8'h00, 32'd0);
  endtask

  task automatic cmp_cfg(int r, int c, int lo, int hi, int incl);
    wr(r, c, REG_CFG + 0, 32'(lo));
    wr(r, c, REG_CFG + 1, 32'(hi));
    wr(r, c, REG_CFG + 2, 32'(incl));
  endtask

  task automatic dma_read(int k, int word, int beats);
    send(dma_addr(k), CMD_WRITE, DREG_RADDR, 32'(word * (MEM_W / 8)));
    send(dma_addr(k), CMD_WRITE, DREG_RLEN, 32'(beats));
    send(dma_addr(k), CMD_WRITE, DREG_CTRL, 32'h1);
  endtask

  // wait for a packet with the given header fields; returns its payload
  task automatic wait_pkt(cmd_e c, node_addr_t src, logic [7:0] rg, output words_t pay,
                          output logic found);
    int t;
    found = 0;
    t = 0;
    while (!found && t < 200000) begin
      for (int i = 0; i < pkts.size(); i++) begin
        noc_hdr_t h;
        h = noc_hdr_t'(pkts[i][0]);
        if (!found && h.cmd == c && h.src == src && h.regn == rg && h.dst == host_addr()) begin
          pay = pkts[i][1:$];
          pkts.delete(i);
          found = 1;
          break;
        end
      end
      if (!found) begin @(posedge clk); t++; end
    end
  endtask

  task automatic expect_pkt(string what, cmd_e c, node_addr_t src, logic [7:0] rg,
                            int nw, logic [63:0] v);
    words_t pay;
    logic found;
    logic [63:0] g;
    wait_pkt(c, src, rg, pay, found);
    checks++;
    if (!found || pay.size() != nw) begin
      failures++; $display("%s: packet missing or wrong length", what); return;
    end
    g = (nw == 2) ? {pay[1], pay[0]} : 64'(pay[0]);
    if (g != v) begin failures++; $display("%s: got %0d want %0d", what, g, v); end
    else $display("%s: %0d ok", what, g);
  endtask

  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  int mode_switches = 0, width_conv = 0, errors_seen = 0, results_seen = 0;

  initial begin
    longint sum, cnt;
    int unsigned start;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // ---------------- phase 1: Q6 ----------------
    tile(0, 0, KRN_CMP_RANGE, DIR_W, 4, 2, 0, 2, 2);  cmp_cfg(0, 0, -1000, 24, 0);
    tile(1, 0, KRN_CMP_RANGE, DIR_W, 4, 2, 0, 2, 2);  cmp_cfg(1, 0, 365, 730, 0);
    tile(2, 0, KRN_COPY,      DIR_W, 4, 1, 0, 2, 2);
    tile(2, 1, KRN_CMP_RANGE, DIR_W, 4, 2, 2, 0, 2);  cmp_cfg(2, 1, 5, 7, 1);
    tile(1, 1, KRN_AND,       DIR_W, DIR_N, 2, 2, 0, 2);
    tile(0, 1, KRN_AND,       DIR_W, DIR_N, 2, 0, 2, 2);
    tile(0, 2, KRN_COPY,      DIR_W, 4, 1, 0, 2, 2);
    tile(3, 0, KRN_DUAL_FIFO, DIR_S, 4, 2, 0, 2, 2);
    tile(3, 1, KRN_DUAL_FIFO, DIR_W, 4, 2, 0, 2, 2);
    tile(3, 2, KRN_DUAL_FIFO, DIR_W, 4, 2, 2, 0, 2);
    tile(2, 2, KRN_DUAL_FIFO, DIR_N, 4, 2, 2, 0, 2);
    tile(1, 2, KRN_FILTER,    DIR_N, DIR_S, 2, 0, 2, 2);
    tile(0, 3, KRN_FILTER,    DIR_S, DIR_W, 0, 2, 2, 2);
    tile(1, 3, KRN_MUL,       DIR_W, DIR_S, 0, 2, 2, 2);
    tile(2, 3, KRN_ADD_RED,   DIR_S, 4, 2, 2, 2, 2);

    sum = 0; cnt = 0;
    for (int r = 0; r < ROWS_Q; r++)
      if (colv(0, r) < 24 && colv(1, r) >= 365 && colv(1, r) < 730 &&
          colv(2, r) >= 5 && colv(2, r) <= 7) begin
        sum += longint'(colv(10, r)) * longint'(colv(2, r));
        cnt++;
      end
    $display("Q6 reference: %0d of %0d rows selected, revenue %0d", cnt, ROWS_Q, sum);

    start = cyc;
    foreach (USED[i]) dma_read(USED[i], 0, BEATS);
    expect_pkt("Q6 revenue", CMD_RESULT, tile_addr(2, 3), 8'h00, 2, 64'(sum));
    $display("Q6 took %0d cycles for %0d rows", cyc - start, ROWS_Q);
    results_seen++;
    foreach (USED[i])
      expect_pkt($sformatf("DMA %0d read done", USED[i]), CMD_STATUS, dma_addr(USED[i]),
                 8'd0, 1, 64'(BEATS));

    // ---------------- phase 2: mode switch ----------------
    tile(2, 3, KRN_COUNT, DIR_S, 4, 2, 2, 2, 2);
    cmp_cfg(0, 0, -1000, 40, 0);
    mode_switches++;
    cnt = 0;
    for (int r = 0; r < ROWS_Q; r++)
      if (colv(0, r) < 40 && colv(1, r) >= 365 && colv(1, r) < 730 &&
          colv(2, r) >= 5 && colv(2, r) <= 7) cnt++;
    foreach (USED[i]) dma_read(USED[i], 0, BEATS);
    expect_pkt("count after switch", CMD_RESULT, tile_addr(2, 3), 8'h00, 2, 64'(cnt));
    results_seen++;
    foreach (USED[i])
      expect_pkt($sformatf("DMA %0d read done", USED[i]), CMD_STATUS, dma_addr(USED[i]),
                 8'd0, 1, 64'(BEATS));

    // ---------------- phase 3: loop-back copy through DMA 0 ----------------
    tile(0, 0, KRN_FIFO, DIR_W, 4, 2, 2, 2, 0);
    send(dma_addr(0), CMD_WRITE, DREG_WADDR, 32'(COPY_WORD * (MEM_W / 8)));
    send(dma_addr(0), CMD_WRITE, DREG_CTRL, 32'h2);
    dma_read(0, 0, BEATS);
    expect_pkt("DMA 0 read done", CMD_STATUS, dma_addr(0), 8'd0, 1, 64'(BEATS));
    expect_pkt("DMA 0 write done", CMD_STATUS, dma_addr(0), 8'd1, 1, 64'(BEATS));
    begin
      int bad;
      bad = 0;
      for (int r = 0; r < ROWS_Q + 8; r++) begin
        logic [31:0] g, e;
        g = g_mem[0].m.mem[COPY_WORD + r / 16][(r % 16) * 32 +: 32];
        e = (r < ROWS_Q) ? 32'(colv(0, r)) : 32'd0;
        if (g != e) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("copy: %0d words wrong", bad); end
      else begin width_conv++; $display("copy of %0d values ok", ROWS_Q); end
    end

    // ---------------- phase 4: error answers ----------------
    wr(1, 1, 8'h30, 32'd1);
    expect_pkt("tile bad register", CMD_ERROR, tile_addr(1, 1), 8'h30, 1, 64'(ERR_BAD_REG));
    send(dma_addr(7), cmd_e'(4'hd), 8'h00, 32'd0);
    expect_pkt("DMA bad command", CMD_ERROR, dma_addr(7), 8'h00, 1, 64'(ERR_BAD_CMD));
    errors_seen = 2;

    // ---------------- mechanisms ----------------
    $display("stream stalls %0d, host stalls %0d, mode switches %0d, CU resets %0d,",
             stream_stalls, host_stalls, mode_switches, cu_resets);
    $display("width conversions %0d, error packets %0d, network results %0d",
             width_conv, errors_seen, results_seen);
    checks++; if (stream_stalls == 0) begin failures++; $display("no stream stall"); end
    checks++; if (host_stalls == 0)   begin failures++; $display("no host stall"); end
    checks++; if (mode_switches == 0) begin failures++; $display("no mode switch"); end
    checks++; if (cu_resets < 2)      begin failures++; $display("no CU reset"); end
    checks++; if (width_conv == 0)    begin failures++; $display("no width conversion"); end
    checks++; if (errors_seen == 0)   begin failures++; $display("no error packet"); end
    checks++; if (results_seen == 0)  begin failures++; $display("no network result"); end
    checks++;
    if (pkts.size() != 0) begin failures++; $display("%0d unexpected packets", pkts.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
