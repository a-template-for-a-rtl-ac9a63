// tb_overlay_tile: a tile at row 0, column 2, configured only through its
// network port. (1) kernel mul with CU input 0 <- west, input 1 <- south,
// east <- CU output 0: products checked. (2) a CU reset followed at once by
// a stream: nothing lost while the CU is held. (3) kernel add reduce fed
// from the north: the sum comes back as a CMD_RESULT packet. (4) packets for
// other tiles leave on the east/north child ports; packets from a child are
// passed upstream. (5) a read of the kernel register is answered.
module tb_overlay_tile;
  import overlay_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  [N_DIR-1:0] s_valid, s_ready, m_valid, m_ready;
  beat_t [N_DIR-1:0] s_data, m_data;
  logic net_dn_valid, net_dn_ready, net_up_valid, net_up_ready;
  flit_t net_dn, net_up;
  logic [1:0] ch_dn_valid, ch_dn_ready, ch_up_valid, ch_up_ready;
  flit_t [1:0] ch_dn, ch_up;

  for (genvar d = 0; d < N_DIR; d++) begin : g_io
    tb_src #(.STALL(1)) u_src (.clk, .valid(s_valid[d]), .ready(s_ready[d]), .data(s_data[d]));
    tb_snk #(.STALL(1)) u_snk (.clk, .rst_n, .valid(m_valid[d]), .ready(m_ready[d]), .data(m_data[d]));
  end

  overlay_tile #(.ROW(0), .COL(2), .RST_CYCLES(8)) dut (.*);

  flit_t up_q[$], ch_q[2][$];
  assign net_up_ready = 1'b1;
  assign ch_dn_ready  = 2'b11;
  always_ff @(posedge clk) begin
    if (rst_n && net_up_valid) up_q.push_back(net_up);
    for (int k = 0; k < 2; k++) if (rst_n && ch_dn_valid[k]) ch_q[k].push_back(ch_dn[k]);
  end

  task automatic send_flit(flit_t f);
    @(negedge clk);
    net_dn_valid = 1; net_dn = f;
    @(posedge clk); while (!net_dn_ready) @(posedge clk);
    @(negedge clk); net_dn_valid = 0;
  endtask

  task automatic cmd(node_addr_t dst, cmd_e c, logic [7:0] r, logic [31:0] w);
    noc_hdr_t h;
    h.dst = dst; h.src = host_addr(); h.cmd = c; h.regn = r;
    send_flit('{data: 32'(h), last: 1'b0});
    send_flit('{data: w, last: 1'b1});
  endtask

  function automatic beat_t rnd_beat(bit l);
    beat_t x;
    x.data = {$urandom, $urandom, $urandom, $urandom}; x.keep = '1; x.last = l;
    return x;
  endfunction

  function automatic noc_hdr_t hdr_of(flit_t f);
    return noc_hdr_t'(f.data);
  endfunction

  localparam node_addr_t ME = '{kind: K_TILE, row: 4'd0, col: 4'd2};

  initial begin
    beat_t ea[$], eb[$];
    net_dn_valid = 0; net_dn = '0; ch_up_valid = '0; ch_up = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);

    // (1) mul: W x S -> E
    cmd(ME, CMD_WRITE, REG_INSEL + 0, DIR_W);
    cmd(ME, CMD_WRITE, REG_INSEL + 1, DIR_S);
    cmd(ME, CMD_WRITE, REG_OUTSEL + DIR_E, 0);
    cmd(ME, CMD_WRITE, REG_KERNEL, 32'(KRN_MUL));
    for (int i = 0; i < 20; i++) begin
      beat_t x, y;
      x = rnd_beat(i == 19); y = rnd_beat(i == 19);
      g_io[DIR_W].u_src.q.push_back(x); g_io[DIR_S].u_src.q.push_back(y);
      ea.push_back(x); eb.push_back(y);
    end
    begin
      int t; t = 0;
      while (g_io[DIR_E].u_snk.q.size() < 20 && t < 1000) begin @(posedge clk); t++; end
    end
    checks++;
    if (g_io[DIR_E].u_snk.q.size() != 20) begin failures++; $display("mul beats %0d", g_io[DIR_E].u_snk.q.size()); end
    else foreach (ea[i]) for (int l = 0; l < 4; l++) begin
      logic [63:0] p;
      p = $signed(ea[i].data[l*32 +: 32]) * $signed(eb[i].data[l*32 +: 32]);
      checks++;
      if (g_io[DIR_E].u_snk.q[i].data[l*32 +: 32] !== p[31:0]) begin failures++; $display("mul beat %0d lane %0d", i, l); end
    end
    checks++;
    if (g_io[DIR_N].u_snk.q.size() + g_io[DIR_S].u_snk.q.size() + g_io[DIR_W].u_snk.q.size() != 0) begin
      failures++; $display("data on an unselected output");
    end

    // (2) reset, then a stream at once: all beats must arrive
    g_io[DIR_E].u_snk.q.delete(); ea.delete(); eb.delete();
    cmd(ME, CMD_RESET, 8'h00, 32'd0);
    for (int i = 0; i < 10; i++) begin
      beat_t x, y;
      x = rnd_beat(i == 9); y = rnd_beat(i == 9);
      g_io[DIR_W].u_src.q.push_back(x); g_io[DIR_S].u_src.q.push_back(y);
    end
    begin
      int t; t = 0;
      while (g_io[DIR_E].u_snk.q.size() < 10 && t < 1000) begin @(posedge clk); t++; end
    end
    checks++;
    if (g_io[DIR_E].u_snk.q.size() != 10) begin failures++; $display("after reset %0d beats", g_io[DIR_E].u_snk.q.size()); end

    // (3) add reduce from the north, result over the network
    cmd(ME, CMD_WRITE, REG_KERNEL, 32'(KRN_ADD_RED));
    cmd(ME, CMD_RESET, 8'h00, 32'd0);
    cmd(ME, CMD_WRITE, REG_INSEL + 0, DIR_N);
    up_q.delete();
    begin
      logic [63:0] sum;
      int t;
      sum = 0;
      for (int i = 0; i < 16; i++) begin
        beat_t x;
        x = rnd_beat(i == 15);
        for (int l = 0; l < 4; l++) sum += 64'($signed(x.data[l*32 +: 32]));
        g_io[DIR_N].u_src.q.push_back(x);
      end
      t = 0;
      while (up_q.size() < 3 && t < 1000) begin @(posedge clk); t++; end
      checks++;
      if (up_q.size() != 3 || hdr_of(up_q[0]).cmd != CMD_RESULT ||
          {up_q[2].data, up_q[1].data} != sum) begin
        failures++; $display("result packet wrong (%0d flits)", up_q.size());
      end
    end

    // (4) pass-through of packets
    cmd(tile_addr(0, 5), CMD_WRITE, 8'h00, 32'd1);
    cmd(tile_addr(3, 2), CMD_WRITE, 8'h00, 32'd2);
    repeat (5) @(posedge clk);
    checks += 2;
    if (ch_q[0].size() != 2 || ch_q[0][1].data != 32'd1) begin failures++; $display("east packet"); end
    if (ch_q[1].size() != 2 || ch_q[1][1].data != 32'd2) begin failures++; $display("north packet"); end
    up_q.delete();
    @(negedge clk);
    ch_up_valid[1] = 1; ch_up[1] = '{data: 32'h1234, last: 1'b1};
    @(posedge clk); while (!ch_up_ready[1]) @(posedge clk);
    @(negedge clk); ch_up_valid[1] = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (up_q.size() != 1 || up_q[0].data != 32'h1234) begin failures++; $display("upstream pass"); end

    // (5) read back
    up_q.delete();
    cmd(ME, CMD_READ, REG_KERNEL, 32'd0);
    repeat (10) @(posedge clk);
    checks++;
    if (up_q.size() != 2 || hdr_of(up_q[0]).cmd != CMD_STATUS || up_q[1].data != 32'(KRN_ADD_RED)) begin
      failures++; $display("read answer");
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
