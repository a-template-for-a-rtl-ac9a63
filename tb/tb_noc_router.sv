// tb_noc_router: a tile router at row 0, column 1.
// Downstream: packets of 1..4 flits for this tile, for tiles east and north
// of it and for unreachable nodes are sent with random gaps; each must appear
// complete and in order on the local, east (child 0) or north (child 1)
// port, or vanish. Upstream: the three inputs send tagged packets at the same
// time; the parent port must carry whole packets, each input's packets in
// order, and every input must be served. Random ready on every output.
module tb_noc_router;
  import overlay_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic dn_in_valid, dn_in_ready, up_out_valid, up_out_ready;
  flit_t dn_in, up_out;
  logic [2:0] dn_out_valid, dn_out_ready, up_in_valid, up_in_ready;
  flit_t [2:0] dn_out, up_in;

  noc_router #(.ROLE(R_TILE), .ROW(0), .COL(1)) dut (.*);

  flit_t dsrc[$];            // downstream flits to send
  flit_t dexp[3][$];         // expected per output port
  flit_t usrc[3][$];         // upstream flits per input
  flit_t uexp[3][$];         // expected per input (in order)
  int    served[3] = '{0, 0, 0};

  // downstream source
  always_ff @(posedge clk) begin
    if (!(dn_in_valid && !dn_in_ready)) begin
      if (dn_in_valid && dn_in_ready) void'(dsrc.pop_front());
      if (dsrc.size() > 0 && $urandom % 4 != 0) begin
        dn_in_valid <= 1; dn_in <= dsrc[0];
      end else dn_in_valid <= 0;
    end
  end
  // upstream sources
  for (genvar p = 0; p < 3; p++) begin : g_us
    always_ff @(posedge clk) begin
      if (!(up_in_valid[p] && !up_in_ready[p])) begin
        if (up_in_valid[p] && up_in_ready[p]) void'(usrc[p].pop_front());
        if (usrc[p].size() > 0) begin
          up_in_valid[p] <= 1; up_in[p] <= usrc[p][0];
        end else up_in_valid[p] <= 0;
      end
    end
  end

  // downstream sinks
  always_ff @(posedge clk) begin
    for (int p = 0; p < 3; p++) begin
      if (rst_n && dn_out_valid[p] && dn_out_ready[p]) begin
        checks++;
        if (dexp[p].size() == 0 || dn_out[p] !== dexp[p][0]) begin
          failures++; $display("port %0d got %h", p, dn_out[p].data);
        end
        if (dexp[p].size() != 0) void'(dexp[p].pop_front());
      end
      dn_out_ready[p] <= $urandom % 3 != 0;
    end
  end

  // upstream sink: whole packets, per-source order
  int cur = -1;
  always_ff @(posedge clk) begin
    if (rst_n && up_out_valid && up_out_ready) begin
      int s;
      s = int'(up_out.data[31:30]);   // source tag in the payload
      checks++;
      if (cur != -1 && s != cur) begin failures++; $display("packets interleaved"); end
      if (s > 2 || uexp[s].size() == 0 || up_out !== uexp[s][0]) begin
        failures++; $display("upstream flit wrong %h", up_out.data);
      end else void'(uexp[s].pop_front());
      cur = up_out.last ? -1 : s;
      if (up_out.last && s <= 2) served[s]++;
    end
    up_out_ready <= $urandom % 3 != 0;
  end

  task automatic dpkt(node_addr_t dst, int port, int len);
    noc_hdr_t h;
    h = '0; h.dst = dst; h.cmd = CMD_WRITE; h.regn = 8'($urandom);
    for (int i = 0; i < len; i++) begin
      flit_t f;
      f.data = (i == 0) ? 32'(h) : $urandom;
      f.last = (i == len - 1);
      dsrc.push_back(f);
      if (port >= 0) dexp[port].push_back(f);
    end
  endtask

  initial begin
    dn_in_valid = 0; dn_in = '0; up_in_valid = '0; up_in = '0;
    dn_out_ready = '0; up_out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      int k, len;
      k = int'($urandom % 5);
      len = 1 + int'($urandom % 4);
      case (k)
        0: dpkt(tile_addr(0, 1), 0, len);                     // this tile
        1: dpkt(tile_addr(0, 2 + int'($urandom % 8)), 1, len); // east
        2: dpkt(tile_addr(1 + int'($urandom % 3), 1), 2, len); // north
        3: dpkt(tile_addr(1, 0), -1, len);                    // not below this router
        default: dpkt(dma_addr(3), -1, len);                  // not a tile
      endcase
    end
    for (int p = 0; p < 3; p++)
      for (int n = 0; n < 10; n++) begin
        int len;
        len = 1 + int'($urandom % 4);
        for (int i = 0; i < len; i++) begin
          flit_t f;
          f.data = {2'(p), 30'($urandom)};
          f.last = (i == len - 1);
          usrc[p].push_back(f); uexp[p].push_back(f);
        end
      end
    while (dsrc.size() != 0 || usrc[0].size() != 0 || usrc[1].size() != 0 || usrc[2].size() != 0)
      @(posedge clk);
    repeat (30) @(posedge clk);
    for (int p = 0; p < 3; p++) begin
      checks += 2;
      if (dexp[p].size() != 0) begin failures++; $display("port %0d missing %0d flits", p, dexp[p].size()); end
      if (served[p] != 10) begin failures++; $display("input %0d served %0d packets", p, served[p]); end
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
