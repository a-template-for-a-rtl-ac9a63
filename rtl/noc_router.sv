// noc_router: router of the lightweight command/status network.
//
// The network is a tree rooted at the host interface. Each router has one
// parent port (towards the host) and up to two child ports plus a local port:
//   - downstream (host to overlay): a packet arriving from the parent is sent
//     to the local endpoint or to child 0 / child 1, as route_f() decides from
//     the destination in its header flit. Packets nobody can take are dropped.
//   - upstream (overlay to host): packets from the local endpoint and the two
//     children are merged onto the parent port by a round-robin arbiter.
// Both directions switch whole packets: a path is held from the header flit
// to the flit with last=1. Every output has a 2-entry buffer, so a flit
// takes one cycle per router and each port moves one flit per cycle.
//
// Roles (overlay_pkg::router_role_e): a tile router's child 0 is the tile to
// the east, child 1 the tile to the north; the root's child 0 is tile (0,0)
// and child 1 the first DMA router; a DMA router's child 0 is the next DMA
// router. This tree follows the network drawing of the overlay (routers along
// the DMA row, routers beside and inside the tile grid); the routing rule and
// the packet format are this design's own.
module noc_router
  import overlay_pkg::*;
#(
  parameter router_role_e ROLE = R_TILE,
  parameter int           ROW  = 0,
  parameter int           COL  = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  // downstream input from the parent
  input  logic  dn_in_valid,
  output logic  dn_in_ready,
  input  flit_t dn_in,
  // downstream outputs: [0] local, [1] child 0, [2] child 1
  output logic  [2:0] dn_out_valid,
  input  logic  [2:0] dn_out_ready,
  output flit_t [2:0] dn_out,
  // upstream inputs: [0] local, [1] child 0, [2] child 1
  input  logic  [2:0] up_in_valid,
  output logic  [2:0] up_in_ready,
  input  flit_t [2:0] up_in,
  // upstream output to the parent
  output logic  up_out_valid,
  input  logic  up_out_ready,
  output flit_t up_out
);
  // ---------------- downstream ----------------
  logic   dn_busy;
  rport_e dn_port, dn_port_q;
  logic [2:0] dbuf_valid, dbuf_ready;
  noc_hdr_t hdr;

  assign hdr     = noc_hdr_t'(dn_in.data);
  assign dn_port = dn_busy ? dn_port_q : route_f(ROLE, 4'(ROW), 4'(COL), hdr.dst);

  always_comb begin
    dbuf_valid  = '0;
    dn_in_ready = 1'b0;
    if (dn_port == P_DROP) begin
      dn_in_ready = 1'b1;
    end else begin
      dbuf_valid[dn_port] = dn_in_valid;
      dn_in_ready         = dbuf_ready[dn_port];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn_busy   <= 1'b0;
      dn_port_q <= P_DROP;
    end else if (dn_in_valid && dn_in_ready) begin
      dn_busy   <= !dn_in.last;
      dn_port_q <= dn_port;
    end
  end

  for (genvar p = 0; p < 3; p++) begin : g_dn
    logic [FLIT_W-1:0] q;
    axis_fifo #(.W(FLIT_W), .DEPTH(2)) u_buf (
      .clk, .rst_n,
      .s_valid(dbuf_valid[p]), .s_ready(dbuf_ready[p]), .s_data(dn_in),
      .m_valid(dn_out_valid[p]), .m_ready(dn_out_ready[p]), .m_data(q),
      .level()
    );
    assign dn_out[p] = flit_t'(q);
  end

  // ---------------- upstream ----------------
  logic       up_busy;
  logic [1:0] up_sel, up_last_grant;
  logic [1:0] up_pick;
  logic       up_any;
  logic       ubuf_valid, ubuf_ready;
  flit_t      ubuf_data;

  // round robin: start searching after the last granted port
  always_comb begin
    up_pick = 2'd0;
    up_any  = 1'b0;
    for (int k = 1; k <= 3; k++) begin
      int idx;
      idx = (int'(up_last_grant) + k) % 3;
      if (!up_any && up_in_valid[idx]) begin
        up_pick = 2'(idx);
        up_any  = 1'b1;
      end
    end
  end

  assign up_sel = up_busy ? up_last_grant : up_pick;

  always_comb begin
    up_in_ready = '0;
    ubuf_valid  = 1'b0;
    ubuf_data   = up_in[up_sel];
    if (up_busy || up_any) begin
      ubuf_valid          = up_in_valid[up_sel];
      up_in_ready[up_sel] = ubuf_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_busy       <= 1'b0;
      up_last_grant <= 2'd2;
    end else if (ubuf_valid && ubuf_ready) begin
      up_busy       <= !ubuf_data.last;
      up_last_grant <= up_sel;
    end
  end

  logic [FLIT_W-1:0] uq;
  axis_fifo #(.W(FLIT_W), .DEPTH(2)) u_ubuf (
    .clk, .rst_n,
    .s_valid(ubuf_valid), .s_ready(ubuf_ready), .s_data(ubuf_data),
    .m_valid(up_out_valid), .m_ready(up_out_ready), .m_data(uq),
    .level()
  );
  assign up_out = flit_t'(uq);
endmodule
