// overlay_top: the overlay of the database prototype, a grid of ROWS x COLS
// tiles (11 x 4 by default) with N_DMA DMA engines at its edges and the
// command/status network that connects the host interface to every tile and
// every DMA engine.
//
// Data streams: neighbouring tiles are joined by one 128-bit stream per
// direction (4-neighbour topology). Row 0 is the bottom row, column 0 the
// west edge. DMA engines sit at the edges: DMA r (r < ROWS) on the west side
// of row r, DMA ROWS+r on the east side of row r, and the remaining ones
// (DMA 2*ROWS + j) below column j+1. Other edge ports are closed: their
// inputs never carry data and their outputs are never ready.
//
// Network: the host port enters a root router; its child 0 is tile (0,0)
// and its child 1 the chain of DMA routers. Tile routers pass packets east
// along row 0 and north up each column.
//
// The memory side of every DMA engine (reduced AXI4, MEM_W bits) is brought
// out; the memory controllers and the interconnect in front of them are not
// part of this RTL. Likewise the host interface (PCIe) is outside: its
// network packets enter and leave through the host_* ports.
//
// Default sizes follow the prototype: 11 x 4 tiles, 11 DMA engines, 128-bit
// streams with 4 SIMD lanes, 512-bit memory ports. The DMA placement and all
// buffer depths are this design's choices.
module overlay_top
  import overlay_pkg::*;
#(
  parameter int ROWS       = 4,
  parameter int COLS       = 11,
  parameter int N_DMA      = 11,
  parameter int MEM_W      = 512,
  parameter int BUF_DEPTH  = 2,
  parameter int FIFO_DEPTH = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  // host side of the command/status network
  input  logic  host_dn_valid,
  output logic  host_dn_ready,
  input  flit_t host_dn,
  output logic  host_up_valid,
  input  logic  host_up_ready,
  output flit_t host_up,
  // memory ports of the DMA engines
  output logic [N_DMA-1:0]                ar_valid,
  input  logic [N_DMA-1:0]                ar_ready,
  output logic [N_DMA-1:0][31:0]          ar_addr,
  output logic [N_DMA-1:0][7:0]           ar_len,
  input  logic [N_DMA-1:0]                r_valid,
  output logic [N_DMA-1:0]                r_ready,
  input  logic [N_DMA-1:0][MEM_W-1:0]     r_data,
  input  logic [N_DMA-1:0]                r_last,
  output logic [N_DMA-1:0]                aw_valid,
  input  logic [N_DMA-1:0]                aw_ready,
  output logic [N_DMA-1:0][31:0]          aw_addr,
  output logic [N_DMA-1:0][7:0]           aw_len,
  output logic [N_DMA-1:0]                w_valid,
  input  logic [N_DMA-1:0]                w_ready,
  output logic [N_DMA-1:0][MEM_W-1:0]     w_data,
  output logic [N_DMA-1:0][MEM_W/8-1:0]   w_strb,
  output logic [N_DMA-1:0]                w_last,
  input  logic [N_DMA-1:0]                b_valid,
  output logic [N_DMA-1:0]                b_ready
);
  localparam int N_SOUTH = N_DMA - 2 * ROWS;

  initial begin
    assert (N_DMA >= 2 * ROWS && N_SOUTH <= COLS - 1 && ROWS <= 16 && COLS <= 16)
      else $error("overlay_top: unsupported size");
  end

  // ---------------- tile stream ports ----------------
  logic  [ROWS-1:0][COLS-1:0][N_DIR-1:0] ti_valid, ti_ready, to_valid, to_ready;
  beat_t [ROWS-1:0][COLS-1:0][N_DIR-1:0] ti_data, to_data;

  // DMA streams
  logic  [N_DMA-1:0] dm_valid, dm_ready, ds_valid, ds_ready;
  beat_t [N_DMA-1:0] dm_data, ds_data;

  // ---------------- network links ----------------
  // link into / out of each tile from its parent
  logic  [ROWS-1:0][COLS-1:0] tn_dv, tn_dr, tn_uv, tn_ur;
  flit_t [ROWS-1:0][COLS-1:0] tn_d, tn_u;
  logic  [ROWS-1:0][COLS-1:0][1:0] tc_dv, tc_dr, tc_uv, tc_ur;
  flit_t [ROWS-1:0][COLS-1:0][1:0] tc_d, tc_u;
  // DMA router chain: link into router k from its parent
  logic  [N_DMA-1:0] dn_dv, dn_dr, dn_uv, dn_ur;
  flit_t [N_DMA-1:0] dn_d, dn_u;

  // ---------------- root router ----------------
  logic  [2:0] sp_dv, sp_dr, sp_uv, sp_ur;
  flit_t [2:0] sp_d, sp_u;

  noc_router #(.ROLE(R_SPINE), .ROW(0), .COL(0)) u_root (
    .clk, .rst_n,
    .dn_in_valid(host_dn_valid), .dn_in_ready(host_dn_ready), .dn_in(host_dn),
    .dn_out_valid(sp_dv), .dn_out_ready(sp_dr), .dn_out(sp_d),
    .up_in_valid(sp_uv), .up_in_ready(sp_ur), .up_in(sp_u),
    .up_out_valid(host_up_valid), .up_out_ready(host_up_ready), .up_out(host_up));

  assign sp_dr[0] = 1'b1;          // the root has no local endpoint
  assign sp_uv[0] = 1'b0;
  assign sp_u[0]  = '0;
  assign tn_dv[0][0] = sp_dv[1];
  assign sp_dr[1]    = tn_dr[0][0];
  assign tn_d[0][0]  = sp_d[1];
  assign sp_uv[1]    = tn_uv[0][0];
  assign tn_ur[0][0] = sp_ur[1];
  assign sp_u[1]     = tn_u[0][0];
  assign dn_dv[0]    = sp_dv[2];
  assign sp_dr[2]    = dn_dr[0];
  assign dn_d[0]     = sp_d[2];
  assign sp_uv[2]    = dn_uv[0];
  assign dn_ur[0]    = sp_ur[2];
  assign sp_u[2]     = dn_u[0];

  // ---------------- tiles ----------------
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      overlay_tile #(
        .ROW(r), .COL(c), .BUF_DEPTH(BUF_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)
      ) u_tile (
        .clk, .rst_n,
        .s_valid(ti_valid[r][c]), .s_ready(ti_ready[r][c]), .s_data(ti_data[r][c]),
        .m_valid(to_valid[r][c]), .m_ready(to_ready[r][c]), .m_data(to_data[r][c]),
        .net_dn_valid(tn_dv[r][c]), .net_dn_ready(tn_dr[r][c]), .net_dn(tn_d[r][c]),
        .net_up_valid(tn_uv[r][c]), .net_up_ready(tn_ur[r][c]), .net_up(tn_u[r][c]),
        .ch_dn_valid(tc_dv[r][c]), .ch_dn_ready(tc_dr[r][c]), .ch_dn(tc_d[r][c]),
        .ch_up_valid(tc_uv[r][c]), .ch_up_ready(tc_ur[r][c]), .ch_up(tc_u[r][c]));

      // ---- network children: east (row 0 only) and north ----
      if (r == 0 && c + 1 < COLS) begin : g_ne
        assign tn_dv[0][c+1] = tc_dv[0][c][0];
        assign tc_dr[0][c][0] = tn_dr[0][c+1];
        assign tn_d[0][c+1]  = tc_d[0][c][0];
        assign tc_uv[0][c][0] = tn_uv[0][c+1];
        assign tn_ur[0][c+1] = tc_ur[0][c][0];
        assign tc_u[0][c][0]  = tn_u[0][c+1];
      end else begin : g_ne_off
        assign tc_dr[r][c][0] = 1'b1;
        assign tc_uv[r][c][0] = 1'b0;
        assign tc_u[r][c][0]  = '0;
      end
      if (r + 1 < ROWS) begin : g_nn
        assign tn_dv[r+1][c]  = tc_dv[r][c][1];
        assign tc_dr[r][c][1] = tn_dr[r+1][c];
        assign tn_d[r+1][c]   = tc_d[r][c][1];
        assign tc_uv[r][c][1] = tn_uv[r+1][c];
        assign tn_ur[r+1][c]  = tc_ur[r][c][1];
        assign tc_u[r][c][1]  = tn_u[r+1][c];
      end else begin : g_nn_off
        assign tc_dr[r][c][1] = 1'b1;
        assign tc_uv[r][c][1] = 1'b0;
        assign tc_u[r][c][1]  = '0;
      end

      // ---- stream inputs, each link driven from its receiving side ----
      // north input <- south output of the tile above
      if (r + 1 < ROWS) begin : g_in_n
        assign ti_valid[r][c][DIR_N]   = to_valid[r+1][c][DIR_S];
        assign ti_data[r][c][DIR_N]    = to_data[r+1][c][DIR_S];
        assign to_ready[r+1][c][DIR_S] = ti_ready[r][c][DIR_N];
      end else begin : g_in_n_off
        assign ti_valid[r][c][DIR_N] = 1'b0;
        assign ti_data[r][c][DIR_N]  = '0;
        assign to_ready[r][c][DIR_N] = 1'b0;
      end
      // south input <- north output of the tile below, or a south DMA
      if (r > 0) begin : g_in_s
        assign ti_valid[r][c][DIR_S]   = to_valid[r-1][c][DIR_N];
        assign ti_data[r][c][DIR_S]    = to_data[r-1][c][DIR_N];
        assign to_ready[r-1][c][DIR_N] = ti_ready[r][c][DIR_S];
      end else if (c >= 1 && c <= N_SOUTH) begin : g_in_s_dma
        localparam int K = 2 * ROWS + c - 1;
        assign ti_valid[0][c][DIR_S] = dm_valid[K];
        assign ti_data[0][c][DIR_S]  = dm_data[K];
        assign dm_ready[K]           = ti_ready[0][c][DIR_S];
        assign ds_valid[K]           = to_valid[0][c][DIR_S];
        assign ds_data[K]            = to_data[0][c][DIR_S];
        assign to_ready[0][c][DIR_S] = ds_ready[K];
      end else begin : g_in_s_off
        assign ti_valid[0][c][DIR_S] = 1'b0;
        assign ti_data[0][c][DIR_S]  = '0;
        assign to_ready[0][c][DIR_S] = 1'b0;
      end
      // east input <- west output of the tile to the east, or an east DMA
      if (c + 1 < COLS) begin : g_in_e
        assign ti_valid[r][c][DIR_E]   = to_valid[r][c+1][DIR_W];
        assign ti_data[r][c][DIR_E]    = to_data[r][c+1][DIR_W];
        assign to_ready[r][c+1][DIR_W] = ti_ready[r][c][DIR_E];
      end else begin : g_in_e_dma
        assign ti_valid[r][c][DIR_E] = dm_valid[ROWS + r];
        assign ti_data[r][c][DIR_E]  = dm_data[ROWS + r];
        assign dm_ready[ROWS + r]    = ti_ready[r][c][DIR_E];
        assign ds_valid[ROWS + r]    = to_valid[r][c][DIR_E];
        assign ds_data[ROWS + r]     = to_data[r][c][DIR_E];
        assign to_ready[r][c][DIR_E] = ds_ready[ROWS + r];
      end
      // west input <- east output of the tile to the west, or a west DMA
      if (c > 0) begin : g_in_w
        assign ti_valid[r][c][DIR_W]   = to_valid[r][c-1][DIR_E];
        assign ti_data[r][c][DIR_W]    = to_data[r][c-1][DIR_E];
        assign to_ready[r][c-1][DIR_E] = ti_ready[r][c][DIR_W];
      end else begin : g_in_w_dma
        assign ti_valid[r][0][DIR_W] = dm_valid[r];
        assign ti_data[r][0][DIR_W]  = dm_data[r];
        assign dm_ready[r]           = ti_ready[r][0][DIR_W];
        assign ds_valid[r]           = to_valid[r][0][DIR_W];
        assign ds_data[r]            = to_data[r][0][DIR_W];
        assign to_ready[r][0][DIR_W] = ds_ready[r];
      end
    end
  end

  // ---------------- DMA engines and their routers ----------------
  for (genvar k = 0; k < N_DMA; k++) begin : g_dma
    logic  [2:0] rdv, rdr, ruv, rur;
    flit_t [2:0] rd, ru;

    noc_router #(.ROLE(R_DMA), .ROW(0), .COL(k)) u_router (
      .clk, .rst_n,
      .dn_in_valid(dn_dv[k]), .dn_in_ready(dn_dr[k]), .dn_in(dn_d[k]),
      .dn_out_valid(rdv), .dn_out_ready(rdr), .dn_out(rd),
      .up_in_valid(ruv), .up_in_ready(rur), .up_in(ru),
      .up_out_valid(dn_uv[k]), .up_out_ready(dn_ur[k]), .up_out(dn_u[k]));

    if (k + 1 < N_DMA) begin : g_next
      assign dn_dv[k+1] = rdv[1];
      assign rdr[1]     = dn_dr[k+1];
      assign dn_d[k+1]  = rd[1];
      assign ruv[1]     = dn_uv[k+1];
      assign dn_ur[k+1] = rur[1];
      assign ru[1]      = dn_u[k+1];
    end else begin : g_next_off
      assign rdr[1] = 1'b1;
      assign ruv[1] = 1'b0;
      assign ru[1]  = '0;
    end
    assign rdr[2] = 1'b1;
    assign ruv[2] = 1'b0;
    assign ru[2]  = '0;

    dma_engine #(.IDX(k), .MEM_W(MEM_W)) u_dma (
      .clk, .rst_n,
      .rx_valid(rdv[0]), .rx_ready(rdr[0]), .rx(rd[0]),
      .tx_valid(ruv[0]), .tx_ready(rur[0]), .tx(ru[0]),
      .ar_valid(ar_valid[k]), .ar_ready(ar_ready[k]), .ar_addr(ar_addr[k]), .ar_len(ar_len[k]),
      .r_valid(r_valid[k]), .r_ready(r_ready[k]), .r_data(r_data[k]), .r_last(r_last[k]),
      .aw_valid(aw_valid[k]), .aw_ready(aw_ready[k]), .aw_addr(aw_addr[k]), .aw_len(aw_len[k]),
      .w_valid(w_valid[k]), .w_ready(w_ready[k]), .w_data(w_data[k]), .w_strb(w_strb[k]),
      .w_last(w_last[k]), .b_valid(b_valid[k]), .b_ready(b_ready[k]),
      .m_valid(dm_valid[k]), .m_ready(dm_ready[k]), .m_data(dm_data[k]),
      .s_valid(ds_valid[k]), .s_ready(ds_ready[k]), .s_data(ds_data[k]));
  end
endmodule
