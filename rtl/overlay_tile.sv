// overlay_tile: one tile of the overlay grid.
//
// Data path: four 128-bit stream inputs (N, E, S, W) enter an input
// crossbar that gives each of the four CU inputs one direction (or none).
// Each CU input and each of the two CU outputs passes a buffer that cuts the
// timing paths (registers for BUF_DEPTH=2, FIFOs for more). An output
// crossbar gives each output direction one CU output (or none). All selects,
// the kernel and the CU configuration words are set at runtime over the
// command/status network.
//
// Control path: the tile's router (role R_TILE) passes network packets on to
// the tile east (child 0) and north (child 1) of it and delivers packets for
// this tile to tile_ctrl, which also returns CU results, read answers and
// error codes upstream. A CMD_RESET packet makes the local reset controller
// hold the CU in reset; during that time the CU's stream handshakes are
// blocked so no beat is lost or invented.
//
// Timing: a beat needs one cycle in the input buffer, the CU's own latency
// and one cycle in the output buffer; each link moves one beat per cycle.
// The structure follows the tile drawing of the overlay (crossbar, buffers,
// CU in a reconfigurable partition, RST, router with TX/RX); the optional
// AXI4 memory-mapped port of the CU is not built.
module overlay_tile
  import overlay_pkg::*;
#(
  parameter int ROW        = 0,
  parameter int COL        = 0,
  parameter int BUF_DEPTH  = 2,
  parameter int FIFO_DEPTH = 32,
  parameter int RST_CYCLES = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // stream ports, index = direction (DIR_N, DIR_E, DIR_S, DIR_W)
  input  logic  [N_DIR-1:0] s_valid,
  output logic  [N_DIR-1:0] s_ready,
  input  beat_t [N_DIR-1:0] s_data,
  output logic  [N_DIR-1:0] m_valid,
  input  logic  [N_DIR-1:0] m_ready,
  output beat_t [N_DIR-1:0] m_data,
  // network: parent side
  input  logic  net_dn_valid,
  output logic  net_dn_ready,
  input  flit_t net_dn,
  output logic  net_up_valid,
  input  logic  net_up_ready,
  output flit_t net_up,
  // network: child ports, [0] = east, [1] = north
  output logic  [1:0] ch_dn_valid,
  input  logic  [1:0] ch_dn_ready,
  output flit_t [1:0] ch_dn,
  input  logic  [1:0] ch_up_valid,
  output logic  [1:0] ch_up_ready,
  input  flit_t [1:0] ch_up
);
  // ---------------- control ----------------
  logic  [2:0] r_dn_valid, r_dn_ready, r_up_valid, r_up_ready;
  flit_t [2:0] r_dn, r_up;

  noc_router #(.ROLE(R_TILE), .ROW(ROW), .COL(COL)) u_router (
    .clk, .rst_n,
    .dn_in_valid(net_dn_valid), .dn_in_ready(net_dn_ready), .dn_in(net_dn),
    .dn_out_valid(r_dn_valid), .dn_out_ready(r_dn_ready), .dn_out(r_dn),
    .up_in_valid(r_up_valid), .up_in_ready(r_up_ready), .up_in(r_up),
    .up_out_valid(net_up_valid), .up_out_ready(net_up_ready), .up_out(net_up));

  assign ch_dn_valid   = r_dn_valid[2:1];
  assign r_dn_ready[2:1] = ch_dn_ready;
  assign ch_dn         = r_dn[2:1];
  assign r_up_valid[2:1] = ch_up_valid;
  assign ch_up_ready   = r_up_ready[2:1];
  assign r_up[2:1]     = ch_up;

  logic [N_CU_IN-1:0][2:0] insel;
  logic [N_DIR-1:0][1:0]   outsel;
  kernel_e                 kernel;
  logic [N_CFG-1:0][31:0]  cfg;
  logic                    rst_req, cu_rst_n, cu_busy;
  logic                    res_valid, res_ready;
  logic [63:0]             res_data;

  tile_ctrl #(.ROW(ROW), .COL(COL)) u_ctrl (
    .clk, .rst_n,
    .rx_valid(r_dn_valid[0]), .rx_ready(r_dn_ready[0]), .rx(r_dn[0]),
    .tx_valid(r_up_valid[0]), .tx_ready(r_up_ready[0]), .tx(r_up[0]),
    .insel, .outsel, .kernel, .cfg, .rst_req,
    .res_valid, .res_ready, .res_data);

  tile_rst_ctrl #(.RST_CYCLES(RST_CYCLES)) u_rst (
    .clk, .rst_n, .req(rst_req), .cu_rst_n, .busy(cu_busy));

  // ---------------- data path ----------------
  logic  [N_CU_IN-1:0] xi_valid, xi_ready, bi_valid, bi_ready;
  logic  [N_CU_IN-1:0][BEAT_W-1:0] xi_data, bi_data;
  logic  [N_CU_IN-1:0] cu_s_valid, cu_s_ready;
  beat_t [N_CU_IN-1:0] cu_s_data;
  logic  [N_CU_OUT-1:0] cu_m_valid, cu_m_ready, bo_valid, bo_ready;
  beat_t [N_CU_OUT-1:0] cu_m_data;
  logic  [N_CU_OUT-1:0][BEAT_W-1:0] bo_data;
  logic  [N_DIR-1:0][BEAT_W-1:0] xo_data;
  logic  [N_DIR-1:0][BEAT_W-1:0] s_flat;

  always_comb for (int d = 0; d < N_DIR; d++) s_flat[d] = s_data[d];

  axis_xbar #(.N_IN(N_DIR), .N_OUT(N_CU_IN), .W(BEAT_W), .SEL_W(3)) u_xin (
    .sel(insel),
    .s_valid(s_valid), .s_ready(s_ready), .s_data(s_flat),
    .m_valid(xi_valid), .m_ready(xi_ready), .m_data(xi_data));

  for (genvar k = 0; k < N_CU_IN; k++) begin : g_ibuf
    axis_fifo #(.W(BEAT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .s_valid(xi_valid[k]), .s_ready(xi_ready[k]), .s_data(xi_data[k]),
      .m_valid(bi_valid[k]), .m_ready(bi_ready[k]), .m_data(bi_data[k]), .level());
    assign cu_s_valid[k] = bi_valid[k] && !cu_busy;
    assign bi_ready[k]   = cu_s_ready[k] && !cu_busy;
    assign cu_s_data[k]  = beat_t'(bi_data[k]);
  end

  compute_unit #(.FIFO_DEPTH(FIFO_DEPTH)) u_cu (
    .clk, .rst_n(cu_rst_n), .kernel, .cfg,
    .s_valid(cu_s_valid), .s_ready(cu_s_ready), .s_data(cu_s_data),
    .m_valid(cu_m_valid), .m_ready(cu_m_ready), .m_data(cu_m_data),
    .r_valid(res_valid), .r_ready(res_ready), .r_data(res_data));

  for (genvar k = 0; k < N_CU_OUT; k++) begin : g_obuf
    logic ov, or_;
    assign ov            = cu_m_valid[k] && !cu_busy;
    assign cu_m_ready[k] = or_ && !cu_busy;
    axis_fifo #(.W(BEAT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .s_valid(ov), .s_ready(or_), .s_data(cu_m_data[k]),
      .m_valid(bo_valid[k]), .m_ready(bo_ready[k]), .m_data(bo_data[k]), .level());
  end

  axis_xbar #(.N_IN(N_CU_OUT), .N_OUT(N_DIR), .W(BEAT_W), .SEL_W(2)) u_xout (
    .sel(outsel),
    .s_valid(bo_valid), .s_ready(bo_ready), .s_data(bo_data),
    .m_valid(m_valid), .m_ready(m_ready), .m_data(xo_data));

  always_comb for (int d = 0; d < N_DIR; d++) m_data[d] = beat_t'(xo_data[d]);
endmodule
