// tile_ctrl: network endpoint of a tile.
//
// Receives configuration packets from the tile's router and holds the tile's
// runtime state: the source select of each CU input (input crossbar), the
// source select of each output direction (output crossbar), the kernel held
// by the compute unit and four 32-bit CU configuration words. It also starts
// the local reset controller and sends results of the CU, read answers and
// error codes back to the host.
//
// Packet handling (formats in overlay_pkg):
//   CMD_WRITE  hdr + 1 word : write register 'regn'
//   CMD_READ   hdr + 1 word : answered by CMD_STATUS hdr + 1 word
//   CMD_RESET  hdr [+ words]: one-cycle rst_req to the reset controller
//   CMD_RESULT (sent)       : hdr + low word + high word of res_data
//   CMD_ERROR  (sent)       : hdr + error code; for an unknown command,
//                             an unknown register or a missing payload word
// Answers go to the packet's source; results go to the host. Words after the
// first payload word are ignored. One answer can wait at a time; a command
// that needs an answer while one is waiting is held at its last flit.
// The register map and the codes are this design's; the document states only
// that the network configures tiles and CUs and carries error codes and
// small results.
module tile_ctrl
  import overlay_pkg::*;
#(
  parameter int ROW = 0,
  parameter int COL = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  // from the router
  input  logic  rx_valid,
  output logic  rx_ready,
  input  flit_t rx,
  // to the router
  output logic  tx_valid,
  input  logic  tx_ready,
  output flit_t tx,
  // tile configuration
  output logic [N_CU_IN-1:0][2:0] insel,
  output logic [N_DIR-1:0][1:0]   outsel,
  output kernel_e                 kernel,
  output logic [N_CFG-1:0][31:0]  cfg,
  output logic                    rst_req,
  // result of the compute unit
  input  logic        res_valid,
  output logic        res_ready,
  input  logic [63:0] res_data
);
  typedef enum logic [1:0] {TX_IDLE, TX_HDR, TX_W0, TX_W1} tx_st_e;
  tx_st_e   tx_st;
  logic     tx_is_res;
  logic     tx_go_ans;

  // ---------------- receive ----------------
  logic     in_pay;      // header seen, waiting for payload/last
  noc_hdr_t hdr_q;
  logic     have_w;
  logic [31:0] w_q;

  // answer waiting to be sent
  logic        ans_valid;
  noc_hdr_t    ans_hdr;
  logic [31:0] ans_word;

  // result waiting to be sent
  logic        rs_valid;
  logic [63:0] rs_data;

  noc_hdr_t hdr_cur;
  logic [31:0] w_cur;
  assign hdr_cur  = in_pay ? hdr_q : noc_hdr_t'(rx.data);
  assign w_cur    = (in_pay && !have_w) ? rx.data : w_q;

  // the last flit of a packet that may need an answer waits for a free slot
  assign rx_ready = !(rx.last && ans_valid);

  node_addr_t me;
  assign me = tile_addr(ROW, COL);

  function automatic logic reg_ok(logic [7:0] r);
    return (r < 8'h09) || (r >= REG_CFG && r < REG_CFG + 8'(N_CFG));
  endfunction

  function automatic noc_hdr_t mk_hdr(node_addr_t dst, node_addr_t src, cmd_e c,
                                      logic [7:0] r);
    noc_hdr_t h;
    h.dst = dst; h.src = src; h.cmd = c; h.regn = r;
    return h;
  endfunction

  logic [31:0] rd_val;
  always_comb begin
    rd_val = '0;
    if (hdr_cur.regn < 8'h04)       rd_val = 32'(insel[hdr_cur.regn[1:0]]);
    else if (hdr_cur.regn < 8'h08)  rd_val = 32'(outsel[hdr_cur.regn[1:0]]);
    else if (hdr_cur.regn == 8'h08) rd_val = 32'(kernel);
    else                            rd_val = cfg[hdr_cur.regn[1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pay    <= 1'b0;
      hdr_q     <= '0;
      have_w    <= 1'b0;
      w_q       <= '0;
      insel     <= {N_CU_IN{3'd4}};
      outsel    <= {N_DIR{2'd2}};
      kernel    <= KRN_FIFO;
      cfg       <= '0;
      rst_req   <= 1'b0;
      ans_valid <= 1'b0;
      ans_hdr   <= '0;
      ans_word  <= '0;
    end else begin
      rst_req <= 1'b0;
      if (rx_valid && rx_ready) begin
        if (!in_pay) begin
          hdr_q  <= noc_hdr_t'(rx.data);
          have_w <= 1'b0;
        end else if (!have_w) begin
          w_q    <= rx.data;
          have_w <= 1'b1;
        end
        in_pay <= !rx.last;
        if (rx.last) begin
          // execute the packet
          unique case (hdr_cur.cmd)
            CMD_WRITE: begin
              if (!in_pay) begin
                ans_valid <= 1'b1;
                ans_hdr   <= mk_hdr(hdr_cur.src, me, CMD_ERROR, hdr_cur.regn);
                ans_word  <= ERR_SHORT;
              end else if (!reg_ok(hdr_cur.regn)) begin
                ans_valid <= 1'b1;
                ans_hdr   <= mk_hdr(hdr_cur.src, me, CMD_ERROR, hdr_cur.regn);
                ans_word  <= ERR_BAD_REG;
              end else if (hdr_cur.regn < 8'h04) begin
                insel[hdr_cur.regn[1:0]] <= w_cur[2:0];
              end else if (hdr_cur.regn < 8'h08) begin
                outsel[hdr_cur.regn[1:0]] <= w_cur[1:0];
              end else if (hdr_cur.regn == 8'h08) begin
                kernel <= kernel_e'(w_cur[3:0]);
              end else begin
                cfg[hdr_cur.regn[1:0]] <= w_cur;
              end
            end
            CMD_READ: begin
              ans_valid <= 1'b1;
              if (!reg_ok(hdr_cur.regn)) begin
                ans_hdr  <= mk_hdr(hdr_cur.src, me, CMD_ERROR, hdr_cur.regn);
                ans_word <= ERR_BAD_REG;
              end else begin
                ans_hdr  <= mk_hdr(hdr_cur.src, me, CMD_STATUS, hdr_cur.regn);
                ans_word <= rd_val;
              end
            end
            CMD_RESET: rst_req <= 1'b1;
            default: begin
              ans_valid <= 1'b1;
              ans_hdr   <= mk_hdr(hdr_cur.src, me, CMD_ERROR, hdr_cur.regn);
              ans_word  <= ERR_BAD_CMD;
            end
          endcase
        end
      end
      if (tx_go_ans) ans_valid <= 1'b0;
    end
  end

  // ---------------- transmit ----------------

  assign res_ready = !rs_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs_valid <= 1'b0;
      rs_data  <= '0;
    end else begin
      if (res_valid && res_ready) begin
        rs_valid <= 1'b1;
        rs_data  <= res_data;
      end else if (tx_st == TX_W1 && tx_ready) begin
        rs_valid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_st     <= TX_IDLE;
      tx_is_res <= 1'b0;
    end else begin
      unique case (tx_st)
        TX_IDLE: if (ans_valid) begin
                   tx_st <= TX_HDR; tx_is_res <= 1'b0;
                 end else if (rs_valid) begin
                   tx_st <= TX_HDR; tx_is_res <= 1'b1;
                 end
        TX_HDR:  if (tx_ready) tx_st <= TX_W0;
        TX_W0:   if (tx_ready) tx_st <= tx_is_res ? TX_W1 : TX_IDLE;
        TX_W1:   if (tx_ready) tx_st <= TX_IDLE;
        default: tx_st <= TX_IDLE;
      endcase
    end
  end

  assign tx_go_ans = (tx_st == TX_W0) && !tx_is_res && tx_ready;

  always_comb begin
    tx_valid = (tx_st != TX_IDLE);
    tx       = '0;
    unique case (tx_st)
      TX_HDR: tx.data = tx_is_res ? 32'(mk_hdr(host_addr(), me, CMD_RESULT, 8'h00))
                                  : 32'(ans_hdr);
      TX_W0:  begin
                tx.data = tx_is_res ? rs_data[31:0] : ans_word;
                tx.last = !tx_is_res;
              end
      TX_W1:  begin
                tx.data = rs_data[63:32];
                tx.last = 1'b1;
              end
      default: ;
    endcase
  end
endmodule
