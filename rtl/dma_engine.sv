// dma_engine: DMA engine that feeds a column of data from external memory
// into the overlay as a 128-bit stream, and writes a stream coming out of the
// overlay back to memory. It stands in for one of the eleven AXI DataMover
// cores of the prototype, including the FIFO and the width conversion that
// the memory-subsystem evaluation places directly at the DMA.
//
// Control: a network endpoint (local port of a DMA router). CMD_WRITE packets
// set RADDR, RLEN (in 128-bit stream beats), WADDR and CTRL; writing CTRL
// bit 0 starts a read (memory to stream), bit 1 arms a write (stream to
// memory). At the end of each transfer a CMD_STATUS packet goes to the host:
// regn 0 for a finished read, regn 1 for a finished write, payload = number of
// stream beats. Unknown commands or registers are answered with CMD_ERROR.
//
// Read: bursts of up to BURST memory beats (MEM_W bits) are requested only
// while the receive FIFO has room for them, so memory never waits on the
// overlay. The FIFO feeds a downsizer to 128 bits; exactly RLEN beats leave,
// the last with last=1, and padding from the final memory beat is dropped.
// Write: stream beats are packed into MEM_W-bit words; each word is written
// with its own single-beat request (aw_len = 0) and byte strobes from keep.
// The transfer ends with the stream beat that has last=1 once every write
// response is back.
// Memory port: a reduced AXI4 (AR/R, AW/W/B with addr, len, data, strb, last;
// no id, size, burst or resp). Bursts must not cross what the memory
// supports; addresses are byte addresses.
module dma_engine
  import overlay_pkg::*;
#(
  parameter int IDX     = 0,
  parameter int MEM_W   = 512,
  parameter int BURST   = 16,
  parameter int FIFO_D  = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  // network endpoint
  input  logic               rx_valid,
  output logic               rx_ready,
  input  flit_t              rx,
  output logic               tx_valid,
  input  logic               tx_ready,
  output flit_t              tx,
  // memory read
  output logic               ar_valid,
  input  logic               ar_ready,
  output logic [31:0]        ar_addr,
  output logic [7:0]         ar_len,
  input  logic               r_valid,
  output logic               r_ready,
  input  logic [MEM_W-1:0]   r_data,
  input  logic               r_last,
  // memory write
  output logic               aw_valid,
  input  logic               aw_ready,
  output logic [31:0]        aw_addr,
  output logic [7:0]         aw_len,
  output logic               w_valid,
  input  logic               w_ready,
  output logic [MEM_W-1:0]   w_data,
  output logic [MEM_W/8-1:0] w_strb,
  output logic               w_last,
  input  logic               b_valid,
  output logic               b_ready,
  // stream to the overlay
  output logic               m_valid,
  input  logic               m_ready,
  output beat_t              m_data,
  // stream from the overlay
  input  logic               s_valid,
  output logic               s_ready,
  input  beat_t              s_data
);
  localparam int R   = MEM_W / DATA_W;     // stream beats per memory beat
  localparam int MB  = MEM_W / 8;          // bytes per memory beat
  localparam int MK  = MEM_W / 32;
  localparam int LW  = $clog2(FIFO_D + 1);

  node_addr_t me;
  typedef enum logic [1:0] {T_IDLE, T_HDR, T_W0} t_st_e;
  t_st_e      t_st;
  logic [1:0] tx_kind;
  logic       tx_fire_done;
  logic       rd_done_ev;
  logic       s_in_ready;
  assign me = dma_addr(IDX);

  // ---------------- registers and packet decode ----------------
  logic [31:0] raddr, rlen, waddr;
  logic        in_pay, have_w;
  noc_hdr_t    hdr_q, hdr_cur;
  logic [31:0] w_q, w_cur;
  logic        start_rd, start_wr;
  logic        rd_busy, wr_busy;

  // answers: error (from decode) and completion messages
  logic        err_v;
  noc_hdr_t    err_h;
  logic [31:0] err_w;
  logic        rdone_v, wdone_v;
  logic [31:0] rdone_w, wdone_w;

  assign hdr_cur = in_pay ? hdr_q : noc_hdr_t'(rx.data);
  assign w_cur   = (in_pay && !have_w) ? rx.data : w_q;
  assign rx_ready = !(rx.last && err_v);

  function automatic noc_hdr_t mk_hdr(node_addr_t dst, node_addr_t src, cmd_e c,
                                      logic [7:0] r);
    noc_hdr_t h;
    h.dst = dst; h.src = src; h.cmd = c; h.regn = r;
    return h;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pay <= 1'b0; have_w <= 1'b0; hdr_q <= '0; w_q <= '0;
      raddr <= '0; rlen <= '0; waddr <= '0;
      start_rd <= 1'b0; start_wr <= 1'b0;
      err_v <= 1'b0; err_h <= '0; err_w <= '0;
    end else begin
      start_rd <= 1'b0;
      start_wr <= 1'b0;
      if (rx_valid && rx_ready) begin
        if (!in_pay) begin
          hdr_q <= noc_hdr_t'(rx.data); have_w <= 1'b0;
        end else if (!have_w) begin
          w_q <= rx.data; have_w <= 1'b1;
        end
        in_pay <= !rx.last;
        if (rx.last) begin
          if (hdr_cur.cmd != CMD_WRITE) begin
            err_v <= 1'b1; err_w <= ERR_BAD_CMD;
            err_h <= mk_hdr(hdr_cur.src, me, CMD_ERROR, hdr_cur.regn);
          end else if (!in_pay) begin
            err_v <= 1'b1; err_w <= ERR_SHORT;
            err_h <= mk_hdr(hdr_cur.src, me, CMD_ERROR, hdr_cur.regn);
          end else begin
            unique case (hdr_cur.regn)
              DREG_RADDR: raddr <= w_cur;
              DREG_RLEN:  rlen  <= w_cur;
              DREG_WADDR: waddr <= w_cur;
              DREG_CTRL: begin
                start_rd <= w_cur[0] && !rd_busy;
                start_wr <= w_cur[1] && !wr_busy;
              end
              default: begin
                err_v <= 1'b1; err_w <= ERR_BAD_REG;
                err_h <= mk_hdr(hdr_cur.src, me, CMD_ERROR, hdr_cur.regn);
              end
            endcase
          end
        end
      end
      if (tx_fire_done && tx_kind == 2'd0) err_v <= 1'b0;
    end
  end

  // ---------------- read: memory to stream ----------------
  logic [31:0] rd_beats_left;   // memory beats still to request
  logic [31:0] rd_addr;
  logic [LW-1:0] credit;        // FIFO entries not yet promised to a burst
  logic [LW-1:0] fifo_level;
  logic [31:0] out_cnt;
  logic        f_valid, f_ready;
  logic [MEM_W:0] f_data;
  logic        c_valid, c_ready, c_last;
  logic [DATA_W-1:0] c_data;
  logic [LANES-1:0]  c_keep;
  logic [7:0]  burst_n;

  assign burst_n  = (rd_beats_left > 32'(BURST)) ? 8'(BURST) : rd_beats_left[7:0];
  assign ar_valid = rd_busy && rd_beats_left != 0 && int'(credit) >= int'(burst_n);
  assign ar_addr  = rd_addr;
  assign ar_len   = burst_n - 8'd1;

  wire ar_fire = ar_valid && ar_ready;
  wire r_fire  = r_valid && r_ready;
  wire f_fire  = f_valid && f_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy <= 1'b0; rd_beats_left <= '0; rd_addr <= '0;
      credit <= LW'(FIFO_D);
    end else begin
      if (start_rd) begin
        rd_busy       <= (rlen != 0);
        rd_beats_left <= (rlen + 32'(R) - 1) / 32'(R);
        rd_addr       <= raddr;
      end
      if (ar_fire) begin
        rd_beats_left <= rd_beats_left - 32'(burst_n);
        rd_addr       <= rd_addr + 32'(burst_n) * 32'(MB);
      end
      credit <= credit - (ar_fire ? LW'(burst_n) : '0) + (f_fire ? LW'(1) : '0);
      if (rd_done_ev) rd_busy <= 1'b0;
    end
  end

  // memory last beat of the whole transfer marks the stream end for the
  // downsizer; r_last (end of a burst) is not needed beyond that
  logic [31:0] rbeats_rcvd, rbeats_total;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbeats_rcvd <= '0; rbeats_total <= '0;
    end else begin
      if (start_rd) begin
        rbeats_rcvd  <= '0;
        rbeats_total <= (rlen + 32'(R) - 1) / 32'(R);
      end else if (r_fire) begin
        rbeats_rcvd <= rbeats_rcvd + 1'b1;
      end
    end
  end
  logic unused_rlast;
  assign unused_rlast = r_last;

  axis_fifo #(.W(MEM_W + 1), .DEPTH(FIFO_D)) u_rfifo (
    .clk, .rst_n,
    .s_valid(r_valid), .s_ready(r_ready),
    .s_data({rbeats_rcvd == rbeats_total - 1, r_data}),
    .m_valid(f_valid), .m_ready(f_ready), .m_data(f_data), .level(fifo_level));

  axis_width_conv #(.IN_W(MEM_W), .OUT_W(DATA_W)) u_down (
    .clk, .rst_n,
    .s_valid(f_valid), .s_ready(f_ready), .s_data(f_data[MEM_W-1:0]),
    .s_keep({MK{1'b1}}), .s_last(f_data[MEM_W]),
    .m_valid(c_valid), .m_ready(c_ready), .m_data(c_data), .m_keep(c_keep),
    .m_last(c_last));

  wire pass = out_cnt < rlen;
  assign m_valid     = c_valid && pass;
  assign m_data.data = c_data;
  assign m_data.keep = c_keep;
  assign m_data.last = (out_cnt == rlen - 1);
  assign c_ready     = pass ? m_ready : 1'b1;
  assign rd_done_ev  = c_valid && c_ready && c_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_cnt <= '0;
      rdone_v <= 1'b0; rdone_w <= '0;
    end else begin
      if (start_rd) out_cnt <= '0;
      else if (c_valid && c_ready && pass) out_cnt <= out_cnt + 1'b1;
      if (rd_done_ev) begin
        rdone_v <= 1'b1; rdone_w <= rlen;
      end else if (tx_fire_done && tx_kind == 2'd1) begin
        rdone_v <= 1'b0;
      end
    end
  end

  // ---------------- write: stream to memory ----------------
  logic              u_valid, u_ready, u_last;
  logic [MEM_W-1:0]  u_data;
  logic [MK-1:0]     u_keep;
  logic              aw_done, w_done, seen_last;
  logic [31:0]       wr_addr, s_cnt, b_pending;

  assign s_ready = wr_busy && !seen_last && s_in_ready;

  axis_width_conv #(.IN_W(DATA_W), .OUT_W(MEM_W)) u_up (
    .clk, .rst_n,
    .s_valid(s_valid && wr_busy && !seen_last), .s_ready(s_in_ready),
    .s_data(s_data.data), .s_keep(s_data.keep), .s_last(s_data.last),
    .m_valid(u_valid), .m_ready(u_ready), .m_data(u_data), .m_keep(u_keep),
    .m_last(u_last));

  assign aw_valid = u_valid && !aw_done;
  assign aw_addr  = wr_addr;
  assign aw_len   = 8'd0;
  assign w_valid  = u_valid && !w_done;
  assign w_data   = u_data;
  assign w_last   = 1'b1;
  always_comb for (int k = 0; k < MK; k++) w_strb[k*4 +: 4] = {4{u_keep[k]}};
  wire aw_ok = aw_done || (aw_valid && aw_ready);
  wire w_ok  = w_done  || (w_valid && w_ready);
  assign u_ready = aw_ok && w_ok;
  assign b_ready = 1'b1;
  logic unused_u_last;
  assign unused_u_last = u_last;

  wire s_fire = s_valid && s_ready;
  wire u_fire = u_valid && u_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_busy <= 1'b0; aw_done <= 1'b0; w_done <= 1'b0; seen_last <= 1'b0;
      wr_addr <= '0; s_cnt <= '0; b_pending <= '0;
      wdone_v <= 1'b0; wdone_w <= '0;
    end else begin
      if (start_wr) begin
        wr_busy <= 1'b1; seen_last <= 1'b0; wr_addr <= waddr; s_cnt <= '0;
      end
      if (s_fire) begin
        s_cnt <= s_cnt + 1'b1;
        if (s_data.last) seen_last <= 1'b1;
      end
      if (u_fire) begin
        aw_done <= 1'b0; w_done <= 1'b0;
        wr_addr <= wr_addr + 32'(MB);
      end else begin
        if (aw_valid && aw_ready) aw_done <= 1'b1;
        if (w_valid && w_ready)   w_done  <= 1'b1;
      end
      b_pending <= b_pending + (u_fire ? 32'd1 : 32'd0) - (b_valid ? 32'd1 : 32'd0);
      if (wr_busy && seen_last && !u_valid && b_pending == 0 && !u_fire && !wdone_v) begin
        wr_busy <= 1'b0;
        wdone_v <= 1'b1; wdone_w <= s_cnt;
      end else if (tx_fire_done && tx_kind == 2'd2) begin
        wdone_v <= 1'b0;
      end
    end
  end

  // ---------------- messages to the host ----------------
  // tx_kind: 0 error answer, 1 read done, 2 write done

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_st <= T_IDLE; tx_kind <= 2'd0;
    end else begin
      unique case (t_st)
        T_IDLE: if (err_v)        begin t_st <= T_HDR; tx_kind <= 2'd0; end
                else if (rdone_v) begin t_st <= T_HDR; tx_kind <= 2'd1; end
                else if (wdone_v) begin t_st <= T_HDR; tx_kind <= 2'd2; end
        T_HDR:  if (tx_ready) t_st <= T_W0;
        T_W0:   if (tx_ready) t_st <= T_IDLE;
        default: t_st <= T_IDLE;
      endcase
    end
  end

  assign tx_fire_done = (t_st == T_W0) && tx_ready;

  always_comb begin
    tx_valid = (t_st != T_IDLE);
    tx       = '0;
    if (t_st == T_HDR) begin
      unique case (tx_kind)
        2'd0:    tx.data = 32'(err_h);
        2'd1:    tx.data = 32'(mk_hdr(host_addr(), me, CMD_STATUS, 8'd0));
        default: tx.data = 32'(mk_hdr(host_addr(), me, CMD_STATUS, 8'd1));
      endcase
    end else if (t_st == T_W0) begin
      tx.last = 1'b1;
      unique case (tx_kind)
        2'd0:    tx.data = err_w;
        2'd1:    tx.data = rdone_w;
        default: tx.data = wdone_w;
      endcase
    end
  end

  logic [LW-1:0] unused_level;
  assign unused_level = fifo_level;
endmodule
