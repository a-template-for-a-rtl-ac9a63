// prim_filter: filter / materialise primitive. Input 0 is a 4-lane data
// stream, input 1 the matching bit-mask stream (128 selection bits per mask
// beat, see prim_cmp_range). The values whose bit is set are packed densely
// into output beats of four; the final beat of a stream carries the
// remainder (keep marks its valid lanes, possibly none) and last=1.
//
// Up to three selected values wait in a small buffer until four are
// collected. A mask beat is released after 128 data values or with the data
// beat that has last=1. When the last data beat leaves more than four values,
// a second, final beat follows in the next cycle and input is held for that
// cycle. Otherwise one data beat is taken per cycle; output beats are
// registered (one cycle of latency). Data beats are expected full except the
// last. The packing and timing are this design's; the document gives the
// primitive's place in the query graph (n values in, n x p_sigma out).
module prim_filter
  import overlay_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s0_valid,   // data
  output logic  s0_ready,
  input  beat_t s0_data,
  input  logic  s1_valid,   // mask
  output logic  s1_ready,
  input  beat_t s1_data,
  output logic  m_valid,
  input  logic  m_ready,
  output beat_t m_data
);
  localparam int PW = $clog2(MASK_BITS + 1);

  logic [LANES-1:0][LANE_W-1:0] buf_q;
  logic [1:0]                   bcnt;
  logic                         flush;
  logic [PW-1:0]                mpos;

  wire room = !m_valid || m_ready;
  wire take = s0_valid && s1_valid && room && !flush;
  assign s0_ready = s1_valid && room && !flush;

  // merge waiting values with the newly selected ones
  logic [2*LANES-1:0][LANE_W-1:0] merged;
  logic [3:0]                     total;
  logic [PW-1:0]                  npos;
  always_comb begin
    merged = '0;
    for (int i = 0; i < LANES; i++)
      if (i < int'(bcnt)) merged[i] = buf_q[i];
    total = 4'(bcnt);
    npos  = mpos;
    for (int i = 0; i < LANES; i++) begin
      if (s0_data.keep[i]) begin
        if (s1_data.data[npos[PW-2:0]]) begin
          merged[total[2:0]] = s0_data.data[i*LANE_W +: LANE_W];
          total = total + 1'b1;
        end
        npos = npos + 1'b1;
      end
    end
  end

  wire mask_done = s0_data.last || (npos == PW'(MASK_BITS));
  assign s1_ready = take && mask_done;

  function automatic logic [LANES-1:0] keep_of(logic [3:0] n);
    logic [LANES-1:0] k;
    for (int j = 0; j < LANES; j++) k[j] = (j < int'(n));
    return k;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q   <= '0;
      bcnt    <= '0;
      flush   <= 1'b0;
      mpos    <= '0;
      m_valid <= 1'b0;
      m_data  <= '0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (flush && room) begin
        m_valid     <= 1'b1;
        m_data.data <= buf_q;
        m_data.keep <= keep_of(4'(bcnt));
        m_data.last <= 1'b1;
        bcnt        <= '0;
        flush       <= 1'b0;
      end else if (take) begin
        mpos <= mask_done ? '0 : npos;
        if (total >= 4'd4) begin
          m_valid     <= 1'b1;
          m_data.data <= merged[LANES-1:0];
          m_data.keep <= '1;
          m_data.last <= s0_data.last && (total == 4'd4);
          for (int i = 0; i < LANES - 1; i++) buf_q[i] <= merged[LANES + i];
          bcnt  <= 2'(total - 4'd4);
          flush <= s0_data.last && (total > 4'd4);
        end else if (s0_data.last) begin
          m_valid     <= 1'b1;
          m_data.data <= merged[LANES-1:0];
          m_data.keep <= keep_of(total);
          m_data.last <= 1'b1;
          bcnt        <= '0;
        end else begin
          buf_q <= merged[LANES-1:0];
          bcnt  <= 2'(total);
        end
      end
    end
  end
endmodule
