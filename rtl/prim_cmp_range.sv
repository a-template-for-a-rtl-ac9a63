// prim_cmp_range: "map cmp" primitive. Compares every value of a 4-lane
// stream of signed 32-bit integers with a range and packs the outcomes into a
// bit-mask stream (n values in, n/128 mask beats out).
//
// A value x passes when  lo <= x < hi,  or  lo <= x <= hi  when hi_incl is
// set; this covers the three predicates of TPC-H Q6 (date range, discount
// between, quantity less than). Bit i of a mask beat belongs to the i-th
// value since the previous mask beat. A mask beat is sent when 128 bits are
// collected or the input beat has last=1; its keep marks the 32-bit words that
// hold valid bits and its last copies the input's last.
// Input beats are expected full (keep=1111) except the last of a stream.
// Timing: one input beat per cycle; the mask beat is registered and leaves the
// cycle after the input beat that completes it. The document gives the
// primitive's role in the query graph; the mask packing is inferred from the
// n/w stream rates printed in the query graph, the rest is this design's.
module prim_cmp_range
  import overlay_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] lo,
  input  logic [31:0] hi,
  input  logic        hi_incl,
  input  logic        s_valid,
  output logic        s_ready,
  input  beat_t       s_data,
  output logic        m_valid,
  input  logic        m_ready,
  output beat_t       m_data
);
  localparam int PW = $clog2(MASK_BITS + 1);
  logic [MASK_BITS-1:0] acc, nacc;
  logic [PW-1:0]        pos, npos;

  assign s_ready = !m_valid || m_ready;
  wire take = s_valid && s_ready;

  always_comb begin
    nacc = acc;
    npos = pos;
    for (int i = 0; i < LANES; i++) begin
      logic signed [31:0] x;
      logic ok;
      x  = s_data.data[i*LANE_W +: LANE_W];
      ok = (x >= $signed(lo)) && (hi_incl ? (x <= $signed(hi)) : (x < $signed(hi)));
      if (s_data.keep[i]) begin
        nacc[npos[PW-2:0]] = ok;
        npos = npos + 1'b1;
      end
    end
  end

  wire emit = take && (s_data.last || npos == PW'(MASK_BITS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      pos     <= '0;
      m_valid <= 1'b0;
      m_data  <= '0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (take) begin
        if (emit) begin
          acc          <= '0;
          pos          <= '0;
          m_valid      <= 1'b1;
          m_data.data  <= nacc;
          m_data.last  <= s_data.last;
          for (int j = 0; j < LANES; j++)
            m_data.keep[j] <= (npos > PW'(j * LANE_W));
        end else begin
          acc <= nacc;
          pos <= npos;
        end
      end
    end
  end
endmodule
