// prim_mul: "map mul" primitive. Joins two 4-lane streams beat by beat and
// multiplies them lane by lane (signed 32 x 32 bits, the low 32 bits of the
// product are kept). keep is the AND of both keeps, last comes from input 0.
// The product is registered: one beat per cycle, one cycle of latency.
// The product width is this design's choice; the document does not give the
// number format of the query's columns.
module prim_mul
  import overlay_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s0_valid,
  output logic  s0_ready,
  input  beat_t s0_data,
  input  logic  s1_valid,
  output logic  s1_ready,
  input  beat_t s1_data,
  output logic  m_valid,
  input  logic  m_ready,
  output beat_t m_data
);
  wire room = !m_valid || m_ready;
  wire take = s0_valid && s1_valid && room;
  assign s0_ready = s1_valid && room;
  assign s1_ready = s0_valid && room;

  logic [DATA_W-1:0] prod;
  always_comb begin
    prod = '0;
    for (int i = 0; i < LANES; i++)
      prod[i*LANE_W +: LANE_W] = lane_mul(s0_data.data[i*LANE_W +: LANE_W],
                                          s1_data.data[i*LANE_W +: LANE_W]);
  end

  function automatic logic [LANE_W-1:0] lane_mul(logic [LANE_W-1:0] a, logic [LANE_W-1:0] b);
    logic signed [2*LANE_W-1:0] p;
    p = $signed(a) * $signed(b);
    return p[LANE_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_data  <= '0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (take) begin
        m_valid     <= 1'b1;
        m_data.data <= prod;
        m_data.keep <= s0_data.keep & s1_data.keep;
        m_data.last <= s0_data.last;
      end
    end
  end
endmodule
