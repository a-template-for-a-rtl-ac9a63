// prim_and: "map and" primitive. Joins two mask streams beat by beat and
// outputs their bitwise AND. keep and last are taken from input 0.
// Both inputs are consumed together; the result is registered, so the
// primitive passes one beat per cycle with one cycle of latency.
module prim_and
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

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_data  <= '0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (take) begin
        m_valid     <= 1'b1;
        m_data.data <= s0_data.data & s1_data.data;
        m_data.keep <= s0_data.keep;
        m_data.last <= s0_data.last;
      end
    end
  end
endmodule
