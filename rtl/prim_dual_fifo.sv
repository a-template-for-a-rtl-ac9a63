// prim_dual_fifo: "dual FIFO" primitive. Two independent FIFOs, input 0 to
// output 0 and input 1 to output 1. Tiles holding it route streams through
// the grid and delay a column until the mask computed from another column
// catches up (a mask beat needs 128 values). With only channel 0 in use it
// is also the plain FIFO a tile holds when it is not used.
// Timing: one beat per cycle per channel, one cycle of latency; DEPTH beats
// per channel (a power of two; the document gives no depth).
module prim_dual_fifo
  import overlay_pkg::*;
#(
  parameter int DEPTH = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s0_valid,
  output logic  s0_ready,
  input  beat_t s0_data,
  input  logic  s1_valid,
  output logic  s1_ready,
  input  beat_t s1_data,
  output logic  m0_valid,
  input  logic  m0_ready,
  output beat_t m0_data,
  output logic  m1_valid,
  input  logic  m1_ready,
  output beat_t m1_data
);
  logic [BEAT_W-1:0] q0, q1;

  axis_fifo #(.W(BEAT_W), .DEPTH(DEPTH)) u_f0 (
    .clk, .rst_n,
    .s_valid(s0_valid), .s_ready(s0_ready), .s_data(s0_data),
    .m_valid(m0_valid), .m_ready(m0_ready), .m_data(q0), .level());
  axis_fifo #(.W(BEAT_W), .DEPTH(DEPTH)) u_f1 (
    .clk, .rst_n,
    .s_valid(s1_valid), .s_ready(s1_ready), .s_data(s1_data),
    .m_valid(m1_valid), .m_ready(m1_ready), .m_data(q1), .level());

  assign m0_data = beat_t'(q0);
  assign m1_data = beat_t'(q1);
endmodule
