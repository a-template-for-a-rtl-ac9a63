// prim_copy: COPY primitive. Duplicates one stream onto two outputs, for
// example to feed a mask to two filters or a column to a compare and a FIFO.
// Each output has its own register; an input beat is accepted when both
// registers are free or being emptied, so both outputs see every beat in
// order and a slow output only stalls the input. One beat per cycle, one
// cycle of latency.
module prim_copy
  import overlay_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_valid,
  output logic  s_ready,
  input  beat_t s_data,
  output logic  m0_valid,
  input  logic  m0_ready,
  output beat_t m0_data,
  output logic  m1_valid,
  input  logic  m1_ready,
  output beat_t m1_data
);
  assign s_ready = (!m0_valid || m0_ready) && (!m1_valid || m1_ready);
  wire take = s_valid && s_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m0_valid <= 1'b0;
      m1_valid <= 1'b0;
      m0_data  <= '0;
      m1_data  <= '0;
    end else begin
      if (m0_valid && m0_ready) m0_valid <= 1'b0;
      if (m1_valid && m1_ready) m1_valid <= 1'b0;
      if (take) begin
        m0_valid <= 1'b1;
        m1_valid <= 1'b1;
        m0_data  <= s_data;
        m1_data  <= s_data;
      end
    end
  end
endmodule
