// axis_fifo: synchronous FIFO with a valid/ready (AXI-stream style) interface
// on both sides. It is the buffer the tile places between its crossbars and
// the compute unit ("registers or FIFOs") and the storage of the FIFO
// primitives. With DEPTH=2 it acts as a full-throughput register slice that
// cuts every combinational path between its two sides.
//
// Interface: s_* is the write side, m_* the read side, W bits of payload.
// Timing: a word written in cycle t is visible at m_data in cycle t+1; one
// word per cycle can pass in each direction. s_ready depends only on the
// fill level, m_valid only on the fill level (no pass-through paths).
// DEPTH must be a power of two (the pointers wrap naturally).
// The handshake assertion uses rst_n as its disable condition, sampled on the
// clock, while the flops use it as an asynchronous reset; lint may report the
// reset net as used both ways. That concerns only the check, not the logic.
module axis_fifo #(
  parameter int W     = 129,
  parameter int DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s_valid,
  output logic         s_ready,
  input  logic [W-1:0] s_data,
  output logic         m_valid,
  input  logic         m_ready,
  output logic [W-1:0] m_data,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  wire do_wr = s_valid && s_ready;
  wire do_rd = m_valid && m_ready;

  assign s_ready = (cnt != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign m_valid = (cnt != '0);
  assign m_data  = mem[rp];
  assign level   = cnt;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= s_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (do_wr) wp <= (DEPTH > 1) ? AW'(wp + 1'b1) : AW'(0);
      if (do_rd) rp <= (DEPTH > 1) ? AW'(rp + 1'b1) : AW'(0);
      cnt <= cnt + ($clog2(DEPTH+1))'(do_wr) - ($clog2(DEPTH+1))'(do_rd);
    end
  end

  initial begin
    assert (DEPTH >= 1 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("axis_fifo: DEPTH must be a power of two");
  end

  // A producer may not withdraw or change a word it has offered.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (s_valid && !s_ready) |=> s_valid;
  endproperty
  a_hold: assert property (p_hold);
endmodule
