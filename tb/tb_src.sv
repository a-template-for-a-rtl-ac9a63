// tb_src: testbench stream source. Beats pushed into 'q' (by hierarchical
// reference) are offered in order; with STALL > 0 valid is dropped at
// random between beats (about one cycle in STALL+1). Data is held until the
// beat is taken.
module tb_src
  import overlay_pkg::*;
#(
  parameter int STALL = 0
) (
  input  logic  clk,
  output logic  valid,
  input  logic  ready,
  output beat_t data
);
  beat_t q[$];
  int    sent = 0;
  initial begin valid = 0; data = '0; end
  always_ff @(posedge clk) begin
    if (!(valid && !ready)) begin
      if (valid && ready) begin
        void'(q.pop_front());
        sent++;
      end
      // offer the next beat, or pause
      if (q.size() > 0 && (STALL == 0 || ($urandom % (STALL + 1)) != 0)) begin
        valid <= 1'b1;
        data  <= q[0];
      end else begin
        valid <= 1'b0;
      end
    end
  end
endmodule
