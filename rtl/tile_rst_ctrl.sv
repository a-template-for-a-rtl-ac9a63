// tile_rst_ctrl: local reset controller of a tile.
//
// The compute unit of a tile can be exchanged at runtime. Before and after an
// exchange the tile has to put the CU into a defined state without touching
// the rest of the overlay. A reset request (one-cycle pulse from the tile's
// network endpoint) holds the CU's active-low reset for RST_CYCLES cycles;
// the global reset also resets the CU. While the CU is held in reset, busy
// is high (a separate flop with the same
// value, so the reset net only drives resets) and the tile blocks the CU's stream handshakes.
//
// The document only names the block; the pulse length, the request interface
// and the stream blocking are this design's choices.
// Timing: cu_rst_n falls in the cycle after req and rises RST_CYCLES cycles
// later.
module tile_rst_ctrl #(
  parameter int RST_CYCLES = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  output logic cu_rst_n,
  output logic busy
);
  localparam int CW = $clog2(RST_CYCLES + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= CW'(RST_CYCLES);
      cu_rst_n <= 1'b0;
      busy     <= 1'b1;
    end else if (req) begin
      cnt      <= CW'(RST_CYCLES);
      cu_rst_n <= 1'b0;
      busy     <= 1'b1;
    end else if (cnt != '0) begin
      cnt      <= cnt - 1'b1;
      cu_rst_n <= (cnt == CW'(1));
      busy     <= (cnt != CW'(1));
    end else begin
      cu_rst_n <= 1'b1;
      busy     <= 1'b0;
    end
  end

endmodule
