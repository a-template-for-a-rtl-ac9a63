// prim_add_reduce: "red. add" primitive. Adds all valid lanes of a stream of
// signed 32-bit values into a 64-bit sum. With the beat that has last=1 the
// sum is handed to the result port (sent to the host over the command/status
// network by the tile) and the accumulator restarts at zero. A stream of
// only keep=0 beats gives the result 0.
// Timing: one beat per cycle; the result is valid the cycle after the last
// beat, and no input is taken while a result waits. The 64-bit result width
// is this design's choice.
module prim_add_reduce
  import overlay_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_valid,
  output logic        s_ready,
  input  beat_t       s_data,
  output logic        r_valid,
  input  logic        r_ready,
  output logic [63:0] r_data
);
  logic signed [63:0] acc, sum;

  assign s_ready = !r_valid;

  always_comb begin
    sum = acc;
    for (int i = 0; i < LANES; i++)
      if (s_data.keep[i]) sum = sum + 64'($signed(s_data.data[i*LANE_W +: LANE_W]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      r_valid <= 1'b0;
      r_data  <= '0;
    end else begin
      if (r_valid && r_ready) r_valid <= 1'b0;
      if (s_valid && s_ready) begin
        if (s_data.last) begin
          r_valid <= 1'b1;
          r_data  <= sum;
          acc     <= '0;
        end else begin
          acc <= sum;
        end
      end
    end
  end
endmodule
