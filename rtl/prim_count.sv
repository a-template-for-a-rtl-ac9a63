// prim_count: count primitive, the smallest primitive of the database
// prototype. Counts the valid values (keep lanes) of a stream. With the beat
// that has last=1 the 64-bit count goes to the result port and the counter
// restarts; no input is taken while a result waits.
// Timing: one beat per cycle, result one cycle after the last beat.
module prim_count
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
  logic [63:0] cnt, ncnt;

  assign s_ready = !r_valid;
  assign ncnt = cnt + 64'($countones(s_data.keep));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      r_valid <= 1'b0;
      r_data  <= '0;
    end else begin
      if (r_valid && r_ready) r_valid <= 1'b0;
      if (s_valid && s_ready) begin
        if (s_data.last) begin
          r_valid <= 1'b1;
          r_data  <= ncnt;
          cnt     <= '0;
        end else begin
          cnt <= ncnt;
        end
      end
    end
  end
endmodule
