// tb_snk: testbench stream sink. Collects every beat taken after reset into 'q'; with
// STALL > 0 ready is dropped at random (about one cycle in STALL+1).
module tb_snk
  import overlay_pkg::*;
#(
  parameter int STALL = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid,
  output logic  ready,
  input  beat_t data
);
  beat_t q[$];
  int    stalls = 0;
  initial ready = 1'b1;
  always_ff @(posedge clk) begin
    if (rst_n && valid && ready) q.push_back(data);
    if (rst_n && valid && !ready) stalls++;
    ready <= (STALL == 0) || (($urandom % (STALL + 1)) != 0);
  end
endmodule
