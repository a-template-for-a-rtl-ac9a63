// axis_xbar: runtime-configured stream crossbar of a tile.
//
// Each output d forwards the input selected by sel[d]; a select value of
// N_IN or above leaves the output idle. The crossbar is purely
// combinational; the tile puts buffers after the input crossbar and before
// the output crossbar to cut the timing paths.
//
// The document only says that the crossbars let streams be routed freely and
// are set at runtime over the network. This design does not broadcast: when
// several outputs select the same input, only the lowest-numbered of them is
// connected, the others stay idle. Stream duplication is the job of the COPY
// primitive. An input nobody selects sees ready=0.
module axis_xbar #(
  parameter int N_IN  = 4,
  parameter int N_OUT = 4,
  parameter int W     = 129,
  parameter int SEL_W = $clog2(N_IN + 1)
) (
  input  logic [N_OUT-1:0][SEL_W-1:0] sel,
  input  logic [N_IN-1:0]             s_valid,
  output logic [N_IN-1:0]             s_ready,
  input  logic [N_IN-1:0][W-1:0]      s_data,
  output logic [N_OUT-1:0]            m_valid,
  input  logic [N_OUT-1:0]            m_ready,
  output logic [N_OUT-1:0][W-1:0]     m_data
);
  // owner[d]: output d is the first output that selects its input.
  logic [N_OUT-1:0] owner;

  always_comb begin
    for (int d = 0; d < N_OUT; d++) begin
      owner[d] = (int'(sel[d]) < N_IN);
      for (int e = 0; e < d; e++)
        if (sel[e] == sel[d]) owner[d] = 1'b0;
    end
  end

  always_comb begin
    s_ready = '0;
    for (int d = 0; d < N_OUT; d++) begin
      m_valid[d] = 1'b0;
      m_data[d]  = '0;
      for (int i = 0; i < N_IN; i++) begin
        if (owner[d] && int'(sel[d]) == i) begin
          m_valid[d] = s_valid[i];
          m_data[d]  = s_data[i];
          s_ready[i] = m_ready[d];
        end
      end
    end
  end
endmodule
