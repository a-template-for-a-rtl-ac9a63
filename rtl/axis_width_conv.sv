// axis_width_conv: stream up-/downsizer between the DMA engines' memory side
// (512 bits, the DDR4 controllers' width) and the 128-bit overlay streams.
// Data is made of 32-bit words; keep has one bit per word and marks a
// contiguous run from word 0; last marks the end of a stream.
//
// Downsizing (IN_W > OUT_W): a wide beat is held and sent as IN_W/OUT_W
// narrow beats, word 0 first (little-endian order). Narrow beats that would
// carry no valid word are skipped, so the last valid piece carries last.
// Upsizing (IN_W < OUT_W): narrow beats are packed into a wide beat, the
// first into the low bits; a wide beat leaves when full or at last.
// Equal widths: a register stage.
// Timing: one output beat per cycle while busy; the downsizer takes a new
// wide beat in the cycle its final piece leaves, the upsizer takes one narrow
// beat per cycle. The document shows where the conversion sits (inside the
// interconnect or directly at the DMA); the circuit is this design's.
module axis_width_conv #(
  parameter int IN_W  = 512,
  parameter int OUT_W = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_valid,
  output logic                 s_ready,
  input  logic [IN_W-1:0]      s_data,
  input  logic [IN_W/32-1:0]   s_keep,
  input  logic                 s_last,
  output logic                 m_valid,
  input  logic                 m_ready,
  output logic [OUT_W-1:0]     m_data,
  output logic [OUT_W/32-1:0]  m_keep,
  output logic                 m_last
);
  localparam int IK = IN_W / 32;
  localparam int OK = OUT_W / 32;

  if (IN_W > OUT_W) begin : g_down
    localparam int R  = IN_W / OUT_W;
    localparam int RW = (R > 1) ? $clog2(R) : 1;
    logic          hv;
    logic [IN_W-1:0] hd;
    logic [IK-1:0]   hk;
    logic            hl;
    logic [RW-1:0]   idx;
    logic            fin;

    // the current piece is final if no later piece has a valid word
    always_comb begin
      fin = 1'b1;
      for (int p = 0; p < R; p++)
        if (p > int'(idx) && hk[p*OK +: OK] != '0) fin = 1'b0;
    end

    assign m_valid = hv;
    assign m_data  = hd[idx*OUT_W +: OUT_W];
    assign m_keep  = hk[idx*OK +: OK];
    assign m_last  = hl && fin;
    assign s_ready = !hv || (m_ready && fin);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        hv <= 1'b0; hd <= '0; hk <= '0; hl <= 1'b0; idx <= '0;
      end else begin
        if (hv && m_ready) begin
          if (fin) hv <= 1'b0;
          else     idx <= idx + 1'b1;
        end
        if (s_valid && s_ready) begin
          hv <= 1'b1; hd <= s_data; hk <= s_keep; hl <= s_last; idx <= '0;
        end
      end
    end
  end else if (IN_W < OUT_W) begin : g_up
    localparam int R  = OUT_W / IN_W;
    localparam int RW = $clog2(R);
    logic [OUT_W-1:0] ad;
    logic [OK-1:0]    ak;
    logic [RW-1:0]    idx;

    assign s_ready = !m_valid || m_ready;
    wire take = s_valid && s_ready;
    wire done = s_last || (idx == RW'(R - 1));
    // collected word with the current beat merged in
    logic [OUT_W-1:0] d;
    logic [OK-1:0]    k;
    always_comb begin
      d = ad; k = ak;
      d[idx*IN_W +: IN_W] = s_data;
      k[idx*IK +: IK]     = s_keep;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ad <= '0; ak <= '0; idx <= '0;
        m_valid <= 1'b0; m_data <= '0; m_keep <= '0; m_last <= 1'b0;
      end else begin
        if (m_valid && m_ready) m_valid <= 1'b0;
        if (take) begin
          if (done) begin
            m_valid <= 1'b1; m_data <= d; m_keep <= k; m_last <= s_last;
            ad <= '0; ak <= '0; idx <= '0;
          end else begin
            ad <= d; ak <= k;
            idx <= idx + 1'b1;
          end
        end
      end
    end
  end else begin : g_same
    assign s_ready = !m_valid || m_ready;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        m_valid <= 1'b0; m_data <= '0; m_keep <= '0; m_last <= 1'b0;
      end else begin
        if (m_valid && m_ready) m_valid <= 1'b0;
        if (s_valid && s_ready) begin
          m_valid <= 1'b1; m_data <= s_data; m_keep <= s_keep; m_last <= s_last;
        end
      end
    end
  end
endmodule
