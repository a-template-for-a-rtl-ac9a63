// compute_unit: the compute unit (CU) that sits in a tile's reconfigurable
// partition. It has four stream inputs and two stream outputs (the 4:2 tile
// configuration of the database prototype) and a result port whose 64-bit
// values the tile sends to the host over the command/status network.
//
// In the overlay the CU is exchanged at runtime by partial reconfiguration.
// This RTL stands in for that with a static CU that contains the primitive
// library of the database prototype's Q6 graph and runs the one named by
// 'kernel': FIFO, dual FIFO, COPY, cmp range, and, filter, mul, add reduce
// and count. Changing 'kernel' (followed by a CU reset) takes the place of
// loading a new partial bitstream. Port use per kernel:
//   FIFO       in0 -> out0            DUAL_FIFO  in0 -> out0, in1 -> out1
//   COPY       in0 -> out0, out1      CMP_RANGE  in0 -> out0 (mask)
//   AND        in0 & in1 -> out0      FILTER     in0 data, in1 mask -> out0
//   MUL        in0 * in1 -> out0      ADD_RED    in0 -> result
//   COUNT      in0 -> result
// Inputs 2 and 3 are not used by these primitives and see ready=0.
// cfg[0] is the lower and cfg[1] the upper bound of cmp range, cfg[2] bit 0
// makes the upper bound inclusive. Unselected primitives see no valid input.
module compute_unit
  import overlay_pkg::*;
#(
  parameter int FIFO_DEPTH = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,     // CU reset (local reset controller)
  input  kernel_e                     kernel,
  input  logic [N_CFG-1:0][31:0]      cfg,
  input  logic [N_CU_IN-1:0]          s_valid,
  output logic [N_CU_IN-1:0]          s_ready,
  input  beat_t [N_CU_IN-1:0]         s_data,
  output logic [N_CU_OUT-1:0]         m_valid,
  input  logic [N_CU_OUT-1:0]         m_ready,
  output beat_t [N_CU_OUT-1:0]        m_data,
  output logic                        r_valid,
  input  logic                        r_ready,
  output logic [63:0]                 r_data
);
  // per-primitive handshakes
  logic f_s0v, f_s0r, f_s1v, f_s1r, f_m0v, f_m0r, f_m1v, f_m1r;
  beat_t f_m0d, f_m1d;
  logic c_sv, c_sr, c_m0v, c_m0r, c_m1v, c_m1r;
  beat_t c_m0d, c_m1d;
  logic p_sv, p_sr, p_mv, p_mr;
  beat_t p_md;
  logic a_s0v, a_s0r, a_s1v, a_s1r, a_mv, a_mr;
  beat_t a_md;
  logic l_s0v, l_s0r, l_s1v, l_s1r, l_mv, l_mr;
  beat_t l_md;
  logic x_s0v, x_s0r, x_s1v, x_s1r, x_mv, x_mr;
  beat_t x_md;
  logic r_sv, r_sr, r_rv, r_rr;
  logic [63:0] r_rd;
  logic n_sv, n_sr, n_rv, n_rr;
  logic [63:0] n_rd;

  prim_dual_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .s0_valid(f_s0v), .s0_ready(f_s0r), .s0_data(s_data[0]),
    .s1_valid(f_s1v), .s1_ready(f_s1r), .s1_data(s_data[1]),
    .m0_valid(f_m0v), .m0_ready(f_m0r), .m0_data(f_m0d),
    .m1_valid(f_m1v), .m1_ready(f_m1r), .m1_data(f_m1d));

  prim_copy u_copy (
    .clk, .rst_n,
    .s_valid(c_sv), .s_ready(c_sr), .s_data(s_data[0]),
    .m0_valid(c_m0v), .m0_ready(c_m0r), .m0_data(c_m0d),
    .m1_valid(c_m1v), .m1_ready(c_m1r), .m1_data(c_m1d));

  prim_cmp_range u_cmp (
    .clk, .rst_n, .lo(cfg[0]), .hi(cfg[1]), .hi_incl(cfg[2][0]),
    .s_valid(p_sv), .s_ready(p_sr), .s_data(s_data[0]),
    .m_valid(p_mv), .m_ready(p_mr), .m_data(p_md));

  prim_and u_and (
    .clk, .rst_n,
    .s0_valid(a_s0v), .s0_ready(a_s0r), .s0_data(s_data[0]),
    .s1_valid(a_s1v), .s1_ready(a_s1r), .s1_data(s_data[1]),
    .m_valid(a_mv), .m_ready(a_mr), .m_data(a_md));

  prim_filter u_filter (
    .clk, .rst_n,
    .s0_valid(l_s0v), .s0_ready(l_s0r), .s0_data(s_data[0]),
    .s1_valid(l_s1v), .s1_ready(l_s1r), .s1_data(s_data[1]),
    .m_valid(l_mv), .m_ready(l_mr), .m_data(l_md));

  prim_mul u_mul (
    .clk, .rst_n,
    .s0_valid(x_s0v), .s0_ready(x_s0r), .s0_data(s_data[0]),
    .s1_valid(x_s1v), .s1_ready(x_s1r), .s1_data(s_data[1]),
    .m_valid(x_mv), .m_ready(x_mr), .m_data(x_md));

  prim_add_reduce u_red (
    .clk, .rst_n,
    .s_valid(r_sv), .s_ready(r_sr), .s_data(s_data[0]),
    .r_valid(r_rv), .r_ready(r_rr), .r_data(r_rd));

  prim_count u_cnt (
    .clk, .rst_n,
    .s_valid(n_sv), .s_ready(n_sr), .s_data(s_data[0]),
    .r_valid(n_rv), .r_ready(n_rr), .r_data(n_rd));

  always_comb begin
    // defaults: everything idle
    {f_s0v, f_s1v, f_m0r, f_m1r} = '0;
    {c_sv, c_m0r, c_m1r}         = '0;
    {p_sv, p_mr}                 = '0;
    {a_s0v, a_s1v, a_mr}         = '0;
    {l_s0v, l_s1v, l_mr}         = '0;
    {x_s0v, x_s1v, x_mr}         = '0;
    {r_sv, r_rr}                 = '0;
    {n_sv, n_rr}                 = '0;
    s_ready = '0;
    m_valid = '0;
    m_data  = '0;
    r_valid = 1'b0;
    r_data  = '0;
    unique case (kernel)
      KRN_FIFO, KRN_DUAL_FIFO: begin
        f_s0v = s_valid[0]; s_ready[0] = f_s0r;
        m_valid[0] = f_m0v; m_data[0] = f_m0d; f_m0r = m_ready[0];
        if (kernel == KRN_DUAL_FIFO) begin
          f_s1v = s_valid[1]; s_ready[1] = f_s1r;
          m_valid[1] = f_m1v; m_data[1] = f_m1d; f_m1r = m_ready[1];
        end
      end
      KRN_COPY: begin
        c_sv = s_valid[0]; s_ready[0] = c_sr;
        m_valid[0] = c_m0v; m_data[0] = c_m0d; c_m0r = m_ready[0];
        m_valid[1] = c_m1v; m_data[1] = c_m1d; c_m1r = m_ready[1];
      end
      KRN_CMP_RANGE: begin
        p_sv = s_valid[0]; s_ready[0] = p_sr;
        m_valid[0] = p_mv; m_data[0] = p_md; p_mr = m_ready[0];
      end
      KRN_AND: begin
        a_s0v = s_valid[0]; s_ready[0] = a_s0r;
        a_s1v = s_valid[1]; s_ready[1] = a_s1r;
        m_valid[0] = a_mv; m_data[0] = a_md; a_mr = m_ready[0];
      end
      KRN_FILTER: begin
        l_s0v = s_valid[0]; s_ready[0] = l_s0r;
        l_s1v = s_valid[1]; s_ready[1] = l_s1r;
        m_valid[0] = l_mv; m_data[0] = l_md; l_mr = m_ready[0];
      end
      KRN_MUL: begin
        x_s0v = s_valid[0]; s_ready[0] = x_s0r;
        x_s1v = s_valid[1]; s_ready[1] = x_s1r;
        m_valid[0] = x_mv; m_data[0] = x_md; x_mr = m_ready[0];
      end
      KRN_ADD_RED: begin
        r_sv = s_valid[0]; s_ready[0] = r_sr;
        r_valid = r_rv; r_data = r_rd; r_rr = r_ready;
      end
      KRN_COUNT: begin
        n_sv = s_valid[0]; s_ready[0] = n_sr;
        r_valid = n_rv; r_data = n_rd; n_rr = r_ready;
      end
      default: ;
    endcase
  end
endmodule
