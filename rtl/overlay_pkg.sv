// overlay_pkg: types and constants shared by the overlay.
//
// Data streams are 128 bits wide and carry four 32-bit SIMD lanes, as in the
// database prototype configuration. A beat has a per-lane keep bit (lanes are
// filled from lane 0 upward) and a last flag. Mask streams use the same beat
// type and carry 128 packed selection bits per beat (bit i of a mask beat
// belongs to the i-th value of the data stream within that block of 128).
//
// The command/status network carries 32-bit flits. A packet is one header flit
// followed by payload flits; the last flit has last=1. The header layout, the
// address encoding, the command codes and the kernel ids are choices of this
// design; the document only states that the network is packet based, small,
// built on AXI stream and used for configuration, error codes and results.
package overlay_pkg;

  localparam int LANES   = 4;
  localparam int LANE_W  = 32;
  localparam int DATA_W  = LANES * LANE_W;   // 128
  localparam int MASK_BITS = DATA_W;          // selection bits per mask beat

  // Stream directions of a tile.
  localparam int DIR_N = 0;
  localparam int DIR_E = 1;
  localparam int DIR_S = 2;
  localparam int DIR_W = 3;
  localparam int N_DIR = 4;

  // Compute unit ports (4:2 configuration).
  localparam int N_CU_IN  = 4;
  localparam int N_CU_OUT = 2;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [LANES-1:0]  keep;
    logic              last;
  } beat_t;
  localparam int BEAT_W = $bits(beat_t);

  // ---------------- command/status network ----------------
  localparam int NOC_W = 32;

  typedef enum logic [1:0] {
    K_TILE = 2'd0,
    K_DMA  = 2'd1,
    K_HOST = 2'd2
  } node_kind_e;

  typedef struct packed {
    node_kind_e kind;
    logic [3:0] row;
    logic [3:0] col;   // for a DMA engine: its index
  } node_addr_t;

  typedef enum logic [3:0] {
    CMD_WRITE  = 4'd1,  // payload[0]: value for register 'reg'
    CMD_RESET  = 4'd2,  // reset the compute unit (payload ignored)
    CMD_READ   = 4'd3,  // read register 'reg', answered by CMD_STATUS
    CMD_RESULT = 4'd4,  // upstream: 64-bit result, payload low then high word
    CMD_STATUS = 4'd5,  // upstream: answer to CMD_READ or DMA completion
    CMD_ERROR  = 4'd6   // upstream: error code in payload[0]
  } cmd_e;

  typedef struct packed {
    node_addr_t dst;   // 10 bits
    node_addr_t src;   // 10 bits
    cmd_e       cmd;   //  4 bits
    logic [7:0] regn;  //  8 bits
  } noc_hdr_t;

  typedef struct packed {
    logic [NOC_W-1:0] data;
    logic             last;
  } flit_t;
  localparam int FLIT_W = $bits(flit_t);

  // Error codes carried by CMD_ERROR.
  localparam logic [31:0] ERR_BAD_CMD = 32'h1;
  localparam logic [31:0] ERR_BAD_REG = 32'h2;
  localparam logic [31:0] ERR_SHORT   = 32'h3;

  // Tile register map.
  localparam logic [7:0] REG_INSEL  = 8'h00; // 0x00..0x03: CU input k <- direction (4 = none)
  localparam logic [7:0] REG_OUTSEL = 8'h04; // 0x04..0x07: direction d <- CU output (2 = none)
  localparam logic [7:0] REG_KERNEL = 8'h08; // kernel id
  localparam logic [7:0] REG_CFG    = 8'h10; // 0x10..0x13: CU configuration words
  localparam int N_CFG = 4;

  // DMA register map.
  localparam logic [7:0] DREG_RADDR = 8'h00; // read (memory to stream) byte address
  localparam logic [7:0] DREG_RLEN  = 8'h01; // read length in 128-bit stream beats
  localparam logic [7:0] DREG_WADDR = 8'h02; // write (stream to memory) byte address
  localparam logic [7:0] DREG_CTRL  = 8'h03; // bit0: start read, bit1: start write

  // Kernels (primitives) a compute unit can hold.
  typedef enum logic [3:0] {
    KRN_FIFO      = 4'd0,  // unused tile: in0 -> out0 through a FIFO
    KRN_DUAL_FIFO = 4'd1,
    KRN_COPY      = 4'd2,
    KRN_CMP_RANGE = 4'd3,
    KRN_AND       = 4'd4,
    KRN_FILTER    = 4'd5,
    KRN_MUL       = 4'd6,
    KRN_ADD_RED   = 4'd7,
    KRN_COUNT     = 4'd8
  } kernel_e;

  // Network router roles and ports.
  typedef enum logic [1:0] {
    R_TILE  = 2'd0,  // tile router: child0 = east, child1 = north
    R_SPINE = 2'd1,  // root next to the host: child0 = tile (0,0), child1 = DMA chain
    R_DMA   = 2'd2   // DMA chain router: child0 = next DMA router
  } router_role_e;

  typedef enum logic [1:0] {
    P_LOCAL = 2'd0,
    P_C0    = 2'd1,
    P_C1    = 2'd2,
    P_DROP  = 2'd3
  } rport_e;

  function automatic rport_e route_f(router_role_e role, logic [3:0] my_row,
                                     logic [3:0] my_col, node_addr_t dst);
    rport_e p;
    p = P_DROP;
    case (role)
      R_TILE: begin
        if (dst.kind != K_TILE)                          p = P_DROP;
        else if (dst.col == my_col && dst.row == my_row) p = P_LOCAL;
        else if (dst.col == my_col && dst.row > my_row)  p = P_C1;
        else if (dst.col > my_col && my_row == 4'd0)     p = P_C0;
        else                                             p = P_DROP;
      end
      R_SPINE: begin
        if (dst.kind == K_TILE)     p = P_C0;
        else if (dst.kind == K_DMA) p = P_C1;
        else                        p = P_DROP;
      end
      R_DMA: begin
        if (dst.kind != K_DMA)        p = P_DROP;
        else if (dst.col == my_col)   p = P_LOCAL;
        else if (dst.col > my_col)    p = P_C0;
        else                          p = P_DROP;
      end
      default: p = P_DROP;
    endcase
    return p;
  endfunction

  function automatic node_addr_t tile_addr(int r, int c);
    node_addr_t a;
    a.kind = K_TILE; a.row = 4'(r); a.col = 4'(c);
    return a;
  endfunction

  function automatic node_addr_t dma_addr(int k);
    node_addr_t a;
    a.kind = K_DMA; a.row = 4'd0; a.col = 4'(k);
    return a;
  endfunction

  function automatic node_addr_t host_addr();
    node_addr_t a;
    a.kind = K_HOST; a.row = 4'd0; a.col = 4'd0;
    return a;
  endfunction

endpackage
