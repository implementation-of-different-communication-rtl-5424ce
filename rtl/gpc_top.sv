// gpc_top - a W x H grid of processing cells with neighbour links.
//
// Tiles are numbered row by row, tile t = y*W + x, which is also its hart
// id, its place in the physical scratchpad map (0x8000_0000 + t*0x8000)
// and the position software derives from the hart id. Every tile has four
// neighbour slots, N (y-1), E (x+1), S (y+1) and W (x-1), that serve as
// virtual address window 0x8000_0000 + (slot+1)*0x8000 and as bit index in
// the handshake CSRs. With TORUS=1 the edge tiles are also linked to the
// tiles on the opposite edge; with TORUS=0 slots that point off the grid
// are unconnected and an access through them returns an error.
//
// For every existing (tile, slot) pair there is one TileLink link from the
// tile's data cache through a tl_buffer (one cycle in each direction) into
// a DTIM adapter of the neighbour, and two handshake lines with opposite
// directions: the tile's selfvalid bit drives the neighbour's othervalid
// bit and the neighbour's selfready bit drives the tile's otherready bit,
// both with no register in between. All tiles also sit on one SystemBus,
// which the host uses (client port host_*) to load and read scratchpads
// and on which everything that is not a scratchpad is reached through the
// external manager port ext_*.
//
// With D > 1 the grid is W x H x D, tile t = (z*H + y)*W + x, and every
// tile has six slots, N, E, Up (z-1), S, W, Down (z+1), so that slot d is
// seen from the neighbour as slot (d + 3) mod 6; the four CSR bits and
// virtual windows of a 2-D tile become six. D = 1 gives the 2-D grid
// above with four slots.
//
// The Rocket cores and their instruction caches are not part of this RTL:
// each tile's data port (core_*), CSR port (csr_*) and instruction-cache
// link (ic_*) are ports of the top, indexed by tile.
// Grid shape, numbering, torus option and link structure follow the design
// description; the slot numbering N/E/S/W, the six-slot order of 3-D grids
// (the original names 3-D grids without detail) and the default 4 x 4
// torus (the grid shown as a chip layout) are this design's choices.
module gpc_top
  import gpc_pkg::*;
#(
  parameter int unsigned W       = 4,
  parameter int unsigned H       = 4,
  parameter bit          TORUS   = 1'b1,
  parameter int unsigned D       = 1,
  parameter int unsigned SPAD_SZ = SPAD_BYTES
) (
  input  logic              clk,
  input  logic              rst_n,
  // core data ports
  input  logic              core_req    [W*H*D],
  input  logic              core_we     [W*H*D],
  input  logic [BE_W-1:0]   core_be     [W*H*D],
  input  logic [31:0]       core_addr   [W*H*D],
  input  logic [XLEN-1:0]   core_wdata  [W*H*D],
  output logic              core_gnt    [W*H*D],
  output logic              core_rvalid [W*H*D],
  output logic [XLEN-1:0]   core_rdata  [W*H*D],
  output logic              core_err    [W*H*D],
  // core CSR ports
  input  logic              csr_valid   [W*H*D],
  input  csr_op_e           csr_op      [W*H*D],
  input  logic [11:0]       csr_addr    [W*H*D],
  input  logic [XLEN-1:0]   csr_wdata   [W*H*D],
  output logic              csr_hit     [W*H*D],
  output logic [XLEN-1:0]   csr_rdata   [W*H*D],
  // instruction cache links to the local scratchpad
  input  logic              ic_a_valid  [W*H*D],
  output logic              ic_a_ready  [W*H*D],
  input  tl_a_t             ic_a        [W*H*D],
  output logic              ic_d_valid  [W*H*D],
  input  logic              ic_d_ready  [W*H*D],
  output tl_d_t             ic_d        [W*H*D],
  // host client on the SystemBus
  input  logic              host_a_valid,
  output logic              host_a_ready,
  input  tl_a_t             host_a,
  output logic              host_d_valid,
  input  logic              host_d_ready,
  output tl_d_t             host_d,
  // external manager on the SystemBus (boot ROM, UART, debug, ...)
  output logic              ext_a_valid,
  input  logic              ext_a_ready,
  output tl_a_t             ext_a,
  input  logic              ext_d_valid,
  output logic              ext_d_ready,
  input  tl_d_t             ext_d
);
  localparam int unsigned NT = W * H * D;
  localparam int unsigned NN = (D > 1) ? 6 : 4;

  // index of the neighbour of tile t in direction d, -1 if there is none
  function automatic int nb_of(int t, int d);
    int x, y, z, nx, ny, nz, dd;
    x = t % W;
    y = (t / W) % H;
    z = t / (W * H);
    nx = x;
    ny = y;
    nz = z;
    // 3-D slots 0..5 are N, E, Up, S, W, Down; 2-D slots 0..3 are N, E, S, W
    dd = (NN == 6) ? d : ((d < 2) ? d : d + 1);
    case (dd)
      0: ny = y - 1;
      1: nx = x + 1;
      2: nz = z - 1;
      3: ny = y + 1;
      4: nx = x - 1;
      default: nz = z + 1;
    endcase
    if (nx < 0 || nx >= W || ny < 0 || ny >= H || nz < 0 || nz >= D) begin
      if (!TORUS) return -1;
      nx = (nx + W) % W;
      ny = (ny + H) % H;
      nz = (nz + D) % D;
    end
    return (nz * H + ny) * W + nx;
  endfunction

  function automatic logic [NN-1:0] link_mask(int t);
    logic [NN-1:0] m;
    for (int d = 0; d < NN; d++) m[d] = (nb_of(t, d) >= 0);
    return m;
  endfunction

  // per-tile link signals
  logic  no_a_valid [NT][NN];
  logic  no_a_ready [NT][NN];
  tl_a_t no_a       [NT][NN];
  logic  no_d_valid [NT][NN];
  logic  no_d_ready [NT][NN];
  tl_d_t no_d       [NT][NN];
  logic  ni_a_valid [NT][NN];
  logic  ni_a_ready [NT][NN];
  tl_a_t ni_a       [NT][NN];
  logic  ni_d_valid [NT][NN];
  logic  ni_d_ready [NT][NN];
  tl_d_t ni_d       [NT][NN];
  logic [NN-1:0] hs_sr [NT];
  logic [NN-1:0] hs_sv [NT];
  logic [NN-1:0] hs_or [NT];
  logic [NN-1:0] hs_ov [NT];

  // SystemBus ports: client 0 = host, client 1+t = tile t;
  // manager t = tile t, manager NT = external
  logic  sc_a_valid [NT+1];
  logic  sc_a_ready [NT+1];
  tl_a_t sc_a       [NT+1];
  logic  sc_d_valid [NT+1];
  logic  sc_d_ready [NT+1];
  tl_d_t sc_d       [NT+1];
  logic  sm_a_valid [NT+1];
  logic  sm_a_ready [NT+1];
  tl_a_t sm_a       [NT+1];
  logic  sm_d_valid [NT+1];
  logic  sm_d_ready [NT+1];
  tl_d_t sm_d       [NT+1];

  for (genvar t = 0; t < NT; t++) begin : g_tile
    gpc_tile #(
      .HARTID(t), .NNEIGH(NN), .OUT_EN(link_mask(t)), .IN_EN(link_mask(t)),
      .SPAD_SZ(SPAD_SZ)
    ) u_tile (
      .clk, .rst_n,
      .core_req(core_req[t]), .core_we(core_we[t]), .core_be(core_be[t]),
      .core_addr(core_addr[t]), .core_wdata(core_wdata[t]),
      .core_gnt(core_gnt[t]), .core_rvalid(core_rvalid[t]),
      .core_rdata(core_rdata[t]), .core_err(core_err[t]),
      .csr_valid(csr_valid[t]), .csr_op(csr_op[t]), .csr_addr(csr_addr[t]),
      .csr_wdata(csr_wdata[t]), .csr_hit(csr_hit[t]), .csr_rdata(csr_rdata[t]),
      .ic_a_valid(ic_a_valid[t]), .ic_a_ready(ic_a_ready[t]), .ic_a(ic_a[t]),
      .ic_d_valid(ic_d_valid[t]), .ic_d_ready(ic_d_ready[t]), .ic_d(ic_d[t]),
      .no_a_valid(no_a_valid[t]), .no_a_ready(no_a_ready[t]), .no_a(no_a[t]),
      .no_d_valid(no_d_valid[t]), .no_d_ready(no_d_ready[t]), .no_d(no_d[t]),
      .ni_a_valid(ni_a_valid[t]), .ni_a_ready(ni_a_ready[t]), .ni_a(ni_a[t]),
      .ni_d_valid(ni_d_valid[t]), .ni_d_ready(ni_d_ready[t]), .ni_d(ni_d[t]),
      .sbc_a_valid(sc_a_valid[t+1]), .sbc_a_ready(sc_a_ready[t+1]), .sbc_a(sc_a[t+1]),
      .sbc_d_valid(sc_d_valid[t+1]), .sbc_d_ready(sc_d_ready[t+1]), .sbc_d(sc_d[t+1]),
      .sbm_a_valid(sm_a_valid[t]), .sbm_a_ready(sm_a_ready[t]), .sbm_a(sm_a[t]),
      .sbm_d_valid(sm_d_valid[t]), .sbm_d_ready(sm_d_ready[t]), .sbm_d(sm_d[t]),
      .hs_self_ready(hs_sr[t]), .hs_self_valid(hs_sv[t]),
      .hs_other_ready(hs_or[t]), .hs_other_valid(hs_ov[t])
    );

    for (genvar d = 0; d < NN; d++) begin : g_link
      localparam int U  = nb_of(t, d);      // neighbour in direction d
      localparam int OD = (d + NN / 2) % NN; // our direction as seen from U
      if (U >= 0) begin : g_on
        // link from tile t's slot d into neighbour U's incoming port OD
        tl_buffer u_buf (
          .clk, .rst_n,
          .c_a_valid(no_a_valid[t][d]), .c_a_ready(no_a_ready[t][d]), .c_a(no_a[t][d]),
          .c_d_valid(no_d_valid[t][d]), .c_d_ready(no_d_ready[t][d]), .c_d(no_d[t][d]),
          .m_a_valid(ni_a_valid[U][OD]), .m_a_ready(ni_a_ready[U][OD]), .m_a(ni_a[U][OD]),
          .m_d_valid(ni_d_valid[U][OD]), .m_d_ready(ni_d_ready[U][OD]), .m_d(ni_d[U][OD])
        );
        assign hs_ov[t][d] = hs_sv[U][OD];
        assign hs_or[t][d] = hs_sr[U][OD];
      end else begin : g_off
        assign no_a_ready[t][d] = 1'b0;
        assign no_d_valid[t][d] = 1'b0;
        assign no_d[t][d]       = '0;
        assign ni_a_valid[t][d] = 1'b0;
        assign ni_a[t][d]       = '0;
        assign ni_d_ready[t][d] = 1'b0;
        assign hs_ov[t][d]      = 1'b0;
        assign hs_or[t][d]      = 1'b0;
      end
    end
  end

  system_bus #(.NTILES(NT), .SPAD_SZ(SPAD_SZ)) u_sbus (
    .clk, .rst_n,
    .c_a_valid(sc_a_valid), .c_a_ready(sc_a_ready), .c_a(sc_a),
    .c_d_valid(sc_d_valid), .c_d_ready(sc_d_ready), .c_d(sc_d),
    .m_a_valid(sm_a_valid), .m_a_ready(sm_a_ready), .m_a(sm_a),
    .m_d_valid(sm_d_valid), .m_d_ready(sm_d_ready), .m_d(sm_d)
  );

  assign sc_a_valid[0] = host_a_valid;
  assign host_a_ready  = sc_a_ready[0];
  assign sc_a[0]       = host_a;
  assign host_d_valid  = sc_d_valid[0];
  assign sc_d_ready[0] = host_d_ready;
  assign host_d        = sc_d[0];

  assign ext_a_valid    = sm_a_valid[NT];
  assign sm_a_ready[NT] = ext_a_ready;
  assign ext_a          = sm_a[NT];
  assign sm_d_valid[NT] = ext_d_valid;
  assign ext_d_ready    = sm_d_ready[NT];
  assign sm_d[NT]       = ext_d;
endmodule
