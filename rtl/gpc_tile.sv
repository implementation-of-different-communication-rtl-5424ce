// gpc_tile - one processing cell: a modified RocketTile without its core.
//
// The tile keeps the pieces of a RocketTile that the grid changes or adds;
// the core and its instruction cache are outside and attach at ports:
//   * scratchpad: the local 32 KiB data memory that replaces the L1 data
//     cache;
//   * tim_arbiter: fixed priority onto the scratchpad, in the order
//     core (0) > ICache DTIM adapter (1) > SystemBus DTIM adapter (2) >
//     incoming neighbour adapters (3 + slot);
//   * dcache_router: the data cache's hit function, sending core accesses
//     to the scratchpad, to an outgoing neighbour link or to the SystemBus;
//   * dtim_adapter x (2 + incoming links): the ICache adapter (virtual
//     local range, so instructions are fetched from the scratchpad without
//     the SystemBus), the SystemBus adapter (physical range of this tile)
//     and one adapter per incoming neighbour link (the slot under which the
//     neighbour sees this tile);
//   * handshake_csr: the selfready/selfvalid/otherready/othervalid CSRs.
// Neighbour slots are numbered 0..NNEIGH-1 (N, E, S, W in a 2-D grid). A
// neighbour in direction d reaches this tile through its own slot
// opposite_dir(d), so the incoming adapter of direction d uses that slot's
// virtual base. OUT_EN/IN_EN say which links exist (mesh edges have none).
// All ports are registered or pass through at most the router's decode;
// timing is that of the sub-blocks.
module gpc_tile
  import gpc_pkg::*;
#(
  parameter int unsigned       HARTID  = 0,
  parameter int unsigned       NNEIGH  = 4,
  parameter logic [NNEIGH-1:0] OUT_EN  = '1,
  parameter logic [NNEIGH-1:0] IN_EN   = '1,
  parameter int unsigned       SPAD_SZ = SPAD_BYTES
) (
  input  logic              clk,
  input  logic              rst_n,
  // core data port
  input  logic              core_req,
  input  logic              core_we,
  input  logic [BE_W-1:0]   core_be,
  input  logic [31:0]       core_addr,
  input  logic [XLEN-1:0]   core_wdata,
  output logic              core_gnt,
  output logic              core_rvalid,
  output logic [XLEN-1:0]   core_rdata,
  output logic              core_err,
  // core CSR port
  input  logic              csr_valid,
  input  csr_op_e           csr_op,
  input  logic [11:0]       csr_addr,
  input  logic [XLEN-1:0]   csr_wdata,
  output logic              csr_hit,
  output logic [XLEN-1:0]   csr_rdata,
  // instruction cache link to its DTIM adapter (TileLink manager side)
  input  logic              ic_a_valid,
  output logic              ic_a_ready,
  input  tl_a_t             ic_a,
  output logic              ic_d_valid,
  input  logic              ic_d_ready,
  output tl_d_t             ic_d,
  // outgoing neighbour links (client)
  output logic              no_a_valid [NNEIGH],
  input  logic              no_a_ready [NNEIGH],
  output tl_a_t             no_a       [NNEIGH],
  input  logic              no_d_valid [NNEIGH],
  output logic              no_d_ready [NNEIGH],
  input  tl_d_t             no_d       [NNEIGH],
  // incoming neighbour links (manager)
  input  logic              ni_a_valid [NNEIGH],
  output logic              ni_a_ready [NNEIGH],
  input  tl_a_t             ni_a       [NNEIGH],
  output logic              ni_d_valid [NNEIGH],
  input  logic              ni_d_ready [NNEIGH],
  output tl_d_t             ni_d       [NNEIGH],
  // SystemBus client (data cache) and manager (SystemBus DTIM adapter)
  output logic              sbc_a_valid,
  input  logic              sbc_a_ready,
  output tl_a_t             sbc_a,
  input  logic              sbc_d_valid,
  output logic              sbc_d_ready,
  input  tl_d_t             sbc_d,
  input  logic              sbm_a_valid,
  output logic              sbm_a_ready,
  input  tl_a_t             sbm_a,
  output logic              sbm_d_valid,
  input  logic              sbm_d_ready,
  output tl_d_t             sbm_d,
  // handshake lines
  output logic [NNEIGH-1:0] hs_self_ready,
  output logic [NNEIGH-1:0] hs_self_valid,
  input  logic [NNEIGH-1:0] hs_other_ready,
  input  logic [NNEIGH-1:0] hs_other_valid
);
  localparam int unsigned NP = 3 + NNEIGH;

  logic [NP-1:0]   arb_req, arb_gnt, arb_rvalid;
  tim_req_t        arb_reqd [NP];
  logic [XLEN-1:0] arb_rdata;
  logic            mem_en, mem_we;
  logic [BE_W-1:0] mem_be;
  logic [31:0]     mem_addr;
  logic [XLEN-1:0] mem_wdata, mem_rdata;

  scratchpad #(.BYTES(SPAD_SZ), .XLEN(XLEN)) u_spad (
    .clk, .en(mem_en), .we(mem_we), .be(mem_be), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata)
  );

  tim_arbiter #(.NPORTS(NP)) u_arb (
    .clk, .rst_n, .req(arb_req), .reqd(arb_reqd), .gnt(arb_gnt),
    .rvalid(arb_rvalid), .rdata(arb_rdata),
    .mem_en, .mem_we, .mem_be, .mem_addr, .mem_wdata, .mem_rdata
  );

  // outgoing slots that have no neighbour are not used by the router; their
  // ports are tied off so the link stays quiet.
  logic  ro_a_valid [NNEIGH];
  tl_a_t ro_a       [NNEIGH];
  logic  ro_d_ready [NNEIGH];
  logic  ro_a_ready [NNEIGH];
  logic  ro_d_valid [NNEIGH];

  dcache_router #(
    .NNEIGH(NNEIGH), .NEIGH_EN(OUT_EN), .SRC_ID(HARTID), .SPAD_SZ(SPAD_SZ)
  ) u_router (
    .clk, .rst_n,
    .core_req, .core_we, .core_be, .core_addr, .core_wdata,
    .core_gnt, .core_rvalid, .core_rdata, .core_err,
    .tim_req(arb_req[0]), .tim(arb_reqd[0]), .tim_gnt(arb_gnt[0]),
    .tim_rvalid(arb_rvalid[0]), .tim_rdata(arb_rdata),
    .nb_a_valid(ro_a_valid), .nb_a_ready(ro_a_ready), .nb_a(ro_a),
    .nb_d_valid(ro_d_valid), .nb_d_ready(ro_d_ready), .nb_d(no_d),
    .sb_a_valid(sbc_a_valid), .sb_a_ready(sbc_a_ready), .sb_a(sbc_a),
    .sb_d_valid(sbc_d_valid), .sb_d_ready(sbc_d_ready), .sb_d(sbc_d)
  );

  for (genvar n = 0; n < NNEIGH; n++) begin : g_out
    if (OUT_EN[n]) begin : g_on
      assign no_a_valid[n] = ro_a_valid[n];
      assign no_a[n]       = ro_a[n];
      assign no_d_ready[n] = ro_d_ready[n];
      assign ro_a_ready[n] = no_a_ready[n];
      assign ro_d_valid[n] = no_d_valid[n];
    end else begin : g_off
      assign no_a_valid[n] = 1'b0;
      assign no_a[n]       = '0;
      assign no_d_ready[n] = 1'b0;
      assign ro_a_ready[n] = 1'b0;
      assign ro_d_valid[n] = 1'b0;
    end
  end

  dtim_adapter #(.BASE(SPAD_BASE), .BYTES(SPAD_SZ)) u_ic_adapter (
    .clk, .rst_n,
    .a_valid(ic_a_valid), .a_ready(ic_a_ready), .a(ic_a),
    .d_valid(ic_d_valid), .d_ready(ic_d_ready), .d(ic_d),
    .tim_req(arb_req[1]), .tim(arb_reqd[1]), .tim_gnt(arb_gnt[1]),
    .tim_rvalid(arb_rvalid[1]), .tim_rdata(arb_rdata)
  );

  dtim_adapter #(
    .BASE(SPAD_BASE + 32'(HARTID * SPAD_SZ)), .BYTES(SPAD_SZ)
  ) u_sb_adapter (
    .clk, .rst_n,
    .a_valid(sbm_a_valid), .a_ready(sbm_a_ready), .a(sbm_a),
    .d_valid(sbm_d_valid), .d_ready(sbm_d_ready), .d(sbm_d),
    .tim_req(arb_req[2]), .tim(arb_reqd[2]), .tim_gnt(arb_gnt[2]),
    .tim_rvalid(arb_rvalid[2]), .tim_rdata(arb_rdata)
  );

  for (genvar n = 0; n < NNEIGH; n++) begin : g_in
    if (IN_EN[n]) begin : g_on
      // the neighbour in direction n sees this tile as its slot opposite_dir(n)
      dtim_adapter #(
        .BASE(SPAD_BASE + 32'((((n + NNEIGH / 2) % NNEIGH) + 1) * SPAD_SZ)),
        .BYTES(SPAD_SZ)
      ) u_nb_adapter (
        .clk, .rst_n,
        .a_valid(ni_a_valid[n]), .a_ready(ni_a_ready[n]), .a(ni_a[n]),
        .d_valid(ni_d_valid[n]), .d_ready(ni_d_ready[n]), .d(ni_d[n]),
        .tim_req(arb_req[3+n]), .tim(arb_reqd[3+n]), .tim_gnt(arb_gnt[3+n]),
        .tim_rvalid(arb_rvalid[3+n]), .tim_rdata(arb_rdata)
      );
    end else begin : g_off
      assign ni_a_ready[n] = 1'b0;
      assign ni_d_valid[n] = 1'b0;
      assign ni_d[n]       = '0;
      assign arb_req[3+n]  = 1'b0;
      assign arb_reqd[3+n] = '0;
    end
  end

  handshake_csr #(.NNEIGH(NNEIGH)) u_hs (
    .clk, .rst_n,
    .csr_valid, .csr_op, .csr_addr, .csr_wdata, .csr_hit, .csr_rdata,
    .self_ready(hs_self_ready), .self_valid(hs_self_valid),
    .other_ready(hs_other_ready), .other_valid(hs_other_valid)
  );
endmodule
