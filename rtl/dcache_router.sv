// dcache_router - data-side address decode of the modified data cache.
//
// In the modified tile the data cache holds no cache any more: it holds the
// scratchpad and decides, by the hit function on the core's virtual
// address, where a load or store goes:
//   * 0x8000_0000 .. +SPAD_BYTES-1 (the tile's own scratchpad, at the same
//     virtual address in every tile): straight to the scratchpad arbiter
//     as a TIM access, offset = address - 0x8000_0000;
//   * neighbour slot n, 0x8000_0000 + (n+1)*SPAD_BYTES ...: a TileLink Get
//     or Put on outgoing link n carrying the virtual address unchanged (the
//     neighbour's DTIM adapter maps it); a slot with no neighbour attached
//     (NEIGH_EN[n]=0) answers with an access error without any traffic;
//   * anything else: a TileLink Get or Put on the SystemBus.
//
// Core port: req with we/be/addr/wdata, accepted in the cycle gnt=1. The
// answer arrives with rvalid (rdata for loads, err for a denied access),
// one cycle after gnt for the local scratchpad and when the D beat
// arrives for TileLink accesses. One access is in flight at a time.
// The decode follows the design description; the core-side port shape
// and the single outstanding access are this design's choices.
module dcache_router
  import gpc_pkg::*;
#(
  parameter int unsigned      NNEIGH   = 4,
  parameter logic [NNEIGH-1:0] NEIGH_EN = '1,
  parameter int unsigned      SRC_ID   = 0,
  parameter int unsigned      SPAD_SZ  = SPAD_BYTES
) (
  input  logic             clk,
  input  logic             rst_n,
  // core data port
  input  logic             core_req,
  input  logic             core_we,
  input  logic [BE_W-1:0]  core_be,
  input  logic [31:0]      core_addr,
  input  logic [XLEN-1:0]  core_wdata,
  output logic             core_gnt,
  output logic             core_rvalid,
  output logic [XLEN-1:0]  core_rdata,
  output logic             core_err,
  // local scratchpad (TIM) port
  output logic             tim_req,
  output tim_req_t         tim,
  input  logic             tim_gnt,
  input  logic             tim_rvalid,
  input  logic [XLEN-1:0]  tim_rdata,
  // outgoing neighbour TileLink client ports
  output logic             nb_a_valid [NNEIGH],
  input  logic             nb_a_ready [NNEIGH],
  output tl_a_t            nb_a       [NNEIGH],
  input  logic             nb_d_valid [NNEIGH],
  output logic             nb_d_ready [NNEIGH],
  input  tl_d_t            nb_d       [NNEIGH],
  // SystemBus TileLink client port
  output logic             sb_a_valid,
  input  logic             sb_a_ready,
  output tl_a_t            sb_a,
  input  logic             sb_d_valid,
  output logic             sb_d_ready,
  input  tl_d_t            sb_d
);
  typedef enum logic [1:0] {R_LOCAL, R_NEIGH, R_SB, R_ERR} route_e;
  typedef enum logic [2:0] {S_IDLE, S_LOCAL, S_NEIGH, S_SB, S_ERR} state_e;

  state_e      state;
  route_e      route;
  int unsigned slot;
  logic [$clog2(NNEIGH+1)-1:0] slot_q;
  tl_a_t       a_msg;
  logic [31:0] rel;

  // hit function
  always_comb begin
    rel   = core_addr - SPAD_BASE;
    route = R_SB;
    slot  = 0;
    if (core_addr >= SPAD_BASE) begin
      if (rel < SPAD_SZ) route = R_LOCAL;
      else if (rel < (NNEIGH + 1) * SPAD_SZ) begin
        slot  = rel / SPAD_SZ - 1;
        route = NEIGH_EN[slot] ? R_NEIGH : R_ERR;
      end
    end
  end

  // TileLink request built from the core request
  always_comb begin
    a_msg         = '0;
    a_msg.opcode  = !core_we ? TL_GET : (core_be == '1) ? TL_PUT_FULL : TL_PUT_PARTIAL;
    a_msg.size    = ($countones(core_be) == 4) ? 2'd2 :
                    ($countones(core_be) == 2) ? 2'd1 :
                    ($countones(core_be) == 1) ? 2'd0 : 2'd2;
    a_msg.source  = SRC_ID[SRC_W-1:0];
    a_msg.address = core_addr;
    a_msg.mask    = core_we ? core_be : '1;
    a_msg.data    = core_wdata;
  end

  assign tim.we    = core_we;
  assign tim.be    = core_be;
  assign tim.addr  = rel;
  assign tim.wdata = core_wdata;

  logic idle;
  assign idle    = (state == S_IDLE);
  assign tim_req = idle && core_req && (route == R_LOCAL);

  always_comb begin
    sb_a_valid = idle && core_req && (route == R_SB);
    sb_a       = a_msg;
    sb_d_ready = (state == S_SB);
    for (int n = 0; n < NNEIGH; n++) begin
      nb_a_valid[n] = idle && core_req && (route == R_NEIGH) && (slot == n);
      nb_a[n]       = a_msg;
      nb_d_ready[n] = (state == S_NEIGH) && (int'(slot_q) == n);
    end
  end

  always_comb begin
    core_gnt = 1'b0;
    if (idle && core_req) begin
      unique case (route)
        R_LOCAL: core_gnt = tim_gnt;
        R_NEIGH: core_gnt = nb_a_ready[slot];
        R_SB:    core_gnt = sb_a_ready;
        R_ERR:   core_gnt = 1'b1;
      endcase
    end
  end

  // response
  always_comb begin
    core_rvalid = 1'b0;
    core_rdata  = '0;
    core_err    = 1'b0;
    unique case (state)
      S_LOCAL: begin
        core_rvalid = tim_rvalid;
        core_rdata  = tim_rdata;
      end
      S_NEIGH: for (int n = 0; n < NNEIGH; n++) if (int'(slot_q) == n) begin
        core_rvalid = nb_d_valid[n];
        core_rdata  = nb_d[n].data;
        core_err    = nb_d[n].denied;
      end
      S_SB: begin
        core_rvalid = sb_d_valid;
        core_rdata  = sb_d.data;
        core_err    = sb_d.denied;
      end
      S_ERR: begin
        core_rvalid = 1'b1;
        core_err    = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      slot_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (core_gnt) begin
          slot_q <= slot[$bits(slot_q)-1:0];
          unique case (route)
            R_LOCAL: state <= S_LOCAL;
            R_NEIGH: state <= S_NEIGH;
            R_SB:    state <= S_SB;
            R_ERR:   state <= S_ERR;
          endcase
        end
        default: if (core_rvalid) state <= S_IDLE;
      endcase
    end
  end

  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    core_req && !core_gnt && idle |=> core_req);
endmodule
