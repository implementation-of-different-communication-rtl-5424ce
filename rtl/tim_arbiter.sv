// tim_arbiter - fixed-priority arbiter in front of a tile's scratchpad.
//
// Every tile has 2+N requesters on its scratchpad besides the core: the
// DTIM adapter of the instruction cache, the DTIM adapter of the SystemBus
// and one DTIM adapter per neighbour that may access this scratchpad. The
// arbitration is priority based: port 0 (the local core) wins over every
// other port, then the instruction-cache adapter, and so on by port index.
// A requester that loses keeps req high and is stalled until it is granted,
// so a low-priority port can starve while higher ones stay busy.
//
// Interface, per port i: req[i] with the request payload in reqd[i]; gnt[i]
// is combinational in the same cycle. The scratchpad is driven in that
// cycle and the read word returns one cycle later with rvalid[i]=1 (also
// for writes, as the completion of the access); rdata is shared.
// The priority order core > ICache adapter > others follows the design
// description; the place of the SystemBus adapter in that order (port 2,
// ahead of the neighbours) is this design's choice.
module tim_arbiter
  import gpc_pkg::*;
#(
  parameter int unsigned NPORTS = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NPORTS-1:0]   req,
  input  tim_req_t            reqd [NPORTS],
  output logic [NPORTS-1:0]   gnt,
  output logic [NPORTS-1:0]   rvalid,
  output logic [XLEN-1:0]     rdata,
  // scratchpad side
  output logic                mem_en,
  output logic                mem_we,
  output logic [BE_W-1:0]     mem_be,
  output logic [31:0]         mem_addr,
  output logic [XLEN-1:0]     mem_wdata,
  input  logic [XLEN-1:0]     mem_rdata
);
  always_comb begin
    gnt       = '0;
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_be    = '0;
    mem_addr  = '0;
    mem_wdata = '0;
    for (int i = NPORTS - 1; i >= 0; i--) begin
      if (req[i]) begin
        gnt       = '0;
        gnt[i]    = 1'b1;
        mem_en    = 1'b1;
        mem_we    = reqd[i].we;
        mem_be    = reqd[i].be;
        mem_addr  = reqd[i].addr;
        mem_wdata = reqd[i].wdata;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= '0;
    else        rvalid <= gnt;
  end

  assign rdata = mem_rdata;

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_grant_requested: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);
endmodule
