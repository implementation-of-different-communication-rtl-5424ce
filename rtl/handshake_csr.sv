// handshake_csr - hardware ready/valid handshake registers of one tile.
//
// Four custom CSRs replace polling of ready/valid flags in shared memory:
//   0x400 selfready   read/write   bit n drives the ready line to neighbour n
//   0x401 selfvalid   read/write   bit n drives the valid line to neighbour n
//   0x402 otherready  read only    bit n is the ready line from neighbour n
//   0x403 othervalid  read only    bit n is the valid line from neighbour n
// Bit n belongs to neighbour slot n, the same index as the neighbour's
// scratchpad in the virtual address map, so up to 32 neighbours fit in a
// 32-bit CSR. The self registers are flip-flops whose outputs are wired
// to the neighbours with no buffer in between: a write at one edge is
// visible in the neighbour's other* CSR from the next cycle.
//
// Access port (the core's CSR instruction): csr_valid with csr_addr,
// csr_op (read, write, set bits, clear bits as csrrw/csrrs/csrrc) and
// csr_wdata. csr_hit says the address is one of the four, csr_rdata
// gives the value before the access in the same cycle, and writes take
// effect at the next edge. Writes to the read-only CSRs are ignored.
// Bits of the self registers at or above NNEIGH read as zero.
// CSR numbers, access rights and bit mapping follow the design description;
// the access port and the reset value zero are this design's choices.
module handshake_csr
  import gpc_pkg::*;
#(
  parameter int unsigned NNEIGH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              csr_valid,
  input  csr_op_e           csr_op,
  input  logic [11:0]       csr_addr,
  input  logic [XLEN-1:0]   csr_wdata,
  output logic              csr_hit,
  output logic [XLEN-1:0]   csr_rdata,
  // lines to and from the neighbours
  output logic [NNEIGH-1:0] self_ready,
  output logic [NNEIGH-1:0] self_valid,
  input  logic [NNEIGH-1:0] other_ready,
  input  logic [NNEIGH-1:0] other_valid
);
  logic [NNEIGH-1:0] wval;

  always_comb begin
    csr_hit   = 1'b1;
    csr_rdata = '0;
    unique case (csr_addr)
      CSR_SELFREADY:  csr_rdata[NNEIGH-1:0] = self_ready;
      CSR_SELFVALID:  csr_rdata[NNEIGH-1:0] = self_valid;
      CSR_OTHERREADY: csr_rdata[NNEIGH-1:0] = other_ready;
      CSR_OTHERVALID: csr_rdata[NNEIGH-1:0] = other_valid;
      default:        csr_hit = 1'b0;
    endcase
  end

  // new value of a self register under the requested operation
  always_comb begin
    unique case (csr_op)
      CSR_WRITE: wval = csr_wdata[NNEIGH-1:0];
      CSR_SET:   wval = csr_rdata[NNEIGH-1:0] | csr_wdata[NNEIGH-1:0];
      CSR_CLEAR: wval = csr_rdata[NNEIGH-1:0] & ~csr_wdata[NNEIGH-1:0];
      default:   wval = csr_rdata[NNEIGH-1:0];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      self_ready <= '0;
      self_valid <= '0;
    end else if (csr_valid) begin
      if (csr_addr == CSR_SELFREADY) self_ready <= wval;
      if (csr_addr == CSR_SELFVALID) self_valid <= wval;
    end
  end
endmodule
