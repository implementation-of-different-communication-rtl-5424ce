// dtim_adapter - TileLink-UL manager port onto a tile's scratchpad.
//
// Rocket Chip reaches a tightly integrated memory from TileLink through a
// DTIM adapter. Each tile has one for its instruction cache, one for the
// SystemBus and one per neighbour that may access its scratchpad. The
// adapter also maps the address it receives onto the scratchpad: it
// subtracts BASE, the address the client side uses for this scratchpad
// (the virtual local range for the instruction cache, the physical range
// on the SystemBus, the neighbour slot of the requesting tile for a
// neighbour link). An address outside [BASE, BASE+BYTES) or an opcode
// other than Get, PutFullData or PutPartialData is answered with
// denied=1 and no access.
//
// Timing: one operation at a time. The A beat is taken when a_ready=1
// (idle), the scratchpad request is raised in the next cycle and held until
// the arbiter grants it, the word comes back one cycle after the grant and
// the D beat is offered in the cycle after that and held until d_ready.
// Uncontended, a Get is answered three cycles after its A beat. The mapping
// function follows the design description; the one-outstanding-operation
// behaviour and the error handling are this design's choice.
module dtim_adapter
  import gpc_pkg::*;
#(
  parameter logic [31:0] BASE  = 32'h8000_0000,
  parameter int unsigned BYTES = 32 * 1024
) (
  input  logic      clk,
  input  logic      rst_n,
  // TileLink-UL manager side
  input  logic      a_valid,
  output logic      a_ready,
  input  tl_a_t     a,
  output logic      d_valid,
  input  logic      d_ready,
  output tl_d_t     d,
  // scratchpad arbiter side
  output logic      tim_req,
  output tim_req_t  tim,
  input  logic      tim_gnt,
  input  logic      tim_rvalid,
  input  logic [XLEN-1:0] tim_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_RESP} state_e;
  state_e      state;
  tl_a_t       areg;
  logic [31:0] offset;
  logic        in_range, op_ok;

  assign offset   = a.address - BASE;
  assign in_range = offset < BYTES;
  assign op_ok    = (a.opcode == TL_GET) || (a.opcode == TL_PUT_FULL) ||
                    (a.opcode == TL_PUT_PARTIAL);

  assign a_ready = (state == S_IDLE);
  assign d_valid = (state == S_RESP);
  assign tim_req = (state == S_REQ);

  always_comb begin
    tim.we    = (areg.opcode != TL_GET);
    tim.be    = areg.mask;
    tim.addr  = areg.address;   // already an offset, see below
    tim.wdata = areg.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      areg  <= '0;
      d     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (a_valid) begin
          areg         <= a;
          areg.address <= offset;
          d.opcode     <= (a.opcode == TL_GET) ? TL_ACCESS_ACK_DATA : TL_ACCESS_ACK;
          d.param      <= '0;
          d.size       <= a.size;
          d.source     <= a.source;
          d.data       <= '0;
          d.corrupt    <= 1'b0;
          d.denied     <= !(in_range && op_ok);
          state        <= (in_range && op_ok) ? S_REQ : S_RESP;
        end
        S_REQ:  if (tim_gnt) state <= S_WAIT;
        S_WAIT: if (tim_rvalid) begin
          if (areg.opcode == TL_GET) d.data <= tim_rdata;
          state <= S_RESP;
        end
        S_RESP: if (d_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_d_stable: assert property (@(posedge clk) disable iff (!rst_n)
    d_valid && !d_ready |=> d_valid && $stable(d));
endmodule
