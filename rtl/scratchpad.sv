// scratchpad - local data scratchpad of one processing cell.
//
// In the modified tile the first-level data cache is replaced by a
// scratchpad memory; its size is configurable and 32 KiB in the design
// described. It is a single-port, word-wide synchronous RAM with byte
// enables: an access presented with en=1 at a rising edge writes the
// enabled bytes (we=1) or reads the addressed word, and the read word is on
// rdata in the following cycle (one-cycle latency, like a synchronous SRAM
// macro). The address is a byte offset into the scratchpad; bits [1:0] and
// the bits above the scratchpad size are ignored. The size follows the
// design description; the port shape and latency are this design's choice.
module scratchpad #(
  parameter int unsigned BYTES = 32 * 1024,
  parameter int unsigned XLEN  = 32
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic                 we,
  input  logic [XLEN/8-1:0]    be,
  input  logic [31:0]          addr,
  input  logic [XLEN-1:0]      wdata,
  output logic [XLEN-1:0]      rdata
);
  localparam int unsigned WORDS = BYTES / (XLEN / 8);
  localparam int unsigned AW    = $clog2(WORDS);
  localparam int unsigned OFS   = $clog2(XLEN / 8);

  logic [XLEN-1:0] mem [WORDS];
  logic [AW-1:0]   widx;

  assign widx = addr[OFS +: AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int b = 0; b < XLEN / 8; b++)
          if (be[b]) mem[widx][8*b +: 8] <= wdata[8*b +: 8];
      end else begin
        rdata <= mem[widx];
      end
    end
  end
endmodule
