// system_bus - shared TileLink-UL SystemBus of the grid.
//
// Clients: port 0 is the host (program loading and debugging from outside
// the grid), ports 1..NTILES are the data caches of the tiles for accesses
// that are neither local nor to a neighbour. Managers: the SystemBus DTIM
// adapter of every tile, which serves the physical scratchpad range
// 0x8000_0000 + n*SPAD_BYTES of tile n, and one external manager port for
// everything else (boot ROM, UART, debug unit and other devices that sit
// on the SystemBus outside the grid).
//
// The bus carries one operation at a time, which is exactly why direct
// neighbour links were added: every access over it serialises with all
// others. A round-robin arbiter picks the next client among those with
// a_valid, starting after the last winner. The A beat is registered, sent
// to the decoded manager, the D beat is registered and handed back to the
// winning client; then the bus is free again. Uncontended, a Get to a
// tile's adapter completes about six cycles after its A beat.
// Client/manager roles and the physical map follow the design
// description; the single-operation bus and round-robin choice are this
// design's choices (the description calls Rocket Chip buses crossbars).
module system_bus
  import gpc_pkg::*;
#(
  parameter int unsigned NTILES  = 16,
  parameter int unsigned SPAD_SZ = SPAD_BYTES
) (
  input  logic   clk,
  input  logic   rst_n,
  // clients: 0 = host, 1+n = tile n
  input  logic   c_a_valid [NTILES+1],
  output logic   c_a_ready [NTILES+1],
  input  tl_a_t  c_a       [NTILES+1],
  output logic   c_d_valid [NTILES+1],
  input  logic   c_d_ready [NTILES+1],
  output tl_d_t  c_d       [NTILES+1],
  // managers: n = tile n's SystemBus adapter, NTILES = external port
  output logic   m_a_valid [NTILES+1],
  input  logic   m_a_ready [NTILES+1],
  output tl_a_t  m_a       [NTILES+1],
  input  logic   m_d_valid [NTILES+1],
  output logic   m_d_ready [NTILES+1],
  input  tl_d_t  m_d       [NTILES+1]
);
  localparam int unsigned NC = NTILES + 1;
  localparam int unsigned IW = $clog2(NC + 1);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_RESP} state_e;
  state_e       state;
  logic [IW-1:0] last, win, win_q, tgt, tgt_q;
  logic          any;
  tl_a_t         areg;
  tl_d_t         dreg;

  // round-robin pick, starting after the last winner
  always_comb begin
    any = 1'b0;
    win = '0;
    for (int k = 1; k <= NC; k++) begin
      int unsigned c;
      c = (int'(last) + k) % NC;
      if (!any && c_a_valid[c]) begin
        any = 1'b1;
        win = IW'(c);
      end
    end
  end

  // address decode of the winner's request
  always_comb begin
    logic [31:0] rel;
    rel = c_a[win].address - SPAD_BASE;
    if (c_a[win].address >= SPAD_BASE && rel < NTILES * SPAD_SZ)
      tgt = IW'(rel / SPAD_SZ);
    else
      tgt = IW'(NTILES);
  end

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      c_a_ready[c] = (state == S_IDLE) && any && (int'(win) == c);
      c_d_valid[c] = (state == S_RESP) && (int'(win_q) == c);
      c_d[c]       = dreg;
      m_a_valid[c] = (state == S_ISSUE) && (int'(tgt_q) == c);
      m_a[c]       = areg;
      m_d_ready[c] = (state == S_WAIT) && (int'(tgt_q) == c);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      last  <= IW'(NC - 1);
      win_q <= '0;
      tgt_q <= '0;
      areg  <= '0;
      dreg  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (any) begin
          win_q <= win;
          last  <= win;
          tgt_q <= tgt;
          areg  <= c_a[win];
          state <= S_ISSUE;
        end
        S_ISSUE: if (m_a_ready[tgt_q]) state <= S_WAIT;
        S_WAIT: if (m_d_valid[tgt_q]) begin
          dreg  <= m_d[tgt_q];
          state <= S_RESP;
        end
        S_RESP: if (c_d_ready[win_q]) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
