// tb_gpc_env - one grid plus its test environment, for the size sweep.
//
// Holds a gpc_top of W x H tiles with the behavioural core models, host,
// instruction-fetch models and external print device, and runs the same
// flow as tb_gpc_top: load over the SystemBus, fetch through the ICache
// adapters, systolic N x N multiplication with the software handshake and
// then with the hardware handshake, neighbour-window read, and counts of
// every mechanism. Instead of ending the simulation it raises finished
// and reports its check counts and the cycle counts of both runs.
module tb_gpc_env
  import gpc_pkg::*;
#(
  parameter int W     = 4,
  parameter int H     = 4,
  parameter bit TORUS = 1'b1
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cyc_sw,
  output int   cyc_hw
);
  localparam int  NT = W * H;
  localparam logic [31:0] PRINT_BASE = 32'h1000_0000;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic              core_req    [NT];
  logic              core_we     [NT];
  logic [3:0]        core_be     [NT];
  logic [31:0]       core_addr   [NT];
  logic [31:0]       core_wdata  [NT];
  logic              core_gnt    [NT];
  logic              core_rvalid [NT];
  logic [31:0]       core_rdata  [NT];
  logic              core_err    [NT];
  logic              csr_valid   [NT];
  csr_op_e           csr_op      [NT];
  logic [11:0]       csr_addr    [NT];
  logic [31:0]       csr_wdata   [NT];
  logic              csr_hit     [NT];
  logic [31:0]       csr_rdata   [NT];
  logic              ic_a_valid  [NT];
  logic              ic_a_ready  [NT];
  tl_a_t             ic_a        [NT];
  logic              ic_d_valid  [NT];
  logic              ic_d_ready  [NT];
  tl_d_t             ic_d        [NT];
  logic  host_a_valid, host_a_ready, host_d_valid, host_d_ready;
  tl_a_t host_a;
  tl_d_t host_d;
  logic  ext_a_valid, ext_a_ready, ext_d_valid, ext_d_ready;
  tl_a_t ext_a;
  tl_d_t ext_d;

  gpc_top #(.W(W), .H(H), .TORUS(TORUS)) dut (.*);

  initial begin finished = 0; checks = 0; failures = 0; end
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: fetch=%0d host=%0d link=%0d hs0=%0d", n_fetch, n_host, n_link, n_hs[0]);
    for (int t = 0; t < NT; t++) $display("tile %0d done=%0d hs=%0d", t, done[t], n_hs[t]);
    finished = 1;
  end

  // ---------------- core models ----------------
  logic start = 1'b0, sw_mode = 1'b0, check_start = 1'b0;
  logic done [NT], check_done [NT];
  int   cycles [NT], n_hs [NT];
  logic [31:0] result [NT], nb_result [NT];

  for (genvar t = 0; t < NT; t++) begin : g_core
    tb_core_model #(.W(W), .H(H), .T(t)) u_core (
      .clk, .rst_n, .start, .sw_mode, .check_start,
      .done(done[t]), .check_done(check_done[t]), .cycles(cycles[t]),
      .result(result[t]), .nb_result(nb_result[t]), .n_hs(n_hs[t]),
      .core_req(core_req[t]), .core_we(core_we[t]), .core_be(core_be[t]),
      .core_addr(core_addr[t]), .core_wdata(core_wdata[t]),
      .core_gnt(core_gnt[t]), .core_rvalid(core_rvalid[t]),
      .core_rdata(core_rdata[t]), .core_err(core_err[t]),
      .csr_valid(csr_valid[t]), .csr_op(csr_op[t]), .csr_addr(csr_addr[t]),
      .csr_wdata(csr_wdata[t]), .csr_rdata(csr_rdata[t])
    );
  end

  // ---------------- external SystemBus device (print port) ----------------
  logic [31:0] printed [NT];
  int          n_print = 0;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin ext_a_ready <= 1; ext_d_valid <= 0; ext_d <= '0; end
    else begin
      if (ext_a_valid && ext_a_ready) begin
        int idx;
        idx = int'((ext_a.address - PRINT_BASE) >> 2);
        if (ext_a.opcode != TL_GET && idx >= 0 && idx < NT) printed[idx] <= ext_a.data;
        n_print <= n_print + 1;
        ext_a_ready <= 0; ext_d_valid <= 1;
        ext_d.opcode <= (ext_a.opcode == TL_GET) ? TL_ACCESS_ACK_DATA : TL_ACCESS_ACK;
        ext_d.source <= ext_a.source;
        ext_d.data   <= 0;
      end
      if (ext_d_valid && ext_d_ready) begin ext_d_valid <= 0; ext_a_ready <= 1; end
    end

  // ---------------- host on the SystemBus ----------------
  int n_host = 0;
  task automatic host(input logic we, input logic [31:0] addr, input logic [31:0] wd,
                      output logic [31:0] rd);
    @(negedge clk);
    host_a = '0;
    host_a.opcode = we ? TL_PUT_FULL : TL_GET;
    host_a.size = 2; host_a.mask = 4'hF; host_a.address = addr; host_a.data = wd;
    host_a_valid = 1;
    #1;
    while (!host_a_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    host_a_valid = 0;
    host_d_ready = 1;
    #1;
    while (!host_d_valid) begin @(negedge clk); #1; end
    rd = host_d.data;
    check("host access not denied", 32'(host_d.denied), 0);
    @(negedge clk);
    host_d_ready = 0;
    n_host++;
  endtask

  // ---------------- instruction fetch through the ICache adapter ----------------
  logic fetch_go = 1'b0;
  int   n_fetch = 0;
  logic [31:0] prog [4];
  for (genvar t = 0; t < NT; t++) begin : g_fetch
    initial begin
      ic_a_valid[t] = 0; ic_a[t] = '0; ic_d_ready[t] = 0;
      forever begin
        wait (fetch_go);
        for (int i = 0; i < 4; i++) begin
          @(negedge clk);
          ic_a[t] = '0;
          ic_a[t].opcode = TL_GET; ic_a[t].size = 2; ic_a[t].mask = 4'hF;
          ic_a[t].address = 32'h8000_0600 + 32'(4 * i);
          ic_a_valid[t] = 1;
          #1;
          while (!ic_a_ready[t]) begin @(negedge clk); #1; end
          @(negedge clk);
          ic_a_valid[t] = 0; ic_d_ready[t] = 1;
          #1;
          while (!ic_d_valid[t]) begin @(negedge clk); #1; end
          check($sformatf("tile %0d fetch %0d", t, i), ic_d[t].data, prog[i] ^ 32'(t));
          n_fetch++;
          @(negedge clk);
          ic_d_ready[t] = 0;
        end
        wait (!fetch_go);
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_link = 0, n_wrap = 0, n_stall = 0, n_tile_sb = 0, n_err = 0;
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NT; t++) begin
      for (int d = 0; d < 4; d++) if (dut.no_a_valid[t][d] && dut.no_a_ready[t][d]) begin
        n_link++;
        if ((d == 0 && t / W == 0) || (d == 2 && t / W == H - 1) ||
            (d == 1 && t % W == W - 1) || (d == 3 && t % W == 0)) n_wrap++;
      end
      if (dut.sc_a_valid[t+1] && dut.sc_a_ready[t+1]) n_tile_sb++;
      if (core_rvalid[t] && core_err[t]) n_err++;
    end
  end
  for (genvar t = 0; t < NT; t++) begin : g_stall
    always @(posedge clk)
      if (rst_n && (dut.g_tile[t].u_tile.arb_req & ~dut.g_tile[t].u_tile.arb_gnt) != 0) n_stall++;
  end

  // ---------------- test sequence ----------------
  logic [31:0] A [H][W], B [H][W], Cexp [H][W];
  int  hs_sw, hs_hw;

  task automatic load_grid();
    logic [31:0] r;
    for (int t = 0; t < NT; t++) begin
      logic [31:0] pb;
      pb = tile_pbase(t);
      if (t % W == 0) for (int k = 0; k < W; k++) host(1, pb + 32'(4 * k), A[t / W][k], r);
      if (t / W == 0) for (int k = 0; k < H; k++) host(1, pb + 32'h100 + 32'(4 * k), B[k][t % W], r);
      for (int m = 0; m < 16; m++) host(1, pb + 32'h400 + 32'(4 * m), 0, r);
      for (int i = 0; i < 4; i++) host(1, pb + 32'h600 + 32'(4 * i), prog[i] ^ 32'(t), r);
      host(1, pb + 32'h200, 32'hFFFF_FFFF, r);
    end
  endtask

  task automatic run(input bit sw, output int cyc, output int hs);
    logic [31:0] r;
    bit all;
    sw_mode = sw;
    for (int t = 0; t < NT; t++) printed[t] = 0;
    start = 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int t = 0; t < NT; t++) all &= done[t];
    end while (!all);
    cyc = 0; hs = 0;
    for (int t = 0; t < NT; t++) begin
      if (cycles[t] > cyc) cyc = cycles[t];
      hs += n_hs[t];
      check($sformatf("%s C[%0d][%0d] in core", sw ? "SW" : "HW", t / W, t % W),
            result[t], Cexp[t / W][t % W]);
      check("C printed on external port", printed[t], Cexp[t / W][t % W]);
      host(0, tile_pbase(t) + 32'h200, 0, r);
      check("C in scratchpad", r, Cexp[t / W][t % W]);
    end
    // read the west neighbour's result through the neighbour window
    check_start = 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int t = 0; t < NT; t++) all &= check_done[t];
    end while (!all);
    for (int t = 0; t < NT; t++) begin
      int x, y;
      x = t % W; y = t / W;
      if (TORUS || x > 0)
        check("west neighbour's C", nb_result[t], Cexp[y][(x + W - 1) % W]);
    end
    start = 0; check_start = 0;
    @(posedge clk);
  endtask

  initial begin
    host_a_valid = 0; host_a = '0; host_d_ready = 0;
    start = 0; sw_mode = 0; check_start = 0; fetch_go = 0;
    for (int i = 0; i < 4; i++) prog[i] = $urandom;
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) begin
        A[i][j] = $urandom_range(1000);
        B[i][j] = $urandom_range(1000);
      end
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) begin
        Cexp[i][j] = 0;
        for (int k = 0; k < W; k++) Cexp[i][j] += A[i][k] * B[k][j];
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_grid();
    fetch_go = 1;
    wait (n_fetch == 4 * NT);
    fetch_go = 0;
    run(1, cyc_sw, hs_sw);
    // reset, reload, and run with the CSR handshake
    @(negedge clk);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load_grid();
    run(0, cyc_hw, hs_hw);
    $display("systolic %0dx%0d: SW handshake %0d cycles, HW handshake %0d cycles, speedup %0d.%02d",
             W, H, cyc_sw, cyc_hw, cyc_sw / cyc_hw, (100 * cyc_sw / cyc_hw) % 100);
    $display("mechanisms: host=%0d tile_sb=%0d print=%0d fetch=%0d link=%0d wrap=%0d stall=%0d sw_hs=%0d hw_hs=%0d err=%0d",
             n_host, n_tile_sb, n_print, n_fetch, n_link, n_wrap, n_stall, hs_sw, hs_hw, n_err);
    check("HW handshake faster than SW", 32'(cyc_hw < cyc_sw), 1);
    check("handshakes per run", 32'(hs_sw), 32'(2 * W * (W - 1) * W));
    check("same handshakes in HW run", 32'(hs_hw), 32'(hs_sw));
    check("host SystemBus operations", 32'(n_host > 0), 1);
    check("tile SystemBus operations", 32'(n_tile_sb >= 2 * NT), 1);
    check("prints on external port", 32'(n_print), 32'(2 * NT));
    check("instruction fetches", 32'(n_fetch), 32'(4 * NT));
    check("neighbour link beats", 32'(n_link > 0), 1);
    check("arbitration stalls", 32'(n_stall > 0), 1);
    if (TORUS) check("torus wrap-around beats", 32'(n_wrap > 0), 1);
    else       check("errors on unconnected edge slots", 32'(n_err), 32'(2 * H));
    finished = 1;
  end
endmodule
