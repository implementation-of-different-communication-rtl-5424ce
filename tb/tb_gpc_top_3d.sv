// tb_gpc_top_3d - neighbour links and handshake lines of a 3-D torus grid.
//
// Builds gpc_top as a 3 x 2 x 2 torus (D = 2), where every tile has six
// neighbour slots in the order N, E, Up, S, W, Down and slot d is seen
// from the neighbour as slot (d + 3) mod 6. Each tile's driver acts as its
// core:
//   1. through every slot d it writes the tag (t << 8 | d) into the
//      neighbour's scratchpad at offset 0x100 + 4*d, all tiles at once, so
//      requests from the core and up to six links meet at the arbiters;
//   2. it reads every tag back through the same window;
//   3. the host reads every scratchpad over the SystemBus at its physical
//      address, and word 0x100 + 4*d of tile u must hold the tag of the
//      tile that reaches u through slot d, which is u's neighbour in the
//      opposite slot;
//   4. every tile writes its own patterns into selfvalid and selfready,
//      and reads othervalid and otherready: bit e must be the neighbour in
//      slot e's bit (e + 3) mod 6.
// Link beats are counted per slot, together with wrap-around beats along
// the third dimension; a slot that carried nothing counts as a failure.
// The testbench computes neighbours from (x, y, z) coordinates itself.
// The original design names three-dimensional grids without detail; the
// six-slot order and the size of this test are this design's choices.
module tb_gpc_top_3d;
  import gpc_pkg::*;
  localparam int W  = 3;
  localparam int H  = 2;
  localparam int D  = 2;
  localparam int NT = W * H * D;
  localparam int NN = 6;
  localparam logic [31:0] TAG_OFS = 32'h100;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              core_req    [NT];
  logic              core_we     [NT];
  logic [BE_W-1:0]   core_be     [NT];
  logic [31:0]       core_addr   [NT];
  logic [XLEN-1:0]   core_wdata  [NT];
  logic              core_gnt    [NT];
  logic              core_rvalid [NT];
  logic [XLEN-1:0]   core_rdata  [NT];
  logic              core_err    [NT];
  logic              csr_valid   [NT];
  csr_op_e           csr_op      [NT];
  logic [11:0]       csr_addr    [NT];
  logic [XLEN-1:0]   csr_wdata   [NT];
  logic              csr_hit     [NT];
  logic [XLEN-1:0]   csr_rdata   [NT];
  logic              ic_a_valid  [NT];
  logic              ic_a_ready  [NT];
  tl_a_t             ic_a        [NT];
  logic              ic_d_valid  [NT];
  logic              ic_d_ready  [NT];
  tl_d_t             ic_d        [NT];
  logic  host_a_valid = 1'b0, host_a_ready, host_d_valid, host_d_ready = 1'b0;
  tl_a_t host_a;
  tl_d_t host_d;
  logic  ext_a_valid, ext_a_ready, ext_d_valid, ext_d_ready;
  tl_a_t ext_a;
  tl_d_t ext_d;

  gpc_top #(.W(W), .H(H), .TORUS(1'b1), .D(D)) dut (.*);

  // nothing in this test talks to the external port or fetches instructions
  assign ext_a_ready = 1'b0;
  assign ext_d_valid = 1'b0;
  assign ext_d       = '0;
  for (genvar t = 0; t < NT; t++) begin : g_ic
    assign ic_a_valid[t] = 1'b0;
    assign ic_a[t]       = '0;
    assign ic_d_ready[t] = 1'b0;
  end

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // neighbour of tile t through slot d (N, E, Up, S, W, Down), with wrap
  function automatic int nb(int t, int d);
    int x, y, z;
    x = t % W;
    y = (t / W) % H;
    z = t / (W * H);
    case (d)
      0: y = (y + H - 1) % H;
      1: x = (x + 1) % W;
      2: z = (z + D - 1) % D;
      3: y = (y + 1) % H;
      4: x = (x + W - 1) % W;
      default: z = (z + 1) % D;
    endcase
    return x + W * (y + H * z);
  endfunction

  function automatic int opp(int d);
    return (d + 3) % 6;
  endfunction

  function automatic logic [31:0] tag(int t, int d);
    return 32'((t << 8) | d);
  endfunction

  function automatic logic [5:0] vpat(int t);
    return 6'((t * 7 + 3) % 64);
  endfunction

  function automatic logic [5:0] rpat(int t);
    return 6'((t * 11 + 5) % 64);
  endfunction

  // ---------------- per-tile core drivers ----------------
  int  phase = 0;
  logic done [NT];

  for (genvar t = 0; t < NT; t++) begin : g_core
    task automatic mem(input logic we, input logic [31:0] addr, input logic [31:0] wd,
                       output logic [31:0] rd);
      @(negedge clk);
      core_req[t] = 1; core_we[t] = we; core_be[t] = 4'hF;
      core_addr[t] = addr; core_wdata[t] = wd;
      #1;
      while (!core_gnt[t]) begin @(negedge clk); #1; end
      @(negedge clk);
      core_req[t] = 0;
      #1;
      while (!core_rvalid[t]) begin @(negedge clk); #1; end
      rd = core_rdata[t];
      check($sformatf("tile %0d access %h without error", t, addr), 32'(core_err[t]), 0);
    endtask

    task automatic csr(input csr_op_e op, input logic [11:0] a, input logic [31:0] wd,
                       output logic [31:0] rd);
      @(negedge clk);
      csr_valid[t] = 1; csr_op[t] = op; csr_addr[t] = a; csr_wdata[t] = wd;
      #1 rd = csr_rdata[t];
      @(negedge clk);
      csr_valid[t] = 0;
    endtask

    initial begin
      logic [31:0] r;
      core_req[t] = 0; core_we[t] = 0; core_be[t] = 0; core_addr[t] = 0; core_wdata[t] = 0;
      csr_valid[t] = 0; csr_op[t] = CSR_READ; csr_addr[t] = 0; csr_wdata[t] = 0;
      done[t] = 0;
      wait (phase == 1);
      for (int d = 0; d < NN; d++)
        mem(1, neigh_vbase(d) + TAG_OFS + 32'(4 * d), tag(t, d), r);
      done[t] = 1;
      wait (phase == 2);
      done[t] = 0;
      for (int d = 0; d < NN; d++) begin
        mem(0, neigh_vbase(d) + TAG_OFS + 32'(4 * d), 0, r);
        check($sformatf("tile %0d reads back slot %0d", t, d), r, tag(t, d));
      end
      done[t] = 1;
      wait (phase == 3);
      done[t] = 0;
      csr(CSR_WRITE, CSR_SELFVALID, 32'(vpat(t)), r);
      csr(CSR_WRITE, CSR_SELFREADY, 32'(rpat(t)), r);
      done[t] = 1;
      wait (phase == 4);
      done[t] = 0;
      begin
        logic [31:0] ov, orr, ev, er;
        csr(CSR_READ, CSR_OTHERVALID, 0, ov);
        csr(CSR_READ, CSR_OTHERREADY, 0, orr);
        ev = '0; er = '0;
        for (int e = 0; e < NN; e++) begin
          ev[e] = vpat(nb(t, e))[opp(e)];
          er[e] = rpat(nb(t, e))[opp(e)];
        end
        check($sformatf("tile %0d othervalid", t), ov, ev);
        check($sformatf("tile %0d otherready", t), orr, er);
      end
      done[t] = 1;
    end
  end

  task automatic all_done();
    bit a;
    do begin
      @(negedge clk);
      a = 1;
      for (int t = 0; t < NT; t++) a &= done[t];
    end while (!a);
  endtask

  // ---------------- host on the SystemBus ----------------
  task automatic host_read(input logic [31:0] addr, output logic [31:0] rd);
    @(negedge clk);
    host_a = '0;
    host_a.opcode = TL_GET; host_a.size = 2; host_a.mask = 4'hF; host_a.address = addr;
    host_a_valid = 1;
    #1;
    while (!host_a_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    host_a_valid = 0;
    host_d_ready = 1;
    #1;
    while (!host_d_valid) begin @(negedge clk); #1; end
    rd = host_d.data;
    @(negedge clk);
    host_d_ready = 0;
  endtask

  // ---------------- link counters ----------------
  int n_slot [NN];
  int n_zwrap = 0;
  initial for (int d = 0; d < NN; d++) n_slot[d] = 0;
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NT; t++)
      for (int d = 0; d < NN; d++) if (dut.no_a_valid[t][d] && dut.no_a_ready[t][d]) begin
        n_slot[d]++;
        if ((d == 2 && t / (W * H) == 0) || (d == 5 && t / (W * H) == D - 1)) n_zwrap++;
      end
  end

  // ---------------- sequence ----------------
  initial begin
    logic [31:0] r;
    host_a = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    phase = 1;
    all_done();
    phase = 2;
    all_done();
    for (int u = 0; u < NT; u++)
      for (int d = 0; d < NN; d++) begin
        host_read(tile_pbase(u) + TAG_OFS + 32'(4 * d), r);
        check($sformatf("tile %0d word of slot %0d over the SystemBus", u, d),
              r, tag(nb(u, opp(d)), d));
      end
    phase = 3;
    all_done();
    repeat (2) @(negedge clk);
    phase = 4;
    all_done();
    for (int d = 0; d < NN; d++) begin
      $display("slot %0d: %0d link beats", d, n_slot[d]);
      check($sformatf("slot %0d carried beats", d), 32'(n_slot[d] > 0), 1);
    end
    $display("wrap-around beats along the third dimension: %0d", n_zwrap);
    check("wrap-around beats along the third dimension", 32'(n_zwrap > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
