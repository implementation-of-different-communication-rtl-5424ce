// tb_gpc_tile - self-checking test of one processing cell.
//
// The tile under test has hart id 2 and four neighbour links. The
// testbench plays the core (data and CSR ports), the instruction cache,
// the host on the SystemBus, the four neighbours on the incoming links and
// simple TileLink responders on the outgoing links and the SystemBus
// client port. It checks that:
//   * words the host writes at the tile's physical address are read by the
//     core at the common local virtual address, and vice versa;
//   * the instruction cache reads the scratchpad through its adapter;
//   * a neighbour in direction d reads and writes the scratchpad through
//     the window of slot opposite(d) of its own map;
//   * core accesses to neighbour slot n leave on outgoing link n;
//   * when the core and a neighbour want the scratchpad at once, the core
//     is served first and the neighbour is stalled;
//   * the handshake CSR bits drive and read the neighbour lines.
module tb_gpc_tile;
  import gpc_pkg::*;
  localparam int NN = 4;
  localparam int HART = 2;
  localparam logic [31:0] PBASE = 32'h8000_0000 + HART * 32'h8000;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic core_req, core_we, core_gnt, core_rvalid, core_err;
  logic [3:0]  core_be;
  logic [31:0] core_addr, core_wdata, core_rdata;
  logic csr_valid, csr_hit;
  csr_op_e csr_op;
  logic [11:0] csr_addr;
  logic [31:0] csr_wdata, csr_rdata;
  logic  ic_a_valid, ic_a_ready, ic_d_valid, ic_d_ready;
  tl_a_t ic_a;
  tl_d_t ic_d;
  logic  no_a_valid [NN], no_a_ready [NN], no_d_valid [NN], no_d_ready [NN];
  tl_a_t no_a [NN];
  tl_d_t no_d [NN];
  logic  ni_a_valid [NN], ni_a_ready [NN], ni_d_valid [NN], ni_d_ready [NN];
  tl_a_t ni_a [NN];
  tl_d_t ni_d [NN];
  logic  sbc_a_valid, sbc_a_ready, sbc_d_valid, sbc_d_ready;
  tl_a_t sbc_a;
  tl_d_t sbc_d;
  logic  sbm_a_valid, sbm_a_ready, sbm_d_valid, sbm_d_ready;
  tl_a_t sbm_a;
  tl_d_t sbm_d;
  logic [NN-1:0] hs_self_ready, hs_self_valid, hs_other_ready, hs_other_valid;
  int checks = 0, failures = 0;

  gpc_tile #(.HARTID(HART), .NNEIGH(NN)) dut (.*);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // responders on the outgoing links (0..3) and the SystemBus client (4)
  int out_hits [5];
  logic [31:0] out_addr [5];
  for (genvar p = 0; p < 5; p++) begin : g_resp
    logic av, ar, dv, dr;
    tl_a_t aa;
    tl_d_t dd;
    if (p < NN) begin : g_nb
      assign av = no_a_valid[p]; assign aa = no_a[p]; assign no_a_ready[p] = ar;
      assign no_d_valid[p] = dv; assign no_d[p] = dd; assign dr = no_d_ready[p];
    end else begin : g_sb
      assign av = sbc_a_valid; assign aa = sbc_a; assign sbc_a_ready = ar;
      assign sbc_d_valid = dv; assign sbc_d = dd; assign dr = sbc_d_ready;
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin ar <= 1; dv <= 0; dd <= '0; out_hits[p] <= 0; end
      else begin
        if (av && ar) begin
          ar <= 0; dv <= 1;
          dd.data <= aa.address + 32'(p);
          dd.opcode <= TL_ACCESS_ACK_DATA;
          out_hits[p] <= out_hits[p] + 1;
          out_addr[p] <= aa.address;
        end
        if (dv && dr) begin dv <= 0; ar <= 1; end
      end
  end

  // core data access
  task automatic core_acc(input logic we, input logic [31:0] addr,
                          input logic [31:0] wd, output logic [31:0] rd,
                          output logic err);
    @(negedge clk);
    core_req = 1; core_we = we; core_be = 4'hF; core_addr = addr; core_wdata = wd;
    #1;
    while (!core_gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    core_req = 0;
    #1;
    while (!core_rvalid) begin @(negedge clk); #1; end
    rd = core_rdata; err = core_err;
  endtask

  // TileLink access on a manager port of the tile:
  // port 0..3 = incoming neighbour link, 4 = SystemBus, 5 = ICache
  task automatic tl_acc(input int port, input logic we, input logic [31:0] addr,
                        input logic [31:0] wd, output logic [31:0] rd,
                        output logic denied, output int lat);
    tl_a_t m;
    logic  rdy, vld;
    m = '0;
    m.opcode = we ? TL_PUT_FULL : TL_GET;
    m.size = 2; m.mask = 4'hF; m.address = addr; m.data = wd; m.source = 8'(port);
    @(negedge clk);
    case (port)
      4: begin sbm_a_valid = 1; sbm_a = m; end
      5: begin ic_a_valid = 1; ic_a = m; end
      default: begin ni_a_valid[port] = 1; ni_a[port] = m; end
    endcase
    do begin
      #1;
      rdy = (port == 4) ? sbm_a_ready : (port == 5) ? ic_a_ready : ni_a_ready[port];
      if (!rdy) @(negedge clk);
    end while (!rdy);
    @(negedge clk);
    case (port)
      4: sbm_a_valid = 0;
      5: ic_a_valid = 0;
      default: ni_a_valid[port] = 0;
    endcase
    lat = 1;
    do begin
      #1;
      vld = (port == 4) ? sbm_d_valid : (port == 5) ? ic_d_valid : ni_d_valid[port];
      if (!vld) begin @(negedge clk); lat++; end
    end while (!vld);
    case (port)
      4: begin rd = sbm_d.data; denied = sbm_d.denied; sbm_d_ready = 1; end
      5: begin rd = ic_d.data; denied = ic_d.denied; ic_d_ready = 1; end
      default: begin rd = ni_d[port].data; denied = ni_d[port].denied; ni_d_ready[port] = 1; end
    endcase
    @(negedge clk);
    sbm_d_ready = 0; ic_d_ready = 0;
    for (int i = 0; i < NN; i++) ni_d_ready[i] = 0;
  endtask

  // collisions on the scratchpad: the core (port 0) wins over neighbour
  // link 1's adapter (port 4)
  int collisions = 0;
  always @(posedge clk) if (dut.arb_req[0] && dut.arb_req[4]) begin
    collisions++;
    check("core granted over neighbour", 32'({dut.arb_gnt[0], dut.arb_gnt[4]}), 32'b10);
  end

  logic [31:0] rd, v;
  logic        err;
  int          lat, lat_free, lat_busy = 0;

  initial begin
    core_req = 0; core_we = 0; core_be = 0; core_addr = 0; core_wdata = 0;
    csr_valid = 0; csr_op = CSR_READ; csr_addr = 0; csr_wdata = 0;
    ic_a_valid = 0; ic_a = '0; ic_d_ready = 0;
    sbm_a_valid = 0; sbm_a = '0; sbm_d_ready = 0;
    for (int i = 0; i < NN; i++) begin ni_a_valid[i] = 0; ni_a[i] = '0; ni_d_ready[i] = 0; end
    hs_other_ready = 0; hs_other_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // host writes at the physical address, core reads at the virtual one
    for (int i = 0; i < 16; i++) tl_acc(4, 1, PBASE + i*4, 32'hC0DE_0000 + i, rd, err, lat);
    for (int i = 0; i < 16; i++) begin
      core_acc(0, 32'h8000_0000 + i*4, 0, rd, err);
      check("core reads host data", rd, 32'hC0DE_0000 + i);
    end
    // a physical address of another tile is not this tile's
    tl_acc(4, 0, PBASE + 32'h8000, 0, rd, err, lat);
    check("other tile's physical range denied", 32'(err), 1);
    // core writes, host and ICache read back
    for (int i = 0; i < 16; i++) core_acc(1, 32'h8000_0100 + i*4, 32'hBEEF_0000 + i, rd, err);
    for (int i = 0; i < 16; i++) begin
      tl_acc(4, 0, PBASE + 32'h100 + i*4, 0, rd, err, lat);
      check("host reads core data", rd, 32'hBEEF_0000 + i);
      tl_acc(5, 0, 32'h8000_0100 + i*4, 0, rd, err, lat);
      check("icache fetch", rd, 32'hBEEF_0000 + i);
    end
    // neighbours: direction d uses its slot (d+2)%4 window
    for (int d = 0; d < NN; d++) begin
      logic [31:0] vb;
      vb = 32'h8000_0000 + ((d + 2) % 4 + 1) * 32'h8000;
      tl_acc(d, 1, vb + 32'h200 + d*4, 32'hAB00_0000 + d, rd, err, lat);
      check("neighbour write ok", 32'(err), 0);
      core_acc(0, 32'h8000_0200 + d*4, 0, rd, err);
      check($sformatf("neighbour %0d write seen by core", d), rd, 32'hAB00_0000 + d);
      tl_acc(d, 0, vb + 32'h100, 0, rd, err, lat);
      check($sformatf("neighbour %0d read", d), rd, 32'hBEEF_0000);
      tl_acc(d, 0, 32'h8000_0000 + ((d + 1) % 4 + 1) * 32'h8000, 0, rd, err, lat);
      check("wrong window denied", 32'(err), 1);
    end
    // outgoing links and the SystemBus client
    for (int n = 0; n < NN; n++) begin
      v = 32'h8000_0000 + (n + 1) * 32'h8000 + 32'h40;
      core_acc(0, v, 0, rd, err);
      check($sformatf("slot %0d leaves on link %0d", n, n), 32'(out_hits[n]), 1);
      check("virtual address unchanged", out_addr[n], v);
      check("answer from the link", rd, v + 32'(n));
    end
    core_acc(0, 32'h1000_0000, 0, rd, err);
    check("other address to SystemBus", 32'(out_hits[4]), 1);
    check("SystemBus answer", rd, 32'h1000_0004);
    // priority: neighbour alone, then together with a busy core
    tl_acc(1, 0, 32'h8002_0000, 0, rd, err, lat_free);
    for (int ofs = 0; ofs < 3; ofs++) begin
      fork
        tl_acc(1, 0, 32'h8002_0000, 0, rd, err, lat);
        begin
          repeat (ofs) @(negedge clk);
          core_req = 1; core_we = 0; core_be = 4'hF; core_addr = 32'h8000_0000;
          repeat (6) @(negedge clk);
          core_req = 0;
        end
      join
      if (lat > lat_busy) lat_busy = lat;
      check("neighbour data after stall", rd, 32'hC0DE_0000);
    end
    check("neighbour stalled behind the core", 32'(lat_busy > lat_free), 1);
    check("core won a collision", 32'(collisions > 0), 1);
    // handshake CSRs
    @(negedge clk);
    csr_valid = 1; csr_op = CSR_SET; csr_addr = CSR_SELFVALID; csr_wdata = 32'h2;
    @(negedge clk);
    csr_op = CSR_SET; csr_addr = CSR_SELFREADY; csr_wdata = 32'h8;
    @(negedge clk);
    csr_valid = 0;
    check("selfvalid line", 32'(hs_self_valid), 2);
    check("selfready line", 32'(hs_self_ready), 8);
    hs_other_valid = 4'h5; hs_other_ready = 4'hA;
    csr_addr = CSR_OTHERVALID;
    #1 check("othervalid", csr_rdata, 5);
    csr_addr = CSR_OTHERREADY;
    #1 check("otherready", csr_rdata, 32'hA);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
