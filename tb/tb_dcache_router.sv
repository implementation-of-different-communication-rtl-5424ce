// tb_dcache_router - self-checking test of the data-side address decode.
//
// The router under test has neighbour slots 0, 1 and 3 connected and slot 2
// unconnected (NEIGH_EN = 4'b1011), as at a grid edge. The testbench
// stands in for the scratchpad arbiter (random grant delay, word one cycle
// after the grant), for the three neighbour links and for the SystemBus
// (TileLink responders with random A and D delays, data derived from the
// address and the port). Random loads and stores to the local window, to
// all four neighbour windows and to addresses outside the scratchpad
// windows are issued; each must appear on the right port only, with the
// right address (offset for the scratchpad, virtual address unchanged on
// TileLink), opcode and mask, and must return the right data. Accesses to
// slot 2 must fail with err and touch no port. A local load must answer
// one cycle after its grant.
module tb_dcache_router;
  import gpc_pkg::*;
  localparam int NN = 4;
  localparam logic [NN-1:0] EN = 4'b1011;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic core_req, core_we, core_gnt, core_rvalid, core_err;
  logic [3:0]  core_be;
  logic [31:0] core_addr, core_wdata, core_rdata;
  logic tim_req, tim_gnt, tim_rvalid;
  tim_req_t tim;
  logic [31:0] tim_rdata;
  logic  nb_a_valid [NN], nb_a_ready [NN], nb_d_valid [NN], nb_d_ready [NN];
  tl_a_t nb_a [NN];
  tl_d_t nb_d [NN];
  logic  sb_a_valid, sb_a_ready, sb_d_valid, sb_d_ready;
  tl_a_t sb_a;
  tl_d_t sb_d;
  int checks = 0, failures = 0;

  dcache_router #(.NNEIGH(NN), .NEIGH_EN(EN), .SRC_ID(5)) dut (.*);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // what each port saw last: 0..3 neighbours, 4 SystemBus, 5 scratchpad
  int          hits [6];
  logic [31:0] last_addr [6];
  logic [3:0]  last_mask [6];
  logic        last_we [6];
  logic [31:0] last_wdata [6];
  logic [7:0]  last_src [6];

  // scratchpad arbiter stand-in
  int tdel;
  always_comb tim_gnt = tim_req && (tdel == 0);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tdel <= 0; tim_rvalid <= 0;
    end else begin
      tim_rvalid <= tim_gnt;
      if (tim_req && !tim_gnt) tdel <= tdel - 1;
      if (tim_gnt) begin
        tdel <= $urandom_range(2);
        tim_rdata <= tim.addr ^ 32'h5555_0000;
        hits[5] <= hits[5] + 1;
        last_addr[5] <= tim.addr; last_we[5] <= tim.we;
        last_mask[5] <= tim.be;   last_wdata[5] <= tim.wdata;
      end
    end

  // TileLink responders for the neighbour links and the SystemBus
  logic  r_a_valid [5], r_a_ready [5], r_d_valid [5], r_d_ready [5];
  tl_a_t r_a [5];
  tl_d_t r_d [5];
  for (genvar p = 0; p < 5; p++) begin : g_resp
    int dly;
    logic busy;
    if (p < NN) begin : g_nb
      assign r_a_valid[p] = nb_a_valid[p];
      assign r_a[p]       = nb_a[p];
      assign nb_a_ready[p] = r_a_ready[p];
      assign nb_d_valid[p] = r_d_valid[p];
      assign nb_d[p]       = r_d[p];
      assign r_d_ready[p]  = nb_d_ready[p];
    end else begin : g_sb
      assign r_a_valid[p] = sb_a_valid;
      assign r_a[p]       = sb_a;
      assign sb_a_ready   = r_a_ready[p];
      assign sb_d_valid   = r_d_valid[p];
      assign sb_d         = r_d[p];
      assign r_d_ready[p] = sb_d_ready;
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        r_a_ready[p] <= 0; r_d_valid[p] <= 0; busy <= 0; dly <= 0; r_d[p] <= '0;
      end else begin
        if (!busy) r_a_ready[p] <= ($urandom_range(2) != 0);
        if (r_a_valid[p] && r_a_ready[p]) begin
          busy <= 1; r_a_ready[p] <= 0; dly <= $urandom_range(3);
          hits[p] <= hits[p] + 1;
          last_addr[p] <= r_a[p].address; last_mask[p] <= r_a[p].mask;
          last_we[p] <= (r_a[p].opcode != TL_GET); last_wdata[p] <= r_a[p].data;
          last_src[p] <= r_a[p].source;
          r_d[p].opcode <= (r_a[p].opcode == TL_GET) ? TL_ACCESS_ACK_DATA : TL_ACCESS_ACK;
          r_d[p].data   <= r_a[p].address ^ (32'h1111_1111 * (p + 1));
          r_d[p].denied <= 0;
          r_d[p].source <= r_a[p].source;
        end
        if (busy && !r_d_valid[p]) begin
          if (dly == 0) r_d_valid[p] <= 1; else dly <= dly - 1;
        end
        if (r_d_valid[p] && r_d_ready[p]) begin r_d_valid[p] <= 0; busy <= 0; end
      end
  end

  int h0 [6];
  int port, glat;
  logic [31:0] addr, exp_d;

  initial begin
    rst_n = 0; core_req = 0; core_we = 0; core_be = 0; core_addr = 0; core_wdata = 0;
    for (int i = 0; i < 6; i++) hits[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 1500; k++) begin
      int kind;
      kind = $urandom_range(6);     // 0 local, 1..4 slot 0..3, 5..6 SystemBus
      case (kind)
        0: begin port = 5; addr = 32'h8000_0000 + {$urandom_range(8191), 2'b00}; end
        1, 2, 3, 4: begin
          port = kind - 1;
          addr = 32'h8000_0000 + 32'(kind) * 32'h8000 + {$urandom_range(8191), 2'b00};
        end
        default: begin
          port = 4;
          addr = ($urandom_range(1) != 0) ? 32'h8002_8000 + {$urandom_range(65535), 2'b00}
                                          : {$urandom_range(32'h7FFF_FFFF) & 32'h7FFF_FFFC};
        end
      endcase
      for (int i = 0; i < 6; i++) h0[i] = hits[i];
      core_req = 1; core_we = 1'($urandom); core_addr = addr; core_wdata = $urandom;
      core_be = core_we ? 4'($urandom_range(1, 15)) : 4'hF;
      #1;
      while (!core_gnt) begin @(negedge clk); #1; end
      @(negedge clk);
      core_req = 0;
      glat = 1;
      #1;
      while (!core_rvalid) begin @(negedge clk); #1; glat++; end
      if (port == 5) begin
        exp_d = (addr - 32'h8000_0000) ^ 32'h5555_0000;
        check("local answer one cycle after grant", 32'(glat), 1);
      end else exp_d = addr ^ (32'h1111_1111 * (port + 1));
      if (port == 2) begin
        check("slot 2 err", 32'(core_err), 1);
      end else begin
        check("err", 32'(core_err), 0);
        if (!core_we) check($sformatf("rdata port %0d", port), core_rdata, exp_d);
      end
      @(negedge clk);
      for (int i = 0; i < 6; i++)
        check($sformatf("port %0d used", i), 32'(hits[i] - h0[i]),
              32'(i == port && port != 2));
      if (port != 2) begin
        check("address", last_addr[port],
              port == 5 ? addr - 32'h8000_0000 : addr);
        check("write flag", 32'(last_we[port]), 32'(core_we));
        if (core_we) begin
          check("wdata", last_wdata[port], core_wdata);
          check("mask", 32'(last_mask[port]), 32'(core_be));
        end
        if (port != 5) check("source id", 32'(last_src[port]), 5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
