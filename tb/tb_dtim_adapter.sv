// tb_dtim_adapter - self-checking test of the TileLink-to-scratchpad adapter.
//
// The adapter under test is configured like an incoming neighbour adapter
// (BASE = 0x8001_0000, neighbour slot 1). The testbench stands in for the
// arbiter and scratchpad: it grants requests after a random delay, returns
// the word one cycle after the grant and keeps a reference memory. It
// checks Get/PutFullData/PutPartialData results, the address remapping,
// the echoed source id and opcode, denied answers for addresses outside
// the window and for unsupported opcodes (with no scratchpad access), D
// beats that hold under back-pressure, and the three-cycle latency of an
// uncontended Get.
module tb_dtim_adapter;
  import gpc_pkg::*;
  localparam logic [31:0] BASE  = 32'h8001_0000;
  localparam int unsigned BYTES = 32 * 1024;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic      a_valid, a_ready, d_valid, d_ready;
  tl_a_t     a;
  tl_d_t     d;
  logic      tim_req, tim_gnt, tim_rvalid;
  tim_req_t  tim;
  logic [31:0] tim_rdata;
  int checks = 0, failures = 0;

  dtim_adapter #(.BASE(BASE), .BYTES(BYTES)) dut (.*);

  // arbiter + scratchpad stand-in
  logic [31:0] mem [BYTES/4];
  int          gnt_delay = 0;
  bit          random_gnt = 1;
  int          tim_accesses = 0;
  always_comb tim_gnt = tim_req && (gnt_delay == 0);
  always_ff @(posedge clk) begin
    tim_rvalid <= tim_gnt;
    if (tim_req && !tim_gnt) gnt_delay <= gnt_delay - 1;
    if (tim_gnt) begin
      tim_accesses <= tim_accesses + 1;
      gnt_delay <= random_gnt ? $urandom_range(3) : 0;
      if (tim.we) begin
        for (int b = 0; b < 4; b++)
          if (tim.be[b]) mem[tim.addr[14:2]][8*b +: 8] <= tim.wdata[8*b +: 8];
      end else tim_rdata <= mem[tim.addr[14:2]];
    end
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // one TileLink operation; returns the D beat and the cycles from A to D
  task automatic tl_op(input tl_a_op_e op, input logic [31:0] addr,
                       input logic [3:0] mask, input logic [31:0] data,
                       input logic [7:0] src, output tl_d_t resp, output int lat);
    @(negedge clk);
    a.opcode = op; a.param = 0; a.size = 2; a.source = src;
    a.address = addr; a.mask = mask; a.data = data;
    a_valid = 1;
    while (!a_ready) @(negedge clk);
    @(negedge clk);
    a_valid = 0;
    lat = 1;
    while (!d_valid) begin @(negedge clk); lat++; end
    // random back-pressure on D: the beat must hold
    while ($urandom_range(1)) begin
      resp = d;
      @(negedge clk);
      check("D held", 32'(d_valid), 1);
      check("D stable", d.data, resp.data);
    end
    resp = d;
    d_ready = 1;
    @(negedge clk);
    d_ready = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ref_mem [BYTES/4];
  tl_d_t r;
  int    lat, n_before;

  initial begin
    rst_n = 0; a_valid = 0; d_ready = 0; a = '0;
    for (int i = 0; i < BYTES/4; i++) begin mem[i] = 0; ref_mem[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      int          w;
      logic [3:0]  m;
      logic [31:0] v;
      logic [7:0]  src;
      w   = (k < 2) ? (k == 0 ? 0 : BYTES/4 - 1) : $urandom_range(63);
      v   = $urandom;
      src = 8'($urandom);
      case ($urandom_range(2))
        0: begin
          tl_op(TL_PUT_FULL, BASE + w*4, 4'hF, v, src, r, lat);
          ref_mem[w] = v;
          check("put ack", 32'(r.opcode), 32'(TL_ACCESS_ACK));
        end
        1: begin
          m = 4'($urandom);
          tl_op(TL_PUT_PARTIAL, BASE + w*4, m, v, src, r, lat);
          for (int b = 0; b < 4; b++) if (m[b]) ref_mem[w][8*b +: 8] = v[8*b +: 8];
          check("put partial ack", 32'(r.opcode), 32'(TL_ACCESS_ACK));
        end
        default: begin
          tl_op(TL_GET, BASE + w*4, 4'hF, 0, src, r, lat);
          check("get opcode", 32'(r.opcode), 32'(TL_ACCESS_ACK_DATA));
          check($sformatf("get data w%0d", w), r.data, ref_mem[w]);
        end
      endcase
      check("source", 32'(r.source), 32'(src));
      check("not denied", 32'(r.denied), 0);
    end
    // out of window, both sides, and an unsupported opcode: denied, no access
    n_before = tim_accesses;
    tl_op(TL_GET, BASE - 4, 4'hF, 0, 8'h11, r, lat);
    check("below window denied", 32'(r.denied), 1);
    tl_op(TL_PUT_FULL, BASE + BYTES, 4'hF, 0, 8'h12, r, lat);
    check("above window denied", 32'(r.denied), 1);
    tl_op(tl_a_op_e'(3'd2), BASE, 4'hF, 0, 8'h13, r, lat);
    check("bad opcode denied", 32'(r.denied), 1);
    check("no scratchpad access when denied", 32'(tim_accesses), 32'(n_before));
    // uncontended latency
    random_gnt = 0;
    @(negedge clk);
    while (gnt_delay != 0) @(negedge clk);
    tl_op(TL_GET, BASE + 8, 4'hF, 0, 8'h20, r, lat);
    check("uncontended Get latency", 32'(lat), 3);
    check("get data", r.data, ref_mem[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
