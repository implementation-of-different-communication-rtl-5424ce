// tb_tim_arbiter - self-checking test of the scratchpad priority arbiter.
//
// Six ports (core, ICache adapter, SystemBus adapter, three neighbour
// adapters) raise random requests that stay up until granted. The test
// checks every cycle that exactly the lowest-numbered requester is
// granted, that the scratchpad sees its payload, that rvalid follows the
// grant by one cycle with the word read by that port, and that a low
// priority port is stalled for as long as the core keeps requesting.
module tb_tim_arbiter;
  import gpc_pkg::*;
  localparam int NP = 6;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [NP-1:0]   req, gnt, rvalid;
  tim_req_t        reqd [NP];
  logic [31:0]     rdata;
  logic            mem_en, mem_we;
  logic [3:0]      mem_be;
  logic [31:0]     mem_addr, mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  tim_arbiter #(.NPORTS(NP)) dut (.*);

  // memory stand-in: the word read is a function of the address
  always_ff @(posedge clk) if (mem_en) mem_rdata <= mem_addr ^ 32'hA5A5_0000;

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

  int          exp_w;
  logic [NP-1:0] exp_gnt, prev_gnt;
  logic [31:0] prev_addr;
  int          stall5;

  initial begin
    rst_n = 0; req = 0;
    for (int i = 0; i < NP; i++) reqd[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev_gnt = 0;
    // random traffic
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NP; i++) if (!req[i] || gnt[i]) begin
        req[i] = ($urandom_range(2) != 0);
        reqd[i].we    = 1'($urandom);
        reqd[i].be    = 4'($urandom);
        reqd[i].addr  = {$urandom_range(255), 2'b00} + (i << 12);
        reqd[i].wdata = $urandom;
      end
      #1;
      exp_gnt = 0; exp_w = -1;
      for (int i = NP - 1; i >= 0; i--) if (req[i]) exp_w = i;
      if (exp_w >= 0) exp_gnt[exp_w] = 1;
      check("gnt", 32'(gnt), 32'(exp_gnt));
      check("mem_en", 32'(mem_en), 32'(exp_w >= 0));
      if (exp_w >= 0) begin
        check("mem_addr", mem_addr, reqd[exp_w].addr);
        check("mem_we", 32'(mem_we), 32'(reqd[exp_w].we));
        check("mem_wdata", mem_wdata, reqd[exp_w].wdata);
        check("mem_be", 32'(mem_be), 32'(reqd[exp_w].be));
      end
      check("rvalid", 32'(rvalid), 32'(prev_gnt));
      if (prev_gnt != 0) check("rdata", rdata, prev_addr ^ 32'hA5A5_0000);
      prev_gnt  = gnt;
      prev_addr = mem_addr;
    end
    // starvation: core and port 5 both request, core keeps requesting
    @(negedge clk);
    req = 0;
    @(negedge clk);
    req[0] = 1; req[5] = 1;
    stall5 = 0;
    for (int cyc = 0; cyc < 20; cyc++) begin
      #1 if (!gnt[5]) stall5++;
      @(negedge clk);
    end
    check("port 5 stalled while core requests", 32'(stall5), 32'd20);
    req[0] = 0;
    #1 check("port 5 granted once core idle", 32'(gnt[5]), 32'd1);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
