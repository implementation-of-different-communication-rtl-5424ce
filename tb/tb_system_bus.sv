// tb_system_bus - self-checking test of the shared SystemBus.
//
// Three tiles: four clients (host and three tiles) and four managers
// (three tile adapters and the external port). Every client issues random
// Gets and Puts concurrently to random physical scratchpad addresses and
// to addresses outside the scratchpad map. Manager stand-ins accept after
// a random delay, check that the address belongs to them and answer with
// data derived from the address and their own index. The testbench checks
// every answer's data and source, that never more than one manager is
// busy (one operation on the bus at a time), and that with all four
// clients requesting all the time service rotates (round robin: each
// client served once in every four operations).
module tb_system_bus;
  import gpc_pkg::*;
  localparam int NT = 3;
  localparam int NC = NT + 1;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic  c_a_valid [NC], c_a_ready [NC], c_d_valid [NC], c_d_ready [NC];
  tl_a_t c_a [NC];
  tl_d_t c_d [NC];
  logic  m_a_valid [NC], m_a_ready [NC], m_d_valid [NC], m_d_ready [NC];
  tl_a_t m_a [NC];
  tl_d_t m_d [NC];
  int checks = 0, failures = 0;

  system_bus #(.NTILES(NT)) dut (.*);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: done %0d %0d %0d %0d state %0d", done[0], done[1], done[2], done[3], dut.state);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // managers
  logic mbusy [NC];
  for (genvar m = 0; m < NC; m++) begin : g_mgr
    int dly;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        m_a_ready[m] <= 0; m_d_valid[m] <= 0; mbusy[m] <= 0; m_d[m] <= '0;
      end else begin
        if (!mbusy[m]) m_a_ready[m] <= ($urandom_range(1) != 0);
        if (m_a_valid[m] && m_a_ready[m]) begin
          logic [31:0] rel;
          rel = m_a[m].address - 32'h8000_0000;
          mbusy[m] <= 1; m_a_ready[m] <= 0; dly <= $urandom_range(3);
          check($sformatf("manager %0d address", m),
                32'((m < NT) ? (m_a[m].address >= 32'h8000_0000 && rel / 32'h8000 == m)
                             : !(m_a[m].address >= 32'h8000_0000 && rel < NT * 32'h8000)), 1);
          m_d[m].data   <= m_a[m].address ^ (32'h0101_0101 * (m + 1));
          m_d[m].source <= m_a[m].source;
          m_d[m].opcode <= (m_a[m].opcode == TL_GET) ? TL_ACCESS_ACK_DATA : TL_ACCESS_ACK;
        end
        if (mbusy[m] && !m_d_valid[m]) begin
          if (dly == 0) m_d_valid[m] <= 1; else dly <= dly - 1;
        end
        if (m_d_valid[m] && m_d_ready[m]) begin m_d_valid[m] <= 0; mbusy[m] <= 0; end
      end
  end

  always @(posedge clk) if (rst_n) begin
    int nb;
    nb = 0;
    for (int m = 0; m < NC; m++) nb += int'(mbusy[m]);
    checks++;
    if (nb > 1) begin failures++; $display("FAIL two managers busy"); end
  end

  // clients
  int done [NC];
  bit saturate;
  int order [$];
  for (genvar c = 0; c < NC; c++) begin : g_cli
    initial begin
      logic [31:0] addr;
      int          tgt;
      c_a_valid[c] = 0; c_d_ready[c] = 0; c_a[c] = '0; done[c] = 0;
      wait (rst_n);
      for (int k = 0; k < 150; k++) begin
        @(negedge clk);
        if (!saturate) repeat ($urandom_range(3)) @(negedge clk);
        tgt = $urandom_range(NT);
        if (tgt < NT) addr = 32'h8000_0000 + 32'(tgt) * 32'h8000 + {$urandom_range(8191), 2'b00};
        else addr = ($urandom_range(1) != 0) ? 32'h1000_0000 + {$urandom_range(4095), 2'b00}
                                             : 32'h8000_0000 + 32'(NT) * 32'h8000 + 32'h100;
        c_a[c].opcode  = ($urandom_range(1) != 0) ? TL_GET : TL_PUT_FULL;
        c_a[c].address = addr;
        c_a[c].source  = 8'(c);
        c_a[c].mask    = 4'hF;
        c_a_valid[c]   = 1;
        #1;
        while (!c_a_ready[c]) begin @(negedge clk); #1; end
        @(negedge clk);
        c_a_valid[c] = 0;
        order.push_back(c);
        c_d_ready[c] = 1;
        #1;
        while (!c_d_valid[c]) begin @(negedge clk); #1; end
        check($sformatf("client %0d data", c), c_d[c].data, addr ^ (32'h0101_0101 * (tgt + 1)));
        check($sformatf("client %0d source", c), 32'(c_d[c].source), 32'(c));
        @(negedge clk);
        c_d_ready[c] = 0;
        done[c]++;
      end
    end
  end

  initial begin
    rst_n = 0; saturate = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] >= 75 && done[1] >= 75 && done[2] >= 75 && done[3] >= 75);
    // all clients keep requesting from here on
    saturate = 1;
    wait (done[0] == 150 && done[1] == 150 && done[2] == 150 && done[3] == 150);
    // in the last 40 operations every window of four holds each client once
    for (int i = order.size() - 40; i + 4 <= order.size(); i += 4) begin
      logic [NC-1:0] seen;
      seen = 0;
      for (int j = 0; j < 4; j++) seen[order[i + j]] = 1;
      check("round robin", 32'(seen), 32'hF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
