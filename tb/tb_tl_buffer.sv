// tb_tl_buffer - self-checking test of the TileLink link buffer.
//
// Streams 500 random A beats from the client side and 500 random D beats
// from the manager side through the buffer, with random valid gaps and
// random ready back-pressure on both far ends. Checks that each channel
// delivers its beats in order and unchanged, that a beat offered to an
// empty buffer appears on the far side exactly one cycle later, and that
// with both ends always ready one beat passes per cycle.
module tb_tl_buffer;
  import gpc_pkg::*;
  localparam int NB = 500;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic  c_a_valid, c_a_ready, c_d_valid, c_d_ready;
  logic  m_a_valid, m_a_ready, m_d_valid, m_d_ready;
  tl_a_t c_a, m_a;
  tl_d_t c_d, m_d;
  int checks = 0, failures = 0;

  tl_buffer dut (.*);

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

  logic [31:0] a_data [NB];
  logic [31:0] d_data [NB];
  int a_sent, a_rcvd, d_sent, d_rcvd;
  bit full_rate;

  // A source (client side)
  always @(negedge clk) if (rst_n) begin
    if (c_a_valid && c_a_ready_q) a_sent++;
    if (a_sent < NB && (full_rate || !c_a_valid || c_a_ready_q ? (full_rate || $urandom_range(3) != 0) : 1)) begin
      c_a_valid = (a_sent < NB);
      c_a = '0;
      c_a.opcode = TL_GET;
      c_a.address = a_data[a_sent];
      c_a.data = ~a_data[a_sent];
    end else if (c_a_valid && c_a_ready_q) c_a_valid = 0;
  end
  // D source (manager side)
  always @(negedge clk) if (rst_n) begin
    if (m_d_valid && m_d_ready_q) d_sent++;
    if (d_sent < NB && (full_rate || !m_d_valid || m_d_ready_q ? (full_rate || $urandom_range(3) != 0) : 1)) begin
      m_d_valid = (d_sent < NB);
      m_d = '0;
      m_d.data = d_data[d_sent];
      m_d.source = 8'(d_sent);
    end else if (m_d_valid && m_d_ready_q) m_d_valid = 0;
  end
  // ready sampled at the edge that transfers
  logic c_a_ready_q, m_d_ready_q;
  always @(posedge clk) begin
    c_a_ready_q <= c_a_ready;
    m_d_ready_q <= m_d_ready;
  end
  // sinks
  always @(negedge clk) if (rst_n) begin
    m_a_ready = full_rate || ($urandom_range(2) != 0);
    c_d_ready = full_rate || ($urandom_range(2) != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (m_a_valid && m_a_ready) begin
      check("A address", m_a.address, a_data[a_rcvd]);
      check("A data", m_a.data, ~a_data[a_rcvd]);
      a_rcvd <= a_rcvd + 1;
    end
    if (c_d_valid && c_d_ready) begin
      check("D data", c_d.data, d_data[d_rcvd]);
      check("D source", 32'(c_d.source), 32'(d_rcvd % 256));
      d_rcvd <= d_rcvd + 1;
    end
  end

  int t0, t1;
  initial begin
    for (int i = 0; i < NB; i++) begin a_data[i] = $urandom; d_data[i] = $urandom; end
    rst_n = 0; c_a_valid = 0; m_d_valid = 0; m_a_ready = 0; c_d_ready = 0;
    c_a = '0; m_d = '0;
    a_sent = 0; a_rcvd = 0; d_sent = 0; d_rcvd = 0; full_rate = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    wait (a_rcvd == NB && d_rcvd == NB);
    check("all A beats", 32'(a_rcvd), NB);
    check("all D beats", 32'(d_rcvd), NB);
    // one-cycle delay and full rate
    rst_n = 0;
    @(negedge clk);
    c_a_valid = 0; m_d_valid = 0;
    a_sent = 0; a_rcvd = 0; d_sent = 0; d_rcvd = 0; full_rate = 1;
    @(negedge clk);
    rst_n = 1;
    @(posedge clk);
    t0 = $time;
    check("far side empty before first beat", 32'(m_a_valid), 0);
    @(posedge clk);
    #1 check("first A beat after one cycle", 32'(m_a_valid), 1);
    wait (a_rcvd == NB && d_rcvd == NB);
    t1 = $time;
    check("full rate: 500 beats in about 500 cycles", 32'((t1 - t0) / 10 <= NB + 4), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
