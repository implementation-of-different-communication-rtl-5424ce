// tb_handshake_csr - self-checking test of the handshake CSRs.
//
// Runs random csrrw/csrrs/csrrc/read accesses on the four CSR numbers and
// on unrelated numbers against a reference model of selfready/selfvalid,
// drives random neighbour lines into otherready/othervalid, and checks:
// the value read (old value, in the access cycle), the hit flag, that the
// self registers appear on the lines to the neighbours in the next cycle,
// that the read-only CSRs ignore writes and that bits above the number of
// neighbours read as zero.
module tb_handshake_csr;
  import gpc_pkg::*;
  localparam int NN = 4;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic          csr_valid, csr_hit;
  csr_op_e       csr_op;
  logic [11:0]   csr_addr;
  logic [31:0]   csr_wdata, csr_rdata;
  logic [NN-1:0] self_ready, self_valid, other_ready, other_valid;
  int checks = 0, failures = 0;

  handshake_csr #(.NNEIGH(NN)) dut (.*);

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

  logic [NN-1:0] m_sr, m_sv, nv;
  logic [31:0]   exp_r;
  logic          exp_hit;

  initial begin
    rst_n = 0; csr_valid = 0; csr_op = CSR_READ; csr_addr = 0; csr_wdata = 0;
    other_ready = 0; other_valid = 0;
    m_sr = 0; m_sv = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    check("selfready reset", 32'(self_ready), 0);
    check("selfvalid reset", 32'(self_valid), 0);
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      other_ready = NN'($urandom);
      other_valid = NN'($urandom);
      csr_valid = 1;
      csr_op    = csr_op_e'($urandom_range(3));
      csr_addr  = ($urandom_range(9) == 0) ? 12'h300 + 12'($urandom_range(15))
                                            : 12'h400 + 12'($urandom_range(3));
      csr_wdata = $urandom;
      #1;
      exp_hit = 1;
      case (csr_addr)
        12'h400: exp_r = 32'(m_sr);
        12'h401: exp_r = 32'(m_sv);
        12'h402: exp_r = 32'(other_ready);
        12'h403: exp_r = 32'(other_valid);
        default: begin exp_r = 0; exp_hit = 0; end
      endcase
      check("hit", 32'(csr_hit), 32'(exp_hit));
      check($sformatf("rdata %h", csr_addr), csr_rdata, exp_r);
      if (csr_addr == 12'h400 || csr_addr == 12'h401) begin
        case (csr_op)
          CSR_WRITE: nv = csr_wdata[NN-1:0];
          CSR_SET:   nv = exp_r[NN-1:0] | csr_wdata[NN-1:0];
          CSR_CLEAR: nv = exp_r[NN-1:0] & ~csr_wdata[NN-1:0];
          default:   nv = exp_r[NN-1:0];
        endcase
        if (csr_addr == 12'h400) m_sr = nv; else m_sv = nv;
      end
      @(posedge clk);
      #1;
      check("selfready line", 32'(self_ready), 32'(m_sr));
      check("selfvalid line", 32'(self_valid), 32'(m_sv));
    end
    // one bit per neighbour: set only bit 2 of selfvalid
    @(negedge clk);
    csr_op = CSR_WRITE; csr_addr = 12'h401; csr_wdata = 0;
    @(negedge clk);
    csr_op = CSR_SET; csr_wdata = 32'h4;
    @(negedge clk);
    csr_valid = 0;
    check("single line raised", 32'(self_valid), 32'h4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
