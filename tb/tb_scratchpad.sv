// tb_scratchpad - self-checking test of the scratchpad memory.
//
// Writes random words with random byte enables to random word addresses of
// the full 32 KiB array, keeps a reference copy in the testbench and reads
// every touched word back, checking the data one cycle after the read
// (the one-cycle read latency) and that rdata holds while no read is done.
module tb_scratchpad;
  import gpc_pkg::*;
  localparam int unsigned BYTES = 32 * 1024;
  localparam int unsigned WORDS = BYTES / 4;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        en, we;
  logic [3:0]  be;
  logic [31:0] addr, wdata, rdata;
  int checks = 0, failures = 0;

  scratchpad #(.BYTES(BYTES)) dut (.clk, .en, .we, .be, .addr, .wdata, .rdata);

  logic [31:0] ref_mem [WORDS];
  int          idx [64];

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

  initial begin
    en = 0; we = 0; be = 0; addr = 0; wdata = 0;
    @(posedge clk);
    // full-word initialisation of the words under test
    for (int i = 0; i < 64; i++) begin
      idx[i] = (i == 0) ? 0 : (i == 1) ? WORDS - 1 : int'($urandom_range(WORDS - 1));
      for (int j = 0; j < i; j++) if (idx[j] == idx[i]) idx[i] = (idx[i] + 1) % WORDS;
      ref_mem[idx[i]] = $urandom;
      en <= 1; we <= 1; be <= 4'hF; addr <= idx[i] * 4; wdata <= ref_mem[idx[i]];
      @(posedge clk);
    end
    // partial writes
    for (int k = 0; k < 256; k++) begin
      int i;
      logic [3:0]  m;
      logic [31:0] v;
      i = $urandom_range(63);
      m = 4'($urandom);
      v = $urandom;
      for (int b = 0; b < 4; b++) if (m[b]) ref_mem[idx[i]][8*b +: 8] = v[8*b +: 8];
      en <= 1; we <= 1; be <= m; addr <= idx[i] * 4 + 32'($urandom_range(3)); wdata <= v;
      @(posedge clk);
    end
    // read back, data one cycle after the access
    for (int i = 0; i < 64; i++) begin
      en <= 1; we <= 0; be <= 0; addr <= idx[i] * 4;
      @(posedge clk);
      en <= 0;
      #1 check($sformatf("word %0d", idx[i]), rdata, ref_mem[idx[i]]);
      // rdata holds without a read
      @(posedge clk);
      #1 check("hold", rdata, ref_mem[idx[i]]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
