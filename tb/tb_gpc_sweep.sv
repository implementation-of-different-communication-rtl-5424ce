// tb_gpc_sweep - systolic matrix multiplication on smaller N x N grids.
//
// The evaluation workload of the grid is the systolic multiplication of
// two N x N matrices on an N x N grid, for N from 1 to 8 (the matrices
// have the dimension of the grid). This testbench builds the 2 x 2, 3 x 3
// and 5 x 5 torus grids; tb_gpc_top covers 4 x 4 at the default parameters. A
// 1 x 1 grid has no neighbour traffic at all, so the environment's checks
// that every mechanism occurs cannot hold there, and it is left out.
// The 6 x 6 to 8 x 8 grids build the same RTL with more tiles and are left
// out only because their simulation models take long to compile. It runs the
// multiplication on each grid with the software and the hardware
// handshake, checks every result, and prints the cycle counts side by
// side. The hardware handshake must be faster on every grid.
module tb_gpc_sweep;
  localparam int NS = 3;
  localparam int SIZES [NS] = '{2, 3, 5};

  logic finished [NS];
  int   chk [NS], fail [NS], csw [NS], chw [NS];
  int   checks, failures;

  for (genvar i = 0; i < NS; i++) begin : g_grid
    tb_gpc_env #(.W(SIZES[i]), .H(SIZES[i]), .TORUS(1'b1)) u_env (
      .finished(finished[i]), .checks(chk[i]), .failures(fail[i]),
      .cyc_sw(csw[i]), .cyc_hw(chw[i])
    );
  end

  initial begin
    bit all;
    #1;
    do begin
      #1000;
      all = 1;
      for (int i = 0; i < NS; i++) all &= finished[i];
    end while (!all);
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin
      $display("systolic %0dx%0d: SW handshake %0d cycles, HW handshake %0d cycles",
               SIZES[i], SIZES[i], csw[i], chw[i]);
      checks += chk[i];
      failures += fail[i];
      if (SIZES[i] > 1) begin
        checks++;
        if (!(chw[i] < csw[i])) begin
          failures++;
          $display("FAIL %0dx%0d: HW handshake not faster", SIZES[i], SIZES[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
