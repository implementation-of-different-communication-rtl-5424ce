// tb_core_model - behavioural stand-in for the core of one grid tile.
//
// It is not a processor: it performs, through the tile's data port and
// CSR port, the loads, stores and CSR accesses that the systolic matrix
// multiplication program of one cell would perform, one access at a time
// as an in-order core does. Tile t = y*W + x computes C[y][x] of an
// N x N product on an N x N grid (N = W = H):
//   for k in 0..N-1:
//     a = (x == 0) ? A row word k from its own scratchpad : receive from W
//     b = (y == 0) ? B column word k from its own scratchpad : receive from N
//     acc += a * b
//     if x < N-1: send a to E;  if y < N-1: send b to S
//   store acc locally at C_OFS and print it on the SystemBus (PRINT_BASE + 4t)
// Every transfer follows the ready/valid sequence: receiver raises ready,
// sender writes the data word into the receiver's mailbox for that
// direction (a TileLink write through the neighbour window) and raises
// valid, receiver reads and drops ready, sender drops valid, receiver
// waits for valid low. With sw_mode=1 the ready and valid flags are words
// of the mailbox and are polled over memory (ready lives in the
// receiver's mailbox and is polled remotely by the sender); with sw_mode=0
// they are the selfready/selfvalid/otherready/othervalid CSR bits of the
// direction's slot. Pushing the data into the receiver's mailbox is this
// model's choice; the original protocol keeps the word in the sender's
// scratchpad and lets the receiver fetch it over the link. cycles counts clock cycles from start to done, like
// reading mcycle before and after. After check_start the model reads the
// result of its W neighbour through the neighbour window (the torus link
// for x == 0) into nb_result.
module tb_core_model
  import gpc_pkg::*;
#(
  parameter int W = 4,
  parameter int H = 4,
  parameter int T = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        sw_mode,
  input  logic        check_start,
  output logic        done,
  output logic        check_done,
  output int          cycles,
  output logic [31:0] result,
  output logic [31:0] nb_result,
  output int          n_hs,
  // tile data port
  output logic        core_req,
  output logic        core_we,
  output logic [3:0]  core_be,
  output logic [31:0] core_addr,
  output logic [31:0] core_wdata,
  input  logic        core_gnt,
  input  logic        core_rvalid,
  input  logic [31:0] core_rdata,
  input  logic        core_err,
  // tile CSR port
  output logic        csr_valid,
  output csr_op_e     csr_op,
  output logic [11:0] csr_addr,
  output logic [31:0] csr_wdata,
  input  logic [31:0] csr_rdata
);
  localparam logic [31:0] LOCAL  = 32'h8000_0000;
  localparam logic [31:0] A_OFS  = 32'h000;
  localparam logic [31:0] B_OFS  = 32'h100;
  localparam logic [31:0] C_OFS  = 32'h200;
  localparam logic [31:0] MB_OFS = 32'h400;   // mailbox of direction d at MB_OFS + 16*d
  localparam logic [31:0] PRINT_BASE = 32'h1000_0000;
  localparam int X = T % W;
  localparam int Y = T / W;
  localparam int N = W;

  function automatic logic [31:0] mb(int d, int field);   // 0 valid, 1 ready, 2 data
    return MB_OFS + 32'(16 * d + 4 * field);
  endfunction
  function automatic logic [31:0] win(int slot);
    return LOCAL + 32'((slot + 1) * 32'h8000);
  endfunction

  task automatic mem(input logic we, input logic [31:0] addr, input logic [31:0] wd,
                     output logic [31:0] rd);
    @(negedge clk);
    core_req = 1; core_we = we; core_be = 4'hF; core_addr = addr; core_wdata = wd;
    #1;
    while (!core_gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    core_req = 0;
    #1;
    while (!core_rvalid) begin @(negedge clk); #1; end
    rd = core_rdata;
    if (core_err) $display("tile %0d: access error at %h", T, addr);
  endtask

  task automatic csr(input csr_op_e op, input logic [11:0] a, input logic [31:0] wd,
                     output logic [31:0] rd);
    @(negedge clk);
    csr_valid = 1; csr_op = op; csr_addr = a; csr_wdata = wd;
    #1 rd = csr_rdata;
    @(negedge clk);
    csr_valid = 0;
  endtask

  task automatic send(input int d, input logic [31:0] v);
    logic [31:0] r;
    int od;
    od = (d + 2) % 4;
    if (sw_mode) begin
      do mem(0, win(d) + mb(od, 1), 0, r); while (r == 0);
      mem(1, win(d) + mb(od, 2), v, r);
      mem(1, win(d) + mb(od, 0), 1, r);
      do mem(0, win(d) + mb(od, 1), 0, r); while (r != 0);
      mem(1, win(d) + mb(od, 0), 0, r);
    end else begin
      do csr(CSR_READ, CSR_OTHERREADY, 0, r); while (!r[d]);
      mem(1, win(d) + mb(od, 2), v, r);
      csr(CSR_SET, CSR_SELFVALID, 32'(1) << d, r);
      do csr(CSR_READ, CSR_OTHERREADY, 0, r); while (r[d]);
      csr(CSR_CLEAR, CSR_SELFVALID, 32'(1) << d, r);
    end
    n_hs++;
  endtask

  task automatic recv(input int d, output logic [31:0] v);
    logic [31:0] r;
    if (sw_mode) begin
      mem(1, LOCAL + mb(d, 1), 1, r);
      do mem(0, LOCAL + mb(d, 0), 0, r); while (r == 0);
      mem(0, LOCAL + mb(d, 2), 0, v);
      mem(1, LOCAL + mb(d, 1), 0, r);
      do mem(0, LOCAL + mb(d, 0), 0, r); while (r != 0);
    end else begin
      csr(CSR_SET, CSR_SELFREADY, 32'(1) << d, r);
      do csr(CSR_READ, CSR_OTHERVALID, 0, r); while (!r[d]);
      mem(0, LOCAL + mb(d, 2), 0, v);
      csr(CSR_CLEAR, CSR_SELFREADY, 32'(1) << d, r);
      do csr(CSR_READ, CSR_OTHERVALID, 0, r); while (r[d]);
    end
  endtask

  bit counting;
  always @(posedge clk) if (counting) cycles++;

  initial begin
    logic [31:0] a, b, acc, r;
    core_req = 0; core_we = 0; core_be = 0; core_addr = 0; core_wdata = 0;
    csr_valid = 0; csr_op = CSR_READ; csr_addr = 0; csr_wdata = 0;
    done = 0; check_done = 0; cycles = 0; result = 0; nb_result = 0; n_hs = 0;
    counting = 0;
    forever begin
      wait (start && rst_n);
      @(posedge clk);
      cycles = 0; counting = 1; acc = 0; n_hs = 0;
      for (int k = 0; k < N; k++) begin
        if (X == 0) mem(0, LOCAL + A_OFS + 32'(4 * k), 0, a); else recv(DIR_W, a);
        if (Y == 0) mem(0, LOCAL + B_OFS + 32'(4 * k), 0, b); else recv(DIR_N, b);
        acc += a * b;
        if (X < N - 1) send(DIR_E, a);
        if (Y < N - 1) send(DIR_S, b);
      end
      mem(1, LOCAL + C_OFS, acc, r);
      counting = 0;
      result = acc;
      mem(1, PRINT_BASE + 32'(4 * T), acc, r);
      done = 1;
      wait (check_start);
      mem(0, win(DIR_W) + C_OFS, 0, nb_result);
      check_done = 1;
      wait (!start);
      done = 0; check_done = 0;
    end
  end
endmodule
