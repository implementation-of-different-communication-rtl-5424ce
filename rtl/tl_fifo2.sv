// tl_fifo2 - two-entry valid/ready FIFO used by the TileLink buffer.
//
// A beat written at a rising edge (in_valid && in_ready) is visible on
// out_data/out_valid from the next cycle on. in_ready is high while at most
// one entry is held, and out_valid while at least one is, so neither side's
// handshake depends combinationally on the other. Full throughput: with
// both sides active one beat passes per cycle.
module tl_fifo2 #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);
  T           buf_q [2];
  logic       rd_ptr, wr_ptr;
  logic [1:0] count;

  assign in_ready  = (count != 2'd2);
  assign out_valid = (count != 2'd0);
  assign out_data  = buf_q[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= 1'b0;
      wr_ptr <= 1'b0;
      count  <= 2'd0;
      buf_q[0] <= T'('0);
      buf_q[1] <= T'('0);
    end else begin
      if (in_valid && in_ready) begin
        buf_q[wr_ptr] <= in_data;
        wr_ptr        <= ~wr_ptr;
      end
      if (out_valid && out_ready) rd_ptr <= ~rd_ptr;
      count <= count + 2'((in_valid && in_ready)) - 2'((out_valid && out_ready));
    end
  end
endmodule
