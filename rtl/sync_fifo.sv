// Synchronous FIFO with a valid/ready interface on both sides.
//
// Used as the packet buffer (BUF) behind each classifier and for the smaller
// queues inside the verifier. The storage is a plain array written on push and
// read through a registered head, so it maps onto block or distributed RAM.
// Push when in_valid && in_ready; pop when out_valid && out_ready. Data pushed
// into an empty FIFO is visible at the output one cycle later. `count` is the
// number of stored entries. The depth is a parameter; the document gives no
// buffer size.
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [WIDTH-1:0]         in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [WIDTH-1:0]         out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             push, pop;

  assign in_ready  = (count < CW'(DEPTH));
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop)  rd_ptr <= incr(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  // The occupancy never exceeds the depth and never wraps below zero.
  always_ff @(posedge clk) if (rst_n) assert (count <= CW'(DEPTH));
endmodule
