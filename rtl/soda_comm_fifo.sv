// soda_comm_fifo: communication unit between the host side and the hardware
// side of the platform. The host pushes task descriptors through one of these
// to the task scheduler, and the accelerators' results come back through
// another. The description only says that communication units transfer
// partitioned tasks between software and hardware nodes; building them as
// first-in first-out queues is this design's choice.
//
// Interface: valid/ready on both sides. A word is written when in_valid &&
// in_ready and leaves when out_valid && out_ready. in_ready is low when the
// queue holds DEPTH words; out_valid is high whenever it holds one or more.
// Timing: a word written in cycle t can be read in cycle t+1 (no fall-through).
// A full queue accepts a write in the same cycle as a read. Storage is a
// register array indexed by read and write pointers.
module soda_comm_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T              mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic          push, pop;

  assign out_valid = (count != '0);
  assign in_ready  = (count != DEPTH[$bits(count)-1:0]) || out_ready;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // A producer may not withdraw a word it offered before it was taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid;
  endproperty
  a_hold: assert property (p_hold);

endmodule
