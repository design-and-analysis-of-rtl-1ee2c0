// rian_buffer: packet buffer of one router input, used once for control flits
// and once for payload flits.
//
// The buffer is a first-word-fall-through FIFO with a bypass: when it is empty,
// the flit arriving this cycle is offered at the output straight away, and if
// the router takes it in the same cycle it is never written. Only flits that
// stall (their output is busy or throttled) are stored, as the document's
// router does with stalled control and data packets. The document does not
// give a depth; DEPTH is this design's choice and must be at least 3 so that
// the two-slot throttle margin leaves room to work.
//
// Interface: in_valid/in_data push, out_valid/out_data show the oldest flit
// (or the arriving one when empty), pop takes it. count is the number of
// stored flits (registered). Timing: a pushed flit is visible at the output in
// the same cycle; storage is updated on the rising clock edge.
module rian_buffer #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [WIDTH-1:0]           in_data,
  output logic                       out_valid,
  output logic [WIDTH-1:0]           out_data,
  input  logic                       pop,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic             empty, push;

  assign empty     = (count == '0);
  assign out_valid = !empty || in_valid;
  assign out_data  = empty ? in_data : mem[rd_ptr];
  // A flit that passes through an empty buffer in its arrival cycle is not stored.
  assign push      = in_valid && !(empty && pop);

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop && !empty) rd_ptr <= incr(rd_ptr);
      count <= count + CW'(push) - CW'(pop && !empty);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // The throttle upstream must keep a full buffer from being written.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> (count < CW'(DEPTH) || pop))
    else $error("rian_buffer: write into a full buffer");
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> out_valid)
    else $error("rian_buffer: pop from an empty buffer");
endmodule
