// Input buffer of a router port: a small first-in first-out flit queue.
//
// The router description gives every input port a buffer of two flit
// positions; DEPTH defaults to that. The queue is a circular array with
// read and write pointers and an occupancy counter. A flit is written when
// in_valid and in_ready are both high; in_ready is high whenever the queue
// is not full (it does not look at the read side, so there is no
// combinational path from the consumer to the producer). The oldest flit is
// shown on out_flit while out_valid is high and removed by out_pop. Both can
// happen in the same cycle. The reset empties the queue.
module sps_fifo
  import sps_pkg::*;
#(
  parameter int DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  in_ready,
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  out_pop
);

  localparam int PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t              mem [DEPTH];
  logic [PTR_W-1:0]   rd_ptr, wr_ptr;
  logic [PTR_W:0]     count;
  logic               push, pop;

  assign in_ready  = (count != (PTR_W+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_flit  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_pop && out_valid;

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_flit;
  end

endmodule
