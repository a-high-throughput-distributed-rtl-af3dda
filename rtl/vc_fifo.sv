// vc_fifo: the flit buffer of one input virtual channel (5 flits in the main
// configuration). One push and one pop per cycle. Besides the head entry it
// also shows the entry behind the head, so that the timestamping stage can
// work on the next flit of a VC while its head is still in conflict
// resolution (a choice of this design: the pipeline needs it to accept a
// flit per cycle from one VC). Push and pop take effect at the clock edge;
// the outputs show the state before that edge.
module vc_fifo
  import dsb_pkg::*;
#(
  parameter int DEPTH = DEF_VC_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  flit_t                    push_flit,
  input  logic                     pop,
  output flit_t                    head_flit,
  output flit_t                    next_flit,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  flit_t           mem [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= push_flit;
  end

  assign head_flit = mem[rd_ptr];
  assign next_flit = mem[inc(rd_ptr)];

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (count < CW'(DEPTH) || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> (count != 0));
endmodule
