// crossbar: an N_IN x N_OUT crossbar of flits. Each output takes the flit of
// the input its select names when its enable is set, and drives an invalid,
// all-zero flit otherwise. The router uses two of them: XB1 (5 x 10) from the
// input ports to the middle-memory banks and XB2 (10 x 5) from the banks to
// the output ports. Purely combinational; the select and enable are set up by
// the stage that precedes each crossbar (conflict resolution for XB1, the
// reservation table read-out for XB2). Mux-per-output is this design's
// choice of implementation.
module crossbar
  import dsb_pkg::*;
#(
  parameter int N_IN  = NUM_PORTS,
  parameter int N_OUT = DEF_NUM_MM,
  localparam int SW   = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  flit_t              in_flit  [N_IN],
  input  logic [N_OUT-1:0]   out_en,
  input  logic [SW-1:0]      out_sel  [N_OUT],
  output logic [N_OUT-1:0]   out_valid,
  output flit_t              out_flit [N_OUT]
);
  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      out_valid[o] = out_en[o] && (int'(out_sel[o]) < N_IN);
      out_flit[o]  = out_valid[o] ? in_flit[out_sel[o]] : '0;
    end
  end
endmodule
