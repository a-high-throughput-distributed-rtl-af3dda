// input_port: one router input. Arriving flits are written into the buffer
// of the VC they name (NUM_VC buffers of VC_DEPTH flits; 8 x 5 in the main
// configuration). Each VC keeps the state of the packet at its front: once a
// head flit reaches the front of an idle VC, the RC stage (route_compute)
// works out its output port and the VC is marked routed one cycle later.
// When conflict resolution commits a flit of this port (commit_*), the flit
// leaves its VC buffer, a credit for that VC is sent upstream on the next
// cycle, a committed head records the output VC it was given, and a
// committed tail returns the VC to idle.
// Per-VC routing with one RC unit per VC, and the registered credit output,
// are choices of this design.
module input_port
  import dsb_pkg::*;
#(
  parameter int NUM_VC   = DEF_NUM_VC,
  parameter int VC_DEPTH = DEF_VC_DEPTH
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [COORD_W-1:0]           cur_x,
  input  logic [COORD_W-1:0]           cur_y,
  // link side
  input  logic                         in_valid,
  input  flit_t                        in_flit,
  output credit_t                      credit_out,
  // per-VC view for the timestamper
  output logic [$clog2(VC_DEPTH+1)-1:0] vc_count   [NUM_VC],
  output flit_t                        vc_head    [NUM_VC],
  output flit_t                        vc_next    [NUM_VC],
  output logic [NUM_VC-1:0]            vc_routed,
  output port_e                        vc_out_port[NUM_VC],
  output logic [NUM_VC-1:0]            vc_has_ovc,
  output logic [VC_ID_W-1:0]           vc_ovc     [NUM_VC],
  // commit from conflict resolution
  input  logic                         commit_valid,
  input  logic [VC_ID_W-1:0]           commit_vc,
  input  logic                         commit_head,
  input  logic                         commit_tail,
  input  logic [VC_ID_W-1:0]           commit_ovc
);
  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    logic  push, pop;
    port_e rc_port;

    assign push = in_valid && (in_flit.vc == VC_ID_W'(v));
    assign pop  = commit_valid && (commit_vc == VC_ID_W'(v));

    vc_fifo #(.DEPTH(VC_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push, .push_flit(in_flit),
      .pop,
      .head_flit(vc_head[v]),
      .next_flit(vc_next[v]),
      .count(vc_count[v])
    );

    route_compute u_rc (
      .cur_x, .cur_y,
      .dst_x(flit_dest_x(vc_head[v])),
      .dst_y(flit_dest_y(vc_head[v])),
      .out_port(rc_port)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vc_routed[v]   <= 1'b0;
        vc_has_ovc[v]  <= 1'b0;
        vc_out_port[v] <= PORT_LOCAL;
        vc_ovc[v]      <= '0;
      end else if (pop) begin
        if (commit_head) begin
          vc_has_ovc[v] <= 1'b1;
          vc_ovc[v]     <= commit_ovc;
        end
        if (commit_tail) begin
          vc_routed[v]  <= 1'b0;
          vc_has_ovc[v] <= 1'b0;
        end
      end else if (!vc_routed[v] && vc_count[v] != 0 && vc_head[v].head) begin
        // RC stage
        vc_routed[v]   <= 1'b1;
        vc_out_port[v] <= rc_port;
      end
    end

    a_head_first: assert property (@(posedge clk) disable iff (!rst_n)
      (!vc_routed[v] && vc_count[v] != 0) |-> vc_head[v].head);
    a_commit_routed: assert property (@(posedge clk) disable iff (!rst_n)
      pop |-> vc_routed[v]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credit_out <= '0;
    else begin
      credit_out.valid <= commit_valid;
      credit_out.vc    <= commit_vc;
    end
  end
endmodule
