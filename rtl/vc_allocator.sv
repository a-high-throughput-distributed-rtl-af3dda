// vc_allocator: the VA stage and the output-side flow control. For every
// output port it keeps
//   - a free list: a FIFO of the downstream VCs that no packet holds;
//   - the reserved pool: the VCs that a packet holds;
//   - a credit counter per downstream VC (VC_DEPTH when the VC is empty).
// A head flit in the CR/VA stage asks for a VC of its output; the k-th such
// request to an output in a cycle (inputs in priority order) is granted
// (va_ok) if the free list holds more than k VCs. When a flit commits, a head
// takes the next VC from the front of the free list (alloc_vc), a body or
// tail flit uses the VC its packet already holds; either way one credit of
// that VC is spent. Credits come back on credit_in. A VC returns to the end
// of the free list once its tail flit has committed and all its credits are
// back, i.e. the downstream VC is empty again (VCs are atomic); one VC per
// output rejoins the free list per cycle.
// Free list, reserved pool and moving a freed VC to the end of the free list
// follow the published design; the reserved pool as a bit set, atomic
// release on full credits and merging the credit counters into this block
// are this design's choices.
module vc_allocator
  import dsb_pkg::*;
#(
  parameter int NUM_VC   = DEF_NUM_VC,
  parameter int VC_DEPTH = DEF_VC_DEPTH,
  localparam int CW      = $clog2(VC_DEPTH+1),
  localparam int FW      = $clog2(NUM_VC+1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // state for the TS stage
  output logic [FW-1:0]        free_count [NUM_PORTS],
  output logic [CW-1:0]        credits    [NUM_PORTS][NUM_VC],
  // VA requests of head flits in the CR/VA stage
  input  logic [NUM_PORTS-1:0] va_req,
  input  port_e                va_port [NUM_PORTS],
  output logic [NUM_PORTS-1:0] va_ok,
  // committed flits
  input  logic [NUM_PORTS-1:0] c_valid,
  input  port_e                c_port [NUM_PORTS],
  input  logic [NUM_PORTS-1:0] c_head,
  input  logic [NUM_PORTS-1:0] c_tail,
  input  logic [VC_ID_W-1:0]   c_vc   [NUM_PORTS],
  output logic [VC_ID_W-1:0]   alloc_vc [NUM_PORTS],
  // credits from the downstream routers, one per output port
  input  credit_t              credit_in [NUM_PORTS],
  output logic [NUM_VC-1:0]    reserved  [NUM_PORTS]
);
  localparam int PW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  logic [VC_ID_W-1:0] fl     [NUM_PORTS][NUM_VC];
  logic [PW-1:0]      fl_rd  [NUM_PORTS];
  logic [NUM_VC-1:0]  tail_sent [NUM_PORTS];

  // (base + off) mod NUM_VC, for base < NUM_VC and off <= NUM_VC
  function automatic logic [PW-1:0] wrap(logic [PW-1:0] base, logic [FW-1:0] off);
    logic [PW+FW-1:0] x;
    x = (PW+FW)'(base) + (PW+FW)'(off);
    return (x >= (PW+FW)'(NUM_VC)) ? PW'(x - (PW+FW)'(NUM_VC)) : PW'(x);
  endfunction

  // VA grants: rank among this cycle's head requests for the same output
  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      logic [FW-1:0] rank;
      rank = '0;
      for (int j = 0; j < i; j++)
        if (va_req[j] && va_port[j] == va_port[i]) rank = rank + 1'b1;
      va_ok[i] = va_req[i] && (rank < free_count[va_port[i]]);
    end
  end

  // VC used by each committed flit, and pops from the free lists
  logic [FW-1:0] npop [NUM_PORTS];
  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      logic [FW-1:0] k;
      k = '0;
      for (int j = 0; j < i; j++)
        if (c_valid[j] && c_head[j] && c_port[j] == c_port[i]) k = k + 1'b1;
      alloc_vc[i] = (c_valid[i] && c_head[i]) ? fl[c_port[i]][wrap(fl_rd[c_port[i]], k)] : c_vc[i];
    end
    for (int o = 0; o < NUM_PORTS; o++) begin
      npop[o] = '0;
      for (int i = 0; i < NUM_PORTS; i++)
        if (c_valid[i] && c_head[i] && c_port[i] == port_e'(o)) npop[o] = npop[o] + 1'b1;
    end
  end

  // one VC per output rejoins the free list when its packet is gone
  logic [NUM_PORTS-1:0] release_v;
  logic [PW-1:0]        release_vc [NUM_PORTS];
  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      release_v[o]  = 1'b0;
      release_vc[o] = '0;
      for (int v = NUM_VC - 1; v >= 0; v--)
        if (reserved[o][v] && tail_sent[o][v] && credits[o][v] == CW'(VC_DEPTH)) begin
          release_v[o]  = 1'b1;
          release_vc[o] = PW'(v);
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        for (int v = 0; v < NUM_VC; v++) begin
          fl[o][v]      <= VC_ID_W'(v);
          credits[o][v] <= CW'(VC_DEPTH);
        end
        fl_rd[o]      <= '0;
        free_count[o] <= FW'(NUM_VC);
        reserved[o]   <= '0;
        tail_sent[o]  <= '0;
      end
    end else begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        logic [CW-1:0] cr [NUM_VC];
        for (int v = 0; v < NUM_VC; v++) cr[v] = credits[o][v];
        // releases (decided on last cycle's state)
        if (release_v[o]) begin
          fl[o][wrap(fl_rd[o], free_count[o])] <= VC_ID_W'(release_vc[o]);
          reserved[o][release_vc[o]]  <= 1'b0;
          tail_sent[o][release_vc[o]] <= 1'b0;
        end
        // commits
        for (int i = 0; i < NUM_PORTS; i++) begin
          if (c_valid[i] && c_port[i] == port_e'(o)) begin
            cr[PW'(alloc_vc[i])] = cr[PW'(alloc_vc[i])] - 1'b1;
            if (c_head[i]) reserved[o][PW'(alloc_vc[i])] <= 1'b1;
            if (c_tail[i]) tail_sent[o][PW'(alloc_vc[i])] <= 1'b1;
          end
        end
        // returned credits
        if (credit_in[o].valid) cr[PW'(credit_in[o].vc)] = cr[PW'(credit_in[o].vc)] + 1'b1;
        for (int v = 0; v < NUM_VC; v++) credits[o][v] <= cr[v];
        fl_rd[o]      <= wrap(fl_rd[o], npop[o]);
        free_count[o] <= free_count[o] - npop[o] + FW'(release_v[o]);
      end
    end
  end

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_chk
    a_credit_avail: assert property (@(posedge clk) disable iff (!rst_n)
      c_valid[i] |-> credits[c_port[i]][PW'(alloc_vc[i])] != 0);
    a_body_reserved: assert property (@(posedge clk) disable iff (!rst_n)
      c_valid[i] && !c_head[i] |-> reserved[c_port[i]][PW'(c_vc[i])]);
  end
endmodule
