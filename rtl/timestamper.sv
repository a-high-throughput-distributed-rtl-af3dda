// timestamper: the TS stage. Every cycle it picks, at random, one eligible VC
// at each input port and gives the flit at that VC the earliest departure
// time still free at the output port the flit is routed to. Departure times
// of an output are handed out first come, first served, so the router
// behaves like an output-buffered one; inputs asking for the same output in
// the same cycle are served in fixed priority order, input 0 first.
//
// The output-port reservation table is one register per output, next_ts,
// holding the earliest departure time not yet given out. A flit picked in
// cycle t can leave the middle memory no earlier than t + TS_LEAD (it still
// has to pass CR/VA and XB1/MM_WR), so next_ts is never let fall behind
// that. A grant is refused when the time it would give lies more than
// MAX_LEAD cycles ahead, which keeps every stored timestamp unambiguous in
// a TS_W-bit wrapping clock. Times given to flits that then fail conflict
// resolution are not taken back: that output slot goes unused.
// Random VC choice, fixed input priority and FCFS times follow the published
// design; the LFSR, the single next-free register per output, the horizon and
// not reclaiming failed slots are this design's choices.
// Outputs are combinational; next_ts and the LFSR update at the clock edge.
module timestamper
  import dsb_pkg::*;
#(
  parameter int NUM_VC   = DEF_NUM_VC,
  parameter int TS_W     = DEF_TS_W,
  parameter int LEAD     = TS_LEAD,
  parameter int MAX_LEAD = 2**(TS_W-1) - 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [TS_W-1:0]       now,
  input  logic [NUM_VC-1:0]     eligible [NUM_PORTS],
  input  port_e                 req_port [NUM_PORTS][NUM_VC],
  output logic [NUM_PORTS-1:0]  grant,
  output logic [VC_ID_W-1:0]    grant_vc  [NUM_PORTS],
  output port_e                 grant_port[NUM_PORTS],
  output logic [TS_W-1:0]       grant_ts  [NUM_PORTS]
);
  localparam int SW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  logic [31:0]     lfsr;
  logic [TS_W-1:0] next_ts     [NUM_PORTS];
  logic [TS_W-1:0] next_ts_upd [NUM_PORTS];
  logic [NUM_PORTS-1:0] picked;
  logic [VC_ID_W-1:0]   pick_vc [NUM_PORTS];

  // random pick of one eligible VC per input
  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      int unsigned start;
      start      = ((lfsr >> (i*SW)) & ((1 << SW) - 1)) % NUM_VC;
      picked[i]  = 1'b0;
      pick_vc[i] = '0;
      for (int k = 0; k < NUM_VC; k++) begin
        int unsigned idx;
        idx = (start + k) % NUM_VC;
        if (!picked[i] && eligible[i][idx]) begin
          picked[i]  = 1'b1;
          pick_vc[i] = VC_ID_W'(idx);
        end
      end
    end
  end

  // FCFS departure times per output, inputs in priority order
  always_comb begin
    next_ts_upd = next_ts;
    for (int i = 0; i < NUM_PORTS; i++) begin
      port_e o;
      o             = req_port[i][SW'(pick_vc[i])];
      grant[i]      = 1'b0;
      grant_vc[i]   = pick_vc[i];
      grant_port[i] = o;
      grant_ts[i]   = next_ts_upd[o];
      if (picked[i] && (TS_W'(next_ts_upd[o] - now) <= TS_W'(MAX_LEAD))) begin
        grant[i]        = 1'b1;
        next_ts_upd[o]  = next_ts_upd[o] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= 32'hACE1_2468;
      for (int o = 0; o < NUM_PORTS; o++) next_ts[o] <= TS_W'(LEAD);
    end else begin
      // x^32 + x^22 + x^2 + x + 1
      lfsr <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
      for (int o = 0; o < NUM_PORTS; o++) begin
        // keep next_ts at or after (now+1)+LEAD
        if ($signed(TS_W'(next_ts_upd[o] - (now + TS_W'(LEAD + 1)))) < 0)
          next_ts[o] <= now + TS_W'(LEAD + 1);
        else
          next_ts[o] <= next_ts_upd[o];
      end
    end
  end
endmodule
