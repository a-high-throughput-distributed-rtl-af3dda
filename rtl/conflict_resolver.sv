// conflict_resolver: the CR stage. For every input holding a timestamped
// flit it looks for a middle-memory bank that
//   - no other input is writing in this cycle (no arrival conflict, since a
//     bank takes one write per cycle),
//   - holds no flit with the same timestamp (no departure conflict, since a
//     bank gives one read per cycle), and
//   - has a free entry.
// Inputs are served in fixed priority order, input 0 first, and each takes
// the lowest-numbered bank that qualifies; an input that finds none fails
// and its flit goes back to the TS stage. With at least 2P-1 banks a bank
// can always be found when space allows. Purely combinational.
// The two conflict rules are the published ones; the priority order and the
// lowest-bank choice are this design's.
module conflict_resolver
  import dsb_pkg::*;
#(
  parameter int NUM_MM = DEF_NUM_MM,
  localparam int BW    = (NUM_MM > 1) ? $clog2(NUM_MM) : 1
) (
  input  logic [NUM_PORTS-1:0] req,
  input  logic [NUM_MM-1:0]    conflict [NUM_PORTS],
  input  logic [NUM_MM-1:0]    full,
  output logic [NUM_PORTS-1:0] ok,
  output logic [BW-1:0]        bank [NUM_PORTS]
);
  always_comb begin
    logic [NUM_MM-1:0] used;
    used = '0;
    for (int i = 0; i < NUM_PORTS; i++) begin
      logic [NUM_MM-1:0] cand;
      cand    = ~used & ~conflict[i] & ~full;
      ok[i]   = 1'b0;
      bank[i] = '0;
      if (req[i]) begin
        for (int m = NUM_MM - 1; m >= 0; m--)
          if (cand[m]) begin
            ok[i]   = 1'b1;
            bank[i] = BW'(m);
          end
        if (ok[i]) used[bank[i]] = 1'b1;
      end
    end
  end
endmodule
