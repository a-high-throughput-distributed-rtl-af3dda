// mm_reservation_table: the middle-memory half of the reservation table.
// For every entry of every middle-memory bank it records whether the entry
// is taken, the departure time (timestamp) of the flit it holds and the
// output port that flit leaves through. From this it answers, combinationally:
//   - conflict[i][m]: bank m already holds a flit with the timestamp input i
//     asks about (a departure conflict);
//   - full[m] and free_addr[m]: whether bank m has room, and where;
//   - rd_*[m]: which entry of bank m departs in the current cycle (its
//     timestamp equals now) and to which output.
// Entries are claimed when conflict resolution commits a flit (one per input,
// each in a different bank) and released in the cycle the flit is read out.
// The table's existence follows the published design; keeping it as a list of
// entries per bank, and lowest-free-entry placement, are this design's
// choices.
module mm_reservation_table
  import dsb_pkg::*;
#(
  parameter int NUM_MM   = DEF_NUM_MM,
  parameter int MM_DEPTH = DEF_MM_DEPTH,
  parameter int TS_W     = DEF_TS_W,
  localparam int BW      = (NUM_MM   > 1) ? $clog2(NUM_MM)   : 1,
  localparam int AW      = (MM_DEPTH > 1) ? $clog2(MM_DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [TS_W-1:0]      now,
  // departure-conflict query
  input  logic [TS_W-1:0]      q_ts     [NUM_PORTS],
  output logic [NUM_MM-1:0]    conflict [NUM_PORTS],
  output logic [NUM_MM-1:0]    full,
  output logic [AW-1:0]        free_addr[NUM_MM],
  // commits from conflict resolution
  input  logic [NUM_PORTS-1:0] c_valid,
  input  logic [BW-1:0]        c_bank [NUM_PORTS],
  input  logic [AW-1:0]        c_addr [NUM_PORTS],
  input  logic [TS_W-1:0]      c_ts   [NUM_PORTS],
  input  port_e                c_port [NUM_PORTS],
  // departures this cycle
  output logic [NUM_MM-1:0]    rd_valid,
  output logic [AW-1:0]        rd_addr [NUM_MM],
  output port_e                rd_port [NUM_MM],
  output logic [$clog2(NUM_MM*MM_DEPTH+1)-1:0] occupancy
);
  logic [MM_DEPTH-1:0] ent_valid [NUM_MM];
  logic [TS_W-1:0]     ent_ts    [NUM_MM][MM_DEPTH];
  port_e               ent_port  [NUM_MM][MM_DEPTH];

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      for (int m = 0; m < NUM_MM; m++) begin
        conflict[i][m] = 1'b0;
        for (int e = 0; e < MM_DEPTH; e++)
          if (ent_valid[m][e] && ent_ts[m][e] == q_ts[i]) conflict[i][m] = 1'b1;
      end
    end
  end

  always_comb begin
    occupancy = '0;
    for (int m = 0; m < NUM_MM; m++) begin
      full[m]      = &ent_valid[m];
      free_addr[m] = '0;
      for (int e = MM_DEPTH - 1; e >= 0; e--)
        if (!ent_valid[m][e]) free_addr[m] = AW'(e);
      rd_valid[m] = 1'b0;
      rd_addr[m]  = '0;
      rd_port[m]  = PORT_LOCAL;
      for (int e = 0; e < MM_DEPTH; e++) begin
        occupancy = occupancy + ent_valid[m][e];
        if (ent_valid[m][e] && ent_ts[m][e] == now) begin
          rd_valid[m] = 1'b1;
          rd_addr[m]  = AW'(e);
          rd_port[m]  = ent_port[m][e];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NUM_MM; m++) ent_valid[m] <= '0;
    end else begin
      for (int m = 0; m < NUM_MM; m++)
        if (rd_valid[m]) ent_valid[m][rd_addr[m]] <= 1'b0;
      for (int i = 0; i < NUM_PORTS; i++)
        if (c_valid[i]) ent_valid[c_bank[i]][c_addr[i]] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_PORTS; i++)
      if (c_valid[i]) begin
        ent_ts[c_bank[i]][c_addr[i]]   <= c_ts[i];
        ent_port[c_bank[i]][c_addr[i]] <= c_port[i];
      end
  end

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_chk
    a_commit_free: assert property (@(posedge clk) disable iff (!rst_n)
      c_valid[i] |-> !ent_valid[c_bank[i]][c_addr[i]]);
    a_commit_no_conflict: assert property (@(posedge clk) disable iff (!rst_n)
      c_valid[i] && q_ts[i] == c_ts[i] |-> !conflict[i][c_bank[i]]);
  end
endmodule
