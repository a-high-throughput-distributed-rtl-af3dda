// dsb_router_stress_tb: end-to-end test of a router shrunk until its
// storage limits bite: 4 VCs per input, the minimum 2P-1 = 9 middle-memory
// banks of a single flit, and 5-bit timestamps (departure times at most 15
// cycles ahead). Besides everything dsb_router_tb checks, it requires that
// the middle memory runs full, that conflict resolution finds no usable bank
// and that the timestamper refuses a departure time beyond its horizon.
module dsb_router_stress_tb;
  import dsb_pkg::*;

  localparam int NUM_VC   = 4;
  localparam int VC_DEPTH = 5;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic [COORD_W-1:0]   cur_x, cur_y;
  logic [NUM_PORTS-1:0] in_valid, out_valid;
  flit_t                in_flit [NUM_PORTS], out_flit [NUM_PORTS];
  credit_t              credit_out [NUM_PORTS], credit_in [NUM_PORTS];
  logic                 traffic_done;
  int                   h_checks, h_failures;

  always #5 clk = ~clk;

  dsb_router #(.NUM_VC(4), .VC_DEPTH(5), .NUM_MM(9), .MM_DEPTH(1), .TS_W(5)) dut (
    .clk, .rst_n, .cur_x, .cur_y,
    .in_valid, .in_flit, .credit_out,
    .out_valid, .out_flit, .credit_in
  );

  router_harness #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .N_PKTS(600),
                   .LOAD_PCT(95), .SINK_PCT(40), .HOT_PCT(60)) harness (
    .clk, .rst_n, .cur_x, .cur_y,
    .in_valid, .in_flit, .credit_out,
    .out_valid, .out_flit, .credit_in,
    .traffic_done, .checks(h_checks), .failures(h_failures)
  );

  // mechanisms of the router, watched inside it
  localparam int N_EV = 13;
  int    ev_count [N_EV];
  string ev_name  [N_EV] = '{
    "FCFS times, shared output",
    "CR/VA failure, back to TS",
    "VA: no free VC",
    "departure conflict avoided",
    "arrival conflict (2+ writes)",
    "same-VC look-ahead in TS",
    "look-ahead squashed",
    "downstream VC out of credit",
    "VC back to free list",
    "VC reused by a later packet",
    "middle memory full",
    "TS refused: beyond horizon",
    "CR: no conflict-free bank"
  };
  logic [N_EV-1:0] ev;

  always_comb begin
    ev = '0;
    for (int i = 0; i < NUM_PORTS; i++)
      for (int j = i + 1; j < NUM_PORTS; j++)
        if (dut.ts_grant[i] && dut.ts_grant[j] && dut.ts_port[i] == dut.ts_port[j]) ev[0] = 1'b1;
    ev[1] = |(dut.cr_v & ~dut.commit);
    ev[2] = |(dut.va_req & ~dut.va_ok);
    for (int i = 0; i < NUM_PORTS; i++) begin
      if (dut.commit[i] && dut.conflict[i] != '0) ev[3] = 1'b1;
      if (dut.ts_grant[i] && dut.cr_v[i] && dut.ts_vc[i] == dut.cr_vc[i] && dut.commit[i]) ev[5] = 1'b1;
    end
    ev[4] = $countones(dut.commit) >= 2;
    ev[6] = |(dut.ts_grant & dut.squash);
    for (int o = 0; o < NUM_PORTS; o++)
      for (int v = 0; v < NUM_VC; v++)
        if (dut.reserved[o][v] && dut.credits[o][v] == '0) ev[7] = 1'b1;
    ev[8] = |dut.u_va.release_v;
    ev[9] = vc_reused;
    ev[N_EV-1] = |(dut.cr_req & ~dut.commit);
    ev[10] = |dut.mm_full;
    ev[11] = |(dut.u_ts.picked & ~dut.u_ts.grant);
  end

  // a downstream VC that carries a second packet
  logic vc_reused = 1'b0;
  int   heads_on [NUM_PORTS][NUM_VC];
  initial foreach (heads_on[o, v]) heads_on[o][v] = 0;
  always @(posedge clk)
    for (int o = 0; o < NUM_PORTS; o++)
      if (out_valid[o] && out_flit[o].head) begin
        heads_on[o][int'(out_flit[o].vc)]++;
        if (heads_on[o][int'(out_flit[o].vc)] >= 2) vc_reused <= 1'b1;
      end

  initial foreach (ev_count[e]) ev_count[e] = 0;
  always @(posedge clk)
    if (rst_n) for (int e = 0; e < N_EV; e++) if (ev[e]) ev_count[e]++;

  initial begin
    int checks, failures;
    wait (traffic_done);
    checks = h_checks;
    failures = h_failures;
    for (int e = 0; e < N_EV; e++) begin
      $display("mechanism %-30s fired %0d times", ev_name[e], ev_count[e]);
      checks++;
      if (ev_count[e] == 0) begin
        failures++;
        $display("FAIL: mechanism %s never fired", ev_name[e]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
