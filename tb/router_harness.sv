// router_harness: traffic source, downstream model and scoreboard for one
// dsb_router. It plays the five upstream routers and the five downstream
// routers around the router under test.
//
// Upstream side: every input injects 5-flit packets, spreading them over the
// input VCs, one flit per cycle at most, and never sends a flit on a VC it
// has no credit for (credits come back on credit_out). Downstream side: every
// output owns a model of the next router's VC buffers (VC_DEPTH flits each),
// drains them at random at SINK_PCT percent per cycle and returns one credit
// per drained flit.
//
// Checks: a directed single packet crosses the router in 6 cycles (head in
// to head out) with its five flits back to back; then, under random traffic
// (HOT_PCT percent of packets aimed at the east output), every flit leaves
// through the X-Y route of its destination, flits of one packet stay in
// order on one downstream VC and are never interleaved with another packet
// on that VC, no downstream buffer overflows, payloads arrive intact and
// every packet injected is delivered. traffic_done rises when all is
// delivered; the testbench then adds its own checks and prints the result.
module router_harness
  import dsb_pkg::*;
#(
  parameter int NUM_VC    = DEF_NUM_VC,
  parameter int VC_DEPTH  = DEF_VC_DEPTH,
  parameter int N_PKTS    = 600,
  parameter int LOAD_PCT  = 90,
  parameter int SINK_PCT  = 70,
  parameter int HOT_PCT   = 30,
  parameter int MAX_CYCLES = 200000
) (
  input  logic                 clk,
  output logic                 rst_n,
  output logic [COORD_W-1:0]   cur_x,
  output logic [COORD_W-1:0]   cur_y,
  output logic [NUM_PORTS-1:0] in_valid,
  output flit_t                in_flit    [NUM_PORTS],
  input  credit_t              credit_out [NUM_PORTS],
  input  logic [NUM_PORTS-1:0] out_valid,
  input  flit_t                out_flit   [NUM_PORTS],
  output credit_t              credit_in  [NUM_PORTS],
  output logic                 traffic_done,
  output int                   checks,
  output int                   failures
);
  localparam int PKT_LEN = 5;
  localparam int MY_X = 2, MY_Y = 2;

  int cycle = 0;

  // per-packet record
  int pkt_dest_port [N_PKTS+1];
  int pkt_rx_flits  [N_PKTS+1];
  int next_serial = 0;
  int phase = 0;           // 0: reset, 1: directed, 2: random, 3: drain
  int head_in_cycle = -1, head_out_cycle = -1, tail_out_cycle = -1;

  // upstream state per input VC
  int up_credit  [NUM_PORTS][NUM_VC];
  int up_serial  [NUM_PORTS][NUM_VC];   // packet in progress, -1 if none
  int up_idx     [NUM_PORTS][NUM_VC];
  int up_dx      [NUM_PORTS][NUM_VC];
  int up_dy      [NUM_PORTS][NUM_VC];
  // downstream state per output VC
  int dn_occ     [NUM_PORTS][NUM_VC];
  int dn_serial  [NUM_PORTS][NUM_VC];   // packet in progress, -1 if none
  int dn_idx     [NUM_PORTS][NUM_VC];

  function automatic logic [63:0] payload_tag(int serial, int idx);
    return {32'(serial) * 32'h9E37_79B1, 32'(idx) ^ 32'h5A5A_0000 ^ 32'(serial)};
  endfunction

  function automatic int route_of(int dx, int dy);
    if (dx > MY_X) return int'(PORT_EAST);
    if (dx < MY_X) return int'(PORT_WEST);
    if (dy > MY_Y) return int'(PORT_NORTH);
    if (dy < MY_Y) return int'(PORT_SOUTH);
    return int'(PORT_LOCAL);
  endfunction

  function automatic flit_t make_flit(int serial, int idx, int vc, int dx, int dy, int src);
    flit_t f;
    f.head = (idx == 0);
    f.tail = (idx == PKT_LEN - 1);
    f.vc   = VC_ID_W'(vc);
    f.data = '0;
    f.data[3:0]    = 4'(dx);
    f.data[7:4]    = 4'(dy);
    f.data[10:8]   = 3'(src);
    f.data[31:16]  = 16'(serial);
    f.data[35:32]  = 4'(idx);
    f.data[127:64] = payload_tag(serial, idx);
    return f;
  endfunction

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
    end
  endtask

  // ------------------------------------------------------------ control
  initial begin
    rst_n = 1'b0;
    cur_x = COORD_W'(MY_X);
    cur_y = COORD_W'(MY_Y);
    checks = 0;
    failures = 0;
    traffic_done = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    phase = 1;
    // directed packet: wait for it to drain
    wait (tail_out_cycle >= 0);
    repeat (20) @(posedge clk);
    check(head_out_cycle - head_in_cycle == 6,
          $sformatf("zero-load latency %0d, expected 6", head_out_cycle - head_in_cycle));
    check(tail_out_cycle - head_out_cycle == PKT_LEN - 1,
          $sformatf("packet spread over %0d cycles, expected %0d",
                    tail_out_cycle - head_out_cycle + 1, PKT_LEN));
    phase = 2;
    wait (next_serial >= N_PKTS);
    phase = 3;
    // wait for all packets to be delivered
    while (1) begin
      int done;
      done = 1;
      for (int s = 0; s < next_serial; s++) if (pkt_rx_flits[s] != PKT_LEN) done = 0;
      if (done != 0) break;
      @(posedge clk);
    end
    repeat (50) @(posedge clk);
    for (int s = 0; s < next_serial; s++)
      check(pkt_rx_flits[s] == PKT_LEN, $sformatf("packet %0d got %0d flits", s, pkt_rx_flits[s]));
    for (int o = 0; o < NUM_PORTS; o++)
      for (int v = 0; v < NUM_VC; v++) begin
        check(dn_serial[o][v] == -1, $sformatf("output %0d VC %0d left mid-packet", o, v));
      end
    $display("packets %0d, cycles %0d", next_serial, cycle);
    traffic_done = 1'b1;
  end

  // watchdog
  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, %0d packets injected", next_serial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ upstream
  initial begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        up_credit[i][v] = VC_DEPTH;
        up_serial[i][v] = -1;
        up_idx[i][v]    = 0;
      end
    end
    in_valid = '0;
    for (int i = 0; i < NUM_PORTS; i++) in_flit[i] = '0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // credits back from the router
      for (int i = 0; i < NUM_PORTS; i++)
        if (credit_out[i].valid) begin
          up_credit[i][int'(credit_out[i].vc)]++;
          check(up_credit[i][int'(credit_out[i].vc)] <= VC_DEPTH,
                $sformatf("input %0d VC %0d credit overflow", i, credit_out[i].vc));
        end
      for (int i = 0; i < NUM_PORTS; i++) begin
        int cand [NUM_VC];
        int nc, v;
        logic send;
        send = 1'b0;
        v = 0;
        nc = 0;
        if (phase == 1 && i == int'(PORT_WEST) && next_serial == 0) begin
          v = 0;
          up_serial[i][v] = next_serial;
          up_idx[i][v] = 0;
          up_dx[i][v] = MY_X + 1;
          up_dy[i][v] = MY_Y;
          pkt_dest_port[next_serial] = int'(PORT_EAST);
          pkt_rx_flits[next_serial] = 0;
          next_serial++;
          send = 1'b1;
        end else if (phase == 1 && up_serial[i][0] >= 0 && up_credit[i][0] > 0) begin
          v = 0;
          send = 1'b1;
        end else if (phase >= 2 && ($urandom % 100) < LOAD_PCT) begin
          int idle [NUM_VC];
          int ni;
          ni = 0;
          for (int k = 0; k < NUM_VC; k++) begin
            if (up_serial[i][k] >= 0 && up_credit[i][k] > 0) cand[nc++] = k;
            if (up_serial[i][k] < 0 && up_credit[i][k] > 0 && next_serial < N_PKTS) idle[ni++] = k;
          end
          if (nc > 0 && (ni == 0 || ($urandom % 4) != 0)) begin
            // continue a packet in progress
            v = cand[$urandom % nc];
            send = 1'b1;
          end else if (ni > 0) begin
            // open a new packet on an idle VC
            int dx, dy;
            v = idle[$urandom % ni];
            if (($urandom % 100) < HOT_PCT) begin
              dx = MY_X + 1 + int'($urandom % 2);
              dy = int'($urandom % 5);
            end else begin
              dx = int'($urandom % 5);
              dy = int'($urandom % 5);
            end
            up_serial[i][v] = next_serial;
            up_idx[i][v] = 0;
            up_dx[i][v] = dx;
            up_dy[i][v] = dy;
            pkt_dest_port[next_serial] = route_of(dx, dy);
            pkt_rx_flits[next_serial] = 0;
            next_serial++;
            send = 1'b1;
          end
        end
        if (send) begin
          flit_t f;
          f = make_flit(up_serial[i][v], up_idx[i][v], v, up_dx[i][v], up_dy[i][v], i);
          if (phase == 1 && up_idx[i][v] == 0) head_in_cycle = cycle + 1;  // visible next cycle
          in_valid[i] <= 1'b1;
          in_flit[i]  <= f;
          up_credit[i][v]--;
          up_idx[i][v]++;
          if (up_idx[i][v] == PKT_LEN) up_serial[i][v] = -1;
        end else begin
          in_valid[i] <= 1'b0;
        end
      end
    end
  end

  // ---------------------------------------------------------- downstream
  initial begin
    for (int o = 0; o < NUM_PORTS; o++)
      for (int v = 0; v < NUM_VC; v++) begin
        dn_occ[o][v] = 0;
        dn_serial[o][v] = -1;
        dn_idx[o][v] = 0;
      end
    for (int o = 0; o < NUM_PORTS; o++) credit_in[o] = '0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        // drain one flit of a random non-empty VC
        int cand [NUM_VC];
        int nc;
        nc = 0;
        for (int v = 0; v < NUM_VC; v++) if (dn_occ[o][v] > 0) cand[nc++] = v;
        if (nc > 0 && (phase == 1 || phase == 3 || ($urandom % 100) < SINK_PCT)) begin
          int v;
          v = cand[$urandom % nc];
          dn_occ[o][v]--;
          credit_in[o] <= '{valid: 1'b1, vc: VC_ID_W'(v)};
        end else begin
          credit_in[o] <= '0;
        end
        // receive
        if (out_valid[o]) begin
          flit_t f;
          int s, idx, v;
          f   = out_flit[o];
          v   = int'(f.vc);
          s   = int'(f.data[31:16]);
          idx = int'(f.data[35:32]);
          check(v < NUM_VC, "output VC out of range");
          if (v < NUM_VC && s < next_serial) begin
            check(pkt_dest_port[s] == o,
                  $sformatf("packet %0d left on port %0d, route says %0d", s, o, pkt_dest_port[s]));
            check(f.data[127:64] == payload_tag(s, idx), "payload corrupted");
            check(dn_occ[o][v] < VC_DEPTH, $sformatf("downstream overflow port %0d VC %0d", o, v));
            dn_occ[o][v]++;
            if (f.head) begin
              check(dn_serial[o][v] == -1 && idx == 0,
                    $sformatf("head of %0d on busy VC %0d/%0d", s, o, v));
              dn_serial[o][v] = s;
              dn_idx[o][v] = 1;
            end else begin
              check(dn_serial[o][v] == s && dn_idx[o][v] == idx,
                    $sformatf("flit %0d.%0d out of order on %0d/%0d", s, idx, o, v));
              dn_idx[o][v]++;
            end
            if (f.tail) begin
              check(idx == PKT_LEN - 1, "tail at wrong position");
              dn_serial[o][v] = -1;
            end
            pkt_rx_flits[s]++;
            if (s == 0) begin
              if (idx == 0) head_out_cycle = cycle;
              if (idx == PKT_LEN - 1) tail_out_cycle = cycle;
            end
          end else begin
            check(1'b0, "unknown flit at output");
          end
        end
      end
    end
  end
endmodule
