// input_port_tb: packets of 1 to 5 flits with random destinations arrive on
// random VCs of one input port (never more than a VC holds), and routed VCs
// are drained at random through the commit interface. A model checks every
// cycle: buffer counts, the head flit and the flit behind it, that a VC is
// routed exactly one cycle after a head flit reaches its front (the RC stage),
// the X-Y output port, the output VC recorded when a head commits and dropped
// when a tail commits, and one credit upstream in the cycle after each commit.
module input_port_tb;
  import dsb_pkg::*;
  localparam int NUM_VC = DEF_NUM_VC, VC_DEPTH = DEF_VC_DEPTH;
  localparam int CW = $clog2(VC_DEPTH+1);

  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] cur_x = 4'd5, cur_y = 4'd6;
  logic in_valid = 0;
  flit_t in_flit = '0;
  credit_t credit_out;
  logic [CW-1:0] vc_count [NUM_VC];
  flit_t vc_head [NUM_VC], vc_next [NUM_VC];
  logic [NUM_VC-1:0] vc_routed, vc_has_ovc;
  port_e vc_out_port [NUM_VC];
  logic [VC_ID_W-1:0] vc_ovc [NUM_VC];
  logic commit_valid = 0, commit_head = 0, commit_tail = 0;
  logic [VC_ID_W-1:0] commit_vc = '0, commit_ovc = '0;

  flit_t q [NUM_VC][$];
  logic  m_routed [NUM_VC], m_has [NUM_VC];
  int    m_ovc [NUM_VC];
  int    tx_left [NUM_VC], tx_dx [NUM_VC], tx_dy [NUM_VC], tx_n [NUM_VC];
  int    checks = 0, failures = 0, commits = 0, last_commit_vc = -1;

  always #5 clk = ~clk;
  input_port #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH)) dut (.*);

  task automatic check(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, m); end
  endtask

  function automatic port_e xy(int dx, int dy);
    if (dx > 5) return PORT_EAST;
    if (dx < 5) return PORT_WEST;
    if (dy > 6) return PORT_NORTH;
    if (dy < 6) return PORT_SOUTH;
    return PORT_LOCAL;
  endfunction

  initial begin
    int serial;
    serial = 0;
    foreach (m_routed[v]) begin m_routed[v] = 0; m_has[v] = 0; tx_left[v] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      // compare with the model
      for (int v = 0; v < NUM_VC; v++) begin
        check(int'(vc_count[v]) == q[v].size(), "count");
        if (q[v].size() > 0) check(vc_head[v] == q[v][0], "head flit");
        if (q[v].size() > 1) check(vc_next[v] == q[v][1], "flit behind head");
        check(vc_routed[v] == m_routed[v], $sformatf("VC %0d routed flag", v));
        if (m_routed[v]) check(vc_has_ovc[v] == m_has[v], "output VC held");
        if (m_has[v] && m_routed[v]) check(int'(vc_ovc[v]) == m_ovc[v], "output VC");
      end
      check(credit_out.valid == (last_commit_vc >= 0), "credit valid");
      if (last_commit_vc >= 0) check(int'(credit_out.vc) == last_commit_vc, "credit VC");
      // arrival: continue or start a packet on a random VC with room
      in_valid = 0;
      begin
        int v;
        v = $urandom % NUM_VC;
        if (q[v].size() < VC_DEPTH && ($urandom % 100) < 80) begin
          flit_t f;
          if (tx_left[v] == 0) begin
            tx_left[v] = 1 + $urandom % 5;
            tx_dx[v] = $urandom % 12;
            tx_dy[v] = $urandom % 12;
            tx_n[v] = 0;
          end
          f.head = (tx_n[v] == 0);
          f.tail = (tx_left[v] == 1);
          f.vc = VC_ID_W'(v);
          f.data = {$urandom, $urandom, $urandom, $urandom};
          f.data[3:0] = 4'(tx_dx[v]);
          f.data[7:4] = 4'(tx_dy[v]);
          in_flit = f;
          in_valid = 1;
          tx_left[v]--;
          tx_n[v]++;
        end
      end
      // commit the front flit of a random routed VC
      commit_valid = 0;
      begin
        int v;
        v = $urandom % NUM_VC;
        if (m_routed[v] && q[v].size() > 0 && ($urandom % 100) < 70) begin
          commit_valid = 1;
          commit_vc = VC_ID_W'(v);
          commit_head = q[v][0].head;
          commit_tail = q[v][0].tail;
          commit_ovc = VC_ID_W'($urandom);
        end
      end
      @(posedge clk);
      #1;
      // model update
      for (int v = 0; v < NUM_VC; v++) begin
        if (commit_valid && int'(commit_vc) == v) begin
          flit_t f;
          f = q[v].pop_front();
          commits++;
          if (f.head) begin m_has[v] = 1; m_ovc[v] = int'(commit_ovc); end
          if (f.tail) begin m_routed[v] = 0; m_has[v] = 0; end
        end else if (!m_routed[v] && q[v].size() > 0) begin
          m_routed[v] = 1;
          check(vc_out_port[v] == xy(int'(q[v][0].data[3:0]), int'(q[v][0].data[7:4])), "X-Y route");
        end
      end
      last_commit_vc = commit_valid ? int'(commit_vc) : -1;
      if (in_valid) q[int'(in_flit.vc)].push_back(in_flit);
    end
    check(commits > 1000, "too few commits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
