// vc_allocator_tb: five inputs open packets (head flits asking for a VC of a
// random output), send their body flits while credits allow, and close them
// with a tail; the downstream side returns credits at random. A model of the
// free lists (FIFOs), reserved pools and credit counters checks every cycle:
// VA grants (k-th head request to an output needs k+1 free VCs), the VC each
// head receives (front of the free list, in input priority order), credit
// counts, free counts, the reserved pool, and that a VC rejoins the end of
// the free list only after its tail has left and its credits are all back.
module vc_allocator_tb;
  import dsb_pkg::*;
  localparam int NUM_VC = DEF_NUM_VC, VC_DEPTH = DEF_VC_DEPTH;
  localparam int CW = $clog2(VC_DEPTH+1), FW = $clog2(NUM_VC+1);

  logic clk = 0, rst_n = 0;
  logic [FW-1:0] free_count [NUM_PORTS];
  logic [CW-1:0] credits [NUM_PORTS][NUM_VC];
  logic [NUM_PORTS-1:0] va_req = '0, va_ok, c_valid = '0, c_head = '0, c_tail = '0;
  port_e va_port [NUM_PORTS], c_port [NUM_PORTS];
  logic [VC_ID_W-1:0] c_vc [NUM_PORTS], alloc_vc [NUM_PORTS];
  credit_t credit_in [NUM_PORTS];
  logic [NUM_VC-1:0] reserved [NUM_PORTS];

  // model
  int m_fl [NUM_PORTS][$];
  int m_cred [NUM_PORTS][NUM_VC];
  logic m_res [NUM_PORTS][NUM_VC], m_tail [NUM_PORTS][NUM_VC];
  logic act [NUM_PORTS];
  int a_port [NUM_PORTS], a_vc [NUM_PORTS], a_left [NUM_PORTS];
  int checks = 0, failures = 0, va_fails = 0, releases = 0;

  always #5 clk = ~clk;
  vc_allocator #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH)) dut (.*);

  task automatic check(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, m); end
  endtask

  initial begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        m_fl[o].push_back(v); m_cred[o][v] = VC_DEPTH; m_res[o][v] = 0; m_tail[o][v] = 0;
      end
      act[o] = 0; credit_in[o] = '0; va_port[o] = PORT_LOCAL; c_port[o] = PORT_LOCAL; c_vc[o] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int rank [NUM_PORTS], taken [NUM_PORTS], got [NUM_PORTS];
      @(negedge clk);
      // state outputs
      for (int o = 0; o < NUM_PORTS; o++) begin
        check(int'(free_count[o]) == m_fl[o].size(), $sformatf("free count of output %0d", o));
        for (int v = 0; v < NUM_VC; v++) begin
          check(int'(credits[o][v]) == m_cred[o][v], $sformatf("credit count o%0d v%0d dut %0d model %0d", o, v, credits[o][v], m_cred[o][v]));
          check(reserved[o][v] == m_res[o][v], "reserved pool");
        end
        rank[o] = 0; taken[o] = 0;
      end
      // requests
      for (int i = 0; i < NUM_PORTS; i++) begin
        va_req[i] = 0; c_valid[i] = 0; c_head[i] = 0; c_tail[i] = 0;
        if (!act[i]) begin
          va_req[i] = ($urandom % 100) < 60;
          va_port[i] = port_e'((n < 2500) ? $urandom % 2 : $urandom % NUM_PORTS);
          c_port[i] = va_port[i];
        end else if (m_cred[a_port[i]][a_vc[i]] > 0 && ($urandom % 100) < 50) begin
          c_valid[i] = 1; c_port[i] = port_e'(a_port[i]); c_vc[i] = VC_ID_W'(a_vc[i]);
          c_tail[i] = (a_left[i] == 1);
        end
      end
      #1;
      for (int i = 0; i < NUM_PORTS; i++)
        if (va_req[i]) begin
          int o;
          o = int'(va_port[i]);
          check(va_ok[i] == (rank[o] < m_fl[o].size()), "VA grant");
          rank[o]++;
          if (!va_ok[i]) va_fails++;
          if (va_ok[i] && ($urandom % 100) < 80) begin   // CR may still fail
            c_valid[i] = 1; c_head[i] = 1;
            c_tail[i] = ($urandom % 10) == 0;               // single-flit packet
          end
        end
      #1;
      for (int i = 0; i < NUM_PORTS; i++)
        if (c_valid[i] && c_head[i]) begin
          int o;
          o = int'(c_port[i]);
          check(int'(alloc_vc[i]) == m_fl[o][taken[o]], $sformatf("input %0d got VC %0d, expected %0d",
                i, alloc_vc[i], m_fl[o][taken[o]]));
          taken[o]++;
          got[i] = int'(alloc_vc[i]);
        end
      // downstream credits
      for (int o = 0; o < NUM_PORTS; o++) begin
        int cand [$];
        cand.delete();
        for (int v = 0; v < NUM_VC; v++) if (m_cred[o][v] < VC_DEPTH) cand.push_back(v);
        credit_in[o] = '0;
        if (cand.size() > 0 && ($urandom % 100) < 40)
          credit_in[o] = '{valid: 1'b1, vc: VC_ID_W'(cand[$urandom % cand.size()])};
      end
      @(posedge clk);
      #1;
      // model update: release (on the old state), commits, credits
      for (int o = 0; o < NUM_PORTS; o++) begin
        int rel;
        rel = -1;
        for (int v = NUM_VC - 1; v >= 0; v--)
          if (m_res[o][v] && m_tail[o][v] && m_cred[o][v] == VC_DEPTH) rel = v;
        for (int k = 0; k < taken[o]; k++) void'(m_fl[o].pop_front());
        if (rel >= 0) begin
          m_fl[o].push_back(rel); m_res[o][rel] = 0; m_tail[o][rel] = 0; releases++;
        end
      end
      for (int i = 0; i < NUM_PORTS; i++)
        if (c_valid[i]) begin
          int o, v;
          o = int'(c_port[i]);
          v = c_head[i] ? got[i] : int'(c_vc[i]);
          m_cred[o][v]--;
          if (c_head[i]) begin
            m_res[o][v] = 1; act[i] = 1; a_port[i] = o; a_vc[i] = v; a_left[i] = 4;
          end else a_left[i]--;
          if (c_tail[i]) begin m_tail[o][v] = 1; act[i] = 0; end
        end
      for (int o = 0; o < NUM_PORTS; o++)
        if (credit_in[o].valid) m_cred[o][int'(credit_in[o].vc)]++;
    end
    check(va_fails > 0 && releases > 50, $sformatf("VA failures %0d, releases %0d", va_fails, releases));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
