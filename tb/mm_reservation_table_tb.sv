// mm_reservation_table_tb: random commits into free entries of 10 banks of
// 10 entries, with departure times up to 40 cycles ahead, against a model
// of the table. Every cycle it checks the departure-conflict map for random
// query times, full flags, lowest free entry, occupancy and the read-out of
// the entries whose time has come (and that a read-out frees the entry).
module mm_reservation_table_tb;
  import dsb_pkg::*;
  localparam int NUM_MM = DEF_NUM_MM, MM_DEPTH = DEF_MM_DEPTH, TS_W = DEF_TS_W;
  localparam int BW = $clog2(NUM_MM), AW = $clog2(MM_DEPTH);

  logic clk = 0, rst_n = 0;
  logic [TS_W-1:0] now = '0;
  logic [TS_W-1:0] q_ts [NUM_PORTS];
  logic [NUM_MM-1:0] conflict [NUM_PORTS];
  logic [NUM_MM-1:0] full;
  logic [AW-1:0] free_addr [NUM_MM];
  logic [NUM_PORTS-1:0] c_valid = '0;
  logic [BW-1:0] c_bank [NUM_PORTS];
  logic [AW-1:0] c_addr [NUM_PORTS];
  logic [TS_W-1:0] c_ts [NUM_PORTS];
  port_e c_port [NUM_PORTS];
  logic [NUM_MM-1:0] rd_valid;
  logic [AW-1:0] rd_addr [NUM_MM];
  port_e rd_port [NUM_MM];
  logic [$clog2(NUM_MM*MM_DEPTH+1)-1:0] occupancy;

  // model
  logic            mv [NUM_MM][MM_DEPTH];
  logic [TS_W-1:0] mt [NUM_MM][MM_DEPTH];
  port_e           mp [NUM_MM][MM_DEPTH];
  int checks = 0, failures = 0, reads = 0, fulls = 0;

  always #5 clk = ~clk;
  mm_reservation_table #(.NUM_MM(NUM_MM), .MM_DEPTH(MM_DEPTH), .TS_W(TS_W)) dut (.*);

  task automatic check(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", now, m); end
  endtask

  initial begin
    foreach (mv[m, e]) mv[m][e] = 0;
    foreach (q_ts[i]) begin q_ts[i] = '0; c_bank[i] = '0; c_addr[i] = '0; c_ts[i] = '0; c_port[i] = PORT_LOCAL; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      logic [NUM_MM-1:0] used;
      int occ;
      @(negedge clk);
      // commits: each input to a distinct bank, a free entry, a unique time in that bank
      used = '0;
      for (int i = 0; i < NUM_PORTS; i++) begin
        int m, e, t;
        c_valid[i] = 1'b0;
        m = $urandom % NUM_MM;
        t = int'(now) + 1 + int'($urandom % (n < 1500 ? 40 : 12));
        q_ts[i] = TS_W'(t);
        if (!used[m] && ($urandom % 100) < 60) begin
          e = -1;
          for (int k = MM_DEPTH - 1; k >= 0; k--) if (!mv[m][k]) e = k;
          begin
            logic clash; clash = 0;
            for (int k = 0; k < MM_DEPTH; k++) if (mv[m][k] && mt[m][k] == TS_W'(t)) clash = 1;
            if (e >= 0 && !clash) begin
              c_valid[i] = 1'b1;
              c_bank[i] = BW'(m);
              c_addr[i] = AW'(e);
              c_ts[i] = TS_W'(t);
              c_port[i] = port_e'($urandom % NUM_PORTS);
              used[m] = 1'b1;
            end
          end
        end
      end
      #1;
      // compare combinational outputs with the model
      occ = 0;
      for (int m = 0; m < NUM_MM; m++) begin
        logic f; int fe; logic r; int ra;
        f = 1; fe = -1; r = 0; ra = 0;
        for (int e = MM_DEPTH - 1; e >= 0; e--) begin
          if (!mv[m][e]) begin f = 0; fe = e; end
          if (mv[m][e]) occ++;
          if (mv[m][e] && mt[m][e] == now) begin r = 1; ra = e; end
        end
        check(full[m] == f, "full flag");
        if (f) fulls++;
        if (fe >= 0) check(int'(free_addr[m]) == fe, "lowest free entry");
        check(rd_valid[m] == r, $sformatf("bank %0d read-out valid", m));
        if (r) begin
          check(int'(rd_addr[m]) == ra && rd_port[m] == mp[m][ra], "read-out entry/port");
          reads++;
        end
        for (int i = 0; i < NUM_PORTS; i++) begin
          logic cf; cf = 0;
          for (int e = 0; e < MM_DEPTH; e++) if (mv[m][e] && mt[m][e] == q_ts[i]) cf = 1;
          check(conflict[i][m] == cf, "departure conflict map");
        end
      end
      check(int'(occupancy) == occ, "occupancy");
      @(posedge clk);
      #1;
      for (int m = 0; m < NUM_MM; m++)
        for (int e = 0; e < MM_DEPTH; e++)
          if (mv[m][e] && mt[m][e] == now) mv[m][e] = 0;
      for (int i = 0; i < NUM_PORTS; i++)
        if (c_valid[i]) begin
          mv[c_bank[i]][c_addr[i]] = 1;
          mt[c_bank[i]][c_addr[i]] = c_ts[i];
          mp[c_bank[i]][c_addr[i]] = c_port[i];
        end
      now = now + 1'b1;
    end
    check(reads > 100 && fulls > 0, $sformatf("too few read-outs (%0d) or no full bank (%0d)", reads, fulls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
