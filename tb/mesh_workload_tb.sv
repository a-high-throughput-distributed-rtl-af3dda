// mesh_workload_tb: the synthetic workloads used to evaluate the router, run
// on 4x4 meshes (dsb_mesh) with X-Y routing and 5-flit packets, for the two
// buffer configurations: the main one (8 VCs x 5 flits per input, 10 banks x
// 10 flits: 300 flits per router) and the smaller one (5 VCs x 5 flits, 5
// banks x 10 flits: 175 flits). For uniform random, bit-complement and
// tornado traffic it offers a low load (30 % of the pattern's ideal
// throughput) and a high one (90 %), measures accepted throughput and average
// packet latency over a window, then stops injection and waits until every
// packet has arrived. Checks: every packet is delivered, intact, in order and
// to the right node, and at low load the network accepts what is offered
// (within 10 %). Ideal throughputs for X-Y routing on a 4x4 mesh, in flits per
// node per cycle, from channel-load bounds: uniform 0.94, complement 0.5,
// tornado 1.0.
module mesh_workload_tb;
  import dsb_pkg::*;
  localparam int K = 4;
  localparam int WARM = 400, MEAS = 1500, DRAIN = 6000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic inject = 1'b0, measure = 1'b0;
  int   pattern = 0, rate_ppm = 0, now = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1;

  int     created [2], ejected [2], wflits [2], wpkts [2], errors [2];
  longint wlat [2];
  logic   idle [2];
  string  cfg_name [2] = '{"DSB-300", "DSB-175"};

  dsb_mesh #(.K(K)) mesh300 (
    .clk, .rst_n, .pattern, .rate_ppm, .inject, .measure, .now,
    .tot_created(created[0]), .tot_ejected(ejected[0]), .tot_wflits(wflits[0]),
    .tot_wpkts(wpkts[0]), .tot_wlat(wlat[0]), .tot_errors(errors[0]), .all_idle(idle[0])
  );
  dsb_mesh #(.K(K), .NUM_VC(5), .VC_DEPTH(5), .NUM_MM(5), .MM_DEPTH(10)) mesh175 (
    .clk, .rst_n, .pattern, .rate_ppm, .inject, .measure, .now,
    .tot_created(created[1]), .tot_ejected(ejected[1]), .tot_wflits(wflits[1]),
    .tot_wpkts(wpkts[1]), .tot_wlat(wlat[1]), .tot_errors(errors[1]), .all_idle(idle[1])
  );

  task automatic check(logic c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic run(int pat, string name, real ideal, int pct);
    int waited;
    real offered, accepted;
    pattern = pat;
    rate_ppm = int'(ideal * pct * 10000.0);
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    inject = 1'b1;
    repeat (WARM) @(posedge clk);
    measure = 1'b1;
    repeat (MEAS) @(posedge clk);
    measure = 1'b0;
    inject = 1'b0;
    waited = 0;
    do begin
      @(posedge clk);
      waited++;
    end while ((created[0] != ejected[0] || !idle[0] || created[1] != ejected[1] || !idle[1])
               && waited < DRAIN);
    offered = ideal * pct / 100.0;
    for (int c = 0; c < 2; c++) begin
      accepted = real'(wflits[c]) / real'(MEAS * K * K);
      $display("%s %-10s offered %4.2f (%0d%% of ideal %4.2f)  accepted %5.3f flits/node/cycle (%5.1f%% of ideal)  latency %6.1f cycles  packets %0d",
               cfg_name[c], name, offered, pct, ideal, accepted, 100.0 * accepted / ideal,
               wpkts[c] > 0 ? real'(wlat[c]) / real'(wpkts[c]) : 0.0, created[c]);
      check(errors[c] == 0, $sformatf("%s %s: %0d bad flits", cfg_name[c], name, errors[c]));
      check(created[c] == ejected[c],
            $sformatf("%s %s: %0d of %0d packets delivered", cfg_name[c], name, ejected[c], created[c]));
      check(created[c] > 0, "no traffic");
      if (pct <= 30) check(accepted > 0.9 * offered, $sformatf("%s %s: low load not accepted", cfg_name[c], name));
    end
  endtask

  initial begin
    run(0, "uniform",    0.94, 30);
    run(0, "uniform",    0.94, 90);
    run(1, "complement", 0.5,  30);
    run(1, "complement", 0.5,  90);
    run(2, "tornado",    1.0,  30);
    run(2, "tornado",    1.0,  90);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * (WARM + MEAS + DRAIN + 10)) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
