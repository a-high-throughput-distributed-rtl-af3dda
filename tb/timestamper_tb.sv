// timestamper_tb: random eligibility and routes for 5 inputs x 8 VCs, then a
// phase where all inputs flood one output. Checks, against a model of the
// per-output next-free departure time: a grant goes only to an eligible VC
// and is given whenever a VC is eligible and the time is within the horizon;
// the time is the earliest free one of that output, never sooner than
// now + 3, handed out in input priority order; times of one output are never
// given twice; the random VC choice reaches every VC; and the horizon (127
// cycles ahead) makes the timestamper refuse once an output is booked up.
module timestamper_tb;
  import dsb_pkg::*;
  localparam int NUM_VC = DEF_NUM_VC, TS_W = DEF_TS_W, LEAD = TS_LEAD;
  localparam int MAX_LEAD = 2**(TS_W-1) - 1;

  logic clk = 0, rst_n = 0;
  logic [TS_W-1:0] now = '0;
  logic [NUM_VC-1:0] eligible [NUM_PORTS];
  port_e req_port [NUM_PORTS][NUM_VC];
  logic [NUM_PORTS-1:0] grant;
  logic [VC_ID_W-1:0] grant_vc [NUM_PORTS];
  port_e grant_port [NUM_PORTS];
  logic [TS_W-1:0] grant_ts [NUM_PORTS];

  int checks = 0, failures = 0, refusals = 0;
  int model_nts [NUM_PORTS];      // absolute times
  int abs_now = 0;
  int picks [NUM_VC];
  int last_given [NUM_PORTS];

  always #5 clk = ~clk;
  timestamper #(.NUM_VC(NUM_VC), .TS_W(TS_W)) dut (.*);

  task automatic check(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", abs_now, m); end
  endtask

  initial begin
    foreach (model_nts[o]) begin model_nts[o] = LEAD; last_given[o] = -1; end
    foreach (picks[v]) picks[v] = 0;
    foreach (eligible[i]) eligible[i] = '0;
    foreach (req_port[i, v]) req_port[i][v] = PORT_LOCAL;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      logic flood;
      @(negedge clk);
      flood = (n >= 3000 && n < 3200);
      for (int i = 0; i < NUM_PORTS; i++) begin
        eligible[i] = flood ? '1 : NUM_VC'($urandom) & NUM_VC'($urandom);
        if (n >= 2000 && n < 2500 && i == 0) eligible[i] = '1;
        for (int v = 0; v < NUM_VC; v++)
          req_port[i][v] = flood ? PORT_EAST : port_e'($urandom % NUM_PORTS);
      end
      #1;
      for (int i = 0; i < NUM_PORTS; i++) begin
        if (eligible[i] == '0) begin
          check(!grant[i], "grant with nothing eligible");
        end else begin
          int o, lead;
          check(eligible[i][int'(grant_vc[i])] == 1'b1 || !grant[i], "granted VC not eligible");
          o = int'(req_port[i][int'(grant_vc[i])]);
          check(grant_port[i] == port_e'(o), "granted port");
          lead = model_nts[o] - abs_now;
          if (lead <= MAX_LEAD) begin
            check(grant[i] && grant_ts[i] == TS_W'(model_nts[o]),
                  $sformatf("input %0d: time %0d, expected %0d", i, grant_ts[i], TS_W'(model_nts[o])));
            check(lead >= LEAD, "departure sooner than the pipeline allows");
            check(model_nts[o] > last_given[o], "time given twice");
            last_given[o] = model_nts[o];
            model_nts[o]++;
            if (i == 0 && n >= 2000 && n < 2500) picks[int'(grant_vc[i])]++;
          end else begin
            check(!grant[i], "grant beyond the horizon");
            refusals++;
          end
        end
      end
      @(posedge clk);
      #1;
      abs_now++;
      now = TS_W'(abs_now);
      foreach (model_nts[o]) if (model_nts[o] < abs_now + LEAD) model_nts[o] = abs_now + LEAD;
    end
    foreach (picks[v]) check(picks[v] > 20, $sformatf("VC %0d picked only %0d times of 500", v, picks[v]));
    check(refusals > 0, "horizon never reached");
    $display("refusals %0d", refusals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
