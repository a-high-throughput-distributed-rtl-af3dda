// conflict_resolver_tb: random requests, departure-conflict maps and full
// banks for 10 banks. Each granted input must get a bank that is not full,
// holds no flit of the same timestamp and is not given to another input in
// the same cycle; inputs are served in priority order taking the lowest
// such bank, and a request fails only when no such bank is left. A run with
// every bank free and no conflicts checks that 2P-1 = 9 banks always suffice
// for P = 5 inputs even when each input conflicts with P-1 banks.
module conflict_resolver_tb;
  import dsb_pkg::*;
  localparam int NUM_MM = DEF_NUM_MM;
  logic [NUM_PORTS-1:0] req, ok;
  logic [NUM_MM-1:0]    conflict [NUM_PORTS];
  logic [NUM_MM-1:0]    full;
  logic [3:0]           bank [NUM_PORTS];
  int checks = 0, failures = 0;

  conflict_resolver #(.NUM_MM(NUM_MM)) dut (.*);

  task automatic check(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [NUM_MM-1:0] taken;
      req  = 5'($urandom);
      full = (n < 1500) ? '0 : NUM_MM'($urandom) & NUM_MM'($urandom);
      foreach (conflict[i]) begin
        conflict[i] = '0;
        // at most P-1 = 4 departure conflicts per input in the first half
        for (int k = 0; k < (n < 1500 ? 4 : 8); k++) conflict[i][$urandom % NUM_MM] = 1'b1;
      end
      #1;
      taken = '0;
      for (int i = 0; i < NUM_PORTS; i++) begin
        int exp_bank;
        exp_bank = -1;
        if (req[i])
          for (int m = 0; m < NUM_MM; m++)
            if (exp_bank < 0 && !taken[m] && !conflict[i][m] && !full[m]) exp_bank = m;
        check(ok[i] == (exp_bank >= 0), $sformatf("input %0d grant", i));
        if (exp_bank >= 0) begin
          check(int'(bank[i]) == exp_bank, $sformatf("input %0d bank %0d, expected %0d", i, bank[i], exp_bank));
          taken[exp_bank] = 1'b1;
        end
        if (n < 1500 && req[i]) check(ok[i], "2P-1 banks did not suffice");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
