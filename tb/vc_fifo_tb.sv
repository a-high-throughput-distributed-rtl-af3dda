// vc_fifo_tb: random pushes and pops against a queue model; checks count,
// the head entry and the entry behind it every cycle, and that the buffer
// holds exactly DEPTH (5) flits.
module vc_fifo_tb;
  import dsb_pkg::*;
  localparam int DEPTH = DEF_VC_DEPTH;

  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  flit_t push_flit = '0, head_flit, next_flit;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  flit_t q [$];

  always #5 clk = ~clk;

  vc_fifo #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  initial begin
    int max_seen;
    max_seen = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      check(int'(count) == q.size(), $sformatf("count %0d model %0d", count, q.size()));
      if (q.size() > 0) check(head_flit == q[0], "head entry");
      if (q.size() > 1) check(next_flit == q[1], "entry behind head");
      if (int'(count) > max_seen) max_seen = int'(count);
      // random traffic, biased to fill the buffer in the first half
      push = (q.size() < DEPTH) && ($urandom % 100 < (n < 2000 ? 70 : 40));
      pop  = (q.size() > 0) && ($urandom % 100 < (n < 2000 ? 40 : 70));
      push_flit = '{head: 1'($urandom), tail: 1'($urandom), vc: 4'($urandom),
                    data: {$urandom, $urandom, $urandom, $urandom}};
      @(posedge clk);
      #1;
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(push_flit);
    end
    check(max_seen == DEPTH, $sformatf("buffer never held %0d flits", DEPTH));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
