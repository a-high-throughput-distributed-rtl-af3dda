// middle_memory_tb: one write and one read per cycle at random addresses of
// a 10-flit bank, against an array model; a write lands at the clock edge and
// the read shows the stored flit in the same cycle its address is given.
module middle_memory_tb;
  import dsb_pkg::*;
  localparam int DEPTH = DEF_MM_DEPTH;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, wr_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  flit_t wr_flit = '0, rd_flit;
  flit_t model [DEPTH];
  logic  written [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  middle_memory #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    foreach (written[a]) written[a] = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      rd_addr = AW'($urandom % DEPTH);
      #1;
      if (written[rd_addr]) begin
        checks++;
        if (rd_flit != model[rd_addr]) begin
          failures++;
          if (failures < 10) $display("FAIL: addr %0d", rd_addr);
        end
      end
      wr_en   = 1'($urandom);
      wr_addr = AW'($urandom % DEPTH);
      wr_flit = '{head: 1'($urandom), tail: 1'($urandom), vc: 4'($urandom),
                  data: {$urandom, $urandom, $urandom, $urandom}};
      @(posedge clk);
      if (wr_en) begin
        model[wr_addr] = wr_flit;
        written[wr_addr] = 1;
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
