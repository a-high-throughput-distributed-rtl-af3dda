// crossbar_tb: the two crossbars of the router, XB1 (5 inputs x 10 outputs)
// and XB2 (10 x 5), driven with random flits, enables and selects; each
// output must carry the selected input's flit when enabled and nothing
// otherwise.
module crossbar_tb;
  import dsb_pkg::*;
  int checks = 0, failures = 0;

  flit_t             a_in [5], a_out [10];
  logic [9:0]        a_en, a_valid;
  logic [2:0]        a_sel [10];
  flit_t             b_in [10], b_out [5];
  logic [4:0]        b_en, b_valid;
  logic [3:0]        b_sel [5];

  crossbar #(.N_IN(5),  .N_OUT(10)) xb1 (.in_flit(a_in), .out_en(a_en), .out_sel(a_sel),
                                         .out_valid(a_valid), .out_flit(a_out));
  crossbar #(.N_IN(10), .N_OUT(5))  xb2 (.in_flit(b_in), .out_en(b_en), .out_sel(b_sel),
                                         .out_valid(b_valid), .out_flit(b_out));

  function automatic flit_t rnd_flit();
    return '{head: 1'($urandom), tail: 1'($urandom), vc: 4'($urandom),
             data: {$urandom, $urandom, $urandom, $urandom}};
  endfunction

  task automatic check(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      foreach (a_in[i]) a_in[i] = rnd_flit();
      foreach (b_in[i]) b_in[i] = rnd_flit();
      a_en = 10'($urandom);
      b_en = 5'($urandom);
      foreach (a_sel[o]) a_sel[o] = 3'($urandom % 5);
      foreach (b_sel[o]) b_sel[o] = 4'($urandom % 10);
      #1;
      for (int o = 0; o < 10; o++) begin
        check(a_valid[o] == a_en[o], "XB1 valid");
        check(a_out[o] == (a_en[o] ? a_in[a_sel[o]] : flit_t'('0)), $sformatf("XB1 output %0d", o));
      end
      for (int o = 0; o < 5; o++) begin
        check(b_valid[o] == b_en[o], "XB2 valid");
        check(b_out[o] == (b_en[o] ? b_in[b_sel[o]] : flit_t'('0)), $sformatf("XB2 output %0d", o));
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
