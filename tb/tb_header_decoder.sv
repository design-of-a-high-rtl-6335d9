// tb_header_decoder: exhaustive test of the header decoder over buffer
// state, head destination and grant.
module tb_header_decoder;
  localparam int unsigned AW = 3;
  logic empty, sched_gnt, req, pop, mod_load;
  logic [AW-1:0] head_dst, req_dst, mod_dst;
  int checks = 0, failures = 0;

  header_decoder #(.ADDR_W(AW)) dut (.empty, .head_dst, .req, .req_dst, .sched_gnt, .pop, .mod_load, .mod_dst);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int e = 0; e < 2; e++)
      for (int d = 0; d < (1 << AW); d++)
        for (int g = 0; g < 2; g++) begin
          bit exp_req, exp_load, exp_pop;
          empty = 1'(e); head_dst = AW'(d); sched_gnt = 1'(g);
          #1;
          exp_req  = (e == 0) && (d != 0);
          exp_load = exp_req && (g == 1);
          exp_pop  = exp_load || ((e == 0) && (d == 0));
          check(req == exp_req, $sformatf("req e=%0d d=%0d g=%0d", e, d, g));
          check(mod_load == exp_load, $sformatf("mod_load e=%0d d=%0d g=%0d", e, d, g));
          check(pop == exp_pop, $sformatf("pop e=%0d d=%0d g=%0d", e, d, g));
          check(req_dst == AW'(d) && mod_dst == AW'(d), "dst passed on");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
