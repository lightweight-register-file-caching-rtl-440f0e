// Self-checking test of the issue scheduler: random ready vectors and CCU
// owners; the expected pick (oldest ready warp that owns a free CCU, else
// the oldest ready warp without a busy CCU) is worked out here.
module tb_issue_scheduler;
  import malekeh_pkg::*;
  logic [NUM_WARPS-1:0] warp_rdy;
  rport_t [NUM_CCU-1:0] rport;
  logic sel_valid, sel_cached;
  warp_t sel_warp;

  issue_scheduler dut (.*);

  int checks = 0, failures = 0, n_cached = 0, n_other = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int exp_w, exp_c;
      warp_rdy = '0;
      for (int w = 0; w < NUM_WARPS; w++) warp_rdy[w] = ($urandom % 5) == 0;
      for (int c = 0; c < NUM_CCU; c++) begin
        rport[c].owned = ($urandom % 4) != 0;
        rport[c].warp = warp_t'(c * 4 + ($urandom % 4));  // distinct owners
        rport[c].busy = ($urandom % 3) == 0;
        rport[c].has_near = 1'($urandom);
      end
      #1;
      exp_w = -1; exp_c = 0;
      for (int w = 0; w < NUM_WARPS && exp_w < 0; w++) begin
        bit own, busy;
        own = 0; busy = 0;
        for (int c = 0; c < NUM_CCU; c++)
          if (rport[c].owned && rport[c].warp == warp_t'(w)) begin own = 1; busy = rport[c].busy; end
        if (warp_rdy[w] && own && !busy) begin exp_w = w; exp_c = 1; end
      end
      for (int w = 0; w < NUM_WARPS && exp_w < 0; w++) begin
        bit own;
        own = 0;
        for (int c = 0; c < NUM_CCU; c++)
          if (rport[c].owned && rport[c].warp == warp_t'(w)) own = 1;
        if (warp_rdy[w] && !own) exp_w = w;
      end
      check(sel_valid == (exp_w >= 0), "sel_valid");
      if (exp_w >= 0) begin
        check(int'(sel_warp) == exp_w && int'(sel_cached) == exp_c,
              $sformatf("pick %0d/%0d exp %0d/%0d", sel_warp, sel_cached, exp_w, exp_c));
        if (exp_c) n_cached++; else n_other++;
      end
      #1;
    end
    check(n_cached > 100 && n_other > 100, "both classes picked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
