// Self-checking test of the CCU allocator. A directed part checks the
// waiting rule cycle by cycle: with every free CCU holding near values and
// STHLD = 3 the issue stalls for four cycles and replaces a CCU in the
// fifth. A random part compares every decision and the stall counter with a
// model of the policy kept here.
module tb_ccu_allocator;
  import malekeh_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid;
  warp_t req_warp;
  rport_t [NUM_CCU-1:0] rport;
  logic [STHLD_W-1:0] sthld;
  logic gnt, gnt_flush, ev_wait, ev_replace_near, ev_stall_busy;
  logic [2:0] gnt_ccu;

  ccu_allocator dut (.*);

  int checks = 0, failures = 0;
  int cnt = 0;
  int n_own = 0, n_far = 0, n_wait = 0, n_repl = 0, n_busy = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference decision for the current inputs; updates cnt
  task automatic model_check();
    int own = -1, far = -1, free = -1;
    int eg = 0, ec = 0, ef = 0, ew = 0, er = 0, eb = 0;
    for (int c = 0; c < NUM_CCU; c++) begin
      if (own < 0 && rport[c].owned && rport[c].warp == req_warp) own = c;
      if (free < 0 && !rport[c].busy) free = c;
      if (far < 0 && !rport[c].busy && (!rport[c].owned || !rport[c].has_near)) far = c;
    end
    if (req_valid) begin
      if (own >= 0) begin
        if (!rport[own].busy) begin eg = 1; ec = own; n_own++; end else eb = 1;
      end else if (far >= 0) begin eg = 1; ec = far; ef = 1; n_far++; end
      else if (free >= 0) begin
        if (cnt > int'(sthld)) begin eg = 1; ec = free; ef = 1; er = 1; end else ew = 1;
      end else eb = 1;
    end
    check(gnt == 1'(eg) && (!eg || int'(gnt_ccu) == ec) && (!eg || gnt_flush == 1'(ef)),
          $sformatf("decision gnt=%0d ccu=%0d exp %0d/%0d", gnt, gnt_ccu, eg, ec));
    check(ev_wait == 1'(ew) && ev_replace_near == 1'(er) && ev_stall_busy == 1'(eb), "events");
    n_wait += ew; n_repl += er; n_busy += eb;
    if (eg) cnt = 0; else if (ew) cnt++;
  endtask

  initial begin
    req_valid = 0; req_warp = '0; rport = '0; sthld = 3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // directed: CCUs 0..7 owned by warps 0..7, all busy but CCU 5, which holds near values
    for (int c = 0; c < NUM_CCU; c++)
      rport[c] = '{owned: 1'b1, warp: warp_t'(c), busy: (c != 5), has_near: 1'b1};
    req_valid = 1; req_warp = 5'd20;
    for (int k = 0; k < 4; k++) begin
      #1 check(!gnt && ev_wait, $sformatf("wait cycle %0d", k));
      model_check();
      @(negedge clk);
    end
    #1 check(gnt && gnt_ccu == 3'd5 && gnt_flush && ev_replace_near, "replace after STHLD+1 waits");
    model_check();
    @(negedge clk);
    // random
    for (int it = 0; it < 4000; it++) begin
      req_valid = ($urandom % 4) != 0;
      req_warp = warp_t'($urandom % 16);
      sthld = STHLD_W'($urandom % 6);
      for (int c = 0; c < NUM_CCU; c++) begin
        rport[c].owned = ($urandom % 5) != 0;
        rport[c].warp = warp_t'(2 * c + ($urandom % 2));
        rport[c].busy = ($urandom % 10) < 7;
        rport[c].has_near = ($urandom % 5) != 0;
      end
      #1 model_check();
      @(negedge clk);
    end
    check(n_own > 0 && n_far > 0 && n_wait > 0 && n_repl > 0 && n_busy > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
