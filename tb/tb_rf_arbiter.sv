// Self-checking test of the register-file arbiter. Random read requests,
// writebacks and port-R contents are applied every cycle; a reference
// computed here checks that every bank with a request grants exactly one
// CCU of that bank, the registered routes, the write acceptance per bank,
// the D-port selection (first near write of the owning warp) and the
// invalidation list. A starvation check holds two CCUs on the same bank and
// requires both to be served within N_CCU cycles.
module tb_rf_arbiter;
  import malekeh_pkg::*;
  localparam int unsigned NC = NUM_CCU;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  rdreq_t  [NC-1:0]        rdreq;
  logic    [NC-1:0]        rdgnt;
  logic    [NUM_BANKS-1:0] bank_re, bank_we;
  row_t    [NUM_BANKS-1:0] bank_raddr, bank_waddr;
  sroute_t [NC-1:0]        sroute;
  wb_t     [NUM_WB-1:0]    wb;
  logic    [NUM_WB-1:0]    wb_ready;
  wsel_t   [NUM_BANKS-1:0] bank_wsel;
  rport_t  [NC-1:0]        rport;
  wsel_t   [NC-1:0]        dsel;
  inval_t  [NC-1:0][NUM_WB-1:0] inval;
  logic    [3:0]           n_reads;

  rf_arbiter dut (.*);

  int checks = 0, failures = 0;
  sroute_t [NC-1:0] exp_route;
  int conflicts = 0;

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

  task automatic check_cycle();
    int nb;
    int cnt [NUM_BANKS];
    logic [NUM_BANKS-1:0] want;
    logic [NUM_BANKS-1:0] wtaken;
    nb = 0;
    want = '0;
    for (int b = 0; b < NUM_BANKS; b++) cnt[b] = 0;
    for (int c = 0; c < NC; c++) begin
      bank_t b = bank_t'(rdreq[c].warp[2:0] + rdreq[c].num[2:0]);
      if (rdreq[c].valid) want[b] = 1'b1;
      if (rdgnt[c]) begin
        check(rdreq[c].valid, "grant without request");
        cnt[b]++;
        check(bank_re[b] && bank_raddr[b] == {rdreq[c].warp, rdreq[c].num[5:3]},
              $sformatf("bank %0d address for ccu %0d", b, c));
        exp_route[c] = '{valid: 1'b1, bank: b, idx: rdreq[c].idx};
      end else exp_route[c] = '0;
    end
    for (int b = 0; b < NUM_BANKS; b++) begin
      check(cnt[b] == int'(want[b]), $sformatf("bank %0d grants %0d want %0d", b, cnt[b], want[b]));
      check(bank_re[b] == want[b], "bank_re");
      nb += int'(want[b]);
    end
    check(int'(n_reads) == nb, "n_reads");
    // writes
    wtaken = '0;
    for (int s = 0; s < NUM_WB; s++) begin
      bank_t b = bank_t'(wb[s].warp[2:0] + wb[s].num[2:0]);
      bit e = wb[s].valid && !wtaken[b];
      if (e) wtaken[b] = 1'b1;
      check(wb_ready[s] == e, $sformatf("wb_ready[%0d]", s));
      if (e) check(bank_we[b] && bank_wsel[b].valid && bank_wsel[b].slot == wbidx_t'(s)
                   && bank_waddr[b] == {wb[s].warp, wb[s].num[5:3]}, "bank write");
    end
    check(bank_we == wtaken, "bank_we");
    // D filter
    for (int c = 0; c < NC; c++) begin
      int first = -1;
      for (int s = 0; s < NUM_WB; s++)
        if (wb_ready[s] && rport[c].owned && wb[s].warp == rport[c].warp && wb[s].near && first < 0)
          first = s;
      check(dsel[c].valid == (first >= 0) && (first < 0 || dsel[c].slot == wbidx_t'(first)),
            $sformatf("dsel ccu %0d", c));
      for (int s = 0; s < NUM_WB; s++) begin
        bit iv = wb_ready[s] && rport[c].owned && wb[s].warp == rport[c].warp && s != first;
        check(inval[c][s].valid == iv && (!iv || inval[c][s].num == wb[s].num),
              $sformatf("inval ccu %0d slot %0d", c, s));
      end
    end
  endtask

  initial begin
    rdreq = '0; wb = '0; rport = '0; exp_route = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      // the route registered in the previous cycle
      check(sroute == exp_route, "registered route");
      for (int c = 0; c < NC; c++) begin
        rdreq[c].valid = ($urandom % 3) != 0;
        rdreq[c].warp = warp_t'($urandom % 4);
        rdreq[c].num = regnum_t'($urandom % 16);
        rdreq[c].idx = ctidx_t'($urandom);
        rport[c].owned = ($urandom % 4) != 0;
        rport[c].warp = warp_t'($urandom % 4);
        rport[c].busy = 1'($urandom);
        rport[c].has_near = 1'($urandom);
      end
      for (int s = 0; s < NUM_WB; s++) begin
        wb[s].valid = ($urandom % 2) == 0;
        wb[s].warp = warp_t'($urandom % 4);
        wb[s].num = regnum_t'($urandom % 16);
        wb[s].near = 1'($urandom);
        wb[s].data = {32{$urandom}};
      end
      if (wb[0].valid && wb[1].valid &&
          (wb[0].warp[2:0] + wb[0].num[2:0]) == (wb[1].warp[2:0] + wb[1].num[2:0])) conflicts++;
      #1 check_cycle();
    end
    check(conflicts > 0, "write bank conflict exercised");
    // starvation: CCUs 2 and 5 both keep asking bank 1
    begin
      bit got2 = 0, got5 = 0;
      @(negedge clk);
      rdreq = '0; wb = '0;
      rdreq[2] = '{valid: 1'b1, warp: 5'd0, num: 8'd1, idx: 3'd0};
      rdreq[5] = '{valid: 1'b1, warp: 5'd1, num: 8'd0, idx: 3'd0};
      for (int k = 0; k < NC; k++) begin
        #1;
        got2 |= rdgnt[2]; got5 |= rdgnt[5];
        check($countones(rdgnt) == 1, "one grant for shared bank");
        @(negedge clk);
      end
      check(got2 && got5, "round-robin serves both");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
