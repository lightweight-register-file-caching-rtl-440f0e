// Self-checking test of the operand crossbar: random bank data, routes and
// writeback slots; every S port, D port and bank write port is compared
// with the value picked here from the route.
module tb_operand_crossbar;
  import malekeh_pkg::*;
  localparam int unsigned NC = NUM_CCU;

  data_t   [NUM_BANKS-1:0] bank_rdata, bank_wdata;
  sroute_t [NC-1:0]        sroute;
  sport_t  [NC-1:0]        sport;
  wb_t     [NUM_WB-1:0]    wb;
  wsel_t   [NC-1:0]        dsel;
  dport_t  [NC-1:0]        dport;
  wsel_t   [NUM_BANKS-1:0] bank_wsel;

  operand_crossbar dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      for (int b = 0; b < NUM_BANKS; b++) begin
        for (int w = 0; w < DATA_W / 32; w++) bank_rdata[b][w*32 +: 32] = $urandom;
        bank_wsel[b].valid = 1'($urandom);
        bank_wsel[b].slot = wbidx_t'($urandom);
      end
      for (int s = 0; s < NUM_WB; s++) begin
        wb[s] = '0;
        wb[s].valid = 1'b1;
        wb[s].num = regnum_t'($urandom);
        for (int w = 0; w < DATA_W / 32; w++) wb[s].data[w*32 +: 32] = $urandom;
      end
      for (int c = 0; c < NC; c++) begin
        sroute[c].valid = 1'($urandom);
        sroute[c].bank = bank_t'($urandom);
        sroute[c].idx = ctidx_t'($urandom);
        dsel[c].valid = 1'($urandom);
        dsel[c].slot = wbidx_t'($urandom);
      end
      #1;
      for (int c = 0; c < NC; c++) begin
        check(sport[c].valid == sroute[c].valid, "S valid");
        if (sroute[c].valid)
          check(sport[c].idx == sroute[c].idx && sport[c].data == bank_rdata[sroute[c].bank],
                $sformatf("S data ccu %0d", c));
        check(dport[c].valid == dsel[c].valid, "D valid");
        if (dsel[c].valid)
          check(dport[c].num == wb[dsel[c].slot].num && dport[c].data == wb[dsel[c].slot].data,
                $sformatf("D data ccu %0d", c));
      end
      for (int b = 0; b < NUM_BANKS; b++)
        if (bank_wsel[b].valid)
          check(bank_wdata[b] == wb[bank_wsel[b].slot].data, $sformatf("bank %0d wdata", b));
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
