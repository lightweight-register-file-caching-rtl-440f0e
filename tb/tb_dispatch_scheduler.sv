// Self-checking test of the dispatch scheduler: random ready CCUs and
// execution-unit back-pressure. Checks the round-robin pick after the last
// dispatched CCU, the one-hot grant, no grant while eu_ready is low, and
// that the warp, instruction and operands of the picked CCU reach the
// execution units.
module tb_dispatch_scheduler;
  import malekeh_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NUM_CCU-1:0] disp_rdy, disp_gnt;
  warp_t  [NUM_CCU-1:0] ccu_warp;
  instr_t [NUM_CCU-1:0] ccu_instr;
  data_t  [NUM_CCU-1:0][NSRC-1:0] ccu_opnd;
  logic eu_ready, eu_valid;
  warp_t eu_warp;
  instr_t eu_instr;
  data_t [NSRC-1:0] eu_opnd;

  dispatch_scheduler dut (.*);

  int checks = 0, failures = 0, last = NUM_CCU - 1, n_disp = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    disp_rdy = '0; eu_ready = 0;
    for (int c = 0; c < NUM_CCU; c++) begin
      ccu_warp[c] = warp_t'(c + 3);
      ccu_instr[c] = '0; ccu_instr[c].opcode = 8'(c * 17);
      for (int k = 0; k < NSRC; k++) ccu_opnd[c][k] = {32{32'(c * 100 + k)}};
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int exp;
      for (int c = 0; c < NUM_CCU; c++) disp_rdy[c] = ($urandom % 3) == 0;
      eu_ready = ($urandom % 4) != 0;
      #1;
      exp = -1;
      for (int j = 1; j <= NUM_CCU && exp < 0; j++)
        if (disp_rdy[(last + j) % NUM_CCU]) exp = (last + j) % NUM_CCU;
      check(eu_valid == (exp >= 0), "eu_valid");
      if (exp >= 0) begin
        check(eu_warp == ccu_warp[exp] && eu_instr == ccu_instr[exp] && eu_opnd == ccu_opnd[exp],
              $sformatf("payload of ccu %0d", exp));
        check(disp_gnt == (eu_ready ? (8'(1) << exp) : 8'(0)), "grant");
        if (eu_ready) begin last = exp; n_disp++; end
      end else check(disp_gnt == '0, "no grant");
      @(negedge clk);
    end
    check(n_disp > 500, "dispatches happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
