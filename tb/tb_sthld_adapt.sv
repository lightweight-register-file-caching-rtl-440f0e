// Self-checking test of the adaptive STHLD controller with a 20-cycle
// interval. Each interval issues a chosen number of instructions so the
// IPC change is small or large as wanted; a transition table kept here
// (state, S/L) -> (next state, delta) predicts the state and STHLD after
// every interval, and STHLD must change only at interval boundaries.
// Every one of the eleven transitions is required to occur.
module tb_sthld_adapt;
  localparam int unsigned IV = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic inst;
  logic [7:0] sthld;
  logic [2:0] state;
  logic interval_end;

  sthld_adapt #(.INTERVAL_CYC(IV), .LARGE_SHIFT(4)) dut (.*);

  int checks = 0, failures = 0;
  int nxt [7][2];
  int dlt [7][2];
  int seen [7][2];

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
    int st, th, prev, cur, big;
    // [state][0 = small, 1 = large]
    nxt[1] = '{2, 2}; dlt[1] = '{1, 1};
    nxt[2] = '{2, 3}; dlt[2] = '{1, 1};
    nxt[3] = '{2, 4}; dlt[3] = '{1, -2};
    nxt[4] = '{2, 5}; dlt[4] = '{1, -1};
    nxt[5] = '{6, 5}; dlt[5] = '{1, -1};
    nxt[6] = '{6, 3}; dlt[6] = '{0, 1};
    foreach (seen[i, j]) seen[i][j] = 0;
    inst = 0;
    st = 1; th = 0; prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(state == 3'd1 && sthld == 0, "reset state");
    for (int it = 0; it < 400; it++) begin
      // choose small or large relative change against prev
      if (it == 0) cur = 10;
      else if (($urandom % 2) == 0) cur = prev;
      else cur = (prev >= 10) ? prev - 6 : prev + 6;
      for (int c = 0; c < IV; c++) begin
        inst = (c < cur);
        if (c < IV - 1) begin
          @(negedge clk);
          check(int'(sthld) == th, "sthld changes only at interval end");
        end else begin
          #1 check(interval_end, "interval_end in last cycle");
          @(negedge clk);
        end
      end
      big = (it == 0) ? 1 : (((cur > prev) ? cur - prev : prev - cur) * 16 > prev);
      seen[st][big]++;
      th = th + dlt[st][big];
      if (th < 0) th = 0;
      if (th > 255) th = 255;
      st = nxt[st][big];
      prev = cur;
      check(int'(state) == st, $sformatf("interval %0d state %0d exp %0d", it, state, st));
      check(int'(sthld) == th, $sformatf("interval %0d sthld %0d exp %0d", it, sthld, th));
    end
    for (int s = 2; s <= 6; s++)
      for (int b = 0; b < 2; b++)
        check(seen[s][b] > 0, $sformatf("transition %0d/%0d never taken", s, b));
    check(seen[1][0] + seen[1][1] == 1, "state 1 left once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
