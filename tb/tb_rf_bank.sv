// Self-checking test of rf_bank: writes a pattern into every row, reads it
// back with one cycle of latency, and checks read-during-write returns the
// old value. A reduced row count and width keep it short.
module tb_rf_bank;
  localparam int unsigned DW = 64;
  localparam int unsigned RW = 16;
  logic clk = 0;
  logic re, we;
  logic [3:0] raddr, waddr;
  logic [DW-1:0] rdata, wdata;
  int checks = 0, failures = 0;

  rf_bank #(.DATA_W(DW), .ROWS(RW)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [DW-1:0] pat(int i);
    return {32'(i * 32'h9e37_79b9), 32'(~i)};
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < RW; i++) begin
      we = 1; waddr = 4'(i); wdata = pat(i);
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < RW; i++) begin
      re = 1; raddr = 4'(i);
      @(negedge clk);
      checks++;
      if (rdata !== pat(i)) begin failures++; $display("row %0d: %h", i, rdata); end
    end
    // read and write the same row in one cycle: old value comes out
    re = 1; raddr = 4'd3; we = 1; waddr = 4'd3; wdata = '1;
    @(negedge clk);
    checks++;
    if (rdata !== pat(3)) begin failures++; $display("rdw: %h", rdata); end
    re = 1; we = 0;
    @(negedge clk);
    checks++;
    if (rdata !== '1) begin failures++; $display("after write: %h", rdata); end
    // rdata holds when re is low
    re = 0; raddr = 4'd5;
    @(negedge clk);
    checks++;
    if (rdata !== '1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
