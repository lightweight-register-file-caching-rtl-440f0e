// One register-file bank.
//
// A plain synchronous memory of ROWS warp-wide registers (DATA_W bits each)
// with one read port and one write port, so that a bank can serve a source
// operand read and a writeback in the same cycle. The read address is
// sampled at the clock edge and the data appears on rdata in the next cycle
// (one cycle of bank latency). A read and a write of the same row in one
// cycle return the old contents. The memory has no reset: its contents are
// whatever was last written.
//
// Wide 1024-bit rows and eight banks follow the design description; the
// number of rows is derived from its 256 KB register file. The 1R1W port
// arrangement and the one-cycle latency are this design's choices.
module rf_bank #(
  parameter int unsigned DATA_W = malekeh_pkg::DATA_W,
  parameter int unsigned ROWS   = malekeh_pkg::BANK_ROWS,
  parameter int unsigned ADDR_W = $clog2(ROWS)
) (
  input  logic              clk,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata
);

  logic [DATA_W-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

endmodule
