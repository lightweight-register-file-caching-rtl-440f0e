// Reduced-size end-to-end test: 24 warps of 150 instructions each, and an
// STHLD interval of 300 cycles instead of 10000 so that the adaptive
// threshold goes through several intervals in a short run.
// The checks and the models of the surroundings are in malekeh_harness.
module tb_malekeh_rf;
  import malekeh_pkg::*;

  logic                   clk, rst_n;
  logic   [NUM_WARPS-1:0] warp_rdy;
  instr_t [NUM_WARPS-1:0] warp_instr;
  logic                   issue_valid;
  warp_t                  issue_warp;
  logic                   eu_ready, eu_valid;
  warp_t                  eu_warp;
  instr_t                 eu_instr;
  data_t  [NSRC-1:0]      eu_opnd;
  wb_t    [NUM_WB-1:0]    wb;
  logic   [NUM_WB-1:0]    wb_ready;
  logic   [STHLD_W-1:0]   sthld;
  logic   [2:0]           sthld_state;
  logic   [31:0]          stat_src_hits, stat_src_misses, stat_bank_reads, stat_d_writes,
                          stat_flushes, stat_wait_cycles, stat_near_replacements,
                          stat_busy_stalls, stat_cached_issues, stat_intervals;

  malekeh_rf #(.INTERVAL_CYC(300)) dut (.*);
  malekeh_harness #(.N_ACTIVE(24), .N_INSTR(150), .MAX_CYC(60000), .MIN_INTERVALS(3)) harness (.*);
endmodule
