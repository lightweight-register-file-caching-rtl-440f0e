// Full-size end-to-end test: the register file with every parameter at its
// default (8 CCUs, 8 banks of 256 x 1024 bit, 10000-cycle STHLD interval),
// 32 warps of 700 instructions each, run for at least two intervals.
// The checks and the models of the surroundings are in malekeh_harness.
module tb_malekeh_rf_full;
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

  malekeh_rf dut (.*);
  malekeh_harness #(.N_ACTIVE(32), .N_INSTR(700), .MAX_CYC(400000), .MIN_INTERVALS(2)) harness (.*);
endmodule
