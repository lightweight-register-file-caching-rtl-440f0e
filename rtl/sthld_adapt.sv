// Adaptive STHLD controller.
//
// Execution time is cut into intervals of INTERVAL cycles. During an
// interval the instructions issued are counted (inst pulses); with a fixed
// interval length that count stands for the interval's IPC. At the end of
// each interval the count is compared with the previous interval's count
// (the one extra register this needs). The relative change is "large" (L)
// when |cur - prev| * 2**LARGE_SHIFT > prev, otherwise "small" (S). A
// six-state machine then moves and adds a delta to STHLD:
//   state 1: any         -> 2, +1
//   state 2: S -> 2, +1    L -> 3, +1   (flat region: keep climbing;
//                                        on a jump, a speculative +1)
//   state 3: S -> 2, +1    L -> 4, -2
//   state 4: S -> 2, +1    L -> 5, -1
//   state 5: L -> 5, -1    S -> 6, +1
//   state 6: S -> 6,  0    L -> 3, +1   (settled until a large change)
// STHLD saturates at 0 and at its maximum. sthld is registered and changes
// once per interval, in the cycle after the interval's last cycle.
//
// Follows the design description: the interval (10000 cycles), comparing
// the current with the previous interval's IPC, and the states, transitions
// and deltas of the state machine. This design's choices: the large/small
// threshold (1/16 by default), the start value 0, the STHLD width and the
// saturation.
module sthld_adapt
  import malekeh_pkg::*;
#(
  parameter int unsigned INTERVAL_CYC = malekeh_pkg::INTERVAL,
  parameter int unsigned LARGE_SHIFT  = 4,
  parameter int unsigned W            = malekeh_pkg::STHLD_W,
  parameter int unsigned CNT_W        = $clog2(INTERVAL_CYC + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inst,        // one instruction issued this cycle
  output logic [W-1:0]  sthld,
  output logic [2:0]    state,       // 1..6
  output logic          interval_end
);

  typedef enum logic [2:0] {
    ST1 = 3'd1, ST2 = 3'd2, ST3 = 3'd3, ST4 = 3'd4, ST5 = 3'd5, ST6 = 3'd6
  } st_t;

  st_t st_q, st_d;
  logic [CNT_W-1:0] cyc_q, cur_q, prev_q;
  logic [W-1:0] sthld_q;
  logic [CNT_W-1:0] cur_now, diff;
  logic is_large;
  int delta;

  assign interval_end = (int'(cyc_q) == INTERVAL_CYC - 1);
  assign cur_now = cur_q + CNT_W'(inst);
  assign diff = (cur_now > prev_q) ? cur_now - prev_q : prev_q - cur_now;
  assign is_large = ({diff, LARGE_SHIFT'(0)} > (CNT_W + LARGE_SHIFT)'(prev_q));

  always_comb begin
    st_d = st_q;
    delta = 0;
    unique case (st_q)
      ST1: begin st_d = ST2; delta = 1; end
      ST2: begin st_d = is_large ? ST3 : ST2; delta = 1; end
      ST3: if (is_large) begin st_d = ST4; delta = -2; end
           else       begin st_d = ST2; delta = 1;  end
      ST4: if (is_large) begin st_d = ST5; delta = -1; end
           else       begin st_d = ST2; delta = 1;  end
      ST5: if (is_large) begin st_d = ST5; delta = -1; end
           else       begin st_d = ST6; delta = 1;  end
      ST6: if (is_large) begin st_d = ST3; delta = 1;  end
           else       begin st_d = ST6; delta = 0;  end
      default: begin st_d = ST1; delta = 0; end
    endcase
  end

  function automatic logic [W-1:0] sat_add(logic [W-1:0] v, int d);
    int r;
    r = int'(v) + d;
    if (r < 0) r = 0;
    if (r > (1 << W) - 1) r = (1 << W) - 1;
    return W'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= ST1; cyc_q <= '0; cur_q <= '0; prev_q <= '0; sthld_q <= '0;
    end else if (interval_end) begin
      st_q <= st_d;
      sthld_q <= sat_add(sthld_q, delta);
      prev_q <= cur_now;
      cur_q <= '0;
      cyc_q <= '0;
    end else begin
      cyc_q <= cyc_q + 1'b1;
      cur_q <= cur_now;
    end
  end

  assign sthld = sthld_q;
  assign state = st_q;

endmodule
