// Dispatch scheduler and operand output mux.
//
// Every cycle in which the execution units can take an instruction
// (eu_ready), it picks one CCU whose instruction has all source operands
// ready (disp_rdy) and sends that CCU's warp, instruction and operand
// values to the execution units; disp_gnt tells the CCU it was dispatched,
// which releases it. The pick is round-robin: the search starts after the
// CCU dispatched last. Combinational apart from the round-robin pointer.
//
// The dispatch scheduler and the mux in front of the execution units follow
// the design description; one dispatch per cycle and round-robin order are
// this design's choices.
module dispatch_scheduler
  import malekeh_pkg::*;
#(
  parameter int unsigned N_CCU = malekeh_pkg::NUM_CCU
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N_CCU-1:0]              disp_rdy,
  output logic [N_CCU-1:0]              disp_gnt,
  input  warp_t  [N_CCU-1:0]            ccu_warp,
  input  instr_t [N_CCU-1:0]            ccu_instr,
  input  data_t  [N_CCU-1:0][NSRC-1:0]  ccu_opnd,
  input  logic                          eu_ready,
  output logic                          eu_valid,
  output warp_t                         eu_warp,
  output instr_t                        eu_instr,
  output data_t  [NSRC-1:0]             eu_opnd
);

  localparam int unsigned IW = (N_CCU > 1) ? $clog2(N_CCU) : 1;

  logic [IW-1:0] last_q, pick;
  logic found;

  always_comb begin
    found = 1'b0;
    pick = '0;
    for (int unsigned j = 1; j <= N_CCU; j++) begin
      int unsigned c;
      c = (32'(last_q) + j) % N_CCU;
      if (!found && disp_rdy[c]) begin found = 1'b1; pick = IW'(c); end
    end
    disp_gnt = '0;
    if (found && eu_ready) disp_gnt[pick] = 1'b1;
    eu_valid = found;
    eu_warp  = ccu_warp[pick];
    eu_instr = ccu_instr[pick];
    eu_opnd  = ccu_opnd[pick];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_q <= IW'(N_CCU - 1);
    else if (found && eu_ready) last_q <= pick;
  end

  // valid/ready: an offered instruction stays offered until taken
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(disp_gnt));

endmodule
