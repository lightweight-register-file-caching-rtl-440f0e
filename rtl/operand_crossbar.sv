// Crossbar between the register-file banks and the CCUs.
//
// Moves the wide (DATA_W) values; the arbiter decides every route. Three
// kinds of paths, all purely combinational:
//   * bank read data to a CCU's port S, steered by the registered route
//     sroute (bank number and the CT entry waiting for the value);
//   * a writeback slot to a CCU's port D, steered by dsel (the write path
//     added to the crossbar so destination values can be cached);
//   * a writeback slot to a bank's write port, steered by bank_wsel.
// A port is valid only when its route is valid; the register number of a
// D-port write travels with it.
//
// The crossbar itself follows the design description; its split into
// route (arbiter) and data (this module) is this design's choice.
module operand_crossbar
  import malekeh_pkg::*;
#(
  parameter int unsigned N_CCU = malekeh_pkg::NUM_CCU
) (
  input  data_t   [NUM_BANKS-1:0] bank_rdata,
  input  sroute_t [N_CCU-1:0]     sroute,
  output sport_t  [N_CCU-1:0]     sport,
  input  wb_t     [NUM_WB-1:0]    wb,
  input  wsel_t   [N_CCU-1:0]     dsel,
  output dport_t  [N_CCU-1:0]     dport,
  input  wsel_t   [NUM_BANKS-1:0] bank_wsel,
  output data_t   [NUM_BANKS-1:0] bank_wdata
);

  always_comb begin
    for (int c = 0; c < N_CCU; c++) begin
      sport[c].valid = sroute[c].valid;
      sport[c].idx   = sroute[c].idx;
      sport[c].data  = sroute[c].valid ? bank_rdata[sroute[c].bank] : '0;
      dport[c].valid = dsel[c].valid;
      dport[c].num   = dsel[c].valid ? wb[dsel[c].slot].num : '0;
      dport[c].data  = dsel[c].valid ? wb[dsel[c].slot].data : '0;
    end
    for (int b = 0; b < NUM_BANKS; b++)
      bank_wdata[b] = bank_wsel[b].valid ? wb[bank_wsel[b].slot].data : '0;
  end

endmodule
