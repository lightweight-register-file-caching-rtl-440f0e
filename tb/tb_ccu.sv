// Self-checking test of one caching collector unit.
//
// The testbench plays the register-file banks: it grants the CCU's read
// requests (randomly delayed) and returns the register value one cycle
// later on port S. A model of every register's value is kept in the
// testbench. Directed sequences check hit/miss counts for duplicated
// operands, D-port writes (miss and hit), invalidation, the far-first and LRU victim
// choice and the flush on a warp change; a random phase then checks that
// every dispatched operand equals the model value.
module tb_ccu;
  import malekeh_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             alloc_valid;
  warp_t            alloc_warp;
  instr_t           alloc_instr;
  rdreq_t           rdreq;
  logic             rdgnt;
  sport_t           sport;
  dport_t           dport;
  inval_t [NUM_WB-1:0] inval;
  rport_t           rport;
  logic             disp_rdy, disp_gnt;
  warp_t            disp_warp;
  instr_t           disp_instr;
  data_t [NSRC-1:0] disp_opnd;
  logic [3:0]       alloc_hits, alloc_misses;

  ccu dut (.*);

  int checks = 0, failures = 0;
  int rf_reads = 0;
  data_t regval [NUM_WARPS][256];
  logic gnt_en;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bank model: grant when enabled, return data one cycle later
  assign rdgnt = rdreq.valid && gnt_en;
  always_ff @(posedge clk) begin
    sport.valid <= rdreq.valid && rdgnt;
    sport.idx   <= rdreq.idx;
    sport.data  <= regval[rdreq.warp][rdreq.num];
    if (rdreq.valid && rdgnt) rf_reads++;
  end

  function automatic src_t S(int r, bit near);
    src_t s; s.valid = 1; s.num = regnum_t'(r); s.near = near; return s;
  endfunction

  function automatic instr_t mk(int n, int r0, int r1 = 0, int r2 = 0,
                                 int r3 = 0, int r4 = 0, int r5 = 0, int r6 = 0,
                                 bit near = 1);
    instr_t i = '0;
    int r[7] = '{r0, r1, r2, r3, r4, r5, r6};
    i.opcode = 8'h11;
    for (int k = 0; k < n; k++) i.src[k] = S(r[k], near);
    return i;
  endfunction

  // issue one instruction, check hit/miss counts (-1: don't care)
  task automatic issue(input warp_t w, input instr_t ins, input int eh, input int em,
                       input string tag);
    while (rport.busy) @(negedge clk);
    alloc_valid = 1; alloc_warp = w; alloc_instr = ins;
    #1;
    if (eh >= 0) check(alloc_hits == 4'(eh), $sformatf("%s hits %0d exp %0d", tag, alloc_hits, eh));
    if (em >= 0) check(alloc_misses == 4'(em), $sformatf("%s misses %0d exp %0d", tag, alloc_misses, em));
    @(negedge clk);
    alloc_valid = 0;
  endtask

  // wait for dispatch readiness, check the operands, release the CCU
  task automatic dispatch(input string tag);
    int n = 0;
    while (!disp_rdy) begin @(negedge clk); n++; if (n > 200) break; end
    check(disp_rdy, {tag, " never ready"});
    for (int k = 0; k < NSRC; k++)
      if (disp_instr.src[k].valid)
        check(disp_opnd[k] == regval[disp_warp][disp_instr.src[k].num],
              $sformatf("%s operand %0d (r%0d)", tag, k, disp_instr.src[k].num));
    disp_gnt = 1;
    @(negedge clk);
    disp_gnt = 0;
  endtask

  task automatic dwrite(input warp_t w, input int r, input data_t v);
    regval[w][r] = v;
    dport.valid = 1; dport.num = regnum_t'(r); dport.data = v;
    @(negedge clk);
    dport = '0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < NUM_WARPS; w++)
      for (int r = 0; r < 256; r++)
        regval[w][r] = {32{32'(w * 1000 + r)}};
    alloc_valid = 0; alloc_warp = '0; alloc_instr = '0;
    dport = '0; inval = '0; disp_gnt = 0; gnt_en = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!rport.owned && !rport.busy, "idle after reset");

    // duplicated operand: r1, r2, r1 -> two misses, one hit, two RF reads
    issue(3, mk(3, 1, 2, 1), 1, 2, "dup");
    check(rport.owned && rport.warp == 3 && rport.busy, "port R after alloc");
    dispatch("dup");
    check(rf_reads == 2, $sformatf("dup rf reads %0d", rf_reads));

    // same warp: r1 hits, r5 misses
    issue(3, mk(2, 1, 5), 1, 1, "reuse");
    dispatch("reuse");

    // D write of r9, then r9 hits with the written value
    dwrite(3, 9, {32{32'hdead_beef}});
    issue(3, mk(1, 9), 1, 0, "dhit");
    dispatch("dhit");
    // second D write of r9 hits the cached entry and replaces its value
    dwrite(3, 9, {32{32'h1234_5678}});
    issue(3, mk(1, 9), 1, 0, "dhit2");
    dispatch("dhit2");

    // invalidation of r1 -> r1 misses again and is fetched fresh
    regval[3][1] = {32{32'h0bad_f00d}};
    inval[0].valid = 1; inval[0].num = 8'd1;
    @(negedge clk);
    inval = '0;
    issue(3, mk(1, 1), 0, 1, "inval");
    dispatch("inval");

    // warp change flushes: warp 4, r1 r2 -> all miss
    issue(4, mk(2, 1, 2), 0, 2, "flush");
    check(!rport.has_near || rport.warp == 4, "port R warp");
    dispatch("flush");
    // back to warp 3: flushed too
    issue(3, mk(1, 9), 0, 1, "flush back");
    dispatch("flush back");

    // far-first and LRU: fresh warp 5
    issue(5, mk(7, 10, 11, 12, 13, 14, 15, 16), 0, 7, "fill7");
    dispatch("fill7");
    issue(5, mk(1, 17, 0, 0, 0, 0, 0, 0, 0), 0, 1, "far17");      // far, 8th entry
    check(rport.has_near, "has_near with near entries");
    dispatch("far17");
    issue(5, mk(1, 18), 0, 1, "near18");                         // must replace r17
    dispatch("near18");
    issue(5, mk(7, 10, 11, 12, 13, 14, 15, 16), 7, 0, "near kept");
    dispatch("near kept");
    issue(5, mk(1, 17), 0, 1, "r17 gone");                       // LRU: r18 is oldest now
    dispatch("r17 gone");
    issue(5, mk(1, 18), 0, 1, "lru victim");
    dispatch("lru victim");
    issue(5, mk(2, 11, 17), 2, 0, "lru kept");
    dispatch("lru kept");

    // far-only contents: has_near low
    issue(6, mk(2, 1, 2, 0, 0, 0, 0, 0, 0), 0, 2, "far only");
    dispatch("far only");
    check(!rport.has_near, "far only -> has_near low");

    // random phase: warp 7, 24 registers, random grants and D writes
    for (int it = 0; it < 400; it++) begin
      instr_t ins;
      int n;
      ins = '0;
      n = 1 + ($urandom % 7);
      gnt_en = ($urandom % 4) != 0;
      for (int k = 0; k < n; k++) ins.src[k] = S($urandom % 24, ($urandom % 2) == 1);
      issue(7, ins, -1, -1, "rand");
      fork
        dispatch("rand");
        begin
          for (int c = 0; c < 3; c++) begin
            @(negedge clk); gnt_en = ($urandom % 3) != 0;
          end
          gnt_en = 1;
        end
      join
      if ($urandom % 2) begin
        int r;
        r = 24 + ($urandom % 8);  // destination not read by the last instruction
        dwrite(7, r, {32{$urandom}});
        if ($urandom % 2) begin
          // a write that bypasses the CCU
          r = $urandom % 32;
          regval[7][r] = {32{$urandom}};
          inval[1].valid = 1; inval[1].num = regnum_t'(r);
          @(negedge clk);
          inval = '0;
        end
      end
      if (($urandom % 8) == 0) begin
        ins = '0;
        ins.src[0] = S(24 + ($urandom % 8), 1);
        issue(7, ins, -1, -1, "rand dst");
        dispatch("rand dst");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
