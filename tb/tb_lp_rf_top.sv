// tb_lp_rf_top: end-to-end run of the whole design at its default sizes.
//
// The testbench plays the processor: it keeps a main-memory model and uses
// the instruction cache, the data cache and the register file as the
// processor would.
//   1. Power-up global invalidation of both caches.
//   2. Fetch: lookups in the instruction cache miss, the line is refilled
//      (four word writes, the first with the tag), the lookups then hit and
//      return the memory contents. Refills rotate through the four ways.
//   3. Loads: data-cache lookups; on a miss the line is refilled; the loaded
//      word is written to a register of the DMR register file.
//   4. Stores (write-through): memory is updated; on a data-cache hit the
//      bytes are written into the cache with byte enables.
//   5. Register reads on Rs/Rt/RtRd of both copies are checked against the
//      expected register values; write faults are injected into pipeline
//      copy B (data, address, stray enable) and must be corrected by a
//      stall and replay.
//   6. A second invalidation: all earlier lines then miss.
// Every response is checked one cycle after its request. Each mechanism
// (hit, miss, refill, byte write, invalidation, data/WWL error, stall and
// replay) is counted and must occur.
module tb_lp_rf_top;
  import rf_pkg::*;
  int checks = 0, failures = 0;
  int n_ihit = 0, n_imiss = 0, n_dhit = 0, n_dmiss = 0, n_refill = 0, n_bytewr = 0;
  int n_inv = 0, n_stall = 0, n_wwl_err = 0, n_data_err = 0, n_rf_wr = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- DUT ports ----------------
  logic ic_req_valid, ic_wr_data, ic_wr_tag, ic_rsp_valid, ic_hit, ic_miss;
  cache_op_e ic_op; logic [31:0] ic_addr, ic_wdata, ic_rdata; logic [1:0] ic_way, ic_hit_way;
  logic [3:0] ic_wbe; tag_entry_t ic_wtag, ic_rtag;
  logic dc_req_valid, dc_wr_data, dc_wr_tag, dc_rsp_valid, dc_hit, dc_miss;
  cache_op_e dc_op; logic [31:0] dc_addr, dc_wdata, dc_rdata; logic [1:0] dc_way, dc_hit_way;
  logic [3:0] dc_wbe; tag_entry_t dc_wtag, dc_rtag;
  logic rf_we_a, rf_we_b, rf_stall, rf_wwl_err, rf_data_err;
  logic [4:0] rf_waddr_a, rf_waddr_b; logic [31:0] rf_wdata_a, rf_wdata_b;
  logic [2:0][4:0] rf_raddr_a, rf_raddr_b; logic [2:0][31:0] rf_rdata_a, rf_rdata_b;
  logic [2:0] rf_rperr_a, rf_rperr_b;

  lp_rf_top dut (.*);

  // ---------------- models ----------------
  logic [31:0] store_mem [logic [29:0]];
  logic [20:0] m_tag [2][128][4];
  logic        m_val [2][128][4];
  logic [1:0]  next_way [2][128];
  logic [31:0] ref_rf [32];

  function automatic logic [31:0] mem_rd(input logic [31:0] a);
    if (store_mem.exists(a[31:2])) return store_mem[a[31:2]];
    return (a[31:2] * 32'h9E37_79B9) ^ 32'h5A5A_0F0F;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One cache request; the response is sampled one cycle later.
  logic        r_hit, r_miss;
  logic [1:0]  r_way;
  logic [31:0] r_data;

  task automatic creq(input int c, input cache_op_e op, input logic [31:0] a, input logic [1:0] w,
                      input logic wd, input logic wt, input logic [3:0] be, input logic [31:0] d,
                      input tag_entry_t t);
    @(negedge clk);
    if (c == 0) begin
      ic_req_valid = 1; ic_op = op; ic_addr = a; ic_way = w; ic_wr_data = wd; ic_wr_tag = wt;
      ic_wbe = be; ic_wdata = d; ic_wtag = t;
    end else begin
      dc_req_valid = 1; dc_op = op; dc_addr = a; dc_way = w; dc_wr_data = wd; dc_wr_tag = wt;
      dc_wbe = be; dc_wdata = d; dc_wtag = t;
    end
    @(posedge clk); #1;
    ic_req_valid = 0; dc_req_valid = 0;
    checks++;
    if ((c == 0 ? ic_rsp_valid : dc_rsp_valid) !== 1'b1) begin
      failures++; $display("FAIL cache %0d: no response one cycle after the request", c);
    end
    r_hit  = (c == 0) ? ic_hit : dc_hit;
    r_miss = (c == 0) ? ic_miss : dc_miss;
    r_way  = (c == 0) ? ic_hit_way : dc_hit_way;
    r_data = (c == 0) ? ic_rdata : dc_rdata;
  endtask

  task automatic invalidate(input int c);
    creq(c, OP_INVALIDATE, 32'h0, 2'd0, 1'b0, 1'b0, 4'h0, 32'h0, '0);
    for (int s = 0; s < 128; s++) for (int w = 0; w < 4; w++) m_val[c][s][w] = 1'b0;
    n_inv++;
  endtask

  // Lookup with an independently computed expectation; refill on a miss.
  task automatic access(input int c, input logic [31:0] a, output logic [31:0] data);
    int set, hw;
    logic exp_hit;
    set = int'(a[10:4]);
    exp_hit = 0; hw = 0;
    for (int w = 3; w >= 0; w--) if (m_val[c][set][w] && m_tag[c][set][w] == a[31:11]) begin
      exp_hit = 1; hw = w;
    end
    creq(c, OP_LOOKUP, a, 2'd0, 1'b0, 1'b0, 4'h0, 32'h0, '0);
    checks++;
    if (r_hit !== exp_hit || r_miss !== !exp_hit || (exp_hit && (r_way !== 2'(hw) || r_data !== mem_rd(a)))) begin
      failures++;
      $display("FAIL cache %0d lookup %h: hit=%b way=%0d data=%h exp hit=%b way=%0d data=%h",
               c, a, r_hit, r_way, r_data, exp_hit, hw, mem_rd(a));
    end
    if (exp_hit) begin
      if (c == 0) n_ihit++; else n_dhit++;
      data = r_data;
    end else begin
      int w;
      if (c == 0) n_imiss++; else n_dmiss++;
      w = int'(next_way[c][set]);
      next_way[c][set] = next_way[c][set] + 2'd1;
      for (int k = 0; k < 4; k++) begin
        logic [31:0] la;
        la = {a[31:4], 2'(k), 2'b00};
        creq(c, OP_WRITE, la, 2'(w), 1'b1, (k == 0), 4'hF, mem_rd(la),
             '{lrf: 1'b1, lock: 1'b0, valid: 1'b1, tag: a[31:11]});
      end
      m_tag[c][set][w] = a[31:11]; m_val[c][set][w] = 1'b1;
      n_refill++;
      // the refilled word must now hit
      creq(c, OP_LOOKUP, a, 2'd0, 1'b0, 1'b0, 4'h0, 32'h0, '0);
      checks++;
      if (r_hit !== 1'b1 || r_way !== 2'(w) || r_data !== mem_rd(a)) begin
        failures++; $display("FAIL cache %0d refill %h: hit=%b way=%0d data=%h", c, a, r_hit, r_way, r_data);
      end
      data = r_data;
    end
  endtask

  // Write-through store of the bytes in be.
  task automatic store(input logic [31:0] a, input logic [3:0] be, input logic [31:0] d);
    logic [31:0] m;
    int set;
    m = mem_rd(a);
    for (int k = 0; k < 4; k++) if (be[k]) m[k*8 +: 8] = d[k*8 +: 8];
    store_mem[a[31:2]] = m;
    set = int'(a[10:4]);
    creq(1, OP_LOOKUP, a, 2'd0, 1'b0, 1'b0, 4'h0, 32'h0, '0);
    if (r_hit) begin
      creq(1, OP_WRITE, a, r_way, 1'b1, 1'b0, be, d, '0);
      n_bytewr++;
    end
  endtask

  // Register write from both pipeline copies, with an optional fault in copy B.
  task automatic rf_write(input logic [4:0] r, input logic [31:0] d, input int fault);
    @(negedge clk);
    rf_we_a = 1; rf_waddr_a = r; rf_wdata_a = d;
    rf_we_b = 1; rf_waddr_b = r; rf_wdata_b = d;
    if (fault == 1) rf_wdata_b = d ^ 32'h0001_0000;
    if (fault == 2) rf_waddr_b = r ^ 5'd1;
    #1;
    checks++;
    if (rf_data_err !== (fault == 1) || rf_wwl_err !== (fault == 2)) begin
      failures++; $display("FAIL rf checker fault=%0d: %b %b", fault, rf_data_err, rf_wwl_err);
    end
    if (rf_data_err) n_data_err++;
    if (rf_wwl_err) n_wwl_err++;
    @(posedge clk); #1;
    rf_we_a = 0; rf_we_b = 0; rf_waddr_b = rf_waddr_a; rf_wdata_b = rf_wdata_a;
    ref_rf[r] = d;
    n_rf_wr++;
    checks++;
    if (rf_stall !== (fault != 0)) begin
      failures++; $display("FAIL rf stall=%b after fault %0d", rf_stall, fault);
    end
    if (rf_stall) begin
      n_stall++;
      @(posedge clk); #1;   // replay cycle
      checks++;
      if (rf_stall !== 1'b0) begin failures++; $display("FAIL rf stall longer than one cycle"); end
    end
  endtask

  task automatic rf_check(input logic [4:0] rs, input logic [4:0] rt, input logic [4:0] rd);
    @(negedge clk);
    rf_raddr_a = {rd, rt, rs}; rf_raddr_b = {rd, rt, rs};
    #1;
    for (int p = 0; p < 3; p++) begin
      checks++;
      if (rf_rdata_a[p] !== ref_rf[rf_raddr_a[p]] || rf_rdata_b[p] !== ref_rf[rf_raddr_b[p]] ||
          rf_rperr_a[p] || rf_rperr_b[p]) begin
        failures++; $display("FAIL rf port %0d r%0d: %h %h exp %h", p, rf_raddr_a[p],
                             rf_rdata_a[p], rf_rdata_b[p], ref_rf[rf_raddr_a[p]]);
      end
    end
  endtask

  initial begin
    logic [31:0] d;
    ic_req_valid = 0; ic_op = OP_LOOKUP; ic_addr = 0; ic_way = 0; ic_wr_data = 0; ic_wr_tag = 0;
    ic_wbe = 0; ic_wdata = 0; ic_wtag = '0;
    dc_req_valid = 0; dc_op = OP_LOOKUP; dc_addr = 0; dc_way = 0; dc_wr_data = 0; dc_wr_tag = 0;
    dc_wbe = 0; dc_wdata = 0; dc_wtag = '0;
    rf_we_a = 0; rf_we_b = 0; rf_waddr_a = 0; rf_waddr_b = 0; rf_wdata_a = 0; rf_wdata_b = 0;
    rf_raddr_a = '0; rf_raddr_b = '0;
    for (int c = 0; c < 2; c++) for (int s = 0; s < 128; s++) next_way[c][s] = 2'd0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. power-up invalidation
    invalidate(0); invalidate(1);
    for (int r = 0; r < 32; r++) rf_write(5'(r), 32'h0, 0);
    // 2. instruction fetch loop: a small program fetched three times
    for (int pass = 0; pass < 3; pass++)
      for (int pc = 32'h0040_0000; pc < 32'h0040_0100; pc += 4) access(0, 32'(pc), d);
    // 3./4./5. loads, stores and register traffic over conflicting sets
    for (int i = 0; i < 400; i++) begin
      logic [31:0] a;
      int op;
      a = {21'($urandom_range(0, 5)), 3'($urandom_range(0, 1)), 4'($urandom_range(0, 3)),
           2'($urandom), 2'b00};
      op = $urandom_range(0, 3);
      if (op < 2) begin
        access(1, a, d);
        rf_write(5'($urandom_range(1, 31)), d, ($urandom_range(0, 9) == 0) ? $urandom_range(1, 2) : 0);
      end else if (op == 2) begin
        store(a, 4'($urandom_range(1, 15)), $urandom);
      end else begin
        rf_check(5'($urandom), 5'($urandom), 5'($urandom));
      end
    end
    // 6. invalidate the data cache again: the next access to any line misses
    invalidate(1);
    begin
      int n_before;
      n_before = n_dmiss;
      access(1, 32'h0000_0000, d);
      checks++;
      if (n_dmiss != n_before + 1) begin failures++; $display("FAIL no miss after invalidation"); end
    end
    for (int r = 0; r < 32; r += 3) rf_check(5'(r), 5'(r + 1), 5'(r + 2));

    $display("icache hit=%0d miss=%0d  dcache hit=%0d miss=%0d  refills=%0d byte-writes=%0d invalidations=%0d",
             n_ihit, n_imiss, n_dhit, n_dmiss, n_refill, n_bytewr, n_inv);
    $display("regfile writes=%0d data_err=%0d wwl_err=%0d stall/replay=%0d",
             n_rf_wr, n_data_err, n_wwl_err, n_stall);
    if (n_ihit == 0 || n_imiss == 0 || n_dhit == 0 || n_dmiss == 0 || n_refill == 0 ||
        n_bytewr == 0 || n_inv < 3 || n_data_err == 0 || n_wwl_err == 0 || n_stall == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
