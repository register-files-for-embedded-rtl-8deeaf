// tb_cache_sd: random traffic on the 8 KB cache against a reference model.
//
// One request per clock. The reference holds all 128 sets x 4 ways of tags
// and line data. The stimulus mixes refills (tag + data writes), byte
// writes, lookups of resident and absent lines, way reads, and global
// invalidations. Each response is checked in the cycle after its request
// (rsp_valid, hit/miss, hit way, data, tag), which is the cache's one-cycle
// latency, while the next request is already driven on the inputs; a
// request right after a write must already see it.
module tb_cache_sd;
  import rf_pkg::*;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_inv = 0, n_bytewr = 0, n_read = 0, n_refill = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, wr_data, wr_tag, rsp_valid, hit, miss;
  cache_op_e op;
  logic [31:0] addr, wdata, rdata;
  logic [1:0] way, hit_way;
  logic [3:0] wbe;
  tag_entry_t wtag, rtag;

  cache_sd dut (.clk(clk), .rst_n(rst_n), .req_valid(req_valid), .op(op), .addr(addr),
                .way(way), .wr_data(wr_data), .wr_tag(wr_tag), .wbe(wbe), .wdata(wdata),
                .wtag(wtag), .rsp_valid(rsp_valid), .hit(hit), .miss(miss),
                .hit_way(hit_way), .rdata(rdata), .rtag(rtag));

  tag_entry_t  m_tag  [128][4];
  logic [31:0] m_data [128][4][4];

  // expected response of the request issued in the previous cycle
  logic        e_valid, e_lookup, e_read, e_hit;
  logic [1:0]  e_way;
  logic [31:0] e_data;
  tag_entry_t  e_tag;
  // the same, held while the next request is already being driven
  logic        p_valid, p_lookup, p_read, p_hit;
  logic [1:0]  p_way;
  logic [31:0] p_data;
  tag_entry_t  p_tag;

  task automatic hold_expect();
    p_valid = e_valid; p_lookup = e_lookup; p_read = e_read; p_hit = e_hit;
    p_way = e_way; p_data = e_data; p_tag = e_tag;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [20:0] pick_tag();
    return 21'($urandom_range(0, 5)) | 21'h1A_0000;   // small pool: frequent hits
  endfunction

  task automatic check_rsp();
    checks++;
    if (rsp_valid !== p_valid) begin
      failures++; $display("FAIL rsp_valid=%b exp %b", rsp_valid, p_valid);
    end
    if (p_lookup) begin
      checks++;
      if (hit !== p_hit || miss !== !p_hit || (p_hit && (hit_way !== p_way || rdata !== p_data))) begin
        failures++;
        $display("FAIL lookup hit=%b miss=%b way=%0d data=%h exp hit=%b way=%0d data=%h",
                 hit, miss, hit_way, rdata, p_hit, p_way, p_data);
      end
    end
    if (p_read) begin
      checks++;
      if (rdata !== p_data || rtag !== p_tag) begin
        failures++; $display("FAIL read data=%h tag=%h exp %h %h", rdata, rtag, p_data, p_tag);
      end
    end
  endtask

  task automatic issue(input int kind);
    int set, w, wd;
    logic [20:0] t;
    set = $urandom_range(0, 127); w = $urandom_range(0, 3); wd = $urandom_range(0, 3);
    req_valid = 1; wr_data = 0; wr_tag = 0; wbe = 0; wdata = $urandom; wtag = '0; way = 2'(w);
    e_valid = 1; e_lookup = 0; e_read = 0;
    case (kind)
      0: begin // refill one word of a line: tag write with data
        // a valid tag may appear in only one way of a set
        t = pick_tag();
        for (int n = 0; n < 8; n++) begin
          logic dup;
          dup = 0;
          for (int x = 0; x < 4; x++)
            if (x != w && m_tag[set][x].valid && m_tag[set][x].tag == t) dup = 1;
          if (dup) t = (t == 21'h1A_0005) ? 21'h1A_0000 : t + 21'd1;
        end
        op = OP_WRITE; wr_data = 1; wr_tag = 1; wbe = 4'hF;
        wtag = '{lrf: 1'($urandom), lock: 1'($urandom), valid: 1'b1, tag: t};
        addr = {t, 3'(set >> 4), 4'(set), 2'(wd), 2'b00};
        m_tag[set][w] = wtag;
        m_data[set][w][wd] = wdata;
        n_refill++;
      end
      1: begin // byte write of data only
        op = OP_WRITE; wr_data = 1; wbe = 4'($urandom);
        addr = {21'h0, 3'(set >> 4), 4'(set), 2'(wd), 2'b00};
        for (int k = 0; k < 4; k++) if (wbe[k]) m_data[set][w][wd][k*8 +: 8] = wdata[k*8 +: 8];
        if (wbe != 4'hF && wbe != 4'h0) n_bytewr++;
      end
      2, 3, 4: begin // lookup
        t = pick_tag();
        op = OP_LOOKUP;
        addr = {t, 3'(set >> 4), 4'(set), 2'(wd), 2'($urandom)};
        e_lookup = 1; e_hit = 0; e_way = 0; e_data = 0;
        for (int x = 3; x >= 0; x--)
          if (m_tag[set][x].valid && m_tag[set][x].tag == t) begin
            e_hit = 1; e_way = 2'(x); e_data = m_data[set][x][wd];
          end
        if (e_hit) n_hit++; else n_miss++;
      end
      5: begin // read a way
        op = OP_READ;
        addr = {21'($urandom), 3'(set >> 4), 4'(set), 2'(wd), 2'b00};
        e_read = 1; e_data = m_data[set][w][wd]; e_tag = m_tag[set][w];
        n_read++;
      end
      default: begin // global invalidation
        op = OP_INVALIDATE; addr = $urandom;
        for (int s = 0; s < 128; s++) for (int x = 0; x < 4; x++) m_tag[s][x].valid = 1'b0;
        n_inv++;
      end
    endcase
  endtask

  initial begin
    req_valid = 0; op = OP_LOOKUP; addr = 0; way = 0; wr_data = 0; wr_tag = 0;
    wbe = 0; wdata = 0; wtag = '0;
    e_valid = 0; e_lookup = 0; e_read = 0; e_hit = 0; e_way = 0; e_data = 0; e_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // power-up invalidation, then write every word and tag once so the model is defined
    @(negedge clk); issue(6);
    e_valid = 1;
    for (int s = 0; s < 128; s++) for (int x = 0; x < 4; x++) for (int wd = 0; wd < 4; wd++) begin
      @(negedge clk);
      hold_expect(); #1; check_rsp();
      req_valid = 1; op = OP_WRITE; wr_data = 1; wr_tag = (wd == 0); wbe = 4'hF; way = 2'(x);
      wdata = $urandom; wtag = '{lrf: 1'b0, lock: 1'b0, valid: 1'b0, tag: 21'(s)};
      addr = {21'h0, 3'(s >> 4), 4'(s), 2'(wd), 2'b00};
      m_data[s][x][wd] = wdata;
      if (wd == 0) m_tag[s][x] = wtag;
      e_valid = 1; e_lookup = 0; e_read = 0;
    end
    for (int i = 0; i < 6000; i++) begin
      int kind;
      @(negedge clk);
      hold_expect();
      kind = $urandom_range(0, 5);
      if ($urandom_range(0, 999) == 0) kind = 6;
      if ($urandom_range(0, 9) == 0) begin
        req_valid = 0; e_valid = 0; e_lookup = 0; e_read = 0;   // idle cycle
      end else issue(kind);
      // the previous request's response, checked while this request is on the inputs
      #1; check_rsp();
    end
    @(negedge clk); hold_expect(); req_valid = 0; #1; check_rsp();
    $display("hits=%0d misses=%0d refills=%0d bytewrites=%0d reads=%0d invalidations=%0d",
             n_hit, n_miss, n_refill, n_bytewr, n_read, n_inv);
    if (n_hit == 0 || n_miss == 0 || n_inv < 2 || n_bytewr == 0 || n_read == 0) begin
      failures++; $display("FAIL a cache operation was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
