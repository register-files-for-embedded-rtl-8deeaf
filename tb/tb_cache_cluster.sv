// tb_cache_cluster: one 1 KB cache group against a reference model.
//
// Random lookups, way reads, refills and byte writes with `sel` high, mixed
// with cycles where `sel` is low and the inputs carry random write requests
// that must be ignored (the group is not addressed). Results are checked in
// the cycle after the request; a global invalidation clears all valid bits.
module tb_cache_cluster;
  import rf_pkg::*;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_unsel = 0, n_inv = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sel, wr_data, wr_tag, inv, hit;
  cache_op_e op;
  logic [3:0] index, wbe;
  logic [1:0] word, way, hit_way;
  logic [20:0] ptag;
  logic [31:0] wdata, rdata;
  tag_entry_t wtag, rtag;

  cache_cluster dut (.clk(clk), .rst_n(rst_n), .sel(sel), .op(op), .index(index), .word(word),
                     .ptag(ptag), .way(way), .wr_data(wr_data), .wr_tag(wr_tag), .wbe(wbe),
                     .wdata(wdata), .wtag(wtag), .invalidate(inv), .hit(hit), .hit_way(hit_way),
                     .rdata(rdata), .rtag(rtag));

  tag_entry_t  m_tag  [16][4];
  logic [31:0] m_data [16][4][4];
  logic        e_lookup, e_read, e_hit;
  logic [1:0]  e_way;
  logic [31:0] e_data;
  tag_entry_t  e_tag;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rsp();
    if (e_lookup) begin
      checks++;
      if (hit !== e_hit || (e_hit && (hit_way !== e_way || rdata !== e_data))) begin
        failures++;
        $display("FAIL lookup hit=%b way=%0d data=%h exp hit=%b way=%0d data=%h",
                 hit, hit_way, rdata, e_hit, e_way, e_data);
      end
    end
    if (e_read) begin
      checks++;
      if (rdata !== e_data || rtag !== e_tag) begin
        failures++; $display("FAIL read data=%h tag=%h exp %h %h", rdata, rtag, e_data, e_tag);
      end
    end
  endtask

  initial begin
    sel = 0; op = OP_LOOKUP; index = 0; word = 0; ptag = 0; way = 0; wr_data = 0; wr_tag = 0;
    wbe = 0; wdata = 0; wtag = '0; inv = 0;
    e_lookup = 0; e_read = 0; e_hit = 0; e_way = 0; e_data = 0; e_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // initial fill of every word and tag
    for (int s = 0; s < 16; s++) for (int x = 0; x < 4; x++) for (int wd = 0; wd < 4; wd++) begin
      @(negedge clk);
      sel = 1; op = OP_WRITE; index = 4'(s); word = 2'(wd); way = 2'(x);
      wr_data = 1; wr_tag = 1; wbe = 4'hF; wdata = $urandom;
      wtag = '{lrf: 1'b0, lock: 1'b0, valid: 1'b1, tag: 21'(x * 16 + s)};
      m_data[s][x][wd] = wdata; m_tag[s][x] = wtag;
    end
    for (int i = 0; i < 5000; i++) begin
      int kind, s, x, wd;
      logic [20:0] t;
      @(posedge clk); #1; check_rsp();
      @(negedge clk);
      e_lookup = 0; e_read = 0;
      kind = $urandom_range(0, 5); s = $urandom_range(0, 15); x = $urandom_range(0, 3);
      wd = $urandom_range(0, 3);
      t = 21'($urandom_range(0, 63));
      sel = 1; inv = 0; index = 4'(s); word = 2'(wd); way = 2'(x); wdata = $urandom;
      wbe = 4'($urandom); wr_data = 0; wr_tag = 0; ptag = t; wtag = tag_entry_t'($urandom);
      if ($urandom_range(0, 799) == 0) begin
        sel = 0; inv = 1; n_inv++;
        for (int a = 0; a < 16; a++) for (int b = 0; b < 4; b++) m_tag[a][b].valid = 1'b0;
      end else if (kind == 0) begin        // not addressed: random write that must be ignored
        sel = 0; op = OP_WRITE; wr_data = 1; wr_tag = 1; n_unsel++;
      end else if (kind == 1) begin        // refill word + tag (unique valid tag per set)
        op = OP_WRITE; wr_data = 1; wr_tag = 1; wbe = 4'hF;
        for (int y = 0; y < 4; y++) if (y != x && m_tag[s][y].valid && m_tag[s][y].tag == t) t = 21'h1F_FFFF - 21'(y);
        wtag = '{lrf: 1'($urandom), lock: 1'($urandom), valid: 1'b1, tag: t};
        m_tag[s][x] = wtag; m_data[s][x][wd] = wdata;
      end else if (kind == 2) begin        // byte write
        op = OP_WRITE; wr_data = 1;
        for (int k = 0; k < 4; k++) if (wbe[k]) m_data[s][x][wd][k*8 +: 8] = wdata[k*8 +: 8];
      end else if (kind == 3) begin        // read
        op = OP_READ; e_read = 1; e_data = m_data[s][x][wd]; e_tag = m_tag[s][x];
      end else begin                       // lookup
        op = OP_LOOKUP; e_lookup = 1; e_hit = 0; e_way = 0; e_data = 0;
        for (int y = 3; y >= 0; y--)
          if (m_tag[s][y].valid && m_tag[s][y].tag == t) begin
            e_hit = 1; e_way = 2'(y); e_data = m_data[s][y][wd];
          end
        if (e_hit) n_hit++; else n_miss++;
      end
    end
    @(posedge clk); #1; check_rsp();
    $display("hits=%0d misses=%0d unselected=%0d invalidations=%0d", n_hit, n_miss, n_unsel, n_inv);
    if (n_hit == 0 || n_miss == 0 || n_unsel == 0) begin
      failures++; $display("FAIL a case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
