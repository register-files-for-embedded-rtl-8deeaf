// cache_cluster: one 1 KB group of the cache (16 sets x 4 ways x 16 bytes).
//
// The group holds one tag sub-bank (four tags per set) and four data
// sub-banks, sub-bank k holding word k of every line of all four ways, so
// the ways are interleaved inside each sub-bank. Tag and data sub-banks have
// their own address registers so that they can be addressed independently.
//
// Request registers: a request is sampled at a rising clock edge when `sel`
// is high. The registers feeding a sub-bank load only when that sub-bank is
// used (the tag sub-bank for every operation, a data sub-bank only when its
// word is the target), so the inputs of unused sub-banks do not toggle: this
// is the clock-gated address flip-flop scheme of the design.
//
// Operations (op, cache_op_e), results combinational from the registers and
// so valid in the clock cycle after the request edge:
//   OP_LOOKUP  all four tags are read and compared with ptag (valid bit
//              required); hit/hit_way report the match and rdata is word
//              `word` of the hit way, read from the target data sub-bank only.
//   OP_READ    rdata is word `word` of way `way`, rtag that way's tag entry.
//   OP_WRITE   writes wdata under the byte enables wbe into word `word` of
//              way `way` (wr_data) and/or wtag into the tag of way `way`
//              (wr_tag). The sub-banks store it at the next clock edge.
// Global invalidation (`invalidate`, independent of sel) clears every valid
// bit at the next clock edge after it is sampled.
//
// Which sub-banks' registers are gated follows the design; the handling of
// two matching ways (an assertion, lowest way wins) is this design's choice.
module cache_cluster
  import rf_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned WORDS   = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        sel,
  input  cache_op_e                   op,
  input  logic [$clog2(ENTRIES)-1:0]  index,
  input  logic [$clog2(WORDS)-1:0]    word,
  input  logic [TAG_BITS-1:0]         ptag,
  input  logic [$clog2(WAYS)-1:0]     way,
  input  logic                        wr_data,
  input  logic                        wr_tag,
  input  logic [3:0]                  wbe,
  input  logic [31:0]                 wdata,
  input  tag_entry_t                  wtag,
  input  logic                        invalidate,
  output logic                        hit,
  output logic [$clog2(WAYS)-1:0]     hit_way,
  output logic [31:0]                 rdata,
  output tag_entry_t                  rtag
);
  localparam int unsigned IB = $clog2(ENTRIES);
  localparam int unsigned WB = $clog2(WAYS);

  // ---------------- request registers ----------------
  logic                      valid_q, inv_q, tag_we_q;
  logic [WORDS-1:0]          data_we_q;
  cache_op_e                 op_q;
  logic [$clog2(WORDS)-1:0]  word_q;
  logic [WB-1:0]             way_q;
  logic [TAG_BITS-1:0]       ptag_q;
  logic [IB-1:0]             tag_idx_q;
  logic [WORDS-1:0][IB-1:0]  data_idx_q;
  logic [3:0]                wbe_q;
  logic [31:0]               wdata_q;
  tag_entry_t                wtag_q;

  logic is_wr;
  assign is_wr = (op == OP_WRITE);

  // enables (the sequencing signals of the gated registers) are reset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= 1'b0;
      inv_q     <= 1'b0;
      tag_we_q  <= 1'b0;
      data_we_q <= '0;
    end else begin
      valid_q   <= sel && (op != OP_INVALIDATE);
      inv_q     <= invalidate;
      tag_we_q  <= sel && is_wr && wr_tag;
      for (int k = 0; k < int'(WORDS); k++)
        data_we_q[k] <= sel && is_wr && wr_data && (word == ($clog2(WORDS))'(k));
    end
  end

  // gated address/data registers: load only when used
  always_ff @(posedge clk) begin
    if (sel) begin
      op_q      <= op;
      word_q    <= word;
      way_q     <= way;
      tag_idx_q <= index;
    end
    if (sel && op == OP_LOOKUP) ptag_q <= ptag;
    if (sel && is_wr) begin
      wbe_q   <= wbe;
      wdata_q <= wdata;
      wtag_q  <= wtag;
    end
    for (int k = 0; k < int'(WORDS); k++)
      if (sel && word == ($clog2(WORDS))'(k)) data_idx_q[k] <= index;
  end

  // ---------------- sub-banks ----------------
  tag_entry_t [WAYS-1:0]                tags;
  logic [WORDS-1:0][WAYS-1:0][31:0]     words;

  tag_subbank #(.ENTRIES(ENTRIES), .WAYS(WAYS)) u_tag (
    .clk        (clk),
    .we         (tag_we_q),
    .waddr      (tag_idx_q),
    .wway       (way_q),
    .wtag       (wtag_q),
    .raddr      (tag_idx_q),
    .rtag       (tags),
    .invalidate (inv_q)
  );

  for (genvar k = 0; k < int'(WORDS); k++) begin : g_data
    data_subbank #(.ENTRIES(ENTRIES), .WAYS(WAYS), .WORD(32)) u_data (
      .clk   (clk),
      .we    (data_we_q[k]),
      .waddr (data_idx_q[k]),
      .wway  (way_q),
      .wbe   (wbe_q),
      .wdata (wdata_q),
      .raddr (data_idx_q[k]),
      .rdata (words[k])
    );
  end

  // ---------------- tag compare, way and word multiplexers ----------------
  logic [WAYS-1:0] match;
  logic [WB-1:0]   sel_way;

  always_comb begin
    for (int w = 0; w < int'(WAYS); w++)
      match[w] = tags[w].valid && (tags[w].tag == ptag_q);
    hit_way = '0;
    for (int w = int'(WAYS) - 1; w >= 0; w--)
      if (match[w]) hit_way = WB'(w);
  end

  assign hit     = valid_q && (op_q == OP_LOOKUP) && (match != '0);
  assign sel_way = (op_q == OP_LOOKUP) ? hit_way : way_q;
  assign rdata   = words[word_q][sel_way];
  assign rtag    = tags[sel_way];

  // Ways of one set must never hold the same valid tag.
  a_single_match : assert property (@(posedge clk) disable iff (!rst_n)
    (valid_q && op_q == OP_LOOKUP) |-> ((match & (match - 1'b1)) == '0));
endmodule
