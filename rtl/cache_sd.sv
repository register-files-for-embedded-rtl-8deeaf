// cache_sd: 8 KB, 4-way set-associative cache built from eight 1 KB groups.
//
// Address split (32-bit physical address):
//   addr[1:0]   byte in word (not used; byte enables select bytes)
//   addr[3:2]   word in the 16-byte line  -> which data sub-bank
//   addr[7:4]   set within a group        -> sub-bank entry
//   addr[10:8]  group (cache_cluster)
//   addr[31:11] 21-bit tag
// Group logic decodes addr[10:8] and raises `sel` only for the addressed
// group, so only that group's inputs toggle. Global invalidation goes to all
// groups at once.
//
// Interface: a request (req_valid with op, addr and the write fields) is
// sampled at a rising clock edge. The response (rsp_valid, hit, miss,
// hit_way, rdata, rtag) is valid during the following clock cycle; a write
// or invalidation is stored at the edge that ends that cycle, so a request
// issued in the next cycle already sees it. One request per cycle, no
// back-pressure. The cache does not allocate on a miss by itself: the
// processor refills a line with OP_WRITE (data and tag).
//
// The group structure, sizes and the four operations follow the design; the
// address split, handshake and response timing are this implementation's.
module cache_sd
  import rf_pkg::*;
#(
  parameter int unsigned NCLUSTERS = CACHE_GROUPS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  input  cache_op_e     op,
  input  logic [31:0]   addr,
  input  logic [1:0]    way,
  input  logic          wr_data,
  input  logic          wr_tag,
  input  logic [3:0]    wbe,
  input  logic [31:0]   wdata,
  input  tag_entry_t    wtag,
  output logic          rsp_valid,
  output logic          hit,
  output logic          miss,
  output logic [1:0]    hit_way,
  output logic [31:0]   rdata,
  output tag_entry_t    rtag
);
  localparam int unsigned GB = (NCLUSTERS > 1) ? $clog2(NCLUSTERS) : 1;

  logic [GB-1:0] grp;
  assign grp = addr[8 +: GB];

  logic [NCLUSTERS-1:0]        sel;
  logic                        inv;
  logic [NCLUSTERS-1:0]        c_hit;
  logic [NCLUSTERS-1:0][1:0]   c_way;
  logic [NCLUSTERS-1:0][31:0]  c_rdata;
  tag_entry_t [NCLUSTERS-1:0]  c_rtag;

  assign inv = req_valid && (op == OP_INVALIDATE);
  always_comb begin
    for (int g = 0; g < int'(NCLUSTERS); g++)
      sel[g] = req_valid && (op != OP_INVALIDATE) && (grp == GB'(g));
  end

  for (genvar g = 0; g < int'(NCLUSTERS); g++) begin : g_cluster
    cache_cluster #(.ENTRIES(CACHE_SETS_GRP), .WAYS(CACHE_WAYS), .WORDS(CACHE_WORDS)) u_cluster (
      .clk        (clk),
      .rst_n      (rst_n),
      .sel        (sel[g]),
      .op         (op),
      .index      (addr[7:4]),
      .word       (addr[3:2]),
      .ptag       (addr[31:11]),
      .way        (way),
      .wr_data    (wr_data),
      .wr_tag     (wr_tag),
      .wbe        (wbe),
      .wdata      (wdata),
      .wtag       (wtag),
      .invalidate (inv),
      .hit        (c_hit[g]),
      .hit_way    (c_way[g]),
      .rdata      (c_rdata[g]),
      .rtag       (c_rtag[g])
    );
  end

  // response multiplexer, steered by the registered group number
  logic          rsp_q;
  cache_op_e     op_q;
  logic [GB-1:0] grp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_q <= 1'b0;
      op_q  <= OP_LOOKUP;
      grp_q <= '0;
    end else begin
      rsp_q <= req_valid;
      if (req_valid) begin
        op_q  <= op;
        grp_q <= grp;
      end
    end
  end

  assign rsp_valid = rsp_q;
  assign hit       = rsp_q && (op_q == OP_LOOKUP) && c_hit[grp_q];
  assign miss      = rsp_q && (op_q == OP_LOOKUP) && !c_hit[grp_q];
  assign hit_way   = c_way[grp_q];
  assign rdata     = c_rdata[grp_q];
  assign rtag      = c_rtag[grp_q];
endmodule
