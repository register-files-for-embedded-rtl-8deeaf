// tag_subbank: 16-entry x 96-bit cache tag sub-bank.
//
// Each entry holds the four 24-bit tag entries (tag_entry_t: 21-bit tag,
// valid, lock, LRF) of one set, way w in bits [24w+23:24w]. Its floorplan,
// decoders and timing are those of the data sub-bank (sp_rf_array): a read
// returns all four tags of the addressed set combinationally, a write stores
// one tag at the rising clock edge. A tag spans three 8-bit column groups
// and the three share one write enable, so exactly one way's tag is written
// per write. The valid column of every tag is resettable: while
// `invalidate` is high all valid bits are cleared at the clock edge
// (global cache invalidation).
module tag_subbank
  import rf_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned WAYS    = 4
) (
  input  logic                        clk,
  input  logic                        we,
  input  logic [$clog2(ENTRIES)-1:0]  waddr,
  input  logic [$clog2(WAYS)-1:0]     wway,
  input  tag_entry_t                  wtag,
  input  logic [$clog2(ENTRIES)-1:0]  raddr,
  output tag_entry_t [WAYS-1:0]       rtag,
  input  logic                        invalidate
);
  localparam int unsigned TW     = $bits(tag_entry_t);  // 24
  localparam int unsigned WIDTH  = WAYS * TW;           // 96
  localparam int unsigned GPT    = TW / 8;              // groups per tag
  localparam int unsigned VALIDB = TAG_BITS;            // valid bit position in a tag

  function automatic logic [WIDTH-1:0] valid_mask();
    logic [WIDTH-1:0] m;
    m = '0;
    for (int w = 0; w < int'(WAYS); w++) m[w*TW + VALIDB] = 1'b1;
    return m;
  endfunction

  localparam logic [WIDTH-1:0] VMASK = valid_mask();

  logic [WIDTH/8-1:0] wbe;
  logic [WIDTH-1:0]   phys_rdata;

  always_comb begin
    for (int w = 0; w < int'(WAYS); w++)
      wbe[w*GPT +: GPT] = {GPT{wway == ($clog2(WAYS))'(w)}};
  end

  assign rtag = phys_rdata;

  sp_rf_array #(
    .ENTRIES    (ENTRIES),
    .WIDTH      (WIDTH),
    .GROUP      (8),
    .RESET_MASK (VMASK)
  ) u_array (
    .clk        (clk),
    .we         (we),
    .waddr      (waddr),
    .wbe        (wbe),
    .wdata      ({WAYS{wtag}}),
    .raddr      (raddr),
    .rdata      (phys_rdata),
    .invalidate (invalidate)
  );
endmodule
