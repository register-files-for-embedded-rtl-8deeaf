// sp_rf_array: static single-port register file (one write, one read port).
//
// Storage is ENTRIES x WIDTH cells. The write path follows the design's
// column group scheme: a predecoded write decoder drives one global write
// word line (GWWL) per entry, and every group of GROUP columns has local
// write select gates that AND the GWWL with that group's byte write enable
// to form a local write word line (LWWL). A cell is written only when its
// LWWL is high. Writes take effect at the rising edge of clk.
//
// The read path is fully static: the read decoder always selects one entry,
// the selected cells drive either the top or the bottom read bit line
// (each shared by half the entries), and a 2:1 multiplexer selected by the
// read address MSB forwards the chosen bit line to rdata. rdata is a
// combinational function of raddr and the stored data; no clock or read
// enable is involved.
//
// Columns whose bit is set in RESET_MASK model cells with an extra reset
// transistor (the tag valid bits): while `invalidate` is high they are
// cleared at the clock edge, in every entry. The synchronous clear and the
// edge-triggered write stand in for the design's level-sensitive circuits.
// The stored data is not reset.
module sp_rf_array #(
  parameter int unsigned         ENTRIES    = 16,
  parameter int unsigned         WIDTH      = 128,
  parameter int unsigned         GROUP      = 8,
  parameter logic [WIDTH-1:0]    RESET_MASK = '0
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [$clog2(ENTRIES)-1:0] waddr,
  input  logic [WIDTH/GROUP-1:0]     wbe,
  input  logic [WIDTH-1:0]           wdata,
  input  logic [$clog2(ENTRIES)-1:0] raddr,
  output logic [WIDTH-1:0]           rdata,
  input  logic                       invalidate
);
  localparam int unsigned ABITS  = $clog2(ENTRIES);
  localparam int unsigned NGROUP = WIDTH / GROUP;
  localparam int unsigned HALF   = ENTRIES / 2;

  logic [ENTRIES-1:0][WIDTH-1:0] mem;

  // ---------------- write path ----------------
  logic [ENTRIES-1:0]             gwwl;
  logic [ENTRIES-1:0][NGROUP-1:0] lwwl;

  wl_write_decoder #(.ABITS(ABITS)) u_wdec (
    .addr (waddr),
    .en   (we),
    .wwl  (gwwl)
  );

  always_comb begin
    for (int e = 0; e < int'(ENTRIES); e++)
      lwwl[e] = {NGROUP{gwwl[e]}} & wbe;
  end

  // A clear during a write to the same entry wins over the write for the
  // resettable columns.
  always_ff @(posedge clk) begin
    for (int e = 0; e < int'(ENTRIES); e++) begin
      logic [WIDTH-1:0] nxt;
      nxt = mem[e];
      for (int g = 0; g < int'(NGROUP); g++) begin
        if (lwwl[e][g]) nxt[g*GROUP +: GROUP] = wdata[g*GROUP +: GROUP];
      end
      if (invalidate) nxt = nxt & ~RESET_MASK;
      mem[e] <= nxt;
    end
  end

  // ---------------- read path ----------------
  logic [ENTRIES-1:0] rwl, rwln;
  logic               mux_sel;
  logic [WIDTH-1:0]   rbl_bot, rbl_top;

  wl_read_decoder #(.ABITS(ABITS)) u_rdec (
    .addr    (raddr),
    .rwl     (rwl),
    .rwln    (rwln),
    .mux_sel (mux_sel)
  );

  // Each bit line carries the value of the one cell whose tri-state read
  // inverter is on (RWL high and RWLN low).
  always_comb begin
    rbl_bot = '0;
    rbl_top = '0;
    for (int e = 0; e < int'(HALF); e++) begin
      rbl_bot |= {WIDTH{rwl[e] & ~rwln[e]}} & mem[e];
      rbl_top |= {WIDTH{rwl[e+HALF] & ~rwln[e+HALF]}} & mem[e+HALF];
    end
  end

  assign rdata = mux_sel ? rbl_top : rbl_bot;

  // The read decoder is one-hot at all times; the write decoder at most one-hot.
  a_rwl_onehot : assert property (@(posedge clk)
    (rwl != '0) && ((rwl & (rwl - 1'b1)) == '0));
  a_gwwl_onehot0 : assert property (@(posedge clk) (gwwl & (gwwl - 1'b1)) == '0);
endmodule
