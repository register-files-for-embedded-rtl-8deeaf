// data_subbank: 16-entry x 128-bit cache data sub-bank.
//
// Each entry holds one 32-bit word of a cache line for each of the four
// ways, so the four data sub-banks of a cache group hold words 0..3 of the
// lines of its 16 sets. Bytes are interleaved by way: byte k of way w sits
// at physical byte 4*k + w, so any two bytes of one way are four bytes apart
// and the four bytes that the way multiplexer chooses between sit next to
// each other. A read returns the whole row (all four ways). A write stores
// up to four bytes of one way, selected by wway and the byte enables wbe;
// this is the design's "at most 4 bytes of one word per write".
//
// Timing is that of sp_rf_array: combinational read from raddr, write at the
// rising clock edge.
module data_subbank
  import rf_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned WORD    = 32
) (
  input  logic                              clk,
  input  logic                              we,
  input  logic [$clog2(ENTRIES)-1:0]        waddr,
  input  logic [$clog2(WAYS)-1:0]           wway,
  input  logic [WORD/8-1:0]                 wbe,
  input  logic [WORD-1:0]                   wdata,
  input  logic [$clog2(ENTRIES)-1:0]        raddr,
  output logic [WAYS-1:0][WORD-1:0]         rdata
);
  localparam int unsigned BYTES = WORD / 8;          // bytes per word
  localparam int unsigned WIDTH = WAYS * WORD;       // 128
  localparam int unsigned NBE   = WIDTH / 8;         // 16 byte enables

  logic [NBE-1:0]   phys_be;
  logic [WIDTH-1:0] phys_wdata, phys_rdata;

  // Logical byte k of way w -> physical byte k*WAYS + w.
  always_comb begin
    phys_be    = '0;
    phys_wdata = '0;
    for (int w = 0; w < int'(WAYS); w++) begin
      for (int k = 0; k < int'(BYTES); k++) begin
        phys_be[k*WAYS + w]             = wbe[k] && (wway == ($clog2(WAYS))'(w));
        phys_wdata[(k*WAYS + w)*8 +: 8] = wdata[k*8 +: 8];
      end
    end
  end

  always_comb begin
    for (int w = 0; w < int'(WAYS); w++)
      for (int k = 0; k < int'(BYTES); k++)
        rdata[w][k*8 +: 8] = phys_rdata[(k*WAYS + w)*8 +: 8];
  end

  sp_rf_array #(
    .ENTRIES    (ENTRIES),
    .WIDTH      (WIDTH),
    .GROUP      (8),
    .RESET_MASK ('0)
  ) u_array (
    .clk        (clk),
    .we         (we),
    .waddr      (waddr),
    .wbe        (phys_be),
    .wdata      (phys_wdata),
    .raddr      (raddr),
    .rdata      (phys_rdata),
    .invalidate (1'b0)
  );
endmodule
