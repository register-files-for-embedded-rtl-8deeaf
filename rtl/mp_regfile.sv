// mp_regfile: DMR general-purpose register file with write checking and correction.
//
// The processor pipeline is duplicated (copies A and B) and so is the
// register file. Each copy is a 32-entry x 40-bit static array (mp_rf_copy)
// with three read ports, Rs, Rt and RtRd, and one write port (Rt/Rd). An
// entry is 32 data bits plus one parity bit per nibble, stored as
// {parity[7:0], data[31:0]}; parity (even) is generated here on write and
// checked here on every read port.
//
// Decoders: two write decoders, A (from pipeline A's write address) and B
// (from pipeline B's), each drive a WWL into every cell of both copies; a
// cell is written only when both agree. Six unclocked read decoders, three
// per copy, serve the read ports of each copy's own pipeline.
//
// Checking and correction: dmr_write_checker compares the two WWL vectors
// and the two copies' write data every cycle. On a mismatch rf_recovery
// stalls the pipeline for one cycle and re-writes the recorded write
// (address and data of copy A) through both decoders into both copies, so
// the copies agree again; stall stays high while the check keeps failing.
//
// The write data of each copy is gated outside the array (forced to zero
// when that copy is not writing), so the write bit lines toggle only on
// writes.
//
// Timing: reads are combinational from the read addresses; writes and
// replays take effect at the rising clock edge; stall is high in the cycle
// after the failing write. The structure follows the design; where parity
// is made and checked, its polarity, the entry layout and the one-cycle
// replay are this implementation's choices.
module mp_regfile
  import rf_pkg::*;
#(
  parameter int unsigned ENTRIES = RF_ENTRIES,
  parameter int unsigned DATA    = RF_DATA,
  parameter int unsigned PARITY  = RF_PARITY
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // pipeline copy A
  input  logic                                  we_a,
  input  logic [$clog2(ENTRIES)-1:0]            waddr_a,
  input  logic [DATA-1:0]                       wdata_a,
  input  logic [RF_NRD-1:0][$clog2(ENTRIES)-1:0] raddr_a,
  output logic [RF_NRD-1:0][DATA-1:0]           rdata_a,
  output logic [RF_NRD-1:0]                     rperr_a,
  // pipeline copy B
  input  logic                                  we_b,
  input  logic [$clog2(ENTRIES)-1:0]            waddr_b,
  input  logic [DATA-1:0]                       wdata_b,
  input  logic [RF_NRD-1:0][$clog2(ENTRIES)-1:0] raddr_b,
  output logic [RF_NRD-1:0][DATA-1:0]           rdata_b,
  output logic [RF_NRD-1:0]                     rperr_b,
  // checking and correction
  output logic                                  stall,
  output logic                                  wwl_err,
  output logic                                  data_err
);
  localparam int unsigned AB    = $clog2(ENTRIES);
  localparam int unsigned WIDTH = DATA + PARITY;

  // Generic even parity over nibbles (PARITY = DATA/4 in this design).
  function automatic logic [PARITY-1:0] par(input logic [DATA-1:0] d);
    logic [PARITY-1:0] p;
    for (int i = 0; i < int'(PARITY); i++) p[i] = ^d[4*i +: 4];
    return p;
  endfunction

  // ---------------- write path with replay ----------------
  logic              replay_we, err;
  logic [AB-1:0]     replay_addr;
  logic [DATA-1:0]   replay_data;

  logic              en_a, en_b;
  logic [AB-1:0]     wa_a, wa_b;
  logic [DATA-1:0]   wd_a, wd_b;
  logic [WIDTH-1:0]  we40_a, we40_b;

  always_comb begin
    if (replay_we) begin
      en_a = 1'b1;        en_b = 1'b1;
      wa_a = replay_addr; wa_b = replay_addr;
      wd_a = replay_data; wd_b = replay_data;
    end else begin
      en_a = we_a;        en_b = we_b;
      wa_a = waddr_a;     wa_b = waddr_b;
      wd_a = wdata_a;     wd_b = wdata_b;
    end
    we40_a = {par(wd_a), wd_a};
    we40_b = {par(wd_b), wd_b};
  end

  logic [ENTRIES-1:0] wwl_a, wwl_b;

  wl_write_decoder #(.ABITS(AB)) u_wdec_a (.addr(wa_a), .en(en_a), .wwl(wwl_a));
  wl_write_decoder #(.ABITS(AB)) u_wdec_b (.addr(wa_b), .en(en_b), .wwl(wwl_b));

  dmr_write_checker #(.ENTRIES(ENTRIES), .WIDTH(WIDTH)) u_check (
    .wwl_a    (wwl_a),
    .wwl_b    (wwl_b),
    .wdata_a  (we40_a),
    .wdata_b  (we40_b),
    .wwl_err  (wwl_err),
    .data_err (data_err),
    .err      (err)
  );

  rf_recovery #(.ABITS(AB), .WIDTH(DATA)) u_recovery (
    .clk         (clk),
    .rst_n       (rst_n),
    .we          (we_a),
    .waddr       (waddr_a),
    .wdata       (wdata_a),
    .err         (err),
    .stall       (stall),
    .replay_we   (replay_we),
    .replay_addr (replay_addr),
    .replay_data (replay_data)
  );

  // ---------------- the two copies and their read decoders ----------------
  logic [1:0][RF_NRD-1:0][AB-1:0]      raddr;
  logic [1:0][RF_NRD-1:0][ENTRIES-1:0] rwl, rwln;
  logic [1:0][RF_NRD-1:0]              rsel;
  logic [1:0][RF_NRD-1:0][WIDTH-1:0]   rd40;
  logic [1:0][WIDTH-1:0]               wcopy;

  assign raddr[0] = raddr_a;
  assign raddr[1] = raddr_b;
  // Write data is gated before it reaches the arrays: with no write in
  // progress the write bit lines see all zeros and do not toggle.
  assign wcopy[0] = en_a ? we40_a : '0;
  assign wcopy[1] = en_b ? we40_b : '0;

  for (genvar c = 0; c < 2; c++) begin : g_copy
    for (genvar p = 0; p < int'(RF_NRD); p++) begin : g_rdec
      wl_read_decoder #(.ABITS(AB)) u_rdec (
        .addr    (raddr[c][p]),
        .rwl     (rwl[c][p]),
        .rwln    (rwln[c][p]),
        .mux_sel (rsel[c][p])
      );
    end
    mp_rf_copy #(.ENTRIES(ENTRIES), .WIDTH(WIDTH), .NRD(RF_NRD)) u_array (
      .clk   (clk),
      .wwl_a (wwl_a),
      .wwl_b (wwl_b),
      .wdata (wcopy[c]),
      .rwl   (rwl[c]),
      .rwln  (rwln[c]),
      .rsel  (rsel[c]),
      .rdata (rd40[c])
    );
  end

  // ---------------- read data and parity check ----------------
  always_comb begin
    for (int p = 0; p < int'(RF_NRD); p++) begin
      rdata_a[p] = rd40[0][p][DATA-1:0];
      rdata_b[p] = rd40[1][p][DATA-1:0];
      rperr_a[p] = par(rd40[0][p][DATA-1:0]) != rd40[0][p][WIDTH-1:DATA];
      rperr_b[p] = par(rd40[1][p][DATA-1:0]) != rd40[1][p][WIDTH-1:DATA];
    end
  end

  // Each write decoder raises at most one word line. (A read of the entry
  // being written returns its old value until the clock edge.)
  a_wwl_onehot0 : assert property (@(posedge clk) disable iff (!rst_n)
    ((wwl_a & (wwl_a - 1'b1)) == '0) && ((wwl_b & (wwl_b - 1'b1)) == '0));
endmodule
