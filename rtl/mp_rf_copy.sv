// mp_rf_copy: one copy of the 32 x 40 static multi-port register file array.
//
// One write port and NRD static read ports (Rs, Rt, RtRd). The array takes
// word lines, not addresses: the decoders sit outside (see mp_regfile).
//
// Write: every cell has two write word lines, one from each of the two
// redundant write decoders, and is written only when both are high. A WWL
// that rises on its own (a particle strike in one decoder) therefore writes
// nothing. The write takes place at the rising clock edge.
//
// Read: each port has its own one-hot RWL/RWLN pair per entry. Each column
// has, per port, a top and a bottom read bit line shared by ENTRIES/2 cells,
// and a 2:1 multiplexer selected by that port's read address MSB (rsel)
// picks one of them. Reads are combinational and need no clock.
module mp_rf_copy #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned WIDTH   = 40,
  parameter int unsigned NRD     = 3
) (
  input  logic                              clk,
  input  logic [ENTRIES-1:0]                wwl_a,
  input  logic [ENTRIES-1:0]                wwl_b,
  input  logic [WIDTH-1:0]                  wdata,
  input  logic [NRD-1:0][ENTRIES-1:0]       rwl,
  input  logic [NRD-1:0][ENTRIES-1:0]       rwln,
  input  logic [NRD-1:0]                    rsel,
  output logic [NRD-1:0][WIDTH-1:0]         rdata
);
  localparam int unsigned HALF = ENTRIES / 2;

  logic [ENTRIES-1:0][WIDTH-1:0] mem;

  always_ff @(posedge clk) begin
    for (int e = 0; e < int'(ENTRIES); e++)
      if (wwl_a[e] && wwl_b[e]) mem[e] <= wdata;
  end

  logic [NRD-1:0][WIDTH-1:0] rbl_bot, rbl_top;

  always_comb begin
    for (int p = 0; p < int'(NRD); p++) begin
      rbl_bot[p] = '0;
      rbl_top[p] = '0;
      for (int e = 0; e < int'(HALF); e++) begin
        rbl_bot[p] |= {WIDTH{rwl[p][e] & ~rwln[p][e]}} & mem[e];
        rbl_top[p] |= {WIDTH{rwl[p][e+HALF] & ~rwln[p][e+HALF]}} & mem[e+HALF];
      end
      rdata[p] = rsel[p] ? rbl_top[p] : rbl_bot[p];
    end
  end
endmodule
