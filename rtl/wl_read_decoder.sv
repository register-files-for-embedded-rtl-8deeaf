// wl_read_decoder: unclocked read word-line decoder for a static RF.
//
// The entries are split into a top half and a bottom half, each with its own
// read bit line. Two half decoders decode the low ABITS-1 address bits and
// are qualified by the address MSB, so exactly one read word line (RWL) is
// high at all times: the read is not clocked, so some row is always selected
// and no read bit line floats. Every RWL has a complementary RWLN that turns
// on the pull-up half of the cell's tri-state read inverter. mux_sel is the
// address MSB, which picks the top or bottom read bit line at the column
// output.
//
// Purely combinational, no enable.
module wl_read_decoder #(
  parameter int unsigned ABITS = 4
) (
  input  logic [ABITS-1:0]    addr,
  output logic [2**ABITS-1:0] rwl,
  output logic [2**ABITS-1:0] rwln,
  output logic                mux_sel
);
  localparam int unsigned HALF = 2**(ABITS-1);

  logic [HALF-1:0] half_dec;  // shared decode of the low address bits

  always_comb begin
    for (int i = 0; i < int'(HALF); i++)
      half_dec[i] = (addr[ABITS-2:0] == (ABITS-1)'(i));
  end

  assign mux_sel = addr[ABITS-1];
  assign rwl     = {half_dec & {HALF{addr[ABITS-1]}}, half_dec & {HALF{~addr[ABITS-1]}}};
  assign rwln    = ~rwl;
endmodule
