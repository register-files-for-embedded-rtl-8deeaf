// dmr_write_checker: WWL checker and write-data checker of the DMR register file.
//
// The register file has two write decoders (A and B) whose word lines must
// agree, and two array copies whose write data must agree. This block
// compares them every cycle:
//   wwl_err  - the two WWL vectors differ (a decoder fired a wrong, extra or
//              missing word line);
//   data_err - a write is in progress (any WWL high) and the write data of
//              the two copies differ;
//   err      - either of them; it starts the correction sequence.
// Purely combinational. That these checks exist follows the design; the
// XOR/OR compare and the qualification of the data check by a write are
// this implementation's.
module dmr_write_checker #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned WIDTH   = 40
) (
  input  logic [ENTRIES-1:0] wwl_a,
  input  logic [ENTRIES-1:0] wwl_b,
  input  logic [WIDTH-1:0]   wdata_a,
  input  logic [WIDTH-1:0]   wdata_b,
  output logic               wwl_err,
  output logic               data_err,
  output logic               err
);
  assign wwl_err  = |(wwl_a ^ wwl_b);
  assign data_err = (|wwl_a || |wwl_b) && |(wdata_a ^ wdata_b);
  assign err      = wwl_err || data_err;
endmodule
