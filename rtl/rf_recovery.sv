// rf_recovery: correction sequencer of the DMR register file.
//
// Every cycle it records the write presented to the register file (address
// and data of copy A). When the write checker reports an error in that
// cycle, the next cycle stalls the pipeline and drives a replay write of the
// recorded address and data, which the register file applies to both
// copies with identical data, so the entry ends up with the value the
// pipeline meant to write in both copies. If the check fails again during
// the replay, the replay is repeated. stall is high exactly while a replay
// is being driven; the pipeline must hold its own write during a stall.
//
// Stalling and re-writing the previous write data follow the design; the
// one-cycle replay, its repetition and trusting copy A are this
// implementation's choices.
module rf_recovery #(
  parameter int unsigned ABITS = 5,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [ABITS-1:0] waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             err,
  output logic             stall,
  output logic             replay_we,
  output logic [ABITS-1:0] replay_addr,
  output logic [WIDTH-1:0] replay_data
);
  typedef enum logic {S_RUN, S_REPLAY} state_e;
  state_e state_q;

  logic [ABITS-1:0] addr_q;
  logic [WIDTH-1:0] data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= S_RUN;
    else        state_q <= err ? S_REPLAY : S_RUN;
  end

  // Keep the last write; during a replay the replayed write is kept. An
  // error with no write of its own (a stray word line) replays the last
  // write, which rewrites the value the entry already holds.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0;
      data_q <= '0;
    end else if (state_q == S_RUN && we) begin
      addr_q <= waddr;
      data_q <= wdata;
    end
  end

  assign stall       = (state_q == S_REPLAY);
  assign replay_we   = (state_q == S_REPLAY);
  assign replay_addr = addr_q;
  assign replay_data = data_q;
endmodule
