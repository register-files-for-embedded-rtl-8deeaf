// lp_rf_top: the register-file based storage of a low-power DMR microprocessor.
//
// Three blocks side by side, each with its ports brought out:
//   ic_*  instruction cache, an 8 KB 4-way cache_sd
//   dc_*  data cache, a second cache_sd
//   rf_*  the DMR general-purpose register file (mp_regfile) with both
//         pipeline copies' ports, the stall and the checker flags
// All three are built from static register-file arrays with combinational
// reads. The cache control policy (write-through, read-allocate, refill
// with the LRF/lock bits) and the TLB belong to the processor and act
// through these ports. See cache_sd and mp_regfile for timing.
module lp_rf_top
  import rf_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  // instruction cache
  input  logic                            ic_req_valid,
  input  cache_op_e                       ic_op,
  input  logic [31:0]                     ic_addr,
  input  logic [1:0]                      ic_way,
  input  logic                            ic_wr_data,
  input  logic                            ic_wr_tag,
  input  logic [3:0]                      ic_wbe,
  input  logic [31:0]                     ic_wdata,
  input  tag_entry_t                      ic_wtag,
  output logic                            ic_rsp_valid,
  output logic                            ic_hit,
  output logic                            ic_miss,
  output logic [1:0]                      ic_hit_way,
  output logic [31:0]                     ic_rdata,
  output tag_entry_t                      ic_rtag,
  // data cache
  input  logic                            dc_req_valid,
  input  cache_op_e                       dc_op,
  input  logic [31:0]                     dc_addr,
  input  logic [1:0]                      dc_way,
  input  logic                            dc_wr_data,
  input  logic                            dc_wr_tag,
  input  logic [3:0]                      dc_wbe,
  input  logic [31:0]                     dc_wdata,
  input  tag_entry_t                      dc_wtag,
  output logic                            dc_rsp_valid,
  output logic                            dc_hit,
  output logic                            dc_miss,
  output logic [1:0]                      dc_hit_way,
  output logic [31:0]                     dc_rdata,
  output tag_entry_t                      dc_rtag,
  // register file, pipeline copy A
  input  logic                            rf_we_a,
  input  logic [4:0]                      rf_waddr_a,
  input  logic [31:0]                     rf_wdata_a,
  input  logic [RF_NRD-1:0][4:0]          rf_raddr_a,
  output logic [RF_NRD-1:0][31:0]         rf_rdata_a,
  output logic [RF_NRD-1:0]               rf_rperr_a,
  // register file, pipeline copy B
  input  logic                            rf_we_b,
  input  logic [4:0]                      rf_waddr_b,
  input  logic [31:0]                     rf_wdata_b,
  input  logic [RF_NRD-1:0][4:0]          rf_raddr_b,
  output logic [RF_NRD-1:0][31:0]         rf_rdata_b,
  output logic [RF_NRD-1:0]               rf_rperr_b,
  output logic                            rf_stall,
  output logic                            rf_wwl_err,
  output logic                            rf_data_err
);
  cache_sd u_icache (
    .clk(clk), .rst_n(rst_n), .req_valid(ic_req_valid), .op(ic_op), .addr(ic_addr),
    .way(ic_way), .wr_data(ic_wr_data), .wr_tag(ic_wr_tag), .wbe(ic_wbe),
    .wdata(ic_wdata), .wtag(ic_wtag), .rsp_valid(ic_rsp_valid), .hit(ic_hit),
    .miss(ic_miss), .hit_way(ic_hit_way), .rdata(ic_rdata), .rtag(ic_rtag)
  );

  cache_sd u_dcache (
    .clk(clk), .rst_n(rst_n), .req_valid(dc_req_valid), .op(dc_op), .addr(dc_addr),
    .way(dc_way), .wr_data(dc_wr_data), .wr_tag(dc_wr_tag), .wbe(dc_wbe),
    .wdata(dc_wdata), .wtag(dc_wtag), .rsp_valid(dc_rsp_valid), .hit(dc_hit),
    .miss(dc_miss), .hit_way(dc_hit_way), .rdata(dc_rdata), .rtag(dc_rtag)
  );

  mp_regfile u_regfile (
    .clk(clk), .rst_n(rst_n),
    .we_a(rf_we_a), .waddr_a(rf_waddr_a), .wdata_a(rf_wdata_a),
    .raddr_a(rf_raddr_a), .rdata_a(rf_rdata_a), .rperr_a(rf_rperr_a),
    .we_b(rf_we_b), .waddr_b(rf_waddr_b), .wdata_b(rf_wdata_b),
    .raddr_b(rf_raddr_b), .rdata_b(rf_rdata_b), .rperr_b(rf_rperr_b),
    .stall(rf_stall), .wwl_err(rf_wwl_err), .data_err(rf_data_err)
  );
endmodule
