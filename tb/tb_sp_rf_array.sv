// tb_sp_rf_array: random byte-enabled writes and static reads on the
// 16 x 128 array against a reference memory, then a global clear of the
// resettable columns of a second instance. It also performs the 64-read
// sequence of consecutive different addresses and checks that each read is
// available in the same cycle its address is applied (no clock needed).
module tb_sp_rf_array;
  int checks = 0, failures = 0;
  localparam int W = 128, E = 16;
  localparam logic [W-1:0] MASK = 128'h8000_0000_0000_0001_0000_0000_0000_0100;

  logic clk = 0;
  always #5 clk = ~clk;

  logic         we, inv;
  logic [3:0]   waddr, raddr;
  logic [15:0]  wbe;
  logic [W-1:0] wdata, rdata, rdata_r;
  logic [W-1:0] ref_mem [E];

  sp_rf_array #(.ENTRIES(E), .WIDTH(W)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wbe(wbe), .wdata(wdata),
    .raddr(raddr), .rdata(rdata), .invalidate(1'b0));
  sp_rf_array #(.ENTRIES(E), .WIDTH(W), .RESET_MASK(MASK)) dut_r (
    .clk(clk), .we(we), .waddr(waddr), .wbe(wbe), .wdata(wdata),
    .raddr(raddr), .rdata(rdata_r), .invalidate(inv));

  function automatic logic [W-1:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic wr(input int a, input logic [15:0] be, input logic [W-1:0] d);
    @(negedge clk);
    we = 1; waddr = 4'(a); wbe = be; wdata = d;
    @(posedge clk); #1;
    we = 0;
    for (int b = 0; b < 16; b++) if (be[b]) ref_mem[a][b*8 +: 8] = d[b*8 +: 8];
  endtask

  task automatic chk_rd(input int a);
    raddr = 4'(a); #1;
    checks++;
    if (rdata !== ref_mem[a]) begin
      failures++; $display("FAIL read %0d: %h exp %h", a, rdata, ref_mem[a]);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; inv = 0; waddr = 0; raddr = 0; wbe = 0; wdata = 0;
    // fill every entry fully
    for (int e = 0; e < E; e++) wr(e, 16'hFFFF, rnd128());
    for (int e = 0; e < E; e++) chk_rd(e);
    // random partial writes
    for (int i = 0; i < 200; i++) begin
      wr($urandom_range(0, E-1), 16'($urandom), rnd128());
      chk_rd($urandom_range(0, E-1));
    end
    // 64 consecutive reads without any clock edge, alternating halves
    for (int i = 0; i < 64; i++) chk_rd((i * 7 + (i & 1) * 8) % E);
    // global clear of the resettable columns
    for (int e = 0; e < E; e++) wr(e, 16'hFFFF, '1);
    @(negedge clk); inv = 1; @(posedge clk); #1; inv = 0;
    for (int e = 0; e < E; e++) begin
      raddr = 4'(e); #1;
      checks++;
      if (rdata_r !== ~MASK) begin
        failures++; $display("FAIL clear %0d: %h", e, rdata_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
