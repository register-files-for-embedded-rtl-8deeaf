// tb_data_subbank: writes words of random ways with random byte enables and
// checks the four-way row read against a reference, plus the physical byte
// interleaving (byte k of way w at physical byte 4k+w) seen in the array.
module tb_data_subbank;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we; logic [3:0] waddr, raddr; logic [1:0] wway; logic [3:0] wbe;
  logic [31:0] wdata; logic [3:0][31:0] rdata;
  logic [31:0] ref_mem [16][4];

  data_subbank dut (.clk(clk), .we(we), .waddr(waddr), .wway(wway), .wbe(wbe),
                    .wdata(wdata), .raddr(raddr), .rdata(rdata));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input int w, input logic [3:0] be, input logic [31:0] d);
    @(negedge clk);
    we = 1; waddr = 4'(a); wway = 2'(w); wbe = be; wdata = d;
    @(posedge clk); #1; we = 0;
    for (int k = 0; k < 4; k++) if (be[k]) ref_mem[a][w][k*8 +: 8] = d[k*8 +: 8];
  endtask

  task automatic chk(input int a);
    raddr = 4'(a); #1;
    for (int w = 0; w < 4; w++) begin
      checks++;
      if (rdata[w] !== ref_mem[a][w]) begin
        failures++; $display("FAIL entry %0d way %0d: %h exp %h", a, w, rdata[w], ref_mem[a][w]);
      end
    end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0; wway = 0; wbe = 0; wdata = 0;
    for (int a = 0; a < 16; a++) for (int w = 0; w < 4; w++) wr(a, w, 4'hF, $urandom);
    for (int a = 0; a < 16; a++) chk(a);
    for (int i = 0; i < 300; i++) begin
      wr($urandom_range(0, 15), $urandom_range(0, 3), 4'($urandom), $urandom);
      chk($urandom_range(0, 15));
    end
    // interleaving: way 2 of entry 5 written with 0xDDCCBBAA
    wr(5, 2, 4'hF, 32'hDDCC_BBAA);
    raddr = 4'd5; #1;
    checks++;
    if (dut.phys_rdata[(0*4+2)*8 +: 8] !== 8'hAA || dut.phys_rdata[(1*4+2)*8 +: 8] !== 8'hBB ||
        dut.phys_rdata[(2*4+2)*8 +: 8] !== 8'hCC || dut.phys_rdata[(3*4+2)*8 +: 8] !== 8'hDD) begin
      failures++; $display("FAIL interleave %h", dut.phys_rdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
