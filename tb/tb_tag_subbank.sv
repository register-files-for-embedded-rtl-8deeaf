// tb_tag_subbank: one-tag-per-write behaviour of the tag sub-bank, a
// random write/read sequence against a reference, and global invalidation
// (valid bits cleared, all other fields kept).
module tb_tag_subbank;
  import rf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we, inv; logic [3:0] waddr, raddr; logic [1:0] wway;
  tag_entry_t wtag; tag_entry_t [3:0] rtag;
  tag_entry_t ref_mem [16][4];

  tag_subbank dut (.clk(clk), .we(we), .waddr(waddr), .wway(wway), .wtag(wtag),
                   .raddr(raddr), .rtag(rtag), .invalidate(inv));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input int w, input tag_entry_t t);
    @(negedge clk);
    we = 1; waddr = 4'(a); wway = 2'(w); wtag = t;
    @(posedge clk); #1; we = 0;
    ref_mem[a][w] = t;
  endtask

  task automatic chk(input int a);
    raddr = 4'(a); #1;
    for (int w = 0; w < 4; w++) begin
      checks++;
      if (rtag[w] !== ref_mem[a][w]) begin
        failures++; $display("FAIL entry %0d way %0d: %h exp %h", a, w, rtag[w], ref_mem[a][w]);
      end
    end
  endtask

  initial begin
    we = 0; inv = 0; waddr = 0; raddr = 0; wway = 0; wtag = '0;
    for (int a = 0; a < 16; a++) for (int w = 0; w < 4; w++) wr(a, w, tag_entry_t'($urandom));
    for (int a = 0; a < 16; a++) chk(a);
    for (int i = 0; i < 300; i++) begin
      wr($urandom_range(0, 15), $urandom_range(0, 3), tag_entry_t'($urandom));
      chk($urandom_range(0, 15));
    end
    @(negedge clk); inv = 1; @(posedge clk); #1; inv = 0;
    for (int a = 0; a < 16; a++) for (int w = 0; w < 4; w++) ref_mem[a][w].valid = 1'b0;
    for (int a = 0; a < 16; a++) chk(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
