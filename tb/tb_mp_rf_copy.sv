// tb_mp_rf_copy: the array writes an entry only when both redundant WWLs of
// that entry are high, and its three static read ports return the stored
// words independently (driven here with ideal one-hot word lines).
module tb_mp_rf_copy;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] wwl_a, wwl_b; logic [39:0] wdata;
  logic [2:0][31:0] rwl, rwln; logic [2:0] rsel; logic [2:0][39:0] rdata;
  logic [39:0] ref_mem [32];
  logic [31:0] init_done = '0;

  mp_rf_copy dut (.clk(clk), .wwl_a(wwl_a), .wwl_b(wwl_b), .wdata(wdata),
                  .rwl(rwl), .rwln(rwln), .rsel(rsel), .rdata(rdata));

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic setrd(input int p, input int a);
    rwl[p] = 32'd1 << a; rwln[p] = ~(32'd1 << a); rsel[p] = a[4];
  endtask

  task automatic wr(input int ea, input int eb, input logic [39:0] d);
    @(negedge clk);
    wwl_a = 32'd1 << ea; wwl_b = 32'd1 << eb; wdata = d;
    @(posedge clk); #1; wwl_a = 0; wwl_b = 0;
    if (ea == eb) begin ref_mem[ea] = d; init_done[ea] = 1'b1; end
  endtask

  initial begin
    wwl_a = 0; wwl_b = 0; wdata = 0;
    for (int p = 0; p < 3; p++) setrd(p, 0);
    for (int e = 0; e < 32; e++) wr(e, e, {$urandom, $urandom});
    for (int i = 0; i < 400; i++) begin
      int ea, eb;
      ea = $urandom_range(0, 31);
      eb = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 31) : ea;   // some mismatched WWLs
      wr(ea, eb, {$urandom, $urandom});
      for (int p = 0; p < 3; p++) setrd(p, $urandom_range(0, 31));
      #1;
      for (int p = 0; p < 3; p++) begin
        int a;
        a = $clog2(rwl[p]);
        checks++;
        if (rdata[p] !== ref_mem[a]) begin
          failures++; $display("FAIL port %0d entry %0d: %h exp %h", p, a, rdata[p], ref_mem[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
