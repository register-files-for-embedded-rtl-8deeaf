// tb_wl_read_decoder: exhaustive check of the read decoder (4- and 5-bit):
// exactly one RWL high at `addr`, RWLN its complement, mux_sel the MSB.
module tb_wl_read_decoder;
  int checks = 0, failures = 0;

  logic [3:0] a4; logic [15:0] r4, n4; logic s4;
  logic [4:0] a5; logic [31:0] r5, n5; logic s5;

  wl_read_decoder #(.ABITS(4)) dut4 (.addr(a4), .rwl(r4), .rwln(n4), .mux_sel(s4));
  wl_read_decoder #(.ABITS(5)) dut5 (.addr(a5), .rwl(r5), .rwln(n5), .mux_sel(s5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      a4 = 4'(a); a5 = 5'(a);
      #1;
      if (a < 16) begin
        checks++;
        if (r4 !== (16'd1 << a) || n4 !== ~(16'd1 << a) || s4 !== a[3]) begin
          failures++; $display("FAIL 4-bit addr=%0d rwl=%h rwln=%h sel=%b", a, r4, n4, s4);
        end
      end
      checks++;
      if (r5 !== (32'd1 << a) || n5 !== ~(32'd1 << a) || s5 !== a[4]) begin
        failures++; $display("FAIL 5-bit addr=%0d rwl=%h rwln=%h sel=%b", a, r5, n5, s5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
