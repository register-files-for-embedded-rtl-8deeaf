// tb_wl_write_decoder: exhaustive check of the predecoded write decoder for
// the 4-bit (cache sub-bank) and 5-bit (register file) sizes: with en high
// exactly word line `addr` is high, with en low none is.
module tb_wl_write_decoder;
  int checks = 0, failures = 0;

  logic [3:0]  a4;  logic e4;  logic [15:0] w4;
  logic [4:0]  a5;  logic e5;  logic [31:0] w5;

  wl_write_decoder #(.ABITS(4)) dut4 (.addr(a4), .en(e4), .wwl(w4));
  wl_write_decoder #(.ABITS(5)) dut5 (.addr(a5), .en(e5), .wwl(w5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int en = 0; en < 2; en++) begin
      for (int a = 0; a < 32; a++) begin
        a4 = 4'(a); e4 = en[0]; a5 = 5'(a); e5 = en[0];
        #1;
        if (a < 16) begin
          checks++;
          if (w4 !== (en[0] ? (16'd1 << a) : 16'd0)) begin
            failures++; $display("FAIL 4-bit addr=%0d en=%0d wwl=%h", a, en, w4);
          end
        end
        checks++;
        if (w5 !== (en[0] ? (32'd1 << a) : 32'd0)) begin
          failures++; $display("FAIL 5-bit addr=%0d en=%0d wwl=%h", a, en, w5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
