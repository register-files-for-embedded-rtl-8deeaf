// tb_rf_recovery: an error cycle is followed by exactly one stall/replay
// cycle of the write seen in the error cycle; a repeated error repeats it;
// no error, no stall.
module tb_rf_recovery;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we, err, stall, rwe; logic [4:0] wa, ra; logic [31:0] wd, rd;

  rf_recovery dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(wa), .wdata(wd), .err(err),
                   .stall(stall), .replay_we(rwe), .replay_addr(ra), .replay_data(rd));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        exp_stall;
    logic [4:0]  last_a;
    logic [31:0] last_d;
    we = 0; err = 0; wa = 0; wd = 0;
    exp_stall = 0; last_a = 0; last_d = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      // check the outputs for this cycle
      checks++;
      if (stall !== exp_stall || rwe !== exp_stall || (exp_stall && (ra !== last_a || rd !== last_d))) begin
        failures++; $display("FAIL cycle %0d stall=%b exp %b ra=%0d rd=%h exp %0d %h",
                             i, stall, exp_stall, ra, rd, last_a, last_d);
      end
      we = $urandom_range(0, 1); wa = 5'($urandom); wd = $urandom;
      err = ($urandom_range(0, 4) == 0);
      if (!exp_stall && we) begin last_a = wa; last_d = wd; end
      exp_stall = err;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
