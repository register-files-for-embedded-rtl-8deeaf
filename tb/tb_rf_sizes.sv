// tb_rf_sizes: the single-port static register file at every array size of
// the area/energy/delay comparison: 16, 32 and 64 entries by 32, 64 and 128
// bits. For each size, random byte-enabled writes and static reads are
// checked against a reference memory. One generic checker module is
// instantiated per size; each reports its checks and failures.
module tb_rf_sizes;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NSZ = 9;
  int c_chk [NSZ];
  int c_fail[NSZ];
  logic [NSZ-1:0] done;

  for (genvar r = 0; r < 3; r++) begin : g_rows
    for (genvar c = 0; c < 3; c++) begin : g_cols
      tb_rf_size_check #(.ENTRIES(16 << r), .WIDTH(32 << c)) u_chk (
        .clk(clk), .done(done[r*3+c]), .checks(c_chk[r*3+c]), .failures(c_fail[r*3+c]));
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    for (int i = 0; i < NSZ; i++) begin
      $display("size %0d x %0d: checks=%0d failures=%0d", 16 << (i / 3), 32 << (i % 3), c_chk[i], c_fail[i]);
      checks += c_chk[i]; failures += c_fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
