// tb_dmr_write_checker: matching and mismatching WWL vectors and write data,
// including a data mismatch while no write is in progress (not an error).
module tb_dmr_write_checker;
  int checks = 0, failures = 0;
  logic [31:0] wa, wb; logic [39:0] da, db; logic we, de, e;

  dmr_write_checker dut (.wwl_a(wa), .wwl_b(wb), .wdata_a(da), .wdata_b(db),
                         .wwl_err(we), .data_err(de), .err(e));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic exp_w, exp_d;
      int kind;
      kind = $urandom_range(0, 4);
      wa = ($urandom_range(0, 5) == 0) ? 32'd0 : (32'd1 << $urandom_range(0, 31));
      wb = wa;
      if (kind == 1) wb = 32'd1 << $urandom_range(0, 31);
      if (kind == 2) wb = wa ^ (32'd1 << $urandom_range(0, 31));
      da = {$urandom, $urandom};
      db = da;
      if (kind >= 3) db = da ^ (40'd1 << $urandom_range(0, 39));
      #1;
      exp_w = (wa != wb);
      exp_d = ((wa | wb) != 0) && (da != db);
      checks++;
      if (we !== exp_w || de !== exp_d || e !== (exp_w | exp_d)) begin
        failures++; $display("FAIL wa=%h wb=%h da=%h db=%h -> %b%b%b", wa, wb, da, db, we, de, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
