// tb_mp_regfile: the DMR register file with its checkers and correction.
//
// Both pipeline copies normally present identical writes and reads; the
// three read ports of both copies are checked against a reference each
// cycle. Faults are injected on the write side:
//   - write data of copy B differs   -> data_err, one stall, replay: both
//     copies then hold copy A's data;
//   - write address of copy B differs -> wwl_err, no entry written by the
//     faulty write, then the replay writes copy A's entry in both copies;
//   - a stray write enable in copy B  -> wwl_err, replay of the last write.
// A write presented while stall is high is ignored, and the pipeline
// presents it again in the next cycle. A bit flipped directly in a stored entry must raise the
// parity error of the port reading it.
module tb_mp_regfile;
  import rf_pkg::*;
  int checks = 0, failures = 0;
  int n_data_err = 0, n_wwl_err = 0, n_stall = 0, n_perr = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic we_a, we_b, stall, wwl_err, data_err;
  logic [4:0] waddr_a, waddr_b;
  logic [31:0] wdata_a, wdata_b;
  logic [2:0][4:0] raddr_a, raddr_b;
  logic [2:0][31:0] rdata_a, rdata_b;
  logic [2:0] rperr_a, rperr_b;

  mp_regfile dut (.clk(clk), .rst_n(rst_n),
    .we_a(we_a), .waddr_a(waddr_a), .wdata_a(wdata_a), .raddr_a(raddr_a), .rdata_a(rdata_a), .rperr_a(rperr_a),
    .we_b(we_b), .waddr_b(waddr_b), .wdata_b(wdata_b), .raddr_b(raddr_b), .rdata_b(rdata_b), .rperr_b(rperr_b),
    .stall(stall), .wwl_err(wwl_err), .data_err(data_err));

  logic [31:0] ref_rf [32];
  logic        exp_stall;
  logic [4:0]  last_a;
  logic [31:0] last_d, bad_d;
  logic        hold, b_dirty;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads(input logic skip_b);
    for (int p = 0; p < 3; p++) begin
      logic bad_b;
      bad_b = !(skip_b && raddr_b[p] == last_a) &&
              (rdata_b[p] !== ref_rf[raddr_b[p]] || rperr_b[p] !== 1'b0);
      checks++;
      if (rdata_a[p] !== ref_rf[raddr_a[p]] || rperr_a[p] !== 1'b0 || bad_b) begin
        failures++;
        $display("FAIL port %0d r%0d: A=%h B=%h exp %h perr=%b%b", p, raddr_a[p], rdata_a[p],
                 rdata_b[p], ref_rf[raddr_a[p]], rperr_a[p], rperr_b[p]);
      end
    end
  endtask

  initial begin
    we_a = 0; we_b = 0; waddr_a = 0; waddr_b = 0; wdata_a = 0; wdata_b = 0;
    raddr_a = '0; raddr_b = '0;
    exp_stall = 0; last_a = 0; last_d = 0; bad_d = 0; hold = 0; b_dirty = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // initialise all registers
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we_a = 1; we_b = 1; waddr_a = 5'(r); waddr_b = 5'(r); wdata_a = $urandom; wdata_b = wdata_a;
      ref_rf[r] = wdata_a; last_a = 5'(r); last_d = wdata_a;
    end
    @(negedge clk); we_a = 0; we_b = 0;
    for (int i = 0; i < 3000; i++) begin
      int fault;
      @(negedge clk);
      // outputs of this cycle (after the previous edge)
      checks++;
      if (stall !== exp_stall) begin
        failures++; $display("FAIL cycle %0d stall=%b exp %b", i, stall, exp_stall);
      end
      if (stall) n_stall++;
      for (int p = 0; p < 3; p++) begin
        raddr_a[p] = 5'($urandom); raddr_b[p] = raddr_a[p];
      end
      #1;
      check_reads(b_dirty);
      if (b_dirty) begin
        // copy B holds copy B's faulty data until the replay
        checks++;
        if (dut.g_copy[1].u_array.mem[last_a][31:0] !== bad_d) begin
          failures++; $display("FAIL copy B should hold the faulty data before the replay");
        end
      end
      b_dirty = 0;
      // the pipeline's write for this cycle; after a stall it re-presents the held write
      if (!hold) begin
        we_a = $urandom_range(0, 1); waddr_a = 5'($urandom); wdata_a = $urandom;
      end
      we_b = we_a; waddr_b = waddr_a; wdata_b = wdata_a;
      fault = (stall || hold) ? 0 : $urandom_range(0, 19);
      if (fault > 3) fault = 0;
      if (fault == 1 && !we_a) fault = 0;
      if (fault == 2 && !we_a) fault = 0;
      if (fault == 3 && we_a)  fault = 0;
      if (fault == 1) wdata_b = wdata_a ^ (32'd1 << $urandom_range(0, 31));
      if (fault == 2) waddr_b = waddr_a ^ 5'($urandom_range(1, 31));
      if (fault == 3) we_b = 1'b1;
      #1;
      checks++;
      if (wwl_err !== (fault == 2 || fault == 3) || data_err !== (fault == 1)) begin
        failures++; $display("FAIL checker fault=%0d wwl_err=%b data_err=%b", fault, wwl_err, data_err);
      end
      if (wwl_err) n_wwl_err++;
      if (data_err) n_data_err++;
      // write data reaches the arrays only during a write
      if (!stall && !we_a) begin
        checks++;
        if (dut.wcopy[0] !== '0) begin failures++; $display("FAIL write data not gated"); end
      end
      // reference after the coming edge
      if (stall) begin
        ref_rf[last_a] = last_d;           // replay; the presented write is ignored
        hold = 1;
      end else begin
        hold = 0;
        if (we_a && (fault == 0 || fault == 1)) ref_rf[waddr_a] = wdata_a;
        if (we_a) begin last_a = waddr_a; last_d = wdata_a; end
        if (fault == 1) begin b_dirty = 1; bad_d = wdata_b; end
      end
      exp_stall = (fault != 0);
    end
    // parity: flip one stored bit of copy A and read it on every port
    @(negedge clk); we_a = 0; we_b = 0;
    dut.g_copy[0].u_array.mem[7][13] = ~dut.g_copy[0].u_array.mem[7][13];
    for (int p = 0; p < 3; p++) raddr_a[p] = 5'd7;
    #1;
    for (int p = 0; p < 3; p++) begin
      checks++;
      if (rperr_a[p] !== 1'b1) begin failures++; $display("FAIL no parity error port %0d", p); end
      else n_perr++;
    end
    $display("data_err=%0d wwl_err=%0d stall=%0d parity_err=%0d", n_data_err, n_wwl_err, n_stall, n_perr);
    if (n_data_err == 0 || n_wwl_err == 0 || n_stall == 0 || n_perr == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
