// tb_rf_size_check: stimulus and checker for one sp_rf_array size, used by
// tb_rf_sizes. Fills every entry, then performs random byte-enabled writes,
// each followed by a static read of a random entry, against a reference.
module tb_rf_size_check #(
  parameter int ENTRIES = 16,
  parameter int WIDTH   = 128
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int AB = $clog2(ENTRIES);
  localparam int NB = WIDTH / 8;

  logic we;
  logic [AB-1:0] waddr, raddr;
  logic [NB-1:0] wbe;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] ref_mem [ENTRIES];

  sp_rf_array #(.ENTRIES(ENTRIES), .WIDTH(WIDTH)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wbe(wbe), .wdata(wdata),
    .raddr(raddr), .rdata(rdata), .invalidate(1'b0));

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] v;
    for (int i = 0; i < WIDTH; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic wr(input int a, input logic [NB-1:0] be, input logic [WIDTH-1:0] d);
    @(negedge clk);
    we = 1; waddr = AB'(a); wbe = be; wdata = d;
    @(posedge clk); #1; we = 0;
    for (int b = 0; b < NB; b++) if (be[b]) ref_mem[a][b*8 +: 8] = d[b*8 +: 8];
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    we = 0; waddr = '0; raddr = '0; wbe = '0; wdata = '0;
    for (int e = 0; e < ENTRIES; e++) wr(e, '1, rnd());
    for (int i = 0; i < 200; i++) begin
      int a;
      wr($urandom_range(0, ENTRIES - 1), NB'({$urandom, $urandom}), rnd());
      a = $urandom_range(0, ENTRIES - 1);
      raddr = AB'(a); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++; $display("FAIL %0dx%0d entry %0d", ENTRIES, WIDTH, a);
      end
    end
    done = 1;
  end
endmodule
