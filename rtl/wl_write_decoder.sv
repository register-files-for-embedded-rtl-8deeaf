// wl_write_decoder: predecoded write word-line decoder.
//
// Decodes an ABITS-bit write address into 2**ABITS one-hot write word lines
// (WWL). As in the design's 4-to-16 decoder, the address is first predecoded
// in small fields and each word line is the AND of one predecoded line from
// every field; the split into 2-bit fields (2-to-4 predecoders, a 1-to-2
// predecoder for an odd leftover bit) is this implementation's choice. The
// decoded selects are qualified by `en`, which stands for the gated write
// clock: with en low every WWL is low.
//
// Purely combinational; the array it drives writes at the rising clock edge.
module wl_write_decoder #(
  parameter int unsigned ABITS = 4
) (
  input  logic [ABITS-1:0]      addr,
  input  logic                  en,
  output logic [2**ABITS-1:0]   wwl
);
  localparam int unsigned N      = 2**ABITS;
  localparam int unsigned NFIELD = (ABITS + 1) / 2;

  // pre[f][v] is high when address field f has value v (v in 0..3)
  logic [NFIELD-1:0][3:0] pre;

  always_comb begin
    for (int f = 0; f < int'(NFIELD); f++) begin
      for (int v = 0; v < 4; v++) begin
        if (2*f + 1 < int'(ABITS))
          pre[f][v] = (addr[2*f +: 2] == 2'(v));
        else
          pre[f][v] = (v < 2) ? (addr[2*f] == 1'(v)) : 1'b0;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      logic line;
      line = en;
      for (int f = 0; f < int'(NFIELD); f++) begin
        logic [1:0] fv;
        fv   = 2'((i >> (2*f)) & ((2*f + 1 < int'(ABITS)) ? 3 : 1));
        line = line & pre[f][fv];
      end
      wwl[i] = line;
    end
  end
endmodule
