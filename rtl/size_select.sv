// size_select: cuts the requested 1, 2, 4, 8 or 16 bytes out of a 16-byte
// cache line.
//
// A chain of multiplexors narrows the line step by step: the 8-byte
// multiplexor takes the half chosen by wdsel[1], the 4-byte multiplexor the
// word of that half chosen by wdsel[0], the 2-byte multiplexor the half-word
// chosen by bsel[1] and the 1-byte multiplexor the byte chosen by bsel[0].
// szsel (see cache_pkg::szsel_e) chooses which stage drives the output, which
// is always LINE_W bits wide with the chosen bytes in the low end and zeros
// above. For 16 bytes the whole line is passed and wdsel, bsel are ignored.
// Codes without a size give zero. Purely combinational.
//
// The multiplexor chain, the size codes and the zero-extended output follow
// the design description; zero for unused codes is this implementation's
// choice.
module size_select #(
  parameter int unsigned LINE_W = cache_pkg::LINE_W
) (
  input  logic [LINE_W-1:0] line,
  input  logic [2:0]        szsel,
  input  logic [1:0]        wdsel,
  input  logic [1:0]        bsel,
  output logic [LINE_W-1:0] dout
);
  localparam int unsigned W8 = LINE_W / 2;
  localparam int unsigned W4 = LINE_W / 4;
  localparam int unsigned W2 = LINE_W / 8;
  localparam int unsigned W1 = LINE_W / 16;

  logic [W8-1:0] d8;
  logic [W4-1:0] d4;
  logic [W2-1:0] d2;
  logic [W1-1:0] d1;

  assign d8 = wdsel[1] ? line[LINE_W-1:W8] : line[W8-1:0];
  assign d4 = wdsel[0] ? d8[W8-1:W4]       : d8[W4-1:0];
  assign d2 = bsel[1]  ? d4[W4-1:W2]       : d4[W2-1:0];
  assign d1 = bsel[0]  ? d2[W2-1:W1]       : d2[W1-1:0];

  always_comb begin
    case (cache_pkg::szsel_e'(szsel))
      cache_pkg::SZ_1B:   dout = LINE_W'(d1);
      cache_pkg::SZ_2B:   dout = LINE_W'(d2);
      cache_pkg::SZ_4B:   dout = LINE_W'(d4);
      cache_pkg::SZ_8B:   dout = LINE_W'(d8);
      cache_pkg::SZ_16B:  dout = line;
      default: dout = '0;
    endcase
  end
endmodule
