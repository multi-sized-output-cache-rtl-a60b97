// main_memory: the backing store behind the cache, 4096 bytes kept as 1024
// 32-bit words.
//
// The address a is a byte address that is word aligned: a[11:2] selects the
// word (address 0x0 is word 0, 0x4 is word 1, ...); a[1:0] and the bits above
// a[11] are ignored, so the memory repeats every 4 KiB. There is no read
// enable: rd always shows the word at a, combinationally. A write happens on
// the rising edge of clk while we is high, so rd shows the new word from the
// next cycle on. The contents are not reset.
//
// Size, word width, the word alignment and the port names (we, a, wd, rd)
// follow the design description; the aliasing of high address bits and the
// absence of reset are this implementation's choices.
module main_memory #(
  parameter int unsigned BYTES  = cache_pkg::MEM_BYTES,
  parameter int unsigned WORD_W = cache_pkg::WORD_W,
  parameter int unsigned ADDR_W = cache_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] a,
  input  logic [WORD_W-1:0] wd,
  output logic [WORD_W-1:0] rd
);
  localparam int unsigned WORDS  = BYTES / (WORD_W / 8);
  localparam int unsigned IDX_W  = $clog2(WORDS);
  localparam int unsigned LSB    = $clog2(WORD_W / 8);

  logic [WORD_W-1:0] ram [WORDS];
  logic [IDX_W-1:0]  idx;

  assign idx = a[LSB +: IDX_W];
  assign rd  = ram[idx];

  always_ff @(posedge clk) begin
    if (we) ram[idx] <= wd;
  end
endmodule
