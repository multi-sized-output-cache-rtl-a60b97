// cache_pkg: sizes, address fields and encodings shared by the multi-sized
// output cache, its main memory and its controller.
//
// The cache holds 2 KiB: 16 ways x 8 sets x 16-byte lines. A 32-bit byte
// address splits into tag [31:7] (25 bits), set [6:4] (3 bits), word select
// [3:2] (2 bits) and byte select [1:0] (2 bits), the field widths printed on
// the cache block diagram. The main memory holds 4096 bytes as 1024 32-bit
// words. The CPU writes 8 bytes at a time and reads 1, 2, 4, 8 or 16 bytes,
// chosen by the 3-bit size select code below (the codes are the design's
// published table; code 000 and codes 110/111 return no data, a choice of
// this implementation).
package cache_pkg;

  localparam int unsigned ADDR_W    = 32;
  localparam int unsigned WAYS      = 16;
  localparam int unsigned SETS      = 8;
  localparam int unsigned LINE_W    = 128;          // 16-byte line
  localparam int unsigned WORD_W    = 32;           // memory word
  localparam int unsigned CPU_WR_W  = 64;           // 8-byte CPU write
  localparam int unsigned BYTE_SEL_W = 2;
  localparam int unsigned WORD_SEL_W = 2;
  localparam int unsigned SET_W     = 3;
  localparam int unsigned TAG_W     = ADDR_W - SET_W - WORD_SEL_W - BYTE_SEL_W; // 25
  localparam int unsigned MEM_BYTES = 4096;

  // Output size select (szsel).
  typedef enum logic [2:0] {
    SZ_NONE = 3'b000,
    SZ_1B   = 3'b001,
    SZ_2B   = 3'b010,
    SZ_4B   = 3'b011,
    SZ_8B   = 3'b100,
    SZ_16B  = 3'b101
  } szsel_e;

  // Main state code the controller shows on its control output.
  typedef enum logic [2:0] {
    MS_FETCH       = 3'd0,
    MS_READ_CACHE  = 3'd1,
    MS_GIVE_DATA   = 3'd2,
    MS_READ_MEM    = 3'd3,
    MS_WRITE_CACHE = 3'd4,
    MS_WRITE_MEM   = 3'd5
  } main_state_e;

  // Byte address split into the cache's fields.
  typedef struct packed {
    logic [TAG_W-1:0]      tag;
    logic [SET_W-1:0]      set;
    logic [WORD_SEL_W-1:0] word;
    logic [BYTE_SEL_W-1:0] byte_sel;
  } cache_addr_t;

endpackage
