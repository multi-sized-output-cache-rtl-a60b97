// cache_system: the complete multi-sized output cache, the cache controller,
// the 2 KiB 16-way cache and the 4 KiB main memory wired together.
//
// One CPU port serves all agents: an agent may raise re or we only while busy
// is low, and the controller takes one request at a time. A read returns 1, 2,
// 4, 8 or 16 bytes (szsel) from the line holding addr_in, zero-extended to 128
// bits on dout, valid when dvalid pulses: 2 cycles after the request on a
// hit, 8 on a miss (the line is first fetched from memory as four 32-bit
// words). A write stores 8 bytes (din) at addr_in[31:3] in memory, then
// refills that line into the cache; busy stays high for 7 cycles. control
// shows the controller's main state. All timing is counted in cycles of clk
// from the edge that samples the request; rst is synchronous.
//
// The blocks and their connections follow the design description; sharing
// one port among agents without an arbiter follows its busy-flag scheme.
module cache_system
  import cache_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                re,
  input  logic                we,
  input  logic [ADDR_W-1:0]   addr_in,
  input  logic [CPU_WR_W-1:0] din,
  input  logic [2:0]          szsel,
  output logic [LINE_W-1:0]   dout,
  output logic                hit,
  output logic                busy,
  output logic                dvalid,
  output logic [2:0]          control
);
  logic [TAG_W-1:0]      c_tag;
  logic [SET_W-1:0]      c_set;
  logic [WORD_SEL_W-1:0] c_wdsel;
  logic [BYTE_SEL_W-1:0] c_bsel;
  logic [2:0]            c_szsel;
  logic                  c_re, c_we, c_wfull, c_hit;
  logic [LINE_W-1:0]     c_din, c_dout;
  logic [ADDR_W-1:0]     m_a;
  logic [WORD_W-1:0]     m_wd, m_rd;
  logic                  m_we;

  cache_controller u_ctrl (
    .clk, .rst, .re, .we, .addr_in, .din, .szsel,
    .dout, .hit, .busy, .dvalid, .control,
    .c_tag, .c_set, .c_wdsel, .c_bsel, .c_szsel, .c_re, .c_we, .c_wfull,
    .c_din, .c_hit, .c_dout,
    .m_a, .m_wd, .m_we, .m_rd
  );

  cache u_cache (
    .clk    (clk),
    .rst    (rst),
    .tag_in (c_tag),
    .set    (c_set),
    .wdsel  (c_wdsel),
    .bsel   (c_bsel),
    .szsel  (c_szsel),
    .re     (c_re),
    .we     (c_we),
    .wfull  (c_wfull),
    .din    (c_din),
    .hit    (c_hit),
    .dout   (c_dout)
  );

  main_memory u_mem (
    .clk (clk),
    .we  (m_we),
    .a   (m_a),
    .wd  (m_wd),
    .rd  (m_rd)
  );
endmodule
