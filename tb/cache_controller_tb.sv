// cache_controller_tb: checks the controller FSM against simple cache and
// memory stand-ins.
//
// The stand-in cache remembers every line the controller writes (keyed by tag
// and set) and reports a hit for those; its read data is the whole stored
// line. The stand-in memory returns a fixed pattern of the word address
// unless the controller has written that word. For each random request the
// test checks: the memory addresses and data of the two-word write and of the
// four-word line read, the line written to the cache, the data returned,
// busy and control in every cycle, and the latencies (read hit: dvalid 2
// cycles after the request, read miss: 8 cycles, write: back to idle after 7).
module cache_controller_tb;
  import cache_pkg::*;
  logic         clk = 1'b0, rst;
  logic         re, we;
  logic [31:0]  addr_in;
  logic [63:0]  din;
  logic [2:0]   szsel;
  logic [127:0] dout;
  logic         hit, busy, dvalid;
  logic [2:0]   control;
  logic [24:0]  c_tag;
  logic [2:0]   c_set;
  logic [1:0]   c_wdsel, c_bsel;
  logic [2:0]   c_szsel;
  logic         c_re, c_we, c_wfull, c_hit;
  logic [127:0] c_din, c_dout;
  logic [31:0]  m_a, m_wd, m_rd;
  logic         m_we;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_write = 0;

  // Requests stay below address 0x400: 64 lines, 256 words.
  logic [127:0] cache_lines [64];
  logic [63:0]  cache_valid;
  logic [31:0]  mem_words   [256];
  logic [255:0] mem_written;

  cache_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] mem_word(input logic [31:0] a);
    if (a[31:10] == '0 && mem_written[a[9:2]]) return mem_words[a[9:2]];
    return {a[31:2], 2'b01} ^ 32'h5a5a_0000;
  endfunction

  function automatic logic [127:0] mem_line(input logic [31:0] a);
    logic [31:0] base;
    base = {a[31:4], 4'h0};
    return {mem_word(base + 12), mem_word(base + 8), mem_word(base + 4), mem_word(base)};
  endfunction

  // stand-in cache and memory
  assign c_hit  = ({c_tag[24:3]} == '0) && cache_valid[{c_tag[2:0], c_set}];
  assign c_dout = (c_re && c_hit) ? cache_lines[{c_tag[2:0], c_set}] : '0;
  assign m_rd   = mem_word(m_a);
  always @(posedge clk) begin
    if (rst) begin
      cache_valid <= '0;
      mem_written <= '0;
    end else begin
      if (c_we) begin
        cache_lines[{c_tag[2:0], c_set}] <= c_din;
        cache_valid[{c_tag[2:0], c_set}] <= 1'b1;
      end
      if (m_we) begin
        mem_words[m_a[9:2]]   <= m_wd;
        mem_written[m_a[9:2]] <= 1'b1;
      end
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic do_read(input logic [31:0] a);
    logic present;
    logic [127:0] exp_line;
    int lat, exp_lat;
    present = cache_valid[a[9:4]];
    exp_line = mem_line(a);
    @(negedge clk);
    check(!busy && control == MS_FETCH, "idle before read");
    re = 1'b1; addr_in = a; szsel = 3'($urandom_range(1, 5));
    @(negedge clk);
    re = 1'b0; addr_in = $urandom;
    lat = 1;
    while (!dvalid && lat < 20) begin
      check(busy, "busy during read");
      if (control == MS_READ_MEM) begin
        check(m_a == {a[31:4], 2'(lat - 2), 2'b00} && !m_we, "line read address");
      end
      if (c_we) check(c_din == exp_line && c_wfull, "line written to cache");
      check(c_szsel == dut.szsel_q && {c_tag, c_set, c_wdsel, c_bsel} == a, "cache address fields");
      @(negedge clk);
      lat++;
    end
    exp_lat = present ? 2 : 8;
    check(lat == exp_lat, $sformatf("read latency %0d expected %0d", lat, exp_lat));
    check(dvalid && control == MS_GIVE_DATA, "give data");
    check(hit && dout == exp_line, $sformatf("read data %h expected %h", dout, exp_line));
    if (present) n_hit++; else n_miss++;
    @(negedge clk);
    check(!busy && dout == exp_line, "data held after give data");
  endtask

  task automatic do_write(input logic [31:0] a, input logic [63:0] d);
    int cyc;
    logic [31:0] base8;
    base8 = {a[31:3], 3'b000};
    @(negedge clk);
    we = 1'b1; addr_in = a; din = d; szsel = '0;
    @(negedge clk);
    we = 1'b0; din = $urandom;
    cyc = 1;
    while (busy && cyc < 20) begin
      check(!dvalid, "no data valid on write");
      if (cyc == 1) check(m_we && m_a == base8 && m_wd == d[31:0] && control == MS_WRITE_MEM, "lower word write");
      if (cyc == 2) check(m_we && m_a == base8 + 4 && m_wd == d[63:32] && control == MS_WRITE_MEM, "upper word write");
      if (cyc >= 3 && cyc <= 6) check(!m_we && control == MS_READ_MEM, "refill read");
      if (cyc == 7) check(c_we && control == MS_WRITE_CACHE && c_din == mem_line(a), "refill write to cache");
      @(negedge clk);
      cyc++;
    end
    check(cyc == 8, $sformatf("write busy for %0d cycles", cyc - 1));
    n_write++;
  endtask

  initial begin
    rst = 1'b1; re = 1'b0; we = 1'b0; addr_in = '0; din = '0; szsel = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    #1 check(!busy && control == MS_FETCH && dout == '0, "reset state");
    // reference controller sequence: write 0x08, read 0x00 (hit after refill)
    do_write(32'h08, 64'haaaaaaaa_aaaaaaaa);
    do_read(32'h00);
    check(dout == {64'haaaaaaaa_aaaaaaaa, mem_word(32'h4), mem_word(32'h0)}, "reference read");
    for (int i = 0; i < 600; i++) begin
      logic [31:0] a;
      a = {22'd0, 6'($urandom), 4'($urandom)};
      if ($urandom_range(0, 3) == 0) do_write(a, {$urandom, $urandom});
      else do_read(a);
    end
    check(n_hit > 0 && n_miss > 0 && n_write > 0, "every request kind seen");
    $display("hits=%0d misses=%0d writes=%0d", n_hit, n_miss, n_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
