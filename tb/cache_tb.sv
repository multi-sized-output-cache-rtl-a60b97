// cache_tb: checks the 16-way cache against a model of its ways.
//
// First the reference sequence: 8-byte writes to 0x00, 0x08 (same line, way
// 0) and 0x80 (same set, new tag, way 1), then 0x80 replaced by a second
// write to 0x08, which must land in way 0 again; the way contents are
// inspected directly. Then the reference reads (4 bytes of word 0, 16 bytes).
// Then random whole-line and half-line writes and random reads of every size
// over a few tags, enough of them in one set to wrap the replacement counter
// and evict lines. The model keeps valid/tag/line per way and set and a
// single counter that advances after each allocating write.
module cache_tb;
  localparam int unsigned WAYS = 16;
  localparam int unsigned SETS = 8;
  logic         clk = 1'b0, rst;
  logic [24:0]  tag_in;
  logic [2:0]   set;
  logic [1:0]   wdsel, bsel;
  logic [2:0]   szsel;
  logic         re, we, wfull;
  logic [127:0] din, dout;
  logic         hit;
  int checks = 0, failures = 0;
  int evictions = 0;

  logic         m_val  [WAYS][SETS];
  logic [24:0]  m_tag  [WAYS][SETS];
  logic [127:0] m_line [WAYS][SETS];
  int           m_cnt;

  cache dut (.clk, .rst, .tag_in, .set, .wdsel, .bsel, .szsel, .re, .we, .wfull,
             .din, .hit, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int find(input logic [2:0] s, input logic [24:0] t);
    for (int w = 0; w < WAYS; w++) if (m_val[w][s] && m_tag[w][s] == t) return w;
    return -1;
  endfunction

  function automatic logic [127:0] sized(input logic [127:0] l, input logic [2:0] code,
                                         input int off);
    int n, start;
    logic [127:0] r;
    case (code)
      3'b001: n = 1;
      3'b010: n = 2;
      3'b011: n = 4;
      3'b100: n = 8;
      3'b101: n = 16;
      default: n = 0;
    endcase
    r = '0;
    if (n > 0) begin
      start = (off / n) * n;
      for (int b = 0; b < n; b++) r[b*8 +: 8] = l[(start + b)*8 +: 8];
    end
    return r;
  endfunction

  task automatic do_write(input logic [31:0] addr, input logic full, input logic [127:0] d);
    int w;
    logic [2:0] s;
    logic [24:0] t;
    s = addr[6:4]; t = addr[31:7];
    @(negedge clk);
    tag_in = t; set = s; wdsel = addr[3:2]; bsel = addr[1:0];
    wfull = full; din = d; we = 1'b1; re = 1'b0;
    @(negedge clk);
    we = 1'b0;
    w = find(s, t);
    if (w < 0) begin
      w = m_cnt;
      if (m_val[w][s]) evictions++;
      m_cnt = (m_cnt + 1) % WAYS;
      m_line[w][s] = '0;
    end
    if (full) m_line[w][s] = d;
    else m_line[w][s][addr[3]*64 +: 64] = d[63:0];
    m_val[w][s] = 1'b1;
    m_tag[w][s] = t;
  endtask

  task automatic do_read(input logic [31:0] addr, input logic [2:0] code);
    int w;
    @(negedge clk);
    tag_in = addr[31:7]; set = addr[6:4]; wdsel = addr[3:2]; bsel = addr[1:0];
    szsel = code; re = 1'b1; we = 1'b0;
    w = find(addr[6:4], addr[31:7]);
    #1;
    check(hit == (w >= 0), $sformatf("hit at %h", addr));
    if (w >= 0) check(dout == sized(m_line[w][addr[6:4]], code, int'(addr[3:0])),
                      $sformatf("data at %h size %b: %h", addr, code, dout));
    else        check(dout == '0, "no data on miss");
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; re = 1'b0; wfull = 1'b0; din = '0;
    tag_in = '0; set = '0; wdsel = '0; bsel = '0; szsel = '0;
    m_cnt = 0;
    for (int w = 0; w < WAYS; w++)
      for (int s = 0; s < SETS; s++) begin m_val[w][s] = 1'b0; m_tag[w][s] = '0; m_line[w][s] = '0; end
    @(negedge clk); @(negedge clk);
    rst = 1'b0;

    // reference write sequence
    do_write(32'h00, 1'b0, {64'h0, 64'h22222222_20202020});
    do_write(32'h08, 1'b0, {64'h0, 64'hf3f3f3f3_f2f2f2f2});
    do_write(32'h80, 1'b0, {64'h0, 64'haaaaaaaa_aaaaaaaa});
    check(dut.g_way[0].u_way.way[0] == 128'hf3f3f3f3f2f2f2f2_2222222220202020, "way0 set0 line");
    check(dut.g_way[1].u_way.tag[0] == 25'd1 && dut.g_way[1].u_way.val[0], "0x80 in way1");
    do_write(32'h08, 1'b0, {64'h0, 64'haaaaaaaa_aaaaaaaa});
    check(dut.g_way[0].u_way.way[0] == 128'haaaaaaaaaaaaaaaa_2222222220202020, "rewrite in way0");
    check(dut.g_way[2].u_way.val[0] == 1'b0, "way2 still empty");
    // reference reads
    do_read(32'h00, 3'b011);
    check(dout == 128'h20202020, "4-byte word 0");
    do_read(32'h08, 3'b101);
    check(dout == 128'haaaaaaaaaaaaaaaa_2222222220202020, "16-byte read");
    do_read(32'h100, 3'b101);

    // random traffic: 24 tags over 2 sets, so set 0 and set 1 overflow 16 ways
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] addr;
      addr = {25'($urandom_range(0, 23)), 3'($urandom_range(0, 1)), 4'($urandom)};
      if ($urandom_range(0, 2) == 0) do_write(addr, 1'($urandom), {$urandom, $urandom, $urandom, $urandom});
      else do_read(addr, 3'($urandom_range(0, 7)));
    end
    checks++;
    if (evictions == 0) begin failures++; $display("FAIL no eviction happened"); end
    $display("evictions=%0d", evictions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
