// cache_system_tb: end-to-end test of the cache system at its default sizes
// (16 ways x 8 sets x 16 bytes of cache, 4 KiB memory).
//
// Three agents share the CPU port: each waits for busy to fall before it
// raises a request, and a cycle in which an agent holds a request back because
// busy is high is counted as a stall. First the reference sequence runs
// (8-byte write of aaaaaaaa_aaaaaaaa to 0x08, 16-byte read of 0x00); then
// random reads of every size and 8-byte writes over the whole 4 KiB, half of
// them to a few hot lines so that reads hit, half spread so that sets
// overflow their 16 ways and lines are evicted.
//
// The reference model is a word array loaded from the memory's initial
// contents after reset, plus a model of the tags held in each set and of the
// replacement counter. Every read is checked for data, the hit flag and its
// latency (2 cycles on a hit, 8 on a miss); every write for its 7 busy
// cycles. Each mechanism (hit, miss with line fill, write to a line already
// cached, write that allocates, eviction, each output size, busy stall, each
// agent) must happen at least once.
module cache_system_tb;
  import cache_pkg::*;
  localparam int NREQ = 4000;

  logic         clk = 1'b0, rst;
  logic         re, we;
  logic [31:0]  addr_in;
  logic [63:0]  din;
  logic [2:0]   szsel;
  logic [127:0] dout;
  logic         hit, busy, dvalid;
  logic [2:0]   control;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_hit = 0, n_miss = 0, n_wr_hit = 0, n_wr_alloc = 0, n_evict = 0, n_stall = 0;
  int n_size [6];
  int n_agent [3];

  logic [31:0] mem  [1024];
  logic        c_val [WAYS][SETS];
  logic [24:0] c_tag [WAYS][SETS];
  int          c_cnt;
  semaphore    port = new(1);   // the agents' turn-taking on the shared port

  cache_system dut (.clk, .rst, .re, .we, .addr_in, .din, .szsel,
                    .dout, .hit, .busy, .dvalid, .control);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int find(input logic [31:0] a);
    for (int w = 0; w < WAYS; w++)
      if (c_val[w][a[6:4]] && c_tag[w][a[6:4]] == a[31:7]) return w;
    return -1;
  endfunction

  // Allocate the line of a in the model if it is not cached.
  function automatic void allocate(input logic [31:0] a);
    if (find(a) < 0) begin
      if (c_val[c_cnt][a[6:4]]) n_evict++;
      c_val[c_cnt][a[6:4]] = 1'b1;
      c_tag[c_cnt][a[6:4]] = a[31:7];
      c_cnt = (c_cnt + 1) % WAYS;
    end
  endfunction

  function automatic logic [127:0] expected(input logic [31:0] a, input logic [2:0] code);
    logic [127:0] l, r;
    int n, start;
    for (int k = 0; k < 4; k++) l[k*32 +: 32] = mem[{a[11:4], 2'(k)}];
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
      start = (int'(a[3:0]) / n) * n;
      for (int b = 0; b < n; b++) r[b*8 +: 8] = l[(start + b)*8 +: 8];
    end
    return r;
  endfunction

  // An agent waits until the port is free.
  task automatic wait_free(input int agent);
    @(negedge clk);
    while (busy) begin
      n_stall++;
      @(negedge clk);
    end
    n_agent[agent]++;
  endtask

  task automatic do_read(input int agent, input logic [31:0] a, input logic [2:0] code);
    int w, lat, exp_lat;
    logic [127:0] exp;
    port.get(1);
    wait_free(agent);
    w = find(a);
    exp = expected(a, code);
    if (w < 0) allocate(a);
    re = 1'b1; addr_in = a; szsel = code;
    @(negedge clk);
    re = 1'b0; addr_in = $urandom; szsel = 3'($urandom);
    port.put(1);
    lat = 1;
    while (!dvalid && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    exp_lat = (w >= 0) ? 2 : 8;
    check(lat == exp_lat, $sformatf("read %h latency %0d expected %0d", a, lat, exp_lat));
    check(hit && dout == exp, $sformatf("read %h size %b: %h expected %h", a, code, dout, exp));
    if (w >= 0) n_hit++;
    else n_miss++;
    n_size[code]++;
  endtask

  task automatic do_write(input int agent, input logic [31:0] a, input logic [63:0] d);
    int cyc;
    port.get(1);
    wait_free(agent);
    we = 1'b1; addr_in = a; din = d;
    mem[{a[11:3], 1'b0}] = d[31:0];
    mem[{a[11:3], 1'b1}] = d[63:32];
    if (find(a) >= 0) n_wr_hit++;
    else begin n_wr_alloc++; allocate(a); end
    @(negedge clk);
    we = 1'b0; din = {$urandom, $urandom};
    port.put(1);
    cyc = 1;
    while (busy && cyc < 20) begin
      check(!dvalid, "no data valid during write");
      @(negedge clk);
      cyc++;
    end
    check(cyc == 8, $sformatf("write %h busy %0d cycles", a, cyc - 1));
  endtask

  // One agent: NREQ/3 random requests.
  task automatic agent_run(input int agent);
    for (int i = 0; i < NREQ / 3; i++) begin
      logic [31:0] a;
      if ($urandom_range(0, 1) == 0) a = {20'd0, 2'd0, 3'($urandom_range(0, 3)), 3'($urandom_range(0, 1)), 4'($urandom)};
      else                            a = {20'd0, 12'($urandom)};
      if ($urandom_range(0, 3) == 0) do_write(agent, a, {$urandom, $urandom});
      else do_read(agent, a, 3'($urandom_range(1, 5)));
    end
  endtask

  initial begin
    rst = 1'b1; re = 1'b0; we = 1'b0; addr_in = '0; din = '0; szsel = '0;
    foreach (n_size[i]) n_size[i] = 0;
    foreach (n_agent[i]) n_agent[i] = 0;
    c_cnt = 0;
    for (int w = 0; w < WAYS; w++)
      for (int s = 0; s < SETS; s++) begin c_val[w][s] = 1'b0; c_tag[w][s] = '0; end
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 1024; i++) mem[i] = dut.u_mem.ram[i];

    // reference sequence
    do_write(0, 32'h0000_0008, 64'haaaaaaaa_aaaaaaaa);
    do_read(1, 32'h0000_0000, 3'b101);
    check(dout[127:64] == 64'haaaaaaaa_aaaaaaaa, "reference read upper half");
    do_read(2, 32'h0000_0000, 3'b011);

    fork
      agent_run(0);
      agent_run(1);
      agent_run(2);
    join
    @(negedge clk);
    while (busy) @(negedge clk);

    check(n_hit > 0,      "read hit happened");
    check(n_miss > 0,     "read miss with line fill happened");
    check(n_wr_hit > 0,   "write to a cached line happened");
    check(n_wr_alloc > 0, "write allocating a line happened");
    check(n_evict > 0,    "eviction happened");
    check(n_stall > 0,    "busy stall happened");
    for (int c = 1; c <= 5; c++) check(n_size[c] > 0, $sformatf("size code %0d used", c));
    for (int g = 0; g < 3; g++) check(n_agent[g] > 0, $sformatf("agent %0d served", g));
    $display("hits=%0d misses=%0d write_hits=%0d write_allocs=%0d evictions=%0d stalls=%0d",
             n_hit, n_miss, n_wr_hit, n_wr_alloc, n_evict, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
