// cache_way_tb: checks one cache way: no hit after reset, whole-line and
// half-line writes, tag compare, clearing of the unwritten half on
// allocation, independence of the sets, and reset of the valid bits.
// A model of valid/tag/line per set is kept alongside and compared after
// every random operation.
module cache_way_tb;
  localparam int unsigned SETS = 8;
  logic         clk = 1'b0, rst;
  logic [2:0]   set;
  logic [24:0]  tag_in;
  logic         we;
  logic [1:0]   half_en;
  logic [127:0] wdata, rdata;
  logic         hit, val_out;
  int checks = 0, failures = 0;

  logic         m_val [SETS];
  logic [24:0]  m_tag [SETS];
  logic [127:0] m_line [SETS];

  cache_way #(.SETS(SETS)) dut (.clk, .rst, .set, .tag_in, .we, .half_en, .wdata,
                                .hit, .val_out, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (set %0d)", what, set); end
  endtask

  task automatic compare();
    logic exp_hit;
    exp_hit = m_val[set] && (m_tag[set] == tag_in);
    #1;
    check(hit == exp_hit, "hit");
    check(val_out == m_val[set], "valid");
    if (m_val[set]) check(rdata == m_line[set], "line");
  endtask

  task automatic do_write(input logic [2:0] s, input logic [24:0] t,
                          input logic [1:0] he, input logic [127:0] d);
    logic was_hit;
    @(negedge clk);
    set = s; tag_in = t; half_en = he; wdata = d; we = 1'b1;
    was_hit = m_val[s] && (m_tag[s] == t);
    @(negedge clk);
    we = 1'b0;
    for (int h = 0; h < 2; h++) begin
      if (he[h])        m_line[s][h*64 +: 64] = d[h*64 +: 64];
      else if (!was_hit) m_line[s][h*64 +: 64] = '0;
    end
    m_val[s] = 1'b1;
    m_tag[s] = t;
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; set = '0; tag_in = '0; half_en = '0; wdata = '0;
    for (int s = 0; s < SETS; s++) begin m_val[s] = 1'b0; m_tag[s] = '0; m_line[s] = '0; end
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int s = 0; s < SETS; s++) begin set = 3'(s); compare(); end

    // reference sequence in set 0, tag 0: 0x00 lower half, 0x08 upper half
    do_write(3'd0, 25'd0, 2'b01, {64'h0, 64'h22222222_20202020});
    set = 3'd0; tag_in = 25'd0;
    #1 check(rdata == 128'h0000000000000000_2222222220202020, "lower half allocated, upper cleared");
    do_write(3'd0, 25'd0, 2'b10, {64'hf3f3f3f3_f2f2f2f2, 64'h0});
    #1 check(rdata == 128'hf3f3f3f3f2f2f2f2_2222222220202020, "upper half merged");
    do_write(3'd0, 25'd0, 2'b10, {64'haaaaaaaa_aaaaaaaa, 64'h0});
    #1 check(rdata == 128'haaaaaaaaaaaaaaaa_2222222220202020, "upper half rewritten");
    tag_in = 25'd1;
    #1 check(!hit, "other tag misses");

    for (int i = 0; i < 2000; i++) begin
      logic [24:0] t;
      t = 25'($urandom_range(0, 3));
      if ($urandom_range(0, 2) == 0)
        do_write(3'($urandom), t, 2'($urandom_range(1, 3)),
                 {$urandom, $urandom, $urandom, $urandom});
      @(negedge clk);
      set = 3'($urandom); tag_in = 25'($urandom_range(0, 3));
      compare();
    end

    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    for (int s = 0; s < SETS; s++) begin
      set = 3'(s); tag_in = m_tag[s];
      #1 check(!hit && !val_out, "valid cleared by reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
