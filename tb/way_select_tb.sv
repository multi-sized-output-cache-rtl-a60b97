// way_select_tb: checks the way decoder and the replacement counter.
//
// A write that misses must enable the counter's way and advance the counter
// (wrapping after way 15); a write that hits must enable the hitting way and
// leave the counter alone; no write enables nothing.
module way_select_tb;
  localparam int unsigned WAYS = 16;
  logic            clk = 1'b0, rst;
  logic            we, hit;
  logic [3:0]      hit_way, victim;
  logic [WAYS-1:0] way_we;
  int checks = 0, failures = 0;
  int exp_cnt;

  way_select #(.WAYS(WAYS)) dut (.clk, .rst, .we, .hit, .hit_way, .way_we, .victim);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; hit = 1'b0; hit_way = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    exp_cnt = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we = 1'($urandom); hit = 1'($urandom); hit_way = 4'($urandom);
      #1;
      check(victim == 4'(exp_cnt), "counter value");
      if (!we)      check(way_we == '0, "no enable without write");
      else if (hit) check(way_we == (WAYS'(1) << hit_way), "hit way enabled");
      else          check(way_we == (WAYS'(1) << exp_cnt), "counter way enabled");
      if (we && !hit) exp_cnt = (exp_cnt + 1) % WAYS;
    end
    @(negedge clk);
    we = 1'b0;
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    #1 check(victim == 4'd0, "counter reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
