// main_memory_tb: self-checking test of the 4 KiB word memory.
//
// Writes the two words of the reference test (0x00000000 <- 20202020,
// 0x00000004 <- 22222222) and reads them back, checks that a read during the
// write cycle still shows the old word, then runs random writes and reads
// against a word-array model and checks address aliasing above 4 KiB.
module main_memory_tb;
  logic        clk = 1'b0;
  logic        we;
  logic [31:0] a, wd, rd;
  int checks = 0, failures = 0;
  logic [31:0] model [1024];
  logic [1023:0] known;

  main_memory dut (.clk, .we, .a, .wd, .rd);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic write_word(input logic [31:0] addr, input logic [31:0] data);
    @(negedge clk);
    we = 1'b1; a = addr; wd = data;
    @(negedge clk);
    we = 1'b0;
    model[addr[11:2]] = data;
    known[addr[11:2]] = 1'b1;
  endtask

  initial begin
    known = '0;
    we = 1'b0; a = '0; wd = '0;
    write_word(32'h0000_0000, 32'h2020_2020);
    write_word(32'h0000_0004, 32'h2222_2222);
    a = 32'h0000_0000; #1 check(rd, 32'h2020_2020, "table word 0");
    a = 32'h0000_0004; #1 check(rd, 32'h2222_2222, "table word 1");
    // read during the write cycle shows the old word
    @(negedge clk);
    we = 1'b1; a = 32'h0000_0004; wd = 32'h1234_5678;
    #1 check(rd, 32'h2222_2222, "old word during write");
    @(negedge clk);
    we = 1'b0;
    #1 check(rd, 32'h1234_5678, "new word after write");
    model[1] = 32'h1234_5678;
    // aliasing: bits above [11] are ignored
    a = 32'h0000_1004; #1 check(rd, 32'h1234_5678, "alias above 4 KiB");
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] addr;
      addr = {20'($urandom), 10'($urandom), 2'b00};
      if ($urandom_range(0, 1) == 0) begin
        write_word(addr, $urandom);
      end else if (known[addr[11:2]]) begin
        @(negedge clk);
        a = addr;
        #1 check(rd, model[addr[11:2]], "random read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
