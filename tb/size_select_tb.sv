// size_select_tb: checks the size multiplexor chain on random lines for every
// size code and every word/byte select.
//
// The expected value is built byte by byte: for a size of n bytes the first
// byte taken is the byte offset {wdsel,bsel} rounded down to a multiple of n,
// and the output holds those n bytes with zeros above. Codes without a size
// must give zero. Also checks the two reads of the reference test.
module size_select_tb;
  logic [127:0] line, dout, exp;
  logic [2:0]   szsel;
  logic [1:0]   wdsel, bsel;
  int checks = 0, failures = 0;

  size_select dut (.line, .szsel, .wdsel, .bsel, .dout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int size_of(input logic [2:0] code);
    case (code)
      3'b001: return 1;
      3'b010: return 2;
      3'b011: return 4;
      3'b100: return 8;
      3'b101: return 16;
      default: return 0;
    endcase
  endfunction

  initial begin
    // reference reads: line aaaaaaaa_aaaaaaaa_22222222_20202020
    line = 128'haaaaaaaa_aaaaaaaa_22222222_20202020;
    szsel = 3'b011; wdsel = 2'b00; bsel = 2'b00;
    #1 checks++;
    if (dout !== 128'h20202020) begin failures++; $display("FAIL 4-byte word 0"); end
    wdsel = 2'b01;
    #1 checks++;
    if (dout !== 128'h22222222) begin failures++; $display("FAIL 4-byte word 1"); end
    szsel = 3'b101; wdsel = 2'b10;
    #1 checks++;
    if (dout !== line) begin failures++; $display("FAIL 16-byte"); end

    for (int i = 0; i < 200; i++) begin
      line = {$urandom, $urandom, $urandom, $urandom};
      for (int c = 0; c < 8; c++) begin
        for (int off = 0; off < 16; off++) begin
          int n, start;
          szsel = 3'(c);
          {wdsel, bsel} = 4'(off);
          n = size_of(3'(c));
          exp = '0;
          if (n > 0) begin
            start = (off / n) * n;
            for (int b = 0; b < n; b++) exp[b*8 +: 8] = line[(start + b)*8 +: 8];
          end
          #1;
          checks++;
          if (dout !== exp) begin
            failures++;
            $display("FAIL szsel=%b off=%0d got %h exp %h", szsel, off, dout, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
