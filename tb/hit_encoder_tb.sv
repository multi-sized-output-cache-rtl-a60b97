// hit_encoder_tb: exhaustive check of the hit encoder for every single-way
// hit and for no hit.
module hit_encoder_tb;
  localparam int unsigned WAYS = 16;
  logic [WAYS-1:0] way_hit;
  logic            hit;
  logic [3:0]      hit_way;
  int checks = 0, failures = 0;

  hit_encoder #(.WAYS(WAYS)) dut (.way_hit, .hit, .hit_way);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    way_hit = '0;
    #1;
    checks++;
    if (hit !== 1'b0) begin failures++; $display("FAIL hit with no way hit"); end
    for (int w = 0; w < WAYS; w++) begin
      way_hit = WAYS'(1) << w;
      #1;
      checks++;
      if (hit !== 1'b1 || hit_way !== 4'(w)) begin
        failures++;
        $display("FAIL way %0d: hit=%b hit_way=%0d", w, hit, hit_way);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
