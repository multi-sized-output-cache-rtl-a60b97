// way_select: picks the way a cache write goes to and decodes it into one
// write enable per way.
//
// A replacement counter stands in for LRU. The way select multiplexor passes
// hit_way when the written address already hits (the line is overwritten in
// place) and the counter otherwise; a decoder turns that way number into
// way_we, one-hot while we is high and all zero otherwise. After a write that
// missed, i.e. after a new line was allocated, the counter moves to the next
// way, wrapping from WAYS-1 to 0. rst sets the counter to way 0.
//
// Counter, multiplexor and decoder follow the design description. The single
// counter shared by all sets, advancing only on allocation, and its reset
// value are this implementation's reading of it.
module way_select #(
  parameter int unsigned WAYS = cache_pkg::WAYS
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    we,
  input  logic                    hit,
  input  logic [$clog2(WAYS)-1:0] hit_way,
  output logic [WAYS-1:0]         way_we,
  output logic [$clog2(WAYS)-1:0] victim
);
  localparam int unsigned WAY_W = $clog2(WAYS);

  logic [WAY_W-1:0] counter;
  logic [WAY_W-1:0] sel;

  assign victim = counter;
  assign sel    = hit ? hit_way : counter;

  always_comb begin
    way_we = '0;
    if (we) way_we[sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)
      counter <= '0;
    else if (we && !hit)
      counter <= (counter == WAY_W'(WAYS - 1)) ? '0 : counter + 1'b1;
  end
endmodule
