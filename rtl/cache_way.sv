// cache_way: one way of the set-associative cache.
//
// For each of SETS sets the way keeps a valid bit, a TAG_W-bit tag register and
// a LINE_W-bit data line. The set input picks one entry; the way compares its
// stored tag with tag_in and ANDs the result with the valid bit to form hit.
// rdata and val_out show the picked entry combinationally.
//
// A write (we high at the rising clock edge, driven by the cache's way
// decoder) stores tag_in, sets the valid bit and writes the 8-byte halves of
// wdata enabled by half_en (bit 0 = bytes 0-7, bit 1 = bytes 8-15). When the
// way did not already hold the line (no hit), halves that are not written are
// cleared to zero, so a newly allocated line never shows stale data. rst
// clears all valid bits on the rising edge; tags and data are not reset.
//
// Valid bit, tag register, comparator and AND gate per way follow the design
// description; the half-line write and the clearing of the unwritten half are
// this implementation's choices.
module cache_way #(
  parameter int unsigned SETS   = cache_pkg::SETS,
  parameter int unsigned TAG_W  = cache_pkg::TAG_W,
  parameter int unsigned LINE_W = cache_pkg::LINE_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [$clog2(SETS)-1:0] set,
  input  logic [TAG_W-1:0]        tag_in,
  input  logic                    we,
  input  logic [1:0]              half_en,
  input  logic [LINE_W-1:0]       wdata,
  output logic                    hit,
  output logic                    val_out,
  output logic [LINE_W-1:0]       rdata
);
  localparam int unsigned HALF_W = LINE_W / 2;

  logic [LINE_W-1:0] way [SETS];
  logic [TAG_W-1:0]  tag [SETS];
  logic [SETS-1:0]   val;

  assign val_out = val[set];
  assign rdata   = way[set];
  assign hit     = val[set] && (tag[set] == tag_in);

  always_ff @(posedge clk) begin
    if (rst) begin
      val <= '0;
    end else if (we) begin
      val[set] <= 1'b1;
      tag[set] <= tag_in;
      for (int h = 0; h < 2; h++) begin
        if (half_en[h])
          way[set][h*HALF_W +: HALF_W] <= wdata[h*HALF_W +: HALF_W];
        else if (!hit)
          way[set][h*HALF_W +: HALF_W] <= '0;
      end
    end
  end
endmodule
