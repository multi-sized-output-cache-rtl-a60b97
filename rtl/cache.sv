// cache: 2 KiB, 16-way set-associative cache with multi-sized read output.
//
// Read: every way looks up the entry picked by set and compares its tag with
// tag_in; the valid-qualified compares go to the hit encoder, which gives the
// cache hit and the number of the hitting way. The data multiplexor passes
// that way's 16-byte line to the size selector, which returns 1, 2, 4, 8 or
// 16 bytes (szsel) chosen by wdsel (address [3:2]) and bsel (address [1:0]),
// zero-extended to 128 bits. dout is zero when re is low or nothing hits.
// The read path is combinational.
//
// Write: on the rising clock edge while we is high, the way select logic
// picks the hitting way, or the replacement counter's way on a miss, and that
// way stores tag_in, sets its valid bit and takes the data: the whole line
// from din when wfull is high, otherwise din[63:0] into the 8-byte half chosen
// by wdsel[1]. rst clears all valid bits and the replacement counter.
//
// Structure (ways with valid/tag/data, comparators, encoder, data multiplexor,
// counter-driven way select and decoder, size multiplexor chain) follows the
// design description; the wfull half/whole write port and dout gating by re
// are this implementation's choices.
module cache #(
  parameter int unsigned WAYS   = cache_pkg::WAYS,
  parameter int unsigned SETS   = cache_pkg::SETS,
  parameter int unsigned LINE_W = cache_pkg::LINE_W,
  parameter int unsigned TAG_W  = cache_pkg::TAG_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [TAG_W-1:0]        tag_in,
  input  logic [$clog2(SETS)-1:0] set,
  input  logic [1:0]              wdsel,
  input  logic [1:0]              bsel,
  input  logic [2:0]              szsel,
  input  logic                    re,
  input  logic                    we,
  input  logic                    wfull,
  input  logic [LINE_W-1:0]       din,
  output logic                    hit,
  output logic [LINE_W-1:0]       dout
);
  localparam int unsigned WAY_W  = $clog2(WAYS);
  localparam int unsigned HALF_W = LINE_W / 2;

  logic [WAYS-1:0]   way_hit;
  logic [LINE_W-1:0] way_data [WAYS];
  logic [WAYS-1:0]   way_we;
  logic [WAY_W-1:0]  hit_way;
  logic [LINE_W-1:0] line;
  logic [LINE_W-1:0] sized;
  logic [LINE_W-1:0] wdata;
  logic [1:0]        half_en;

  // Whole line, or the low 8 bytes of din copied into both halves so that
  // half_en can pick where they land.
  assign wdata   = wfull ? din : {din[HALF_W-1:0], din[HALF_W-1:0]};
  assign half_en = wfull ? 2'b11 : (wdsel[1] ? 2'b10 : 2'b01);

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    cache_way #(.SETS(SETS), .TAG_W(TAG_W), .LINE_W(LINE_W)) u_way (
      .clk     (clk),
      .rst     (rst),
      .set     (set),
      .tag_in  (tag_in),
      .we      (way_we[w]),
      .half_en (half_en),
      .wdata   (wdata),
      .hit     (way_hit[w]),
      .val_out (),
      .rdata   (way_data[w])
    );
  end

  hit_encoder #(.WAYS(WAYS)) u_enc (
    .way_hit (way_hit),
    .hit     (hit),
    .hit_way (hit_way)
  );

  way_select #(.WAYS(WAYS)) u_wsel (
    .clk     (clk),
    .rst     (rst),
    .we      (we),
    .hit     (hit),
    .hit_way (hit_way),
    .way_we  (way_we),
    .victim  ()
  );

  // Data multiplexor.
  assign line = way_data[hit_way];

  size_select #(.LINE_W(LINE_W)) u_size (
    .line  (line),
    .szsel (szsel),
    .wdsel (wdsel),
    .bsel  (bsel),
    .dout  (sized)
  );

  assign dout = (re && hit) ? sized : '0;

  // Tags within one set are unique, so no two ways may hit at once.
  a_one_hit: assert property (@(posedge clk) disable iff (rst) $onehot0(way_hit))
    else $error("cache: more than one way hits");
endmodule
