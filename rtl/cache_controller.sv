// cache_controller: the finite-state machine that serves CPU reads and writes
// from the cache and the main memory.
//
// Main states (shown on control, see cache_pkg::main_state_e):
//   Fetch Data   idle; busy is low; the temporary line register is emptied.
//                A request (we or re high) is latched with its address, data
//                and size. A write takes precedence over a read.
//   Read Cache   the latched address, split into tag/set/word/byte fields,
//                is looked up. On a hit the sized data is captured in dout and
//                the FSM goes to Give Data; on a miss it goes to Read Memory.
//   Give Data    dvalid pulses for one cycle; back to Fetch Data.
//   Read Memory  four sub-states read the four 32-bit words of the 16-byte
//                line from memory, incrementing the word-aligned address, and
//                assemble them in the temporary line register (word k into
//                bits [32k+31:32k]); then Write Cache.
//   Write Cache  the temporary register is written to the cache as a whole
//                line. After a read miss the FSM returns to Read Cache, which
//                now hits; after a CPU write it returns to Fetch Data.
//   Write Memory two sub-states store the 8-byte write data as two words, the
//                lower word at address [31:3]*8 and the upper word 4 bytes
//                above; then Read Memory refills the whole line, so the cache
//                line always matches memory (write-through, write-allocate).
//
// Timing, counted from the clock edge that samples a request in Fetch Data:
// a read hit gives dvalid 2 cycles later, a read miss 8 cycles later, and a
// write returns to Fetch Data after 7 cycles. busy is high in every state but
// Fetch Data; requests are only accepted while busy is low. dout and hit hold
// their value until the next read.
//
// The main states, the four-word line assembly, the two-word write split and
// the busy flag follow the design description. The refill after a write, the
// write-over-read priority, the dvalid pulse and the state codes are this
// implementation's choices.
module cache_controller
  import cache_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  // CPU side
  input  logic                  re,
  input  logic                  we,
  input  logic [ADDR_W-1:0]     addr_in,
  input  logic [CPU_WR_W-1:0]   din,
  input  logic [2:0]            szsel,
  output logic [LINE_W-1:0]     dout,
  output logic                  hit,
  output logic                  busy,
  output logic                  dvalid,
  output logic [2:0]            control,
  // Cache side
  output logic [TAG_W-1:0]      c_tag,
  output logic [SET_W-1:0]      c_set,
  output logic [WORD_SEL_W-1:0] c_wdsel,
  output logic [BYTE_SEL_W-1:0] c_bsel,
  output logic [2:0]            c_szsel,
  output logic                  c_re,
  output logic                  c_we,
  output logic                  c_wfull,
  output logic [LINE_W-1:0]     c_din,
  input  logic                  c_hit,
  input  logic [LINE_W-1:0]     c_dout,
  // Memory side
  output logic [ADDR_W-1:0]     m_a,
  output logic [WORD_W-1:0]     m_wd,
  output logic                  m_we,
  input  logic [WORD_W-1:0]     m_rd
);
  typedef enum logic [3:0] {
    S_FETCH,
    S_READ_CACHE,
    S_GIVE_DATA,
    S_RD_MEM0,
    S_RD_MEM1,
    S_RD_MEM2,
    S_RD_MEM3,
    S_WRITE_CACHE,
    S_WR_MEM_LO,
    S_WR_MEM_HI
  } state_e;

  state_e               state;
  cache_addr_t          addr_q;
  logic [CPU_WR_W-1:0]  din_q;
  logic [2:0]           szsel_q;
  logic                 write_op_q;
  logic [LINE_W-1:0]    line_q;     // temporary 16-byte register
  logic [1:0]           rd_word;

  // ---------------------------------------------------------------- outputs
  assign busy = (state != S_FETCH);

  always_comb begin
    unique case (state)
      S_FETCH:                                   control = MS_FETCH;
      S_READ_CACHE:                              control = MS_READ_CACHE;
      S_GIVE_DATA:                               control = MS_GIVE_DATA;
      S_RD_MEM0, S_RD_MEM1, S_RD_MEM2, S_RD_MEM3: control = MS_READ_MEM;
      S_WRITE_CACHE:                             control = MS_WRITE_CACHE;
      S_WR_MEM_LO, S_WR_MEM_HI:                  control = MS_WRITE_MEM;
      default:                                   control = MS_FETCH;
    endcase
  end

  assign dvalid = (state == S_GIVE_DATA);

  // Cache interface: the latched address split into its fields.
  assign c_tag   = addr_q.tag;
  assign c_set   = addr_q.set;
  assign c_wdsel = addr_q.word;
  assign c_bsel  = addr_q.byte_sel;
  assign c_szsel = szsel_q;
  assign c_re    = (state == S_READ_CACHE);
  assign c_we    = (state == S_WRITE_CACHE);
  assign c_wfull = 1'b1;
  assign c_din   = line_q;

  // Memory interface.
  always_comb begin
    rd_word = 2'd0;
    unique case (state)
      S_RD_MEM1: rd_word = 2'd1;
      S_RD_MEM2: rd_word = 2'd2;
      S_RD_MEM3: rd_word = 2'd3;
      default:   rd_word = 2'd0;
    endcase
  end

  always_comb begin
    m_we = 1'b0;
    m_wd = din_q[WORD_W-1:0];
    m_a  = {addr_q.tag, addr_q.set, rd_word, 2'b00};
    if (state == S_WR_MEM_LO) begin
      m_we = 1'b1;
      m_a  = {addr_q.tag, addr_q.set, addr_q.word[1], 1'b0, 2'b00};
      m_wd = din_q[WORD_W-1:0];
    end else if (state == S_WR_MEM_HI) begin
      m_we = 1'b1;
      m_a  = {addr_q.tag, addr_q.set, addr_q.word[1], 1'b1, 2'b00};
      m_wd = din_q[2*WORD_W-1:WORD_W];
    end
  end

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_FETCH;
      addr_q     <= '0;
      din_q      <= '0;
      szsel_q    <= '0;
      write_op_q <= 1'b0;
      line_q     <= '0;
      dout       <= '0;
      hit        <= 1'b0;
    end else begin
      unique case (state)
        S_FETCH: begin
          line_q <= '0;
          if (we || re) begin
            addr_q     <= cache_addr_t'(addr_in);
            din_q      <= din;
            szsel_q    <= szsel;
            write_op_q <= we;
            state      <= we ? S_WR_MEM_LO : S_READ_CACHE;
          end
        end
        S_READ_CACHE: begin
          hit <= c_hit;
          if (c_hit) begin
            dout  <= c_dout;
            state <= S_GIVE_DATA;
          end else begin
            state <= S_RD_MEM0;
          end
        end
        S_GIVE_DATA: state <= S_FETCH;
        S_RD_MEM0: begin line_q[0*WORD_W +: WORD_W] <= m_rd; state <= S_RD_MEM1; end
        S_RD_MEM1: begin line_q[1*WORD_W +: WORD_W] <= m_rd; state <= S_RD_MEM2; end
        S_RD_MEM2: begin line_q[2*WORD_W +: WORD_W] <= m_rd; state <= S_RD_MEM3; end
        S_RD_MEM3: begin line_q[3*WORD_W +: WORD_W] <= m_rd; state <= S_WRITE_CACHE; end
        S_WRITE_CACHE: state <= write_op_q ? S_FETCH : S_READ_CACHE;
        S_WR_MEM_LO:   state <= S_WR_MEM_HI;
        S_WR_MEM_HI:   state <= S_RD_MEM0;
        default:       state <= S_FETCH;
      endcase
    end
  end

  // Requests are only to be made while the controller is not busy.
  a_no_req_when_busy: assert property (@(posedge clk) disable iff (rst) busy |-> !(re || we))
    else $error("cache_controller: request while busy");
  // A read that misses must hit after the line fill.
  a_refill_hits: assert property (@(posedge clk) disable iff (rst)
      (state == S_WRITE_CACHE && !write_op_q) |=> (state == S_READ_CACHE) ##0 c_hit)
    else $error("cache_controller: no hit after line fill");
endmodule
