// mem_io_ctrl -- tester side of the on-chip memory during test.
//
// The tester runs on its own, slower clock `tck` and drives NCH data
// channels. In the tck domain, W/NCH valid tester cycles (most significant
// chunk first) make up one W-bit replacement word; a tester cycle with
// `tst_valid` low is a no-operation and sends nothing. A finished word is
// held in a register and announced by toggling a request bit. In the
// system clock domain the toggle passes a two-flop synchronizer; each
// change writes the held word into the reserved area REPL_BASE ..
// REPL_BASE+M-1, cycling modulo M. That the tester fills this area
// cyclically through the memory I/O controller, at a clock slower than the
// system clock, follows the architecture; the chunk order, the toggle
// handshake and the NOP cycle are this design's choices.
//
// The controller also counts the words written but not yet read by the
// processor (`consume` pulses). `words_avail` lets the processor wait for
// data, and `overflow` (sticky) records the memory overflow condition: a
// word written while M words were still unprocessed, which overwrites one
// of them. Both are this design's additions for observing that condition.
// `clear` (system domain, the start of a session) returns pointer, count
// and flag to zero; the tester-side chunk counter is cleared by reset only.
//
// Timing: a word reaches memory 2 to 3 system clocks after the tck edge
// that took its last chunk, and `fill` counts it from that write on. The
// held word must stay stable until then, so the next word may complete no
// sooner than 4 system clocks later: W/NCH tester cycles must last longer
// than 4 system clock periods.
module mem_io_ctrl #(
  parameter int W         = 32,
  parameter int NCH       = 8,
  parameter int M         = 16,
  parameter int REPL_BASE = 0,
  parameter int AW        = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  // tester clock domain
  input  logic                   tck,
  input  logic                   tst_valid,
  input  logic [NCH-1:0]         tst_data,
  // system clock domain
  input  logic                   consume,
  output logic                   mem_we,
  output logic [AW-1:0]          mem_addr,
  output logic [W-1:0]           mem_wdata,
  output logic                   words_avail,
  output logic [$clog2(M+1)-1:0] fill,
  output logic                   overflow
);

  localparam int CHUNKS = W / NCH;
  localparam int CCW    = (CHUNKS > 1) ? $clog2(CHUNKS) : 1;
  localparam int PW     = (M > 1) ? $clog2(M) : 1;
  localparam int FW     = $clog2(M + 1);
  localparam int HW     = (CHUNKS > 1) ? W - NCH : 1;  // bits held between chunks

  // ---------------- tester clock domain
  logic [HW-1:0]  word;      // chunks of the word taken so far
  logic [CCW-1:0] chunk;     // chunks taken so far
  logic [W-1:0]   next_word;
  logic [W-1:0]   held;      // last complete word
  logic           req_t;     // toggles once per complete word

  wire last_chunk = tst_valid && (chunk == CCW'(CHUNKS - 1));

  always_comb begin
    if (CHUNKS > 1) next_word = W'({word, tst_data});
    else            next_word = W'(tst_data);
  end

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) begin
      word  <= '0;
      chunk <= '0;
      held  <= '0;
      req_t <= 1'b0;
    end else if (tst_valid) begin
      word  <= next_word[HW-1:0];
      chunk <= last_chunk ? '0 : chunk + 1'b1;
      if (last_chunk) begin
        held  <= next_word;
        req_t <= ~req_t;
      end
    end
  end

  // ---------------- system clock domain
  logic req_s1, req_s2, req_s3;
  logic [PW-1:0] wr_ptr;   // next slot in the reserved area

  wire new_word = req_s2 ^ req_s3;
  wire full     = (fill == FW'(M));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_s1   <= 1'b0;
      req_s2   <= 1'b0;
      req_s3   <= 1'b0;
      wr_ptr   <= '0;
      fill     <= '0;
      overflow <= 1'b0;
    end else begin
      req_s1 <= req_t;
      req_s2 <= req_s1;
      req_s3 <= req_s2;
      if (clear) begin
        wr_ptr   <= '0;
        fill     <= '0;
        overflow <= 1'b0;
      end else begin
        if (new_word) begin
          wr_ptr <= (wr_ptr == PW'(M - 1)) ? '0 : wr_ptr + 1'b1;
          // a new word with all M slots unprocessed overwrites one of them
          if (full && !consume) overflow <= 1'b1;
        end
        case ({new_word && !(full && !consume), consume && fill != '0})
          2'b10:   fill <= fill + 1'b1;
          2'b01:   fill <= fill - 1'b1;
          default: ;
        endcase
      end
    end
  end

  assign mem_we      = new_word && !clear;
  assign mem_addr    = AW'(REPL_BASE) + AW'(wr_ptr);
  assign mem_wdata   = held;
  assign words_avail = (fill != '0);

  initial assert (W % NCH == 0) else $error("mem_io_ctrl: W must be a multiple of NCH");

  a_no_consume_when_empty : assert property (@(posedge clk) disable iff (!rst_n)
    consume |-> fill != '0);

endmodule
