// decomp_ctrl -- hardwired form of the test-data decompression program.
//
// In the architecture an embedded processor runs a short loop; this
// controller performs the same loop with the same memory traffic, so the
// rest of the test logic can be built and checked without a processor
// model. Each iteration reads the next replacement word from the reserved
// area (REPL_BASE + index, index cycling modulo M) and writes its new
// block pattern into the current-block area at BLK_BASE + block number.
// When the word's last flag is set the vector is complete: blocks 0..N-1
// are read back one at a time and block i is loaded into serializer
// (i mod K), first waiting for that serializer if it is still shifting.
// Once every serializer is idle the controller pulses `capture` (the
// system clock to the cores) and returns to reading words. The loop ends
// when `end_of_test` is high and no unprocessed word is left.
//
// The loop, the word fields, the block-to-serializer mapping and the
// wait for a busy serializer follow the architecture description, as does
// u, the number of cycles spent on one replacement word, which depends on
// the processor's instruction set: U_CYCLES sets it (at least 2, the
// read and the block write; every further cycle is a stall between them,
// while the word's data waits on the memory port). The other cycle costs
// (2 cycles per block download), waiting on `words_avail` when the tester
// is behind, the end-of-test input and the capture timing are this
// design's choices.
//
// Interface: memory port with registered read (data one cycle after
// mem_en, held until the next read); `consume` pulses in the cycle the
// replacement word is decoded, U_CYCLES-1 cycles after its read;
// ser_load is one-hot and ser_data is a bus shared by all serializers.
// Counters report applied vectors, cycles spent waiting for a busy
// serializer and cycles spent waiting for the tester.
module decomp_ctrl
  import tdc_pkg::*;
#(
  parameter int W         = 32,
  parameter int N_BLK     = 8,
  parameter int K         = 4,
  parameter int M         = 16,
  parameter int REPL_BASE = 0,
  parameter int BLK_BASE  = 32,
  parameter int AW        = 6,
  parameter int U_CYCLES  = 2,
  localparam int B        = block_bits(W, N_BLK),
  localparam int NB       = blk_num_bits(N_BLK)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          end_of_test,
  // tester-side status
  input  logic          words_avail,
  output logic          consume,
  // on-chip memory, processor port
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [W-1:0]  mem_wdata,
  input  logic [W-1:0]  mem_rdata,
  // serializers
  input  logic [K-1:0]  ser_busy,
  output logic [K-1:0]  ser_load,
  output logic [B-1:0]  ser_data,
  // cores under test
  output logic          capture,
  // status
  output logic          busy,
  output logic          done,
  output logic [31:0]   vec_count,
  output logic [31:0]   ser_wait_cycles,
  output logic [31:0]   starve_cycles
);

  localparam int PW = (M > 1) ? $clog2(M) : 1;
  localparam int IW = $clog2(N_BLK);
  localparam int SW = (K > 1) ? $clog2(K) : 1;
  localparam int UW = (U_CYCLES > 2) ? $clog2(U_CYCLES) : 1;

  dc_state_e     state;
  logic [PW-1:0] rd_idx;   // mem_index of the program
  logic [IW-1:0] blk_i;    // block being downloaded
  logic [SW-1:0] ser_i;    // i mod K
  logic [UW-1:0] stall;    // stall cycles left for this word

  // fields of the replacement word arriving from memory
  logic          f_last;
  logic [NB-1:0] f_blk;
  logic [B-1:0]  f_pat;
  assign {f_last, f_blk, f_pat} = mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= DC_IDLE;
      rd_idx          <= '0;
      blk_i           <= '0;
      ser_i           <= '0;
      stall           <= '0;
      vec_count       <= '0;
      ser_wait_cycles <= '0;
      starve_cycles   <= '0;
    end else begin
      unique case (state)
        DC_IDLE: if (start) begin
          state           <= DC_FETCH;
          rd_idx          <= '0;
          vec_count       <= '0;
          ser_wait_cycles <= '0;
          starve_cycles   <= '0;
        end
        DC_FETCH: begin
          if (words_avail) begin
            if (U_CYCLES > 2) begin
              state <= DC_STALL;
              stall <= UW'(U_CYCLES - 3);
            end else begin
              state <= DC_DECODE;
            end
          end
          else if (end_of_test) state <= DC_DONE;
          else                  starve_cycles <= starve_cycles + 1;
        end
        DC_STALL: begin
          if (stall == '0) state <= DC_DECODE;
          else             stall <= stall - 1'b1;
        end
        DC_DECODE: begin
          rd_idx <= (rd_idx == PW'(M - 1)) ? '0 : rd_idx + 1'b1;
          if (f_last) begin
            state <= DC_APPLY_RD;
            blk_i <= '0;
            ser_i <= '0;
          end else begin
            state <= DC_FETCH;
          end
        end
        DC_APPLY_RD: begin
          if (!ser_busy[ser_i]) state <= DC_APPLY_LD;
          else                  ser_wait_cycles <= ser_wait_cycles + 1;
        end
        DC_APPLY_LD: begin
          ser_i <= (ser_i == SW'(K - 1)) ? '0 : ser_i + 1'b1;
          if (blk_i == IW'(N_BLK - 1)) begin
            state <= DC_DRAIN;
          end else begin
            blk_i <= blk_i + 1'b1;
            state <= DC_APPLY_RD;
          end
        end
        DC_DRAIN:   if (ser_busy == '0) state <= DC_CAPTURE;
        DC_CAPTURE: begin
          vec_count <= vec_count + 1;
          state     <= DC_FETCH;
        end
        DC_DONE:    if (start) begin
          state           <= DC_FETCH;
          rd_idx          <= '0;
          vec_count       <= '0;
          ser_wait_cycles <= '0;
          starve_cycles   <= '0;
        end
        default:    state <= DC_IDLE;
      endcase
    end
  end

  // memory port and outputs
  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    consume   = 1'b0;
    ser_load  = '0;
    ser_data  = mem_rdata[B-1:0];
    unique case (state)
      DC_FETCH: if (words_avail) begin
        mem_en   = 1'b1;
        mem_addr = AW'(REPL_BASE) + AW'(rd_idx);
      end
      DC_DECODE: begin
        consume   = 1'b1;
        mem_en    = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = AW'(BLK_BASE) + AW'(f_blk);
        mem_wdata = W'(f_pat);
      end
      DC_APPLY_RD: if (!ser_busy[ser_i]) begin
        mem_en   = 1'b1;
        mem_addr = AW'(BLK_BASE) + AW'(blk_i);
      end
      DC_APPLY_LD: ser_load[ser_i] = 1'b1;
      default: ;
    endcase
  end

  assign capture = (state == DC_CAPTURE);
  assign busy    = (state != DC_IDLE) && (state != DC_DONE);
  assign done    = (state == DC_DONE);

  initial begin
    assert (U_CYCLES >= 2) else $error("decomp_ctrl: U_CYCLES must be at least 2");
    assert (N_BLK >= 2) else $error("decomp_ctrl: N_BLK must be at least 2");
    assert (K <= N_BLK) else $error("decomp_ctrl: K must not exceed N_BLK");
    assert (BLK_BASE + N_BLK <= 2**AW) else $error("decomp_ctrl: block area outside memory");
    assert (REPL_BASE + M <= 2**AW) else $error("decomp_ctrl: word area outside memory");
  end

  a_block_number_in_range : assert property (@(posedge clk) disable iff (!rst_n)
    state == DC_DECODE |-> int'(f_blk) < N_BLK);

endmodule
