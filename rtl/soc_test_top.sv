// soc_test_top -- deterministic scan test of an SOC using its processor
// and on-chip memory to decompress the test data.
//
// The tester streams compressed test data, a sequence of replacement
// words, through the memory I/O controller into a reserved area of the
// on-chip memory. The decompression controller (standing in for the
// processor's program) rebuilds each test vector in the current-block
// area of the same memory by replacing only the blocks that differ from
// the previous vector, then deals the N blocks round-robin to K
// serializers. Each serializer shifts its block into its scan chain at
// one bit per system clock, so scan shifting runs at speed however slow
// the tester is. After the whole vector is in, the cores' response is
// captured into the chains and shifted out into the MISR while the next
// vector shifts in.
//
// The block structure, the replacement-word format, the memory areas, the
// serializer-per-chain organisation and the MISR follow the architecture
// description; widths other than W and N, the memory map, the tester
// handshake and the overflow flag are this design's choices (see the
// submodules). U_CYCLES is u, the controller's cycles per replacement
// word, which the architecture leaves to the processor's instruction set. The cores under test are outside: chain_q drives their
// inputs and cut_resp returns their outputs, chain j using the low L_j
// bits, L_j = (blocks dealt to chain j) * b.
//
// Timing: everything runs on the system clock `clk` except the tester
// interface (tck, tst_valid, tst_data), which the memory I/O controller
// brings across into the clk domain; W/NCH tester cycles must be longer
// than 4 system clocks. A session starts with a `start` pulse after
// reset, and `done` rises once `end_of_test` is high and every word has
// been processed. Status outputs: `fill` (unprocessed words in memory),
// `overflow` (a word was overwritten before it was processed),
// `ser_wait_cycles` (cycles the controller waited for a busy serializer)
// and `starve_cycles` (cycles it waited for the tester).
module soc_test_top
  import tdc_pkg::*;
#(
  parameter int               W         = 32,
  parameter int               N_BLK     = 8,
  parameter int               K         = 4,
  parameter int               M         = 16,
  parameter int               NCH       = 8,
  parameter int               DEPTH     = 64,
  parameter int               REPL_BASE = 0,
  parameter int               BLK_BASE  = 32,
  parameter int               U_CYCLES  = 2,
  parameter int               MISR_W    = 16,
  parameter logic [MISR_W-1:0] MISR_POLY = 16'h6801,
  localparam int              B         = block_bits(W, N_BLK),
  localparam int              LMAX      = blocks_in_chain(0, N_BLK, K) * B,
  localparam int              AW        = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      end_of_test,
  input  logic                      tck,
  input  logic                      tst_valid,
  input  logic [NCH-1:0]            tst_data,
  input  logic [K-1:0][LMAX-1:0]    cut_resp,
  output logic [K-1:0][LMAX-1:0]    chain_q,
  output logic [K-1:0]              scan_shift,
  output logic                      capture,
  output logic [MISR_W-1:0]         signature,
  output logic                      overflow,
  output logic                      done,
  output logic                      busy,
  output logic [31:0]               vec_count,
  output logic [$clog2(M+1)-1:0]    fill,
  output logic [31:0]               ser_wait_cycles,
  output logic [31:0]               starve_cycles
);

  // memory I/O controller -> memory
  logic          a_we;
  logic [AW-1:0] a_addr;
  logic [W-1:0]  a_wdata;
  logic          words_avail, consume;

  // controller <-> memory
  logic          b_en, b_we;
  logic [AW-1:0] b_addr;
  logic [W-1:0]  b_wdata, b_rdata;

  // controller <-> serializers
  logic [K-1:0]  ser_busy, ser_load, ser_so;
  logic [B-1:0]  ser_data;
  logic [K-1:0]  chain_so;


  mem_io_ctrl #(
    .W(W), .NCH(NCH), .M(M), .REPL_BASE(REPL_BASE), .AW(AW)
  ) u_mio (
    .clk, .rst_n, .clear(start), .tck, .tst_valid, .tst_data, .consume,
    .mem_we(a_we), .mem_addr(a_addr), .mem_wdata(a_wdata),
    .words_avail, .fill, .overflow
  );

  onchip_mem #(.W(W), .DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk,
    .a_we, .a_addr, .a_wdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  decomp_ctrl #(
    .W(W), .N_BLK(N_BLK), .K(K), .M(M),
    .REPL_BASE(REPL_BASE), .BLK_BASE(BLK_BASE), .AW(AW),
    .U_CYCLES(U_CYCLES)
  ) u_ctrl (
    .clk, .rst_n, .start, .end_of_test,
    .words_avail, .consume,
    .mem_en(b_en), .mem_we(b_we), .mem_addr(b_addr), .mem_wdata(b_wdata), .mem_rdata(b_rdata),
    .ser_busy, .ser_load, .ser_data,
    .capture,
    .busy, .done, .vec_count, .ser_wait_cycles, .starve_cycles
  );

  for (genvar j = 0; j < K; j++) begin : g_chain
    localparam int LJ = blocks_in_chain(j, N_BLK, K) * B;
    logic [LJ-1:0] q;

    serializer #(.B(B)) u_ser (
      .clk, .rst_n, .load(ser_load[j]), .din(ser_data),
      .busy(ser_busy[j]), .so(ser_so[j]), .shift_en(scan_shift[j])
    );

    scan_chain #(.LEN(LJ)) u_chain (
      .clk, .rst_n, .shift_en(scan_shift[j]), .si(ser_so[j]),
      .capture, .resp(cut_resp[j][LJ-1:0]), .q, .so(chain_so[j])
    );

    assign chain_q[j] = LMAX'(q);
  end

  // A chain that is not shifting contributes 0.
  misr #(.WIDTH(MISR_W), .NIN(K), .POLY(MISR_POLY)) u_misr (
    .clk, .rst_n, .clear(start), .en(|scan_shift),
    .d(chain_so & scan_shift), .sig(signature)
  );

  initial assert (BLK_BASE >= REPL_BASE + M || BLK_BASE + N_BLK <= REPL_BASE)
    else $error("soc_test_top: word area and block area overlap");

endmodule
