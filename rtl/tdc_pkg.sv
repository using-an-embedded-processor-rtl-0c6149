// tdc_pkg -- shared definitions of the processor-driven test data
// decompression architecture.
//
// A replacement word of W bits holds, from the most significant bit down,
// a one-bit last flag, a clog2(N)-bit block number and a b-bit new block
// pattern, with 1 + clog2(N) + b = W. A test vector of N blocks is spread
// over K scan chains: block i goes to chain (i mod K), so chain j holds
// blocks j, j+K, j+2K, ... The field order inside the word and the
// controller's state encoding are this design's choices.
package tdc_pkg;

  // Width of the block-number field.
  function automatic int blk_num_bits(int n_blk);
    return $clog2(n_blk);
  endfunction

  // Block size b from 1 + ceil(log2 N) + b = W.
  function automatic int block_bits(int w, int n_blk);
    return w - 1 - $clog2(n_blk);
  endfunction

  // Number of blocks that chain j receives when N blocks are dealt
  // round-robin over K chains.
  function automatic int blocks_in_chain(int j, int n_blk, int k);
    return (n_blk - j + k - 1) / k;
  endfunction

  // States of the decompression controller.
  typedef enum logic [3:0] {
    DC_IDLE,      // waiting for start
    DC_FETCH,     // read next replacement word (or wait for one)
    DC_STALL,     // extra cycles per word, modelling a slower processor
    DC_DECODE,    // word arrives: write new block pattern
    DC_APPLY_RD,  // wait for serializer (i mod K), read block i
    DC_APPLY_LD,  // block i arrives: load and start serializer
    DC_DRAIN,     // wait until every serializer is idle
    DC_CAPTURE,   // one system clock to the cores
    DC_DONE       // end of test
  } dc_state_e;

endpackage
