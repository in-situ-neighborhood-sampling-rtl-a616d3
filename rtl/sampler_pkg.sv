// sampler_pkg: types and constants shared by the epoch-wide neighbourhood
// sampling kernel.
//
// Graph data is handled as 32-bit words: node IDs, the chunk header fields
// (src, cnt, offsets) and sampled neighbours are all one word each, and all
// memory addresses are word addresses into the FPGA DRAM. The chunk layout
// (src, cnt, cnt+1 offsets, neighbour lists, zero padding) follows the
// chunk format of the design; the dummy value that fills unused result
// slots is this design's own choice (all ones, never a valid node ID in the
// evaluated graphs, which have fewer than 2^31 vertices).
package sampler_pkg;

  localparam int unsigned WORD_W = 32;
  typedef logic [WORD_W-1:0] word_t;

  // Value written to result slots that have no neighbour to hold.
  localparam word_t DUMMY_NODE = '1;

  // Word positions inside a chunk header.
  localparam int unsigned HDR_SRC  = 0;  // ID of the first node in the chunk
  localparam int unsigned HDR_CNT  = 1;  // number of nodes in the chunk
  localparam int unsigned HDR_OFFS = 2;  // first of cnt+1 neighbourhood offsets

  // Work item handed from the controller to a sampling lane. The chunk
  // header travels with the job so that the controller can move on to the
  // next chunk while lanes still work on the previous one.
  typedef struct packed {
    word_t target;  // target node ID
    word_t index;   // position of the target in the target array
    word_t src;     // first node ID of the target's chunk
    word_t cnt;     // number of nodes in that chunk
  } lane_job_t;

endpackage
