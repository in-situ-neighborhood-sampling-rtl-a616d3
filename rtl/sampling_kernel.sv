// sampling_kernel: epoch-wide in-situ neighbourhood sampling kernel.
//
// One call samples one layer of an epoch: for every node of a sorted target
// list it draws up to `fanout` neighbours out of the graph chunks loaded
// into the input buffer, and writes them to the result buffer. All three
// areas are regions of the FPGA's DRAM, given as word addresses:
//   chunk_base   n_chunks fixed-size chunks, chunk c at chunk_base +
//                c*chunk_words, in ascending node-ID order; each chunk is
//                src, cnt, offsets[0..cnt], neighbours, padding
//   tgt_base     tgt_count sorted target node IDs
//   res_base     result buffer; target i owns words i*fanout .. i*fanout+fanout-1
// A result slot that has no neighbour holds DUMMY_NODE (all ones), and so
// does every slot of a target that lies in no loaded chunk. There is no
// host involvement between mini-batches or between chunks.
//
// Structure: a kernel_controller walks chunks and targets together and hands
// each target, with its chunk's address and header, to one of LANES
// sample_lane units that sample independent targets in parallel (the
// design's unrolling factor of 32); a result_arbiter merges
// their result writes onto one write port. The lane count, the maximum
// fanout (25, the largest of the evaluated fanouts) and the chunk format
// follow the design; memory port style and address width are this
// design's own choices.
//
// Interface: the arguments are captured on `start` (taken while `busy` is
// low); `done` pulses once all results are written; `lane_busy` shows
// which lanes are working, for status and monitoring. Read ports are
// rd_*[0] for the controller and rd_*[1+i] for lane i, each a valid/ready
// request with an in-order rvalid response and at most one read in
// flight. The write port is valid/ready, one word per accepted cycle.
module sampling_kernel
  import sampler_pkg::*;
#(
  parameter int unsigned LANES      = 32,
  parameter int unsigned MAX_FANOUT = 25,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned FAN_W      = $clog2(MAX_FANOUT + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // kernel call
  input  logic              start,
  input  logic [ADDR_W-1:0] chunk_base,
  input  logic [ADDR_W-1:0] chunk_words,
  input  word_t             n_chunks,
  input  logic [ADDR_W-1:0] tgt_base,
  input  word_t             tgt_count,
  input  logic [ADDR_W-1:0] res_base,
  input  logic [FAN_W-1:0]  fanout,
  input  word_t             seed,
  output logic              busy,
  output logic              done,
  output logic [LANES-1:0]  lane_busy,   // status: lane i is sampling a target
  // read ports into FPGA DRAM: [0] controller, [1+i] lane i
  output logic [LANES:0]    rd_valid,
  output logic [ADDR_W-1:0] rd_addr  [LANES+1],
  input  logic [LANES:0]    rd_ready,
  input  logic [LANES:0]    rd_rvalid,
  input  word_t             rd_rdata [LANES+1],
  // write port into the result buffer
  output logic              wr_valid,
  output logic [ADDR_W-1:0] wr_addr,
  output word_t             wr_data,
  input  logic              wr_ready
);

  localparam word_t SEED_STRIDE = 32'h9E37_79B9;

  // Arguments held for the whole call.
  logic [ADDR_W-1:0] res_base_q;
  word_t             seed_q;
  logic [FAN_W-1:0]  fanout_q;
  logic              ctrl_start;

  assign ctrl_start = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_base_q   <= '0;
      seed_q       <= '0;
      fanout_q     <= '0;
    end else if (ctrl_start) begin
      res_base_q   <= res_base;
      seed_q       <= seed;
      fanout_q     <= (fanout > FAN_W'(MAX_FANOUT)) ? FAN_W'(MAX_FANOUT) : fanout;
    end
  end

  logic             seed_load;
  logic [ADDR_W-1:0] job_base;
  logic [LANES-1:0] lane_start;
  lane_job_t        job;

  kernel_controller #(
    .LANES  (LANES),
    .ADDR_W (ADDR_W)
  ) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (ctrl_start),
    .chunk_base (chunk_base),
    .chunk_words(chunk_words),
    .n_chunks   (n_chunks),
    .tgt_base   (tgt_base),
    .tgt_count  (tgt_count),
    .busy       (busy),
    .done       (done),
    .seed_load  (seed_load),
    .rd_valid   (rd_valid[0]),
    .rd_addr    (rd_addr[0]),
    .rd_ready   (rd_ready[0]),
    .rd_rvalid  (rd_rvalid[0]),
    .rd_rdata   (rd_rdata[0]),
    .lane_busy  (lane_busy),
    .lane_start (lane_start),
    .job        (job),
    .job_base   (job_base)
  );

  logic [LANES-1:0]  lw_valid, lw_ready;
  logic [ADDR_W-1:0] lw_addr [LANES];
  word_t             lw_data [LANES];

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    sample_lane #(
      .ADDR_W     (ADDR_W),
      .MAX_FANOUT (MAX_FANOUT),
      .FAN_W      (FAN_W)
    ) u_lane (
      .clk        (clk),
      .rst_n      (rst_n),
      .res_base   (res_base_q),
      .fanout     (fanout_q),
      .seed_load  (seed_load),
      .seed       (seed_q ^ (SEED_STRIDE * word_t'(i + 1))),
      .start      (lane_start[i]),
      .job        (job),
      .job_base   (job_base),
      .busy       (lane_busy[i]),
      .rd_valid   (rd_valid[1+i]),
      .rd_addr    (rd_addr[1+i]),
      .rd_ready   (rd_ready[1+i]),
      .rd_rvalid  (rd_rvalid[1+i]),
      .rd_rdata   (rd_rdata[1+i]),
      .wr_valid   (lw_valid[i]),
      .wr_addr    (lw_addr[i]),
      .wr_data    (lw_data[i]),
      .wr_ready   (lw_ready[i])
    );
  end

  result_arbiter #(
    .N      (LANES),
    .ADDR_W (ADDR_W)
  ) u_arb (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (lw_valid),
    .in_addr   (lw_addr),
    .in_data   (lw_data),
    .in_ready  (lw_ready),
    .out_valid (wr_valid),
    .out_addr  (wr_addr),
    .out_data  (wr_data),
    .out_ready (wr_ready)
  );

endmodule
