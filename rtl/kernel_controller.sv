// kernel_controller: runs one call of the sampling kernel, i.e. one layer
// of an epoch over the chunks loaded into the input buffer.
//
// The call names n_chunks fixed-size chunks stored back to back from
// chunk_base (chunk c at chunk_base + c*chunk_words), in ascending node-ID
// order, and tgt_count sorted target IDs at tgt_base. The controller walks
// both lists like a merge: it reads a chunk's header words src and cnt,
// then reads targets one by one; a target inside the current chunk
// (target - src < cnt) is handed, together with the chunk's base address
// and header, to the lowest-numbered idle lane. A target beyond the chunk
// makes the controller read the next chunk's header first. A target that
// lies in no loaded chunk (below the current chunk's src, or after the
// last chunk) is still handed out, and the lane fills its result slots
// with dummies. `done` pulses for one cycle once every target has been
// handed out and every lane has finished (a lane stays busy until its last
// result word is accepted). `busy` is high from the cycle after `start`
// until `done`.
//
// Sampling a whole layer with one call and iterating over the target nodes
// chunk by chunk follow the design; the merge walk, the dynamic hand-out to
// free lanes (rather than fixed groups of LANES), the one-entry job
// register and the reseeding of the lanes at every call are this design's
// choices. Read port: rd_valid/rd_ready request, in-order rd_rvalid
// response, one read outstanding. Each target costs at least four cycles
// plus the memory latency; a chunk switch adds two header reads. The call
// arguments are captured on `start`.
module kernel_controller
  import sampler_pkg::*;
#(
  parameter int unsigned LANES  = 32,
  parameter int unsigned ADDR_W = 32
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
  output logic              busy,
  output logic              done,
  output logic              seed_load,
  // read port into FPGA DRAM
  output logic              rd_valid,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_ready,
  input  logic              rd_rvalid,
  input  word_t             rd_rdata,
  // lanes
  input  logic [LANES-1:0]  lane_busy,
  output logic [LANES-1:0]  lane_start,
  output lane_job_t         job,
  output logic [ADDR_W-1:0] job_base
);

  typedef enum logic [3:0] {
    C_IDLE, C_SRC_REQ, C_SRC_WAIT, C_CNT_REQ, C_CNT_WAIT,
    C_NEXT, C_TGT_REQ, C_TGT_WAIT, C_DISPATCH, C_DRAIN, C_DONE
  } cstate_t;

  cstate_t           state;
  logic [ADDR_W-1:0] words_q, tbase_q;   // call arguments, captured at start
  word_t             nchunks_q, tcount_q;
  logic [ADDR_W-1:0] cur_base;     // base address of the current chunk
  word_t             chunk_idx;
  word_t             src, cnt;     // header of the current chunk
  word_t             fetch_idx;    // next target to read
  logic              job_valid;    // a target waits in the job register
  word_t             target;
  word_t             target_idx;
  logic [LANES-1:0]  started_q;    // lanes started last cycle (busy not yet seen)
  logic [LANES-1:0]  lane_free;
  logic              any_free;
  logic [LANES-1:0]  pick;
  logic              in_chunk, beyond, more_chunks;

  always_comb begin
    lane_free = ~(lane_busy | started_q);
    pick      = '0;
    any_free  = 1'b0;
    for (int unsigned i = 0; i < LANES; i++) begin
      if (!any_free && lane_free[i]) begin
        pick[i]  = 1'b1;
        any_free = 1'b1;
      end
    end
    lane_start = (state == C_DISPATCH) ? pick : '0;
  end

  always_comb begin
    in_chunk    = (target - src) < cnt;
    beyond      = (target >= src) && !in_chunk;
    more_chunks = (chunk_idx + 1'b1) < nchunks_q;
  end

  always_comb begin
    job.target = target;
    job.index  = target_idx;
    job.src    = src;
    job.cnt    = cnt;
    job_base   = cur_base;
  end

  always_comb begin
    rd_valid = 1'b0;
    rd_addr  = cur_base;
    unique case (state)
      C_SRC_REQ: begin rd_valid = 1'b1; rd_addr = cur_base + ADDR_W'(HDR_SRC); end
      C_CNT_REQ: begin rd_valid = 1'b1; rd_addr = cur_base + ADDR_W'(HDR_CNT); end
      C_TGT_REQ: begin rd_valid = 1'b1; rd_addr = tbase_q + ADDR_W'(fetch_idx); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      cur_base   <= '0;
      words_q    <= '0;
      nchunks_q  <= '0;
      tbase_q    <= '0;
      tcount_q   <= '0;
      chunk_idx  <= '0;
      src        <= '0;
      cnt        <= '0;
      fetch_idx  <= '0;
      job_valid  <= 1'b0;
      target     <= '0;
      target_idx <= '0;
      started_q  <= '0;
      seed_load  <= 1'b0;
    end else begin
      seed_load <= 1'b0;
      started_q <= lane_start;
      unique case (state)
        C_IDLE: if (start) begin
          seed_load <= 1'b1;
          fetch_idx <= '0;
          chunk_idx <= '0;
          job_valid <= 1'b0;
          src       <= '0;
          cnt       <= '0;
          cur_base  <= chunk_base;
          words_q   <= chunk_words;
          nchunks_q <= n_chunks;
          tbase_q   <= tgt_base;
          tcount_q  <= tgt_count;
          state     <= (n_chunks != '0) ? C_SRC_REQ : C_NEXT;
        end
        C_SRC_REQ:  if (rd_ready)  state <= C_SRC_WAIT;
        C_SRC_WAIT: if (rd_rvalid) begin src <= rd_rdata; state <= C_CNT_REQ; end
        C_CNT_REQ:  if (rd_ready)  state <= C_CNT_WAIT;
        C_CNT_WAIT: if (rd_rvalid) begin cnt <= rd_rdata; state <= C_NEXT; end
        C_NEXT: begin
          if (job_valid) begin
            if (beyond && more_chunks) begin
              chunk_idx <= chunk_idx + 1'b1;
              cur_base  <= cur_base + words_q;
              state     <= C_SRC_REQ;
            end else begin
              state <= C_DISPATCH;
            end
          end else if (fetch_idx < tcount_q) begin
            state <= C_TGT_REQ;
          end else begin
            state <= C_DRAIN;
          end
        end
        C_TGT_REQ: if (rd_ready) begin
          target_idx <= fetch_idx;
          fetch_idx  <= fetch_idx + 1'b1;
          state      <= C_TGT_WAIT;
        end
        C_TGT_WAIT: if (rd_rvalid) begin
          target    <= rd_rdata;
          job_valid <= 1'b1;
          state     <= C_NEXT;
        end
        C_DISPATCH: if (any_free) begin
          job_valid <= 1'b0;
          state     <= C_NEXT;
        end
        C_DRAIN: if (lane_busy == '0 && started_q == '0) state <= C_DONE;
        C_DONE:  state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

  assign busy = (state != C_IDLE) && (state != C_DONE);
  assign done = (state == C_DONE);

  a_one_start: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(lane_start));
  a_start_free: assert property (@(posedge clk) disable iff (!rst_n)
                                 (lane_start & (lane_busy | started_q)) == '0);

endmodule
