// sample_lane: samples the neighbourhood of one target node in a chunk.
//
// The job names the target, its index in the target array, and the chunk
// that holds it: the chunk's word address in FPGA DRAM (`job_base`) and
// its header words src and cnt. The chunk has the
// layout src, cnt, offsets[0..cnt], neighbour words, padding; offsets are
// word positions counted from the start of the chunk, so node src+i owns
// the neighbour words at positions [offsets[i], offsets[i+1]). For a job
// (target ID, index in the target array) the lane
//   1. reads offsets[target-src] and offsets[target-src+1] (the
//      neighbourhood boundaries; degree = end - start),
//   2. if degree < fanout: copies every neighbour into the result slots and
//      fills the remaining slots with DUMMY_NODE,
//   3. otherwise: draws a uniform sample of `fanout` distinct neighbours.
// The copy/pad versus sample rule is the design's. How the uniform sample
// is drawn is this design's choice: selection sampling (Knuth's Algorithm
// S) walks the neighbour list once, keeping position j with probability
// needed/remaining, decided as (rand * remaining) >> 32 < needed with a
// 32-bit xorshift value. It needs no memory of what was already picked,
// yields distinct neighbours in list order, and only reads the neighbours
// it keeps. A target outside its chunk (target-src >= cnt) gets fanout
// dummies, also this design's choice.
//
// Results for the job go to words res_base + index*fanout + k, k < fanout.
//
// Interfaces: one read port (rd_valid/rd_ready request, in-order rd_rvalid
// response, one read outstanding) and one write port (wr_valid/wr_ready).
// `start` is taken only while `busy` is low; `busy` rises on the next
// clock edge and falls once the last result word has been accepted.
// Timing per job: 2 boundary reads, then one cycle per neighbour examined
// plus one read, one write and one decision cycle per result word.
module sample_lane
  import sampler_pkg::*;
#(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned MAX_FANOUT = 25,
  parameter int unsigned FAN_W      = $clog2(MAX_FANOUT + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // kernel arguments, stable while a run is active
  input  logic [ADDR_W-1:0] res_base,
  input  logic [FAN_W-1:0]  fanout,
  input  logic              seed_load,
  input  word_t             seed,
  // job hand-over
  input  logic              start,
  input  lane_job_t         job,       // target, index and its chunk's src, cnt
  input  logic [ADDR_W-1:0] job_base,  // word address of the target's chunk
  output logic              busy,
  // read port into FPGA DRAM
  output logic              rd_valid,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_ready,
  input  logic              rd_rvalid,
  input  word_t             rd_rdata,
  // write port towards the result buffer
  output logic              wr_valid,
  output logic [ADDR_W-1:0] wr_addr,
  output word_t             wr_data,
  input  logic              wr_ready
);

  typedef enum logic [2:0] {
    S_IDLE, S_BND_REQ, S_BND_WAIT, S_NEXT, S_SEL, S_NB_REQ, S_NB_WAIT, S_WR
  } state_t;

  typedef enum logic [1:0] {M_COPY, M_SELECT, M_PAD} mode_t;

  state_t            state;
  mode_t             mode;
  logic              bnd_hi;     // 0: reading start boundary, 1: end boundary
  logic [ADDR_W-1:0] chunk_base;  // chunk of the current job
  word_t             bnd_start;
  word_t             pos;        // chunk position of the next neighbour
  word_t             deg;
  word_t             remaining;  // neighbours not yet examined (select mode)
  logic [FAN_W-1:0]  slot;       // result words written so far
  logic [ADDR_W-1:0] res_addr;   // address of result slot 0
  word_t             data_q;

  word_t             rnd;
  logic              rng_step;
  word_t             scaled;     // (rnd * remaining) >> 32
  word_t             needed;
  logic              take;

  lane_rng u_rng (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (seed_load),
    .seed  (seed),
    .step  (rng_step),
    .value (rnd)
  );

  // Selection-sampling decision: keep this neighbour with probability
  // needed / remaining.
  always_comb begin
    needed   = word_t'(fanout) - word_t'(slot);
    scaled   = WORD_W'(({{WORD_W{1'b0}}, rnd} * {{WORD_W{1'b0}}, remaining}) >> WORD_W);
    take     = scaled < needed;
    rng_step = (state == S_SEL);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mode      <= M_PAD;
      bnd_hi    <= 1'b0;
      chunk_base <= '0;
      bnd_start <= '0;
      pos       <= '0;
      deg       <= '0;
      remaining <= '0;
      slot      <= '0;
      res_addr  <= '0;
      data_q    <= '0;
      rd_addr   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          res_addr <= res_base + ADDR_W'(job.index * word_t'(fanout));
          slot       <= '0;
          bnd_hi     <= 1'b0;
          chunk_base <= job_base;
          if (job.target - job.src >= job.cnt) begin
            mode  <= M_PAD;
            state <= S_NEXT;
          end else begin
            rd_addr <= job_base + ADDR_W'(HDR_OFFS) + ADDR_W'(job.target - job.src);
            state   <= S_BND_REQ;
          end
        end

        S_BND_REQ: if (rd_ready) state <= S_BND_WAIT;

        S_BND_WAIT: if (rd_rvalid) begin
          if (!bnd_hi) begin
            bnd_start <= rd_rdata;
            bnd_hi    <= 1'b1;
            rd_addr   <= rd_addr + ADDR_W'(1);
            state     <= S_BND_REQ;
          end else begin
            deg       <= rd_rdata - bnd_start;
            remaining <= rd_rdata - bnd_start;
            pos       <= bnd_start;
            mode      <= (rd_rdata - bnd_start < word_t'(fanout)) ? M_COPY : M_SELECT;
            state     <= S_NEXT;
          end
        end

        S_NEXT: begin
          if (slot == fanout) begin
            state <= S_IDLE;
          end else begin
            unique case (mode)
              M_COPY: begin
                if (word_t'(slot) < deg) begin
                  rd_addr <= chunk_base + ADDR_W'(pos);
                  pos     <= pos + 1'b1;
                  state   <= S_NB_REQ;
                end else begin
                  mode   <= M_PAD;
                  data_q <= DUMMY_NODE;
                  state  <= S_WR;
                end
              end
              M_SELECT: state <= S_SEL;
              default: begin
                data_q <= DUMMY_NODE;
                state  <= S_WR;
              end
            endcase
          end
        end

        S_SEL: begin
          pos       <= pos + 1'b1;
          remaining <= remaining - 1'b1;
          if (take) begin
            rd_addr <= chunk_base + ADDR_W'(pos);
            state   <= S_NB_REQ;
          end
        end

        S_NB_REQ: if (rd_ready) state <= S_NB_WAIT;

        S_NB_WAIT: if (rd_rvalid) begin
          data_q <= rd_rdata;
          state  <= S_WR;
        end

        S_WR: if (wr_ready) begin
          slot  <= slot + 1'b1;
          state <= S_NEXT;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign rd_valid = (state == S_BND_REQ) || (state == S_NB_REQ);
  assign wr_valid = (state == S_WR);
  assign wr_addr  = res_addr + ADDR_W'(slot);
  assign wr_data  = data_q;

  // Handshake rules: a pending request holds its address until accepted.
  property p_rd_stable;
    @(posedge clk) disable iff (!rst_n)
      rd_valid && !rd_ready |=> rd_valid && $stable(rd_addr);
  endproperty
  property p_wr_stable;
    @(posedge clk) disable iff (!rst_n)
      wr_valid && !wr_ready |=> wr_valid && $stable(wr_addr) && $stable(wr_data);
  endproperty
  a_rd_stable: assert property (p_rd_stable);
  a_wr_stable: assert property (p_wr_stable);
  // Selection sampling never runs out of neighbours before the sample is full.
  a_sel_enough: assert property (@(posedge clk) disable iff (!rst_n)
                                 state == S_SEL |-> remaining >= needed && remaining != 0);

endmodule
