// tb_kernel_controller: runs the controller with four stand-in lanes that
// stay busy for 1 to 60 cycles per job, against a DRAM model with random
// stalls. Each call loads up to five chunks with gaps between their node
// ranges and a sorted target list that also holds nodes in the gaps, below
// the first chunk and beyond the last. It checks that every target is
// handed out exactly once with its index, with the address and header of
// the chunk that holds it (or, for a node in no chunk, a header that marks
// it absent), that no busy lane is started, that `done` comes only after
// the last lane has finished, and that chunk switches, absent targets and
// the case where all lanes are busy and a target has to wait all occur.
module tb_kernel_controller;
  import sampler_pkg::*;

  localparam int unsigned LANES = 4;
  localparam int unsigned ADDR_W = 32;
  localparam logic [ADDR_W-1:0] WORDS = 32'd256;   // fixed chunk size

  logic clk = 0, rst_n = 0, start = 0, busy, done, seed_load;
  logic [ADDR_W-1:0] chunk_base = '0, tgt_base = '0, chunk_words = '0;
  word_t tgt_count = '0, n_chunks = '0;
  logic [0:0] rd_valid, rd_ready, rd_rvalid;
  logic [ADDR_W-1:0] rd_addr [1];
  logic [ADDR_W-1:0] rd_addr_s;
  word_t rd_rdata [1];
  logic [LANES-1:0] lane_busy = '0, lane_start;
  lane_job_t job;
  logic [ADDR_W-1:0] job_base;
  logic wr_ready;

  int checks = 0, failures = 0;
  int waits_all_busy = 0, seed_loads = 0, n_absent = 0, n_switch = 0;

  kernel_controller #(.LANES(LANES), .ADDR_W(ADDR_W)) dut (
    .clk, .rst_n, .start, .chunk_base, .chunk_words, .n_chunks, .tgt_base, .tgt_count,
    .busy, .done, .seed_load,
    .rd_valid(rd_valid[0]), .rd_addr(rd_addr_s), .rd_ready(rd_ready[0]),
    .rd_rvalid(rd_rvalid[0]), .rd_rdata(rd_rdata[0]),
    .lane_busy, .lane_start, .job, .job_base);
  assign rd_addr[0] = rd_addr_s;

  dram_model #(.NRD(1), .ADDR_W(ADDR_W)) mem (
    .clk, .rd_valid, .rd_addr, .rd_ready, .rd_rvalid, .rd_rdata,
    .wr_valid(1'b0), .wr_addr('0), .wr_data('0), .wr_ready);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the call's chunks and targets
  word_t c_src [$], c_cnt [$];
  word_t targets [$];
  int    seen [int];

  // Targets read but not yet handed to a lane: a response that is not a
  // header word (the tb knows the header addresses).
  int pending = 0;
  logic [ADDR_W-1:0] last_rd_addr;
  always @(negedge clk) begin
    if (rd_valid[0] && rd_ready[0] && rd_addr[0] >= tgt_base && rd_addr[0] < tgt_base + tgt_count)
      pending++;
    if (rd_valid[0] && rd_ready[0] && rd_addr[0] != chunk_base + HDR_SRC &&
        rd_addr[0] < chunk_base + n_chunks * WORDS && (rd_addr[0] - chunk_base) % WORDS == HDR_SRC)
      n_switch++;
    if (lane_start != '0) pending--;
    if (pending > 0 && &lane_busy) waits_all_busy++;
  end

  // stand-in lanes
  int remaining [LANES];
  always @(posedge clk) begin
    if (seed_load) seed_loads++;
    for (int i = 0; i < LANES; i++) begin
      if (lane_start[i]) begin
        int c;
        checks++;
        if (lane_busy[i]) begin failures++; $display("FAIL started busy lane %0d", i); end
        checks++;
        if (job.index >= tgt_count || job.target != targets[job.index]) begin
          failures++; $display("FAIL job target %0d index %0d", job.target, job.index);
        end else begin
          seen[int'(job.index)] = seen.exists(int'(job.index)) ? seen[int'(job.index)] + 1 : 1;
        end
        c = -1;
        foreach (c_src[k]) if (job.target - c_src[k] < c_cnt[k]) c = k;
        checks++;
        if (c >= 0) begin
          if (job_base != chunk_base + c * WORDS || job.src != c_src[c] || job.cnt != c_cnt[c]) begin
            failures++; $display("FAIL target %0d handed with chunk at %0d (%0d, %0d), expected chunk %0d",
                                 job.target, job_base, job.src, job.cnt, c);
          end
        end else begin
          n_absent++;
          if (job.target - job.src < job.cnt) begin
            failures++; $display("FAIL absent target %0d handed as present", job.target);
          end
        end
        remaining[i] = 1 + $urandom % 60;
        lane_busy[i] <= 1'b1;
      end else if (lane_busy[i]) begin
        remaining[i]--;
        if (remaining[i] == 0) lane_busy[i] <= 1'b0;
      end
    end
    if (done) begin
      checks++;
      if (lane_busy != '0) begin failures++; $display("FAIL done while a lane is busy"); end
    end
  end

  task automatic call(int nch, int per);
    int loads0;
    word_t s;
    loads0 = seed_loads;
    targets.delete();
    seen.delete();
    c_src.delete();
    c_cnt.delete();
    chunk_base = 32'h0004_0000 + $urandom % 1000;
    tgt_base   = 32'h0008_0000 + $urandom % 1000;
    s = 5000;
    for (int c = 0; c < nch; c++) begin
      c_src.push_back(s);
      c_cnt.push_back(10 + $urandom % 60);
      mem.poke(chunk_base + c * WORDS + HDR_SRC, c_src[c]);
      mem.poke(chunk_base + c * WORDS + HDR_CNT, c_cnt[c]);
      s += c_cnt[c] + (($urandom % 2) ? 0 : 1 + $urandom % 20);   // optional gap
    end
    // sorted targets from 4990 up to beyond the last chunk
    begin
      word_t t;
      t = 4990;
      while (targets.size() < per) begin
        t += 1 + $urandom % 4;
        targets.push_back(t);
      end
    end
    foreach (targets[i]) mem.poke(tgt_base + i, targets[i]);
    tgt_count = per;
    n_chunks = nch;
    chunk_words = WORDS;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    checks++;
    if (seen.size() != per) begin failures++; $display("FAIL %0d of %0d targets handed out", seen.size(), per); end
    foreach (seen[k]) begin
      checks++;
      if (seen[k] != 1) begin failures++; $display("FAIL target %0d handed out %0d times", k, seen[k]); end
    end
    checks++;
    if (seed_loads != loads0 + 1) begin failures++; $display("FAIL seed not loaded once"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    call(1, 1);
    call(1, 40);
    call(2, 0);
    call(5, 150);
    call(0, 10);
    call(3, 120);
    $display("targets waited for a free lane in %0d cycles; %0d chunk switches; %0d absent targets; read stalls %0d",
             waits_all_busy, n_switch, n_absent, mem.rd_stalls);
    checks++;
    if (waits_all_busy == 0 || n_switch == 0 || n_absent == 0) begin
      failures++; $display("FAIL a case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
