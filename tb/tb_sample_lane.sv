// tb_sample_lane: drives one sampling lane against a DRAM model with random
// stalls. It first runs the worked example chunk (nodes 0..2, offsets 6, 11,
// 13, 15), then several hundred jobs on random chunks with degrees below,
// equal to and above the fanout, fanouts 0..25 and targets outside the
// chunk. Every result word is compared with a reference computed here
// (copy + dummy padding, or selection sampling driven by a reference
// xorshift32 stream), and the number of result writes per job is checked.
module tb_sample_lane;
  import sampler_pkg::*;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned MAXF   = 25;
  localparam int unsigned FAN_W  = $clog2(MAXF + 1);

  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] chunk_base = '0, res_base = '0, job_base = '0;
  word_t src = '0, cnt = '0, seed = '0;
  logic [FAN_W-1:0] fanout = '0;
  logic seed_load = 0, start = 0, busy;
  lane_job_t job = '0;
  logic [0:0] rd_valid, rd_ready, rd_rvalid;
  logic [ADDR_W-1:0] rd_addr [1];
  word_t rd_rdata [1];
  logic wr_valid, wr_ready;
  logic [ADDR_W-1:0] wr_addr;
  word_t wr_data;
  logic [ADDR_W-1:0] rd_addr_s;

  int checks = 0, failures = 0;
  int n_copy = 0, n_select = 0, n_equal = 0, n_absent = 0;

  sample_lane #(.ADDR_W(ADDR_W), .MAX_FANOUT(MAXF)) dut (
    .clk, .rst_n, .res_base, .fanout, .seed_load, .seed,
    .start, .job, .job_base, .busy,
    .rd_valid(rd_valid[0]), .rd_addr(rd_addr_s), .rd_ready(rd_ready[0]),
    .rd_rvalid(rd_rvalid[0]), .rd_rdata(rd_rdata[0]),
    .wr_valid, .wr_addr, .wr_data, .wr_ready);
  assign rd_addr[0] = rd_addr_s;

  dram_model #(.NRD(1), .ADDR_W(ADDR_W)) mem (
    .clk, .rd_valid, .rd_addr, .rd_ready, .rd_rvalid, .rd_rdata,
    .wr_valid, .wr_addr, .wr_data, .wr_ready);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----
  word_t rstate;
  word_t chunk [$];

  function automatic word_t xs(word_t s);
    s ^= s << 13; s ^= s >> 17; s ^= s << 5;
    return s;
  endfunction

  function automatic void ref_job(word_t tgt, int f, ref word_t out [$]);
    word_t rel, st, en, dg, rem, pos;
    int slot;
    out.delete();
    rel = tgt - chunk[0];
    if (rel >= chunk[1]) begin
      for (int k = 0; k < f; k++) out.push_back(DUMMY_NODE);
      return;
    end
    st = chunk[2 + rel]; en = chunk[3 + rel]; dg = en - st;
    if (dg < word_t'(f)) begin
      for (int k = 0; k < f; k++) out.push_back(k < int'(dg) ? chunk[st + k] : DUMMY_NODE);
      return;
    end
    rem = dg; pos = st; slot = 0;
    while (slot < f) begin
      logic [63:0] prod;
      prod = 64'(rstate) * 64'(rem);
      rstate = xs(rstate);
      if (prod[63:32] < word_t'(f - slot)) begin
        out.push_back(chunk[pos]);
        slot++;
      end
      pos++; rem--;
    end
  endfunction

  task automatic load_chunk(logic [ADDR_W-1:0] base);
    mem.clear();
    for (int i = 0; i < chunk.size(); i++) mem.poke(base + i, chunk[i]);
    chunk_base = base;
    src = chunk[0];
    cnt = chunk[1];
  endtask

  task automatic do_seed(word_t s);
    @(negedge clk);
    seed = s; seed_load = 1;
    @(negedge clk);
    seed_load = 0;
    rstate = (s == 0) ? 32'h2545_F491 : s;
  endtask

  task automatic run_job(word_t tgt, word_t idx, int f);
    word_t exp [$];
    longint unsigned w0;
    word_t rel;
    rel = tgt - chunk[0];
    if (rel >= chunk[1]) n_absent++;
    else if (chunk[3 + rel] - chunk[2 + rel] < word_t'(f)) n_copy++;
    else if (chunk[3 + rel] - chunk[2 + rel] == word_t'(f)) n_equal++;
    else n_select++;
    ref_job(tgt, f, exp);
    @(negedge clk);
    fanout = FAN_W'(f);
    job.target = tgt; job.index = idx; job.src = src; job.cnt = cnt;
    job_base = chunk_base; start = 1;
    w0 = mem.writes;
    @(negedge clk);
    start = 0;
    job = '0; job_base = '0;  // must have been captured
    while (busy) @(negedge clk);
    checks++;
    if (mem.writes - w0 != longint'(f)) begin
      failures++;
      $display("FAIL target %0d: %0d writes for fanout %0d", tgt, mem.writes - w0, f);
    end
    for (int k = 0; k < f; k++) begin
      word_t got;
      got = mem.peek(res_base + idx * word_t'(f) + k);
      checks++;
      if (got !== exp[k]) begin
        failures++;
        $display("FAIL target %0d slot %0d: got %0d expected %0d", tgt, k, got, exp[k]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    res_base = 32'h0010_0000;
    // worked example chunk
    chunk = '{0, 3, 6, 11, 13, 15, 1, 2, 4, 8, 9, 3, 4, 5, 6, 0};
    load_chunk(32'd100);
    do_seed(32'h0BAD_5EED);
    run_job(0, 0, 2);
    run_job(2, 1, 2);
    // the neighbours of node 2 are exactly {5, 6}
    checks++;
    if (mem.peek(res_base + 2) != 5 || mem.peek(res_base + 3) != 6) begin
      failures++; $display("FAIL example: node 2 sample is not 5, 6");
    end
    run_job(1, 2, 5);
    run_job(7, 3, 3);
    // random chunks
    for (int c = 0; c < 12; c++) begin
      int nn;
      word_t s0, off;
      word_t degs [$];
      nn = 1 + $urandom % 20;
      s0 = $urandom % 100000;
      chunk.delete();
      chunk.push_back(s0);
      chunk.push_back(nn);
      off = 2 + nn + 1;
      for (int i = 0; i <= nn; i++) begin
        chunk.push_back(off);
        if (i < nn) begin
          word_t d;
          d = ($urandom % 3 == 0) ? $urandom % 8 : $urandom % 45;
          degs.push_back(d);
          off += d;
        end
      end
      for (int i = 0; i < nn; i++)
        for (int k = 0; k < int'(degs[i]); k++) chunk.push_back(1000 + $urandom % 1000000);
      while (chunk.size() % 16 != 0) chunk.push_back(0);
      load_chunk(32'h0002_0000 + c * 32'h1000);
      do_seed($urandom);
      for (int j = 0; j < 30; j++) begin
        word_t t;
        int f;
        t = ($urandom % 8 == 0) ? s0 + nn + $urandom % 5 : s0 + $urandom % nn;
        f = (j % 5 == 0) ? int'(degs[t - s0 < nn ? t - s0 : 0]) : $urandom % (MAXF + 1);
        if (f > int'(MAXF)) f = MAXF;
        run_job(t, j, f);
      end
    end
    $display("jobs: copy+pad %0d, sample %0d, degree==fanout %0d, absent %0d; read stalls %0d, write stalls %0d",
             n_copy, n_select, n_equal, n_absent, mem.rd_stalls, mem.wr_stalls);
    checks++;
    if (n_copy == 0 || n_select == 0 || n_equal == 0 || n_absent == 0 ||
        mem.rd_stalls == 0 || mem.wr_stalls == 0) begin
      failures++; $display("FAIL some case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
