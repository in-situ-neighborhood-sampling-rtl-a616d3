// tb_sampling_kernel: end-to-end test of the sampling kernel at its default
// size (32 lanes, fanout up to 25) against a DRAM model with random stalls.
//
// It builds a random graph of 600 nodes and packs it into fixed-size
// (1024-word) sorted indexed chunks: header src/cnt/offsets, neighbour
// lists, zero padding. It then plays the host: for every layer it sorts and
// deduplicates the target nodes, loads the chunks that hold them back to
// back into the input buffer, writes the target array and samples the
// whole layer with one kernel call. It runs a 2-layer epoch with fanouts
// {25, 10} and a 3-layer epoch with {20, 15, 10}, the worked example chunk
// (targets 0 and 2, fanout 2), a call whose targets include nodes of a
// chunk that was not loaded, a call with fanout above 25 (clamped), and 320
// samples of one node to test that neighbours are picked uniformly and
// that the lanes work in parallel. Each result row is checked: degree <
// fanout gives every neighbour then dummies; otherwise fanout distinct
// neighbours in list order; a node in no loaded chunk gives dummies.
module tb_sampling_kernel;
  import sampler_pkg::*;

  localparam int unsigned LANES = 32;
  localparam int unsigned MAXF  = 25;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned FAN_W = $clog2(MAXF + 1);
  localparam int unsigned NODES = 600;
  localparam int unsigned CHUNK_WORDS = 1024;
  localparam logic [ADDR_W-1:0] CHUNK_AREA = 32'h0100_0000;
  localparam logic [ADDR_W-1:0] TGT_AREA   = 32'h0200_0000;
  localparam logic [ADDR_W-1:0] RES_AREA   = 32'h0300_0000;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [LANES-1:0] lane_busy;
  logic [ADDR_W-1:0] chunk_base = '0, tgt_base = '0, res_base = '0, chunk_words = '0;
  word_t tgt_count = '0, seed = '0, n_chunks = '0;
  logic [FAN_W-1:0] fanout = '0;
  logic [LANES:0] rd_valid, rd_ready, rd_rvalid;
  logic [ADDR_W-1:0] rd_addr [LANES+1];
  word_t rd_rdata [LANES+1];
  logic wr_valid, wr_ready;
  logic [ADDR_W-1:0] wr_addr;
  word_t wr_data;

  int checks = 0, failures = 0;

  sampling_kernel dut (.*);

  dram_model #(.NRD(LANES + 1), .ADDR_W(ADDR_W)) mem (
    .clk, .rd_valid, .rd_addr, .rd_ready, .rd_rvalid, .rd_rdata,
    .wr_valid, .wr_addr, .wr_data, .wr_ready);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_copy = 0, n_select = 0, n_equal = 0, n_absent = 0, n_clamp = 0, n_calls = 0;
  int n_contention = 0, n_lanes_full = 0, n_switch = 0;

  // Targets read from the target array and not yet taken by a lane; a lane
  // taking a target shows as a rising lane_busy bit.
  int pending = 0, cur_n = 0;
  logic [LANES-1:0] busy_q = '0;
  logic [ADDR_W-1:0] last_row = '1;
  bit last_acc = 0;
  int cur_f = 1;
  always @(negedge clk) begin
    if (rd_valid[0] && rd_ready[0] && rd_addr[0] >= TGT_AREA && rd_addr[0] < TGT_AREA + cur_n)
      pending++;
    if (rd_valid[0] && rd_ready[0] && rd_addr[0] > CHUNK_AREA && rd_addr[0] < TGT_AREA &&
        (rd_addr[0] - CHUNK_AREA) % CHUNK_WORDS == HDR_SRC)
      n_switch++;
    pending -= $countones(lane_busy & ~busy_q);
    busy_q = lane_busy;
    // writes of two different targets accepted in consecutive cycles: two
    // lanes competing for the write port
    if (wr_valid && wr_ready) begin
      if (last_acc && (wr_addr - RES_AREA) / cur_f != last_row) n_contention++;
      last_row = (wr_addr - RES_AREA) / cur_f;
    end
    last_acc = wr_valid && wr_ready;
    if (pending > 0 && &lane_busy) n_lanes_full++;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // ---- graph ----
  word_t adj [NODES][$];
  int    chunk_of [NODES];
  word_t image [$][$];      // chunk images as stored on the SSD
  word_t chunk_first [$];
  word_t chunk_cnt [$];

  task automatic build_graph();
    for (int v = 0; v < int'(NODES); v++) begin
      int d;
      bit used [int];
      case ($urandom % 6)
        0: d = 0;
        1: d = $urandom % 5;
        2: d = 10 + $urandom % 30;
        3: d = 25;
        4: d = 40 + $urandom % 80;
        default: d = $urandom % 25;
      endcase
      adj[v].delete();
      while (adj[v].size() < d) begin
        int u;
        u = $urandom % NODES;
        if (!used.exists(u)) begin used[u] = 1; adj[v].push_back(u); end
      end
    end
  endtask

  // Chunk layout: src, cnt, cnt+1 offsets (word positions in the chunk),
  // neighbour words, zero padding up to CHUNK_WORDS. Nodes are packed
  // greedily while the chunk still fits.
  task automatic make_chunks();
    int first;
    first = 0;
    while (first < int'(NODES)) begin
      int n, words;
      word_t img [$];
      word_t off;
      n = 0;
      words = HDR_OFFS + 1;
      while (first + n < int'(NODES) && words + 1 + adj[first + n].size() <= CHUNK_WORDS) begin
        words += 1 + adj[first + n].size();
        n++;
      end
      img.push_back(first);
      img.push_back(n);
      off = HDR_OFFS + n + 1;
      for (int i = 0; i <= n; i++) begin
        img.push_back(off);
        if (i < n) off += adj[first + i].size();
      end
      for (int i = 0; i < n; i++) begin
        chunk_of[first + i] = image.size();
        foreach (adj[first + i][k]) img.push_back(adj[first + i][k]);
      end
      while (img.size() < CHUNK_WORDS) img.push_back(0);
      image.push_back(img);
      chunk_first.push_back(first);
      chunk_cnt.push_back(n);
      first += n;
    end
  endtask

  // Load the given chunks back to back into the input buffer.
  task automatic load_chunks(int ids [$]);
    foreach (ids[j])
      for (int k = 0; k < int'(CHUNK_WORDS); k++)
        mem.poke(CHUNK_AREA + j * CHUNK_WORDS + k, image[ids[j]][k]);
  endtask

  // ---- one kernel call ----
  int last_cycles;

  task automatic kernel_call(logic [ADDR_W-1:0] cb, int nch, word_t tgts [$], int f, word_t sd);
    longint unsigned w0;
    int cyc;
    for (int i = 0; i < tgts.size(); i++) mem.poke(TGT_AREA + i, tgts[i]);
    @(negedge clk);
    chunk_base = cb; n_chunks = nch; chunk_words = CHUNK_WORDS;
    tgt_base = TGT_AREA; tgt_count = tgts.size();
    res_base = RES_AREA; fanout = FAN_W'(f); seed = sd;
    cur_n = tgts.size();
    cur_f = (f > int'(MAXF)) ? MAXF : (f == 0 ? 1 : f);
    start = 1;
    w0 = mem.writes;
    @(negedge clk);
    start = 0;
    chunk_base = '0; tgt_base = '0; res_base = '0; fanout = '0;  // must have been captured
    n_chunks = '0; chunk_words = '0; tgt_count = '0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    last_cycles = cyc;
    n_calls++;
    checks++;
    if (mem.writes - w0 != longint'(tgts.size() * ((f > int'(MAXF)) ? MAXF : f)))
      fail($sformatf("call wrote %0d words for %0d targets", mem.writes - w0, tgts.size()));
  endtask

  // Check target i's result row; returns the valid sampled nodes.
  task automatic check_row(int i, word_t tgt, int f, bit absent, ref word_t picked [$]);
    word_t row [$];
    for (int k = 0; k < f; k++) row.push_back(mem.peek(RES_AREA + i * f + k));
    checks++;
    if (absent) begin
      n_absent++;
      foreach (row[k]) if (row[k] != DUMMY_NODE) begin fail($sformatf("absent target %0d got a neighbour", tgt)); break; end
    end else if (adj[tgt].size() < f) begin
      n_copy++;
      foreach (row[k]) begin
        word_t e;
        e = (k < adj[tgt].size()) ? adj[tgt][k] : DUMMY_NODE;
        if (row[k] != e) begin fail($sformatf("target %0d slot %0d: %0d, expected %0d", tgt, k, row[k], e)); break; end
        if (e != DUMMY_NODE) picked.push_back(e);
      end
    end else begin
      int p;
      if (adj[tgt].size() == f) n_equal++; else n_select++;
      p = 0;
      foreach (row[k]) begin
        while (p < adj[tgt].size() && adj[tgt][p] != row[k]) p++;
        if (p == adj[tgt].size()) begin
          fail($sformatf("target %0d slot %0d: %0d not a later neighbour", tgt, k, row[k])); break;
        end
        picked.push_back(row[k]);
        p++;
      end
    end
  endtask

  // ---- one epoch: layer by layer, chunk by chunk ----
  task automatic run_epoch(int fans [$], int n_train);
    word_t layer [$];
    bit in_set [int];
    while (layer.size() < n_train) begin
      int v;
      v = $urandom % NODES;
      if (!in_set.exists(v)) begin in_set[v] = 1; layer.push_back(v); end
    end
    foreach (fans[l]) begin
      word_t next [$];
      bit nset [int];
      int ids [$];
      layer.sort();
      foreach (layer[i]) if (ids.size() == 0 || ids[$] != chunk_of[layer[i]]) ids.push_back(chunk_of[layer[i]]);
      load_chunks(ids);
      kernel_call(CHUNK_AREA, ids.size(), layer, fans[l], $urandom);
      foreach (layer[i]) begin
        word_t got [$];
        check_row(i, layer[i], fans[l], 0, got);
        foreach (got[k]) if (!nset.exists(int'(got[k]))) begin nset[int'(got[k])] = 1; next.push_back(got[k]); end
      end
      $display("layer %0d: %0d targets in %0d chunks, fanout %0d, %0d cycles, %0d unique sampled nodes",
               l, layer.size(), ids.size(), fans[l], last_cycles, next.size());
      layer = next;
    end
  endtask

  initial begin
    word_t tg [$];
    word_t got [$];
    int hist [int];
    int stride;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // worked example: nodes 0..2, offsets 6, 11, 13, 15
    begin
      word_t ex [16] = '{0, 3, 6, 11, 13, 15, 1, 2, 4, 8, 9, 3, 4, 5, 6, 0};
      foreach (ex[k]) mem.poke(32'h0000_1000 + k, ex[k]);
      kernel_call(32'h0000_1000, 1, '{0, 2}, 2, 32'h1234);
      checks++;
      if (mem.peek(RES_AREA + 2) != 5 || mem.peek(RES_AREA + 3) != 6) fail("example: node 2 sample is not 5, 6");
      begin
        word_t a, b;
        a = mem.peek(RES_AREA); b = mem.peek(RES_AREA + 1);
        checks++;
        if (!(a inside {1, 2, 4, 8, 9}) || !(b inside {1, 2, 4, 8, 9}) || a == b)
          fail($sformatf("example: node 0 sample %0d, %0d", a, b));
        $display("example result: %0d %0d %0d %0d", a, b, mem.peek(RES_AREA + 2), mem.peek(RES_AREA + 3));
      end
    end

    build_graph();
    make_chunks();
    $display("graph: %0d nodes in %0d chunks of %0d words", NODES, image.size(), CHUNK_WORDS);

    run_epoch('{25, 10}, 40);
    run_epoch('{20, 15, 10}, 40);

    // chunks 0 and 2 loaded; targets below, in chunk 1 (not loaded) and beyond
    begin
      int ids [$];
      ids = '{0, 2};
      tg.delete();
      tg.push_back(chunk_first[0]);
      tg.push_back(chunk_first[0] + chunk_cnt[0] - 1);
      tg.push_back(chunk_first[1]);
      tg.push_back(chunk_first[1] + 1);
      tg.push_back(chunk_first[2]);
      tg.push_back(chunk_first[3]);
      tg.push_back(NODES + 5);
      load_chunks(ids);
      kernel_call(CHUNK_AREA, ids.size(), tg, 10, 32'h77);
      foreach (tg[i]) begin
        got.delete();
        check_row(i, tg[i], 10, !(chunk_of[tg[i] < NODES ? tg[i] : 0] inside {0, 2}) || tg[i] >= NODES, got);
      end
    end

    // fanout above the maximum is clamped to 25
    begin
      int ids [$];
      ids = '{chunk_of[100]};
      tg = '{100, 101, 102, 103};
      load_chunks(ids);
      kernel_call(CHUNK_AREA, 1, tg, 31, 32'h99);
      foreach (tg[i]) begin got.delete(); check_row(i, tg[i], MAXF, chunk_of[tg[i]] != ids[0], got); end
      n_clamp++;
    end

    // uniformity and parallelism: 320 samples of fanout 10 from a node of degree 40
    begin
      int v;
      v = -1;
      for (int u = 0; u < int'(NODES) && v < 0; u++) if (adj[u].size() >= 40) v = u;
      if (v < 0) fail("no node of degree 40 or more");
      else begin
        tg.delete();
        repeat (320) tg.push_back(v);
        load_chunks('{chunk_of[v]});
        kernel_call(CHUNK_AREA, 1, tg, 10, 32'h5EED);
        foreach (tg[i]) begin
          got.delete();
          check_row(i, tg[i], 10, 0, got);
          foreach (got[k]) hist[int'(got[k])] = hist.exists(int'(got[k])) ? hist[int'(got[k])] + 1 : 1;
        end
        // chi-square test of the pick counts against a uniform choice
        begin
          real expct, chi2, dof;
          expct = 3200.0 / adj[v].size();
          chi2 = 0.0;
          foreach (adj[v][k]) begin
            real h;
            h = hist.exists(int'(adj[v][k])) ? real'(hist[int'(adj[v][k])]) : 0.0;
            chi2 += (h - expct) * (h - expct) / expct;
          end
          dof = adj[v].size() - 1;
          $display("uniformity: chi-square %0.1f with %0.0f degrees of freedom", chi2, dof);
          checks++;
          if (chi2 > dof + 5.0 * $sqrt(2.0 * dof)) fail("neighbours are not picked uniformly");
        end
        // one lane alone would examine 320 x degree neighbours, one per cycle
        checks++;
        if (last_cycles * 4 > 320 * adj[v].size())
          fail($sformatf("320 targets took %0d cycles: lanes not working in parallel", last_cycles));
        $display("320 targets of degree %0d, fanout 10: %0d cycles", adj[v].size(), last_cycles);
      end
    end

    $display("chunk switches inside a call %0d", n_switch);
    $display("calls %0d; rows: copy+pad %0d, sampled %0d, degree==fanout %0d, absent %0d, clamped calls %0d",
             n_calls, n_copy, n_select, n_equal, n_absent, n_clamp);
    $display("read stalls %0d, write stalls %0d, back-to-back writes of different targets %0d, all-lanes-busy waits %0d",
             mem.rd_stalls, mem.wr_stalls, n_contention, n_lanes_full);
    checks++;
    if (n_copy == 0 || n_select == 0 || n_equal == 0 || n_absent == 0 || n_clamp == 0 ||
        mem.rd_stalls == 0 || mem.wr_stalls == 0 || n_switch == 0 || n_contention == 0 || n_lanes_full == 0)
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
