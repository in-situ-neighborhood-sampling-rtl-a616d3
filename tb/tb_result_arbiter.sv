// tb_result_arbiter: four requesters with random write traffic share one
// output port whose ready drops at random. Checks that every word arrives
// exactly once and in each requester's order, that a stalled output holds
// its address and data, that a waiting requester is served within N-1
// grants to others (round-robin), and that one word passes per cycle when
// all requesters are busy and the output is ready.
module tb_result_arbiter;
  import sampler_pkg::*;

  localparam int unsigned N = 4;
  localparam int unsigned ADDR_W = 32;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_ready;
  logic [ADDR_W-1:0] in_addr [N];
  word_t in_data [N];
  logic out_valid, out_ready = 0;
  logic [ADDR_W-1:0] out_addr;
  word_t out_data;

  int checks = 0, failures = 0;

  result_arbiter #(.N(N), .ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned sent [N];     // items already accepted per requester
  int unsigned total [N];    // items each requester will send
  int unsigned got [N];
  int unsigned waited [N];   // grants to others while this one waits
  bit full_rate;
  logic [N-1:0] req = '0;  // a raised request is held until accepted
  logic prev_stall = 0;
  logic [ADDR_W-1:0] prev_addr;
  word_t prev_data;
  int unsigned back_to_back = 0;

  always_comb
    for (int i = 0; i < N; i++) begin
      in_valid[i] = rst_n && req[i];
      in_addr[i]  = ADDR_W'(i * 1000 + sent[i]);
      in_data[i]  = word_t'(32'hA000_0000 + i * 65536 + sent[i]);
    end

  always @(posedge clk) if (rst_n) begin
    if (prev_stall) begin
      checks++;
      if (!out_valid || out_addr != prev_addr || out_data != prev_data) begin
        failures++; $display("FAIL stalled output changed");
      end
    end
    prev_stall <= out_valid && !out_ready;
    prev_addr  <= out_addr;
    prev_data  <= out_data;
    if (out_valid && out_ready) begin
      int r;
      r = int'(out_addr) / 1000;
      checks++;
      if (r >= int'(N) || !in_ready[r] || $countones(in_ready) != 1 ||
          out_addr != ADDR_W'(r * 1000 + got[r]) ||
          out_data != word_t'(32'hA000_0000 + r * 65536 + got[r])) begin
        failures++; $display("FAIL bad transfer addr %0d data %h", out_addr, out_data);
      end
      for (int i = 0; i < N; i++) begin
        if (i == r) waited[i] = 0;
        else if (in_valid[i]) begin
          waited[i]++;
          checks++;
          if (waited[i] > N - 1) begin
            failures++; $display("FAIL requester %0d starved", i);
          end
        end
      end
      got[r]++;
      sent[r]++;
      req[r] = 1'b0;
      if (full_rate) back_to_back++;
    end
  end

  always @(negedge clk)
    for (int i = 0; i < N; i++)
      if (!req[i] && sent[i] < total[i] && (full_rate || ($urandom % 2) == 0)) req[i] = 1'b1;

  initial begin
    for (int i = 0; i < N; i++) total[i] = 200 + $urandom % 100;
    full_rate = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (1) begin
      bit all_done;
      @(negedge clk);
      out_ready = ($urandom % 3) != 0;
      all_done = 1;
      for (int i = 0; i < N; i++) if (sent[i] < total[i]) all_done = 0;
      if (all_done) break;
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] != total[i]) begin failures++; $display("FAIL requester %0d lost words", i); end
    end
    // full rate: all requesting, output always ready
    for (int i = 0; i < N; i++) total[i] += 50;
    full_rate = 1;
    out_ready = 1;
    repeat (100) @(negedge clk);
    checks++;
    if (back_to_back != 100) begin
      failures++; $display("FAIL %0d words in 100 cycles at full rate", back_to_back);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
