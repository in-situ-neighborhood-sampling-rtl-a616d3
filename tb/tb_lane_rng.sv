// tb_lane_rng: checks the lane random generator against a reference
// xorshift32 sequence computed here, its seeding (including the zero-seed
// substitute), that it holds without `step`, and that its output is roughly
// uniform (bucket counts of the top 3 bits).
module tb_lane_rng;
  import sampler_pkg::*;

  logic  clk = 0, rst_n = 0, load = 0, step = 0;
  word_t seed = '0, value;
  int    checks = 0, failures = 0;

  lane_rng dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_next(word_t s);
    logic [63:0] t;
    t = {32'h0, s};
    t[31:0] = t[31:0] ^ {t[18:0], 13'b0};
    t[31:0] = t[31:0] ^ {17'b0, t[31:17]};
    t[31:0] = t[31:0] ^ {t[26:0], 5'b0};
    return t[31:0];
  endfunction

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  word_t exp;
  int    bucket [8];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset state", value, 32'h2545_F491);
    // load a seed
    seed = 32'h1234_5678; load = 1;
    @(negedge clk); load = 0;
    check("loaded seed", value, 32'h1234_5678);
    // known first value of xorshift32 from seed 1 is 270369
    seed = 32'd1; load = 1;
    @(negedge clk); load = 0; step = 1;
    @(negedge clk); step = 0;
    check("xorshift32(1)", value, 32'd270369);
    // hold without step
    exp = value;
    repeat (3) @(negedge clk);
    check("hold", value, exp);
    // long sequence
    seed = 32'hCAFE_F00D; load = 1;
    @(negedge clk); load = 0;
    exp = 32'hCAFE_F00D;
    step = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      exp = ref_next(exp);
      check("sequence", value, exp);
      bucket[value[31:29]]++;
    end
    step = 0;
    for (int b = 0; b < 8; b++) begin
      checks++;
      if (bucket[b] < 400 || bucket[b] > 600) begin
        failures++;
        $display("FAIL bucket %0d count %0d", b, bucket[b]);
      end
    end
    // zero seed is replaced
    seed = '0; load = 1;
    @(negedge clk); load = 0;
    check("zero seed", value, 32'h2545_F491);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
