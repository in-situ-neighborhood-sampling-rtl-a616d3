// result_arbiter: merges the result writes of N sampling lanes onto the
// single write port of the result buffer in FPGA DRAM.
//
// Round-robin: the search for a requester starts one past the lane granted
// last, so every lane with a pending write is served within N accepted
// writes. The arbiter holds no data: out_* is the granted lane's request,
// and that lane's ready is out_ready. While the memory stalls a write
// (out_valid && !out_ready) the grant is held, so the presented address and
// data stay stable even when other lanes raise requests. One write per
// clock when out_ready is high; no added latency. The design names only a
// result buffer; how the lanes share its port is this design's own choice.
module result_arbiter
  import sampler_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned IDX_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      in_valid,
  input  logic [ADDR_W-1:0] in_addr [N],
  input  word_t             in_data [N],
  output logic [N-1:0]      in_ready,
  output logic              out_valid,
  output logic [ADDR_W-1:0] out_addr,
  output word_t             out_data,
  input  logic              out_ready
);

  logic [IDX_W-1:0] ptr;      // lane searched first
  logic [IDX_W-1:0] held;     // grant kept across a stalled write
  logic             hold;
  logic [IDX_W-1:0] pick;
  logic [IDX_W-1:0] grant;
  logic             found;

  // First requesting lane at or after ptr, cyclically.
  always_comb begin
    pick  = ptr;
    found = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      if (!found && in_valid[(int'(ptr) + k) % N]) begin
        pick  = IDX_W'((int'(ptr) + k) % N);
        found = 1'b1;
      end
    end
  end

  always_comb begin
    grant     = hold ? held : pick;
    out_valid = hold ? 1'b1 : found;
    out_addr  = in_addr[grant];
    out_data  = in_data[grant];
    in_ready  = '0;
    in_ready[grant] = out_valid && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr  <= '0;
      held <= '0;
      hold <= 1'b0;
    end else begin
      if (out_valid && out_ready) begin
        ptr  <= (int'(grant) == N - 1) ? '0 : grant + 1'b1;
        hold <= 1'b0;
      end else if (out_valid) begin
        held <= grant;
        hold <= 1'b1;
      end
    end
  end

  a_hold_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                 hold |-> in_valid[held]);

endmodule
