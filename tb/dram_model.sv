// dram_model: behavioural model of the FPGA's on-board DRAM as the sampling
// kernel sees it (testbench only, not synthesizable).
//
// NRD read ports and one write port, all valid/ready. Storage is a sparse
// associative array of 32-bit words; unwritten words read as 0. A read
// accepted at cycle t returns its word, in order per port, at cycle
// t+LAT or later. When STALLS is set, ready drops on random cycles
// (about one in four), which exercises the kernel's back-pressure paths;
// rd_stalls / wr_stalls count the cycles a request waited. poke() and
// peek() give the testbench direct access to the contents.
module dram_model #(
  parameter int unsigned NRD    = 1,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned LAT    = 3,
  parameter bit          STALLS = 1'b1
) (
  input  logic              clk,
  input  logic [NRD-1:0]    rd_valid,
  input  logic [ADDR_W-1:0] rd_addr  [NRD],
  output logic [NRD-1:0]    rd_ready,
  output logic [NRD-1:0]    rd_rvalid,
  output logic [31:0]       rd_rdata [NRD],
  input  logic              wr_valid,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [31:0]       wr_data,
  output logic              wr_ready
);

  logic [31:0] mem [logic [ADDR_W-1:0]];
  longint unsigned cycle = 0;
  longint unsigned rd_stalls = 0;
  longint unsigned wr_stalls = 0;
  longint unsigned writes = 0;

  typedef struct { longint unsigned due; logic [31:0] data; } rsp_t;
  rsp_t q [NRD][$];

  function automatic logic [31:0] peek(logic [ADDR_W-1:0] a);
    return mem.exists(a) ? mem[a] : 32'h0;
  endfunction

  function automatic void poke(logic [ADDR_W-1:0] a, logic [31:0] d);
    mem[a] = d;
  endfunction

  function automatic void clear();
    mem.delete();
  endfunction

  initial begin
    rd_ready  = '1;
    rd_rvalid = '0;
    wr_ready  = 1'b1;
    for (int p = 0; p < NRD; p++) rd_rdata[p] = '0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    // accept
    for (int p = 0; p < NRD; p++) begin
      if (rd_valid[p] && rd_ready[p]) begin
        rsp_t r;
        r.due  = cycle + LAT;
        r.data = peek(rd_addr[p]);
        q[p].push_back(r);
      end else if (rd_valid[p]) begin
        rd_stalls++;
      end
    end
    if (wr_valid && wr_ready) begin
      mem[wr_addr] = wr_data;
      writes++;
    end else if (wr_valid) begin
      wr_stalls++;
    end
    // respond
    for (int p = 0; p < NRD; p++) begin
      if (q[p].size() != 0 && q[p][0].due <= cycle) begin
        rd_rvalid[p] <= 1'b1;
        rd_rdata[p]  <= q[p][0].data;
        void'(q[p].pop_front());
      end else begin
        rd_rvalid[p] <= 1'b0;
      end
      rd_ready[p] <= STALLS ? (($urandom % 4) != 0) : 1'b1;
    end
    wr_ready <= STALLS ? (($urandom % 4) != 0) : 1'b1;
  end

endmodule
