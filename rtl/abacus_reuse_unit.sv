// abacus_reuse_unit: memory reuse distance unit of ABACUS.
//
// Builds a reuse-distance histogram for one set-associative cache with
// least-recently-used replacement. For every cache access (acc_valid) the
// cache reports whether it hit, the way that holds the line, and the LRU
// stack of the accessed set as it was before the access: lru_stack[0] is the
// most recently used way, lru_stack[WAYS-1] the least recently used. The unit
// finds the stack position of the hit way, which is the number of distinct
// other lines of that set touched since this line was last used, and
// increments the counter of that distance. A miss increments the miss
// counter. For the 2-way caches of the reference platform the histogram has
// three bins: miss, distance 0 and distance 1.
//
// Registers (unit-local word addresses), counter k = 0 for misses, k = d+1
// for distance d:
//   2k COUNT k [31:0]   2k+1 COUNT k [CNT_W-1:32]   (read-only)
// clear zeroes every counter; counters wrap at 2**CNT_W.
// Timing: the counter is updated on the clock edge after acc_valid; read data
// appears one cycle after the read request.
// Reuse distance taken from the cache's LRU stack comes from the original ABACUS design; the port
// form of the LRU stack and the register layout are this design's.
module abacus_reuse_unit
  import abacus_pkg::*;
#(
  parameter int unsigned WAYS  = 2,
  parameter int unsigned CNT_W = CNT_W_DEFAULT,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned N_BINS = WAYS + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             acc_valid,
  input  logic             acc_hit,
  input  logic [WAY_W-1:0] acc_way,
  input  logic [WAY_W-1:0] lru_stack [WAYS],
  input  reg_req_t         req,
  output logic [BUS_W-1:0] rdata
);

  logic [CNT_W-1:0] cnt_q [N_BINS];
  logic [N_BINS-1:0] bin_hit;   // one-hot bin selected by this access
  logic              found;

  logic [REG_AW-1:0] waddr;
  assign waddr = req.addr[REG_AW-1:0];

  always_comb begin
    bin_hit = '0;
    found   = 1'b0;
    if (acc_valid) begin
      if (!acc_hit) begin
        bin_hit[0] = 1'b1;
      end else begin
        for (int d = 0; d < WAYS; d++)
          if (!found && lru_stack[d] == acc_way) begin
            bin_hit[d + 1] = 1'b1;
            found          = 1'b1;
          end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_BINS; k++) cnt_q[k] <= '0;
    end else begin
      for (int k = 0; k < N_BINS; k++) begin
        if (clear)           cnt_q[k] <= '0;
        else if (bin_hit[k]) cnt_q[k] <= cnt_q[k] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
    end else if (req.valid && !req.we) begin
      rdata <= '0;
      for (int k = 0; k < N_BINS; k++) begin
        if (waddr == REG_AW'(2*k))     rdata <= cnt_q[k][BUS_W-1:0];
        if (waddr == REG_AW'(2*k + 1)) rdata <= BUS_W'(cnt_q[k] >> BUS_W);
      end
    end
  end

  // A hit way must appear in the LRU stack.
  a_hit_in_stack: assert property (@(posedge clk) disable iff (!rst_n)
    acc_valid && acc_hit |-> found)
    else $error("abacus_reuse_unit: hit way not in LRU stack");

endmodule
