// abacus_code_prof_unit: code profiling unit of ABACUS.
//
// Counts, for each of N_RANGES address ranges, how many instructions the
// processor executes from that range. Software writes a start and an end
// address per range; every executed instruction (instr_valid) whose program
// counter satisfies start <= pc <= end increments that range's counter. All
// ranges are compared in parallel, so ranges may overlap and one instruction
// can count in several of them. The unit therefore profiles how much of a
// workload runs in chosen functions or code regions, at the processor's full
// rate: one instruction per clock.
//
// Registers (unit-local word addresses, range r):
//   4r+0 START r (rw)   4r+1 END r (rw)
//   4r+2 COUNT r [31:0] 4r+3 COUNT r [CNT_W-1:32] (read-only)
// Reset sets START to all ones and END to zero, an empty range. clear zeroes
// the counters and leaves the ranges. Counters wrap at 2**CNT_W.
// Timing: the counter is updated on the clock edge after instr_valid; read
// data appears one cycle after the read request.
// Start/end registers with comparators come from the original ABACUS design; the inclusive
// comparison, the number of ranges and the register layout are this design's.
module abacus_code_prof_unit
  import abacus_pkg::*;
#(
  parameter int unsigned N_RANGES = 6,
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned CNT_W    = CNT_W_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             instr_valid,
  input  logic [ADDR_W-1:0] pc,
  input  reg_req_t         req,
  output logic [BUS_W-1:0] rdata
);

  logic [ADDR_W-1:0] start_q [N_RANGES];
  logic [ADDR_W-1:0] end_q   [N_RANGES];
  logic [CNT_W-1:0]  cnt_q   [N_RANGES];
  logic [N_RANGES-1:0] hit;

  logic [REG_AW-1:0] waddr;
  assign waddr = req.addr[REG_AW-1:0];

  always_comb
    for (int r = 0; r < N_RANGES; r++)
      hit[r] = instr_valid && (pc >= start_q[r]) && (pc <= end_q[r]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N_RANGES; r++) begin
        start_q[r] <= '1;
        end_q[r]   <= '0;
        cnt_q[r]   <= '0;
      end
    end else begin
      for (int r = 0; r < N_RANGES; r++) begin
        if (clear)       cnt_q[r] <= '0;
        else if (hit[r]) cnt_q[r] <= cnt_q[r] + 1'b1;
        if (req.valid && req.we && waddr == REG_AW'(4*r))     start_q[r] <= ADDR_W'(req.wdata);
        if (req.valid && req.we && waddr == REG_AW'(4*r + 1)) end_q[r]   <= ADDR_W'(req.wdata);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
    end else if (req.valid && !req.we) begin
      rdata <= '0;
      for (int r = 0; r < N_RANGES; r++) begin
        unique case (waddr)
          REG_AW'(4*r):     rdata <= BUS_W'(start_q[r]);
          REG_AW'(4*r + 1): rdata <= BUS_W'(end_q[r]);
          REG_AW'(4*r + 2): rdata <= cnt_q[r][BUS_W-1:0];
          REG_AW'(4*r + 3): rdata <= BUS_W'(cnt_q[r] >> BUS_W);
          default: ;
        endcase
      end
    end
  end

endmodule
