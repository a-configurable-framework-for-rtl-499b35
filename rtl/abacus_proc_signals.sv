// abacus_proc_signals: processor-signal stage of the ABACUS external interface.
//
// ABACUS is connected to the processor by only the few signals its units
// need. This stage samples them into registers at the analyzer's boundary, so
// the analyzer's own timing is decoupled from the processor's pipeline and
// cache logic:
//   * the retired-instruction strobe with its program counter and
//     instruction register (code profiling, instruction mix);
//   * one access record per cache (instruction and data): access strobe, hit,
//     way hit and the set's LRU stack before the access (reuse distance).
// Strobes are reset to zero; data fields are captured only with their strobe
// and hold their value otherwise.
// Timing: every output is the input of the previous clock (one cycle of
// latency, one event per clock and per source).
// Which signals are snooped follows the original ABACUS design; the register stage and
// its exact signal list are this design's.
module abacus_proc_signals
  import abacus_pkg::*;
#(
  parameter int unsigned WAYS   = 2,
  parameter int unsigned ADDR_W = 32,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the processor
  input  logic              instr_valid_i,
  input  logic [ADDR_W-1:0] pc_i,
  input  logic [31:0]       ir_i,
  input  logic              ic_acc_i,
  input  logic              ic_hit_i,
  input  logic [WAY_W-1:0]  ic_way_i,
  input  logic [WAY_W-1:0]  ic_lru_i [WAYS],
  input  logic              dc_acc_i,
  input  logic              dc_hit_i,
  input  logic [WAY_W-1:0]  dc_way_i,
  input  logic [WAY_W-1:0]  dc_lru_i [WAYS],
  // to profile control and the units
  output logic              instr_valid_o,
  output logic [ADDR_W-1:0] pc_o,
  output logic [31:0]       ir_o,
  output logic              ic_acc_o,
  output logic              ic_hit_o,
  output logic [WAY_W-1:0]  ic_way_o,
  output logic [WAY_W-1:0]  ic_lru_o [WAYS],
  output logic              dc_acc_o,
  output logic              dc_hit_o,
  output logic [WAY_W-1:0]  dc_way_o,
  output logic [WAY_W-1:0]  dc_lru_o [WAYS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      instr_valid_o <= 1'b0;
      ic_acc_o      <= 1'b0;
      dc_acc_o      <= 1'b0;
    end else begin
      instr_valid_o <= instr_valid_i;
      ic_acc_o      <= ic_acc_i;
      dc_acc_o      <= dc_acc_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_o     <= '0;
      ir_o     <= '0;
      ic_hit_o <= 1'b0;
      ic_way_o <= '0;
      dc_hit_o <= 1'b0;
      dc_way_o <= '0;
      for (int d = 0; d < WAYS; d++) begin
        ic_lru_o[d] <= '0;
        dc_lru_o[d] <= '0;
      end
    end else begin
      if (instr_valid_i) begin
        pc_o <= pc_i;
        ir_o <= ir_i;
      end
      if (ic_acc_i) begin
        ic_hit_o <= ic_hit_i;
        ic_way_o <= ic_way_i;
        ic_lru_o <= ic_lru_i;
      end
      if (dc_acc_i) begin
        dc_hit_o <= dc_hit_i;
        dc_way_o <= dc_way_i;
        dc_lru_o <= dc_lru_i;
      end
    end
  end

endmodule
