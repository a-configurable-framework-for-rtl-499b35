// abacus_profile_control: profile control block of ABACUS.
//
// Passes the sampled processor events on to the profiling units under the
// control of the controller. An event reaches a unit only while profiling is
// running (run) and that unit is enabled (unit_en), so software can start and
// stop measurement and choose which units count without touching the
// processor. The event payloads (PC, IR, cache way and LRU stack) go to the
// units directly; only the strobes pass through here. The clear pulse is
// forwarded to every unit.
// Enable bit k belongs to profiling unit k+1 of the register window:
//   bit 0 code profiling, bit 1 I-cache reuse, bit 2 D-cache reuse,
//   bit 3 instruction mix.
// Timing: combinational; the strobes leave in the cycle they arrive.
// The block's place between controller and units follows the original ABACUS design; its
// gating function is this design's reading of it.
module abacus_profile_control
  import abacus_pkg::*;
#(
  parameter int unsigned N_UNITS = N_PROF_UNITS
) (
  input  logic               run,
  input  logic               clear_i,
  input  logic [N_UNITS-1:0] unit_en,
  input  logic               instr_valid,
  input  logic               ic_acc,
  input  logic               dc_acc,
  output logic               code_instr_valid,
  output logic               ic_acc_valid,
  output logic               dc_acc_valid,
  output logic               imix_instr_valid,
  output logic               clear_o
);

  localparam int unsigned EN_CODE    = int'(UNIT_CODE)    - 1;
  localparam int unsigned EN_REUSE_I = int'(UNIT_REUSE_I) - 1;
  localparam int unsigned EN_REUSE_D = int'(UNIT_REUSE_D) - 1;
  localparam int unsigned EN_IMIX    = int'(UNIT_IMIX)    - 1;

  always_comb begin
    code_instr_valid = run && unit_en[EN_CODE]    && instr_valid;
    ic_acc_valid     = run && unit_en[EN_REUSE_I] && ic_acc;
    dc_acc_valid     = run && unit_en[EN_REUSE_D] && dc_acc;
    imix_instr_valid = run && unit_en[EN_IMIX]    && instr_valid;
    clear_o          = clear_i;
  end

endmodule
