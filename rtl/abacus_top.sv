// abacus_top: ABACUS, a hardware analyzer for the characterization of user
// software, in the configuration of the LEON3 reference platform.
//
// The analyzer watches a processor from outside its core and counts workload
// events in independent profiling units, at the processor's full speed.
// Three layers:
//   external interface  abacus_ahb_slave (register window on the AHB bus) and
//                       abacus_proc_signals (samples the snooped processor and
//                       cache signals);
//   control logic       abacus_controller (register decode, RUN/CLEAR/UNIT_EN)
//                       and abacus_profile_control (gates events to the units);
//   profiling units     one code profiling unit, two memory reuse units (the
//                       instruction and the data cache) and one instruction mix
//                       unit, all with CNT_W-bit counters.
// Interface: an AHB slave port (hclk is the analyzer clock; the processor
// signals must be synchronous to it) and the snooped processor signals: the
// retired-instruction strobe with PC and IR, and one access record per cache
// (strobe, hit, way, LRU stack of the set before the access, MRU first).
// Timing: a processor event is counted two clock edges after it is presented
// (one in the signal stage, one in the unit; the instruction mix unit adds
// one for its table read). Register writes take no wait state, reads one.
// See abacus_pkg for the register window.
// Any subset of the profiling units can be built (USE_* parameters); a unit
// left out keeps its place in the register window, reads as zero, and is
// marked absent in the controller's INFO register.
// The unit mix, the 40-bit counters, the AHB attachment and the 2-way caches
// follow the reference platform; sizes the original description does not give (6 code
// ranges, 6 instruction classes) are this design's.
module abacus_top
  import abacus_pkg::*;
#(
  parameter int unsigned CNT_W     = CNT_W_DEFAULT,
  parameter int unsigned N_RANGES  = 6,
  parameter int unsigned N_CLASSES = 6,
  parameter int unsigned WAYS      = 2,
  // Which profiling units are built (1) or left out (0).
  parameter bit USE_CODE_PROF = 1'b1,
  parameter bit USE_REUSE_I   = 1'b1,
  parameter bit USE_REUSE_D   = 1'b1,
  parameter bit USE_INSTR_MIX = 1'b1,
  localparam int unsigned WAY_W    = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             hclk,
  input  logic             hresetn,
  // AHB slave port
  input  logic             hsel,
  input  logic [31:0]      haddr,
  input  logic [1:0]       htrans,
  input  logic             hwrite,
  input  logic [2:0]       hsize,
  input  logic [31:0]      hwdata,
  input  logic             hready,
  output logic             hreadyout,
  output logic [1:0]       hresp,
  output logic [31:0]      hrdata,
  // snooped processor signals
  input  logic             instr_valid,
  input  logic [31:0]      pc,
  input  logic [31:0]      ir,
  input  logic             ic_acc,
  input  logic             ic_hit,
  input  logic [WAY_W-1:0] ic_way,
  input  logic [WAY_W-1:0] ic_lru [WAYS],
  input  logic             dc_acc,
  input  logic             dc_hit,
  input  logic [WAY_W-1:0] dc_way,
  input  logic [WAY_W-1:0] dc_lru [WAYS]
);

  localparam int unsigned NU = N_PROF_UNITS;

  reg_req_t         req;
  logic [BUS_W-1:0] rdata;
  reg_req_t         unit_req   [NU];
  logic [BUS_W-1:0] unit_rdata [NU];
  logic             run, clear_c, clear;
  logic [NU-1:0]    unit_en;

  abacus_ahb_slave u_slave (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hreadyout, .hresp, .hrdata, .req, .rdata
  );

  localparam logic [NU-1:0] PRESENT = {USE_INSTR_MIX, USE_REUSE_D, USE_REUSE_I, USE_CODE_PROF};

  abacus_controller #(.N_UNITS(NU), .CNT_W(CNT_W), .UNIT_PRESENT(PRESENT)) u_ctrl (
    .clk(hclk), .rst_n(hresetn), .req, .rdata, .unit_req, .unit_rdata,
    .run, .clear(clear_c), .unit_en
  );

  // sampled processor signals
  logic             s_instr_valid;
  logic [31:0]      s_pc, s_ir;
  logic             s_ic_acc, s_ic_hit, s_dc_acc, s_dc_hit;
  logic [WAY_W-1:0] s_ic_way, s_dc_way;
  logic [WAY_W-1:0] s_ic_lru [WAYS];
  logic [WAY_W-1:0] s_dc_lru [WAYS];

  abacus_proc_signals #(.WAYS(WAYS), .ADDR_W(32)) u_sig (
    .clk(hclk), .rst_n(hresetn),
    .instr_valid_i(instr_valid), .pc_i(pc), .ir_i(ir),
    .ic_acc_i(ic_acc), .ic_hit_i(ic_hit), .ic_way_i(ic_way), .ic_lru_i(ic_lru),
    .dc_acc_i(dc_acc), .dc_hit_i(dc_hit), .dc_way_i(dc_way), .dc_lru_i(dc_lru),
    .instr_valid_o(s_instr_valid), .pc_o(s_pc), .ir_o(s_ir),
    .ic_acc_o(s_ic_acc), .ic_hit_o(s_ic_hit), .ic_way_o(s_ic_way), .ic_lru_o(s_ic_lru),
    .dc_acc_o(s_dc_acc), .dc_hit_o(s_dc_hit), .dc_way_o(s_dc_way), .dc_lru_o(s_dc_lru)
  );

  logic code_v, ic_v, dc_v, imix_v;

  abacus_profile_control #(.N_UNITS(NU)) u_pctl (
    .run, .clear_i(clear_c), .unit_en,
    .instr_valid(s_instr_valid), .ic_acc(s_ic_acc), .dc_acc(s_dc_acc),
    .code_instr_valid(code_v), .ic_acc_valid(ic_v), .dc_acc_valid(dc_v),
    .imix_instr_valid(imix_v), .clear_o(clear)
  );

  if (USE_CODE_PROF) begin : g_code
    abacus_code_prof_unit #(.N_RANGES(N_RANGES), .ADDR_W(32), .CNT_W(CNT_W)) u_code (
      .clk(hclk), .rst_n(hresetn), .clear, .instr_valid(code_v), .pc(s_pc),
      .req(unit_req[int'(UNIT_CODE) - 1]), .rdata(unit_rdata[int'(UNIT_CODE) - 1])
    );
  end else begin : g_no_code
    assign unit_rdata[int'(UNIT_CODE) - 1] = '0;
  end

  if (USE_REUSE_I) begin : g_reuse_i
    abacus_reuse_unit #(.WAYS(WAYS), .CNT_W(CNT_W)) u_reuse_i (
      .clk(hclk), .rst_n(hresetn), .clear,
      .acc_valid(ic_v), .acc_hit(s_ic_hit), .acc_way(s_ic_way), .lru_stack(s_ic_lru),
      .req(unit_req[int'(UNIT_REUSE_I) - 1]), .rdata(unit_rdata[int'(UNIT_REUSE_I) - 1])
    );
  end else begin : g_no_reuse_i
    assign unit_rdata[int'(UNIT_REUSE_I) - 1] = '0;
  end

  if (USE_REUSE_D) begin : g_reuse_d
    abacus_reuse_unit #(.WAYS(WAYS), .CNT_W(CNT_W)) u_reuse_d (
      .clk(hclk), .rst_n(hresetn), .clear,
      .acc_valid(dc_v), .acc_hit(s_dc_hit), .acc_way(s_dc_way), .lru_stack(s_dc_lru),
      .req(unit_req[int'(UNIT_REUSE_D) - 1]), .rdata(unit_rdata[int'(UNIT_REUSE_D) - 1])
    );
  end else begin : g_no_reuse_d
    assign unit_rdata[int'(UNIT_REUSE_D) - 1] = '0;
  end

  if (USE_INSTR_MIX) begin : g_imix
    abacus_instr_mix_unit #(.N_CLASSES(N_CLASSES), .CNT_W(CNT_W)) u_imix (
      .clk(hclk), .rst_n(hresetn), .clear, .instr_valid(imix_v), .ir(s_ir),
      .req(unit_req[int'(UNIT_IMIX) - 1]), .rdata(unit_rdata[int'(UNIT_IMIX) - 1])
    );
  end else begin : g_no_imix
    assign unit_rdata[int'(UNIT_IMIX) - 1] = '0;
  end

endmodule
