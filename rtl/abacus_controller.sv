// abacus_controller: control layer of ABACUS.
//
// Sits between the bus slave and the profiling units and gives system
// software one standard way to drive the analyzer. It
//   * decodes the unit-select bits of each register request and forwards the
//     request, with a unit-local word address, to the selected profiling unit;
//   * holds its own registers (unit 0):
//       word 0 CTRL    bit0 RUN   - profiling units count only while set
//                      bit1 CLEAR - writing 1 clears every event counter
//                                   (one-cycle pulse, reads back 0)
//       word 1 UNIT_EN bit k enables profiling unit k+1 (all set at reset)
//       word 2 INFO    {UNIT_PRESENT[7:0], CNT_W[7:0], 16'hABAC}, read-only:
//                      bit k of the top byte is set if profiling unit k+1
//                      was instantiated, so software can discover the
//                      configuration
//   * returns read data one cycle after a read request, from its own
//     registers or from the unit that was addressed (units also answer one
//     cycle later). Unused units and words read as zero.
// RUN, CLEAR and UNIT_EN go to the profile control block, which gates the
// processor events on their way to the units.
// Software control of the units comes from the original ABACUS design; the register set and its
// encoding are this design's choice.
module abacus_controller
  import abacus_pkg::*;
#(
  parameter int unsigned N_UNITS = N_PROF_UNITS,
  parameter int unsigned CNT_W   = CNT_W_DEFAULT,
  parameter logic [N_UNITS-1:0] UNIT_PRESENT = '1
) (
  input  logic               clk,
  input  logic               rst_n,
  // from the bus slave
  input  reg_req_t           req,
  output logic [BUS_W-1:0]   rdata,
  // to and from the profiling units (unit k+1 on index k)
  output reg_req_t           unit_req   [N_UNITS],
  input  logic [BUS_W-1:0]   unit_rdata [N_UNITS],
  // to profile control
  output logic               run,
  output logic               clear,
  output logic [N_UNITS-1:0] unit_en
);

  logic [UNIT_SEL_W-1:0] sel;
  logic [REG_AW-1:0]     waddr;
  logic [UNIT_SEL_W-1:0] rd_sel_q;
  logic [BUS_W-1:0]      own_rdata_q;
  logic                  run_q, clear_q;
  logic [N_UNITS-1:0]    unit_en_q;

  assign sel   = req.addr[WIN_AW-1:REG_AW];
  assign waddr = req.addr[REG_AW-1:0];

  always_comb begin
    for (int k = 0; k < N_UNITS; k++) begin
      unit_req[k]       = req;
      unit_req[k].addr  = WIN_AW'(waddr);
      unit_req[k].valid = req.valid && (sel == UNIT_SEL_W'(k + 1));
    end
  end

  logic own_sel;
  assign own_sel = req.valid && (sel == UNIT_CTRL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q       <= 1'b0;
      clear_q     <= 1'b0;
      unit_en_q   <= '1;
      rd_sel_q    <= '0;
      own_rdata_q <= '0;
    end else begin
      clear_q <= 1'b0;
      if (own_sel && req.we) begin
        unique case (waddr)
          CTRL_REG_CTRL: begin
            run_q   <= req.wdata[0];
            clear_q <= req.wdata[1];
          end
          CTRL_REG_UNIT_EN: unit_en_q <= req.wdata[N_UNITS-1:0];
          default: ;
        endcase
      end
      if (req.valid && !req.we) begin
        rd_sel_q <= sel;
        unique case (waddr)
          CTRL_REG_CTRL:    own_rdata_q <= BUS_W'(run_q);
          CTRL_REG_UNIT_EN: own_rdata_q <= BUS_W'(unit_en_q);
          CTRL_REG_INFO:    own_rdata_q <= {8'(UNIT_PRESENT), 8'(CNT_W), ABACUS_MAGIC};
          default:          own_rdata_q <= '0;
        endcase
      end
    end
  end

  always_comb begin
    rdata = '0;
    if (rd_sel_q == UNIT_CTRL) begin
      rdata = own_rdata_q;
    end else begin
      for (int k = 0; k < N_UNITS; k++)
        if (rd_sel_q == UNIT_SEL_W'(k + 1)) rdata = unit_rdata[k];
    end
  end

  assign run     = run_q;
  assign clear   = clear_q;
  assign unit_en = unit_en_q;

endmodule
