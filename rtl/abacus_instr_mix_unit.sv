// abacus_instr_mix_unit: instruction mix unit of ABACUS.
//
// Classifies every executed instruction and counts the instructions of each
// class. The opcode of the instruction register (for SPARC v8, the 8 bits
// {IR[31:30], IR[24:19]}) indexes a look-up table held in block RAM; the
// table entry names the counter to increment. Software rewrites the table at
// run time, so instructions can be grouped into any classification scheme
// with up to N_CLASSES classes. An entry of N_CLASSES or above marks an
// opcode that is not counted.
//
// Pipeline, one instruction per clock:
//   cycle 0  instr_valid with ir: synchronous table read
//   cycle 1  counter of the class read from the table increments
// A new instruction may arrive every cycle.
//
// Registers (unit-local word addresses):
//   2k COUNT k [31:0]   2k+1 COUNT k [CNT_W-1:32]   (read-only, k < N_CLASSES)
//   IMIX_LUT_BASE + opcode  class of that opcode (rw, CLASS_W bits)
// The table is a dual-port RAM: one read port for classification, one
// read/write port for the bus. It is not reset; software must load it before
// profiling. clear zeroes the counters; counters wrap at 2**CNT_W.
// The opcode-indexed, runtime-configurable table in block RAM selecting a
// counter comes from the original ABACUS design; the opcode field, number of classes and the
// "not counted" code are this design's.
module abacus_instr_mix_unit
  import abacus_pkg::*;
#(
  parameter int unsigned N_CLASSES = 6,
  parameter int unsigned CNT_W     = CNT_W_DEFAULT,
  localparam int unsigned OPC_W    = SPARC_OPC_W,
  localparam int unsigned CLASS_W  = $clog2(N_CLASSES + 1),
  localparam int unsigned LUT_DEPTH = 2 ** OPC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             instr_valid,
  input  logic [31:0]      ir,
  input  reg_req_t         req,
  output logic [BUS_W-1:0] rdata
);

  logic [CLASS_W-1:0] lut [LUT_DEPTH];

  logic [CLASS_W-1:0] cls_q;      // class read from the table
  logic               cls_vld_q;  // an instruction is in stage 1
  logic [CLASS_W-1:0] lut_rd_q;   // bus read port of the table
  logic [CNT_W-1:0]   cnt_q [N_CLASSES];

  logic [REG_AW-1:0] waddr;
  logic              lut_sel;
  logic [OPC_W-1:0]  lut_addr;
  assign waddr    = req.addr[REG_AW-1:0];
  assign lut_sel  = (waddr >= IMIX_LUT_BASE) && (waddr < IMIX_LUT_BASE + REG_AW'(LUT_DEPTH));
  assign lut_addr = OPC_W'(waddr - IMIX_LUT_BASE);

  // Classification port (synchronous read).
  always_ff @(posedge clk)
    cls_q <= lut[sparc_opcode(ir)];

  // Bus port (synchronous read, write).
  always_ff @(posedge clk) begin
    if (req.valid && lut_sel) begin
      if (req.we) lut[lut_addr] <= CLASS_W'(req.wdata);
      lut_rd_q <= lut[lut_addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cls_vld_q <= 1'b0;
      for (int k = 0; k < N_CLASSES; k++) cnt_q[k] <= '0;
    end else begin
      cls_vld_q <= instr_valid && !clear;
      for (int k = 0; k < N_CLASSES; k++) begin
        if (clear)                                    cnt_q[k] <= '0;
        else if (cls_vld_q && cls_q == CLASS_W'(k))   cnt_q[k] <= cnt_q[k] + 1'b1;
      end
    end
  end

  // Counter read data is registered here; table read data comes from the
  // RAM's own output register. rd_lut_q picks between them.
  logic             rd_lut_q;
  logic [BUS_W-1:0] cnt_rd_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_lut_q <= 1'b0;
      cnt_rd_q <= '0;
    end else if (req.valid && !req.we) begin
      rd_lut_q <= lut_sel;
      cnt_rd_q <= '0;
      for (int k = 0; k < N_CLASSES; k++) begin
        if (waddr == REG_AW'(2*k))     cnt_rd_q <= cnt_q[k][BUS_W-1:0];
        if (waddr == REG_AW'(2*k + 1)) cnt_rd_q <= BUS_W'(cnt_q[k] >> BUS_W);
      end
    end
  end

  assign rdata = rd_lut_q ? BUS_W'(lut_rd_q) : cnt_rd_q;

endmodule
