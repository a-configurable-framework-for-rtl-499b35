// abacus_pkg: types and constants shared by the ABACUS profiling analyzer.
//
// ABACUS is a hardware analyzer that sits beside a processor, snoops a small
// set of its signals and counts workload events in a collection of profiling
// units. Software reaches every unit through one memory-mapped window on the
// system bus. This package fixes that window's layout and the request record
// that carries register accesses from the bus slave through the controller
// to the units.
//
// Register window (byte addresses relative to the slave's base, 32-bit words):
//   [15:12] unit select (0 = controller, 1..4 = profiling units, see UNIT_*)
//   [11:2]  word address inside the unit (REG_AW bits)
// Every 40-bit event counter is read as two words: counter k low word at
// word 2k, bits [CNT_W-1:32] at word 2k+1. The window layout, the unit
// numbering and the split of counters into words are choices of this design;
// the 40-bit default counter width is the one the analyzer was reported with.
package abacus_pkg;

  localparam int unsigned BUS_W      = 32;  // system bus data width
  localparam int unsigned REG_AW     = 10;  // word address bits inside a unit
  localparam int unsigned UNIT_SEL_W = 4;   // unit select bits
  localparam int unsigned WIN_AW     = REG_AW + UNIT_SEL_W; // word address bits of the window

  // Default event counter width.
  localparam int unsigned CNT_W_DEFAULT = 40;

  // Unit numbers inside the register window.
  localparam logic [UNIT_SEL_W-1:0] UNIT_CTRL    = 4'd0;
  localparam logic [UNIT_SEL_W-1:0] UNIT_CODE    = 4'd1;
  localparam logic [UNIT_SEL_W-1:0] UNIT_REUSE_I = 4'd2;
  localparam logic [UNIT_SEL_W-1:0] UNIT_REUSE_D = 4'd3;
  localparam logic [UNIT_SEL_W-1:0] UNIT_IMIX    = 4'd4;
  localparam int unsigned N_PROF_UNITS = 4;

  // Controller registers (unit 0, word addresses).
  localparam logic [REG_AW-1:0] CTRL_REG_CTRL    = 10'd0; // bit0 RUN, bit1 CLEAR (write-one pulse)
  localparam logic [REG_AW-1:0] CTRL_REG_UNIT_EN = 10'd1; // one enable bit per profiling unit
  localparam logic [REG_AW-1:0] CTRL_REG_INFO    = 10'd2; // read-only identification word
  localparam logic [15:0]       ABACUS_MAGIC     = 16'hABAC;

  // Instruction mix unit: look-up table words start here (word LUT_BASE + opcode).
  localparam logic [REG_AW-1:0] IMIX_LUT_BASE = 10'd256;

  // One register access, as issued by the bus slave. addr is a word address:
  // inside the whole window at the controller's input, inside one unit after
  // the controller has decoded it. Read data comes back one cycle after a
  // read request (valid && !we).
  typedef struct packed {
    logic              valid;
    logic              we;
    logic [WIN_AW-1:0] addr;
    logic [BUS_W-1:0]  wdata;
  } reg_req_t;

  // AHB transfer types and responses used by the slave.
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  localparam logic [1:0] HRESP_OKAY = 2'b00;

  // Opcode of a SPARC v8 instruction as used to index the instruction mix
  // table: the two format bits op = IR[31:30] followed by the six bits at
  // IR[24:19] (op3 for formats 2 and 3; op2 and the top of the immediate for
  // format 0). 256 table entries therefore cover every instruction class.
  localparam int unsigned SPARC_OPC_W = 8;
  function automatic logic [SPARC_OPC_W-1:0] sparc_opcode(input logic [31:0] ir);
    return {ir[31:30], ir[24:19]};
  endfunction

endpackage
