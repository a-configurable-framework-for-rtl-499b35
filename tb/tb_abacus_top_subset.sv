// tb_abacus_top_subset: ABACUS built with only some of its profiling units.
// The analyzer is instantiated with the code profiling unit and the D-cache
// reuse unit left out. Checks that INFO reports exactly the units present,
// that the absent units' registers read as zero even while events arrive,
// and that the units that are present still count exactly.
module tb_abacus_top_subset;
  import abacus_pkg::*;

  localparam int WAYS = 2;
  logic hclk = 0, hresetn = 0;
  logic hsel = 0, hwrite = 0;
  logic [31:0] haddr = '0, hwdata = '0;
  logic [1:0] htrans = HTRANS_IDLE;
  logic [2:0] hsize = 3'b010;
  logic hready, hreadyout;
  logic [1:0] hresp;
  logic [31:0] hrdata;
  logic instr_valid = 0;
  logic [31:0] pc = '0, ir = '0;
  logic ic_acc = 0, ic_hit = 0, dc_acc = 0, dc_hit = 0;
  logic [0:0] ic_way = '0, dc_way = '0;
  logic [0:0] ic_lru [WAYS];
  logic [0:0] dc_lru [WAYS];
  int checks = 0, failures = 0;
  always #5 hclk = ~hclk;
  assign hready = hreadyout;

  abacus_top #(.USE_CODE_PROF(1'b0), .USE_REUSE_D(1'b0)) dut (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hreadyout, .hresp, .hrdata,
    .instr_valid, .pc, .ir, .ic_acc, .ic_hit, .ic_way, .ic_lru,
    .dc_acc, .dc_hit, .dc_way, .dc_lru);

  initial begin
    repeat (200000) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic ahb_write(input int unit, input int word, input logic [31:0] d);
    @(negedge hclk);
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 1;
    haddr = 32'((unit << (REG_AW + 2)) | (word << 2));
    @(negedge hclk);
    hsel = 0; htrans = HTRANS_IDLE; hwdata = d;
    while (!hreadyout) @(negedge hclk);
    @(posedge hclk); #1;
  endtask

  task automatic ahb_read(input int unit, input int word, output logic [31:0] d);
    @(negedge hclk);
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 0;
    haddr = 32'((unit << (REG_AW + 2)) | (word << 2));
    @(negedge hclk);
    hsel = 0; htrans = HTRANS_IDLE;
    while (!hreadyout) @(negedge hclk);
    d = hrdata;
    @(posedge hclk); #1;
  endtask

  task automatic read_cnt(input int unit, input int k, output logic [63:0] v);
    logic [31:0] lo, hi;
    ahb_read(unit, 2*k, lo);
    ahb_read(unit, 2*k + 1, hi);
    v = {hi, lo};
  endtask

  longint m_ic [3], m_mix [6];

  initial begin
    logic [31:0] d;
    logic [63:0] v;
    foreach (m_ic[k]) m_ic[k] = 0;
    foreach (m_mix[k]) m_mix[k] = 0;
    ic_lru = '{1'b0, 1'b1}; dc_lru = '{1'b0, 1'b1};
    repeat (3) @(negedge hclk);
    hresetn = 1;

    ahb_read(0, int'(CTRL_REG_INFO), d);
    check("INFO shows units 2 and 4 only", 64'(d), 64'h0a28_abac);

    // instruction class = opcode mod 6
    for (int i = 0; i < 256; i++) ahb_write(int'(UNIT_IMIX), int'(IMIX_LUT_BASE) + i, 32'(i % 6));
    // ranges written to the absent code unit go nowhere
    ahb_write(int'(UNIT_CODE), 0, 32'h0);
    ahb_write(int'(UNIT_CODE), 1, 32'hffff_ffff);
    ahb_write(0, int'(CTRL_REG_CTRL), 32'h1);

    for (int i = 0; i < 3000; i++) begin
      @(negedge hclk);
      instr_valid = $urandom_range(0, 1);
      ir = $urandom(); pc = $urandom();
      ic_acc = instr_valid; ic_hit = $urandom_range(0, 3) != 0; ic_way = 1'($urandom());
      ic_lru[0] = 1'($urandom()); ic_lru[1] = ~ic_lru[0];
      dc_acc = $urandom_range(0, 1); dc_hit = 1; dc_way = dc_lru[0];
      if (instr_valid) begin
        m_ic[!ic_hit ? 0 : (ic_lru[0] == ic_way) ? 1 : 2]++;
        m_mix[int'(sparc_opcode(ir)) % 6]++;
      end
    end
    @(negedge hclk); instr_valid = 0; ic_acc = 0; dc_acc = 0;
    repeat (4) @(negedge hclk);
    ahb_write(0, int'(CTRL_REG_CTRL), 32'h0);

    for (int k = 0; k < 3; k++) begin
      read_cnt(int'(UNIT_REUSE_I), k, v); check($sformatf("icache bin %0d", k), v, 64'(m_ic[k]));
      read_cnt(int'(UNIT_REUSE_D), k, v); check($sformatf("absent dcache bin %0d reads 0", k), v, 0);
    end
    for (int k = 0; k < 6; k++) begin
      read_cnt(int'(UNIT_IMIX), k, v); check($sformatf("mix class %0d", k), v, 64'(m_mix[k]));
    end
    for (int w = 0; w < 4; w++) begin
      ahb_read(int'(UNIT_CODE), w, d); check("absent code unit reads 0", 64'(d), 0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
