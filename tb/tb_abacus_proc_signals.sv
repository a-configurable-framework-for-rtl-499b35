// tb_abacus_proc_signals: self-checking test of the processor-signal stage.
// Drives random processor and cache signals and checks that each output
// equals the input of the previous clock for strobes, and that data fields
// follow their strobe and hold otherwise.
module tb_abacus_proc_signals;
  localparam int W = 4, WW = 2;
  logic clk = 0, rst_n = 0;
  logic iv_i = 0, ica_i = 0, ich_i = 0, dca_i = 0, dch_i = 0;
  logic [31:0] pc_i = '0, ir_i = '0;
  logic [WW-1:0] icw_i = '0, dcw_i = '0;
  logic [WW-1:0] icl_i [W], dcl_i [W];
  logic iv_o, ica_o, ich_o, dca_o, dch_o;
  logic [31:0] pc_o, ir_o;
  logic [WW-1:0] icw_o, dcw_o;
  logic [WW-1:0] icl_o [W], dcl_o [W];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  abacus_proc_signals #(.WAYS(W), .ADDR_W(32)) dut (
    .clk, .rst_n,
    .instr_valid_i(iv_i), .pc_i, .ir_i, .ic_acc_i(ica_i), .ic_hit_i(ich_i), .ic_way_i(icw_i),
    .ic_lru_i(icl_i), .dc_acc_i(dca_i), .dc_hit_i(dch_i), .dc_way_i(dcw_i), .dc_lru_i(dcl_i),
    .instr_valid_o(iv_o), .pc_o, .ir_o, .ic_acc_o(ica_o), .ic_hit_o(ich_o), .ic_way_o(icw_o),
    .ic_lru_o(icl_o), .dc_acc_o(dca_o), .dc_hit_o(dch_o), .dc_way_o(dcw_o), .dc_lru_o(dcl_o));

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    logic [31:0] e_pc, e_ir;
    logic e_iv, e_ica, e_dca, e_ich, e_dch;
    logic [WW-1:0] e_icw, e_dcw;
    logic [WW-1:0] e_icl [W], e_dcl [W];
    icl_i = '{default: '0}; dcl_i = '{default: '0};
    repeat (2) @(negedge clk);
    check("reset instr_valid", 64'(iv_o), 0);
    check("reset ic_acc", 64'(ica_o), 0);
    check("reset dc_acc", 64'(dca_o), 0);
    rst_n = 1;
    e_pc = '0; e_ir = '0; e_ich = 0; e_dch = 0; e_icw = '0; e_dcw = '0;
    e_icl = '{default: '0}; e_dcl = '{default: '0};
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      iv_i = $urandom_range(0, 1); pc_i = $urandom(); ir_i = $urandom();
      ica_i = $urandom_range(0, 1); ich_i = $urandom_range(0, 1); icw_i = WW'($urandom());
      dca_i = $urandom_range(0, 1); dch_i = $urandom_range(0, 1); dcw_i = WW'($urandom());
      for (int d = 0; d < W; d++) begin icl_i[d] = WW'($urandom()); dcl_i[d] = WW'($urandom()); end
      e_iv = iv_i; e_ica = ica_i; e_dca = dca_i;
      if (iv_i) begin e_pc = pc_i; e_ir = ir_i; end
      if (ica_i) begin e_ich = ich_i; e_icw = icw_i; e_icl = icl_i; end
      if (dca_i) begin e_dch = dch_i; e_dcw = dcw_i; e_dcl = dcl_i; end
      @(posedge clk); #1;
      check("instr_valid", 64'(iv_o), 64'(e_iv));
      check("pc", 64'(pc_o), 64'(e_pc));
      check("ir", 64'(ir_o), 64'(e_ir));
      check("ic_acc", 64'(ica_o), 64'(e_ica));
      check("ic_hit/way", 64'({ich_o, icw_o}), 64'({e_ich, e_icw}));
      check("dc_acc", 64'(dca_o), 64'(e_dca));
      check("dc_hit/way", 64'({dch_o, dcw_o}), 64'({e_dch, e_dcw}));
      for (int d = 0; d < W; d++) begin
        check("ic_lru", 64'(icl_o[d]), 64'(e_icl[d]));
        check("dc_lru", 64'(dcl_o[d]), 64'(e_dcl[d]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
