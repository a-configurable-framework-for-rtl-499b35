// tb_abacus_instr_mix_unit: self-checking test of the instruction mix unit.
// Loads a classification table over the register port (SPARC v8 classes:
// branches/calls, loads, stores, ALU, multiply/divide, other, and a few
// opcodes marked "not counted"), reads it back, streams random SPARC
// instruction words one per clock, and compares each class counter with a
// count kept in the testbench from the same table. Then reloads the table at
// run time with a different scheme and checks the counts again. Checks the
// two-cycle latency from instruction to counter and full-rate throughput.
module tb_abacus_instr_mix_unit;
  import abacus_pkg::*;

  localparam int unsigned NC = 6;
  localparam int unsigned CW = 40;

  logic clk = 0, rst_n = 0, clear = 0, instr_valid = 0;
  logic [31:0] ir = '0;
  reg_req_t req = '0;
  logic [31:0] rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  abacus_instr_mix_unit #(.N_CLASSES(NC), .CNT_W(CW)) dut (
    .clk, .rst_n, .clear, .instr_valid, .ir, .req, .rdata);

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    req = '{valid: 1'b1, we: 1'b1, addr: WIN_AW'(a), wdata: d};
    @(negedge clk);
    req = '0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk);
    req = '{valid: 1'b1, we: 1'b0, addr: WIN_AW'(a), wdata: '0};
    @(negedge clk);
    req = '0;
    d = rdata;
  endtask

  task automatic rd_cnt(input int k, output logic [63:0] v);
    logic [31:0] lo, hi;
    rd(2*k, lo);
    rd(2*k + 1, hi);
    v = {hi, lo};
  endtask

  int table_a [256];
  longint model [NC];

  // Scheme A: classify by SPARC v8 format. idx = {op, op3}.
  function automatic int class_a(int idx);
    int op, op3;
    op = idx >> 6; op3 = idx & 63;
    case (op)
      0: return 0;                                   // branches, sethi
      1: return 0;                                   // call
      2: begin
        if (op3 inside {6'h0a, 6'h0b, 6'h1a, 6'h1b, 6'h0e, 6'h0f, 6'h1e, 6'h1f}) return 4; // mul/div
        if (op3 == 6'h38 || op3 == 6'h39 || op3 == 6'h3a) return 0;                          // jmpl, rett, ticc
        if (op3 >= 6'h34 && op3 <= 6'h37) return 7;  // FP ops: not counted
        return 3;                                    // ALU
      end
      default: return (op3[2] == 1'b1 && op3 < 8) || (op3 inside {6'h14, 6'h15, 6'h16, 6'h17, 6'h24, 6'h25, 6'h26, 6'h27}) ? 2 : 1; // stores : loads
    endcase
  endfunction

  function automatic logic [31:0] rand_ir();
    logic [31:0] x;
    x = $urandom();
    return x;
  endfunction

  task automatic load_table(input int scheme);
    for (int i = 0; i < 256; i++) begin
      table_a[i] = (scheme == 0) ? class_a(i) : ((i * 7 + 3) % 8);
      wr(int'(IMIX_LUT_BASE) + i, 32'(table_a[i]));
    end
  endtask

  task automatic stream(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      instr_valid = ($urandom_range(0, 7) != 0);
      ir = rand_ir();
      if (instr_valid && table_a[sparc_opcode(ir)] < NC) model[table_a[sparc_opcode(ir)]]++;
    end
    @(negedge clk); instr_valid = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] d;
    logic [63:0] v;
    int errs;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (model[k]) model[k] = 0;

    load_table(0);
    errs = 0;
    for (int i = 0; i < 256; i++) begin
      rd(int'(IMIX_LUT_BASE) + i, d);
      if (d != 32'(table_a[i])) errs++;
    end
    check("table readback mismatches", 64'(errs), 0);

    // counters at zero after reset
    rd_cnt(0, v); check("reset COUNT0", v, 0);

    // latency: an add (op=2, op3=0) presented in cycle 0 counts at edge 2
    @(negedge clk);
    instr_valid = 1; ir = {2'b10, 5'd1, 6'h00, 5'd2, 1'b0, 8'd0, 5'd3};
    @(negedge clk); instr_valid = 0;
    check("not yet counted after one edge", 64'(dut.cnt_q[3]), 0);
    @(posedge clk); #1;
    check("counted after two edges", 64'(dut.cnt_q[3]), 1);
    model[3]++;

    // full rate: 64 back-to-back adds add 64 in 64 cycles
    begin
      longint cnt_start, cyc;
      cnt_start = longint'(dut.cnt_q[3]);
      @(negedge clk);
      instr_valid = 1; ir = {2'b10, 5'd1, 6'h00, 5'd2, 1'b0, 8'd0, 5'd3};
      repeat (64) @(negedge clk);
      instr_valid = 0;
      @(negedge clk);
      check("64 instructions in 64 cycles", 64'(longint'(dut.cnt_q[3]) - cnt_start), 64);
      model[3] += 64;
    end

    stream(6000);
    for (int k = 0; k < NC; k++) begin
      rd_cnt(k, v); check($sformatf("scheme A COUNT%0d", k), v, 64'(model[k]));
    end
    $display("mix A: ctl=%0d ld=%0d st=%0d alu=%0d muldiv=%0d other=%0d",
             model[0], model[1], model[2], model[3], model[4], model[5]);

    // run-time reconfiguration: new table, counters cleared
    load_table(1);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    foreach (model[k]) model[k] = 0;
    stream(4000);
    for (int k = 0; k < NC; k++) begin
      rd_cnt(k, v); check($sformatf("scheme B COUNT%0d", k), v, 64'(model[k]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
