// tb_abacus_code_prof_unit: self-checking test of the code profiling unit.
// Programs six overlapping address ranges, drives random PCs (with gaps in
// instr_valid), and compares every range counter with a reference count kept
// in the testbench. Also checks the START/END readback, the one-cycle update
// latency, the clear pulse and the 40-bit counter's upper word.
module tb_abacus_code_prof_unit;
  import abacus_pkg::*;

  localparam int unsigned NR = 6;
  localparam int unsigned CW = 40;

  logic clk = 0, rst_n = 0, clear = 0, instr_valid = 0;
  logic [31:0] pc = '0;
  reg_req_t req = '0;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  abacus_code_prof_unit #(.N_RANGES(NR), .CNT_W(CW)) dut (
    .clk, .rst_n, .clear, .instr_valid, .pc, .req, .rdata);

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

  task automatic rd_cnt(input int r, output logic [63:0] v);
    logic [31:0] lo, hi;
    rd(4*r + 2, lo);
    rd(4*r + 3, hi);
    v = {hi, lo};
  endtask

  logic [31:0] st [NR];
  logic [31:0] en [NR];
  longint      model [NR];

  function automatic logic [31:0] rand_pc();
    return 32'h4000_0000 + ($urandom_range(0, 4095) << 2);
  endfunction

  initial begin
    logic [31:0] d;
    logic [63:0] v;
    st = '{32'h4000_0000, 32'h4000_0800, 32'h4000_0400, 32'h4000_0100, 32'h4000_3ffc, 32'h5000_0000};
    en = '{32'h4000_07fc, 32'h4000_0fff, 32'h4000_0c00, 32'h4000_0100, 32'h4000_3ffc, 32'h5000_00ff};
    repeat (3) @(negedge clk);
    rst_n = 1;

    // reset values: empty ranges
    rd(0, d); check("reset START0", d, 32'hffff_ffff);
    rd(1, d); check("reset END0", d, 0);
    for (int r = 0; r < NR; r++) begin
      wr(4*r, st[r]);
      wr(4*r + 1, en[r]);
      model[r] = 0;
    end
    for (int r = 0; r < NR; r++) begin
      rd(4*r, d);     check($sformatf("START%0d", r), d, st[r]);
      rd(4*r + 1, d); check($sformatf("END%0d", r), d, en[r]);
    end

    // latency: a hit is visible in the counter at the next edge
    @(negedge clk);
    instr_valid = 1; pc = 32'h4000_0100;
    @(posedge clk); #1;
    check("latency range3 +1", 64'(dut.cnt_q[3]), 1);
    check("latency range0 +1", 64'(dut.cnt_q[0]), 1);
    check("no hit range1", 64'(dut.cnt_q[1]), 0);
    model[0]++; model[2] += 0; model[3]++;
    @(negedge clk); instr_valid = 0;

    // random stream at full rate with gaps
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      instr_valid = ($urandom_range(0, 3) != 0);
      pc = ($urandom_range(0, 9) == 0) ? 32'h5000_0000 + 32'($urandom_range(0, 511)) : rand_pc();
      if (instr_valid)
        for (int r = 0; r < NR; r++)
          if (pc >= st[r] && pc <= en[r]) model[r]++;
    end
    @(negedge clk); instr_valid = 0;
    for (int r = 0; r < NR; r++) begin
      rd_cnt(r, v); check($sformatf("COUNT%0d", r), v, 64'(model[r]));
    end

    // clear
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int r = 0; r < NR; r++) begin
      rd_cnt(r, v); check($sformatf("cleared COUNT%0d", r), v, 0);
    end

    // upper word: force the counter near 2**32 and cross
    dut.cnt_q[1] = 40'h00_ffff_fffe;
    @(negedge clk); instr_valid = 1; pc = 32'h4000_0900;
    @(negedge clk); @(negedge clk); instr_valid = 0;
    rd_cnt(1, v); check("COUNT1 carries into upper word", v, 64'h1_0000_0000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
