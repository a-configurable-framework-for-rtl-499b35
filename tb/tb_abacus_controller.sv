// tb_abacus_controller: self-checking test of the ABACUS controller.
// Four unit models answer reads one cycle after the request with a value
// made of their unit number and the local word address, and log writes.
// Checks address decode (only the selected unit sees a request, with the
// unit-local address), the read-data multiplexer, the RUN bit, the
// one-cycle CLEAR pulse, UNIT_EN (all ones at reset) and the INFO word.
module tb_abacus_controller;
  import abacus_pkg::*;

  localparam int NU = 4;
  logic clk = 0, rst_n = 0;
  reg_req_t req = '0;
  logic [31:0] rdata;
  reg_req_t unit_req [NU];
  logic [31:0] unit_rdata [NU];
  logic run, clear;
  logic [NU-1:0] unit_en;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  abacus_controller #(.N_UNITS(NU), .CNT_W(40)) dut (
    .clk, .rst_n, .req, .rdata, .unit_req, .unit_rdata, .run, .clear, .unit_en);

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

  // unit models
  int wr_count [NU];
  logic [31:0] last_wdata [NU];
  logic [WIN_AW-1:0] last_waddr [NU];
  int clear_cycles = 0;
  always_ff @(posedge clk) begin
    for (int k = 0; k < NU; k++) begin
      if (unit_req[k].valid && !unit_req[k].we)
        unit_rdata[k] <= {8'(k + 1), 14'd0, 10'(unit_req[k].addr)};
      if (unit_req[k].valid && unit_req[k].we) begin
        wr_count[k]   <= wr_count[k] + 1;
        last_wdata[k] <= unit_req[k].wdata;
        last_waddr[k] <= unit_req[k].addr;
      end
    end
    if (rst_n && clear) clear_cycles <= clear_cycles + 1;
  end

  function automatic logic [WIN_AW-1:0] wa(int unit, int word);
    return WIN_AW'((unit << REG_AW) | word);
  endfunction

  task automatic wr(input logic [WIN_AW-1:0] a, input logic [31:0] d);
    @(negedge clk);
    req = '{valid: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(negedge clk);
    req = '0;
  endtask

  task automatic rd(input logic [WIN_AW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '{valid: 1'b1, we: 1'b0, addr: a, wdata: '0};
    @(negedge clk);
    req = '0;
    d = rdata;
  endtask

  initial begin
    logic [31:0] d;
    int wr_before [NU];
    for (int k = 0; k < NU; k++) begin wr_count[k] = 0; unit_rdata[k] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    check("reset RUN", 64'(run), 0);
    check("reset UNIT_EN", 64'(unit_en), 64'hf);
    rd(wa(0, 2), d); check("INFO", 64'(d), 64'h0f28_abac);
    rd(wa(0, 1), d); check("UNIT_EN read", 64'(d), 64'hf);

    // RUN on, read back
    wr(wa(0, 0), 32'h1);
    check("RUN set", 64'(run), 1);
    rd(wa(0, 0), d); check("CTRL read", 64'(d), 1);
    // CLEAR is a single-cycle pulse and RUN follows bit 0
    wr(wa(0, 0), 32'h3);
    @(negedge clk);
    check("CLEAR one cycle", 64'(clear_cycles), 1);
    check("CLEAR self-clears", 64'(clear), 0);
    rd(wa(0, 0), d); check("CLEAR reads back 0", 64'(d), 1);
    wr(wa(0, 0), 32'h0);
    check("RUN cleared", 64'(run), 0);
    wr(wa(0, 1), 32'h5);
    check("UNIT_EN write", 64'(unit_en), 64'h5);

    // decode: writes and reads to each unit
    for (int u = 1; u <= NU; u++) begin
      int word;
      for (int k = 0; k < NU; k++) wr_before[k] = wr_count[k];
      word = $urandom_range(0, 2**REG_AW - 1);
      wr(wa(u, word), 32'(u * 1000 + word));
      for (int k = 0; k < NU; k++)
        check($sformatf("unit %0d write seen by unit %0d", u, k + 1),
              64'(wr_count[k] - wr_before[k]), (k == u - 1) ? 1 : 0);
      check("unit-local address", 64'(last_waddr[u-1]), 64'(word));
      check("write data", 64'(last_wdata[u-1]), 64'(u * 1000 + word));
      rd(wa(u, word), d);
      check($sformatf("read mux unit %0d", u), 64'(d), 64'({8'(u), 14'd0, 10'(word)}));
    end
    // an unused unit number reads zero
    rd(wa(9, 3), d); check("unused unit reads 0", 64'(d), 0);
    rd(wa(0, 7), d); check("unused controller word reads 0", 64'(d), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
