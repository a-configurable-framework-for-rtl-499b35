// tb_abacus_reuse_unit: self-checking test of the memory reuse distance unit.
// A small behavioural 2-way LRU cache model in the testbench (tags per set
// and an LRU stack per set) turns a random address stream into cache access
// records for the unit. The testbench counts misses and the stack distance
// of each hit independently, then compares the unit's counters with those
// counts. Also checks the one-cycle latency, clear, and a 4-way instance.
module tb_abacus_reuse_unit;
  import abacus_pkg::*;

  localparam int unsigned CW = 40;

  logic clk = 0, rst_n = 0, clear = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // 2-way instance
  logic       acc2 = 0, hit2 = 0;
  logic [0:0] way2 = '0;
  logic [0:0] lru2 [2];
  reg_req_t   req2 = '0;
  logic [31:0] rdata2;
  abacus_reuse_unit #(.WAYS(2), .CNT_W(CW)) dut2 (
    .clk, .rst_n, .clear, .acc_valid(acc2), .acc_hit(hit2), .acc_way(way2),
    .lru_stack(lru2), .req(req2), .rdata(rdata2));

  // 4-way instance
  logic       acc4 = 0, hit4 = 0;
  logic [1:0] way4 = '0;
  logic [1:0] lru4 [4];
  reg_req_t   req4 = '0;
  logic [31:0] rdata4;
  abacus_reuse_unit #(.WAYS(4), .CNT_W(CW)) dut4 (
    .clk, .rst_n, .clear, .acc_valid(acc4), .acc_hit(hit4), .acc_way(way4),
    .lru_stack(lru4), .req(req4), .rdata(rdata4));

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

  task automatic rd_cnt(input bit four, input int k, output logic [63:0] v);
    logic [31:0] lo, hi;
    for (int w = 0; w < 2; w++) begin
      @(negedge clk);
      if (four) req4 = '{valid: 1'b1, we: 1'b0, addr: WIN_AW'(2*k + w), wdata: '0};
      else      req2 = '{valid: 1'b1, we: 1'b0, addr: WIN_AW'(2*k + w), wdata: '0};
      @(negedge clk);
      req2 = '0; req4 = '0;
      if (w == 0) lo = four ? rdata4 : rdata2;
      else        hi = four ? rdata4 : rdata2;
    end
    v = {hi, lo};
  endtask

  // Behavioural LRU cache model: NSETS sets, WAYS ways, stack[0] = MRU way.
  localparam int NSETS = 8;
  int tags2  [NSETS][2];
  int stack2 [NSETS][2];
  int tags4  [NSETS][4];
  int stack4 [NSETS][4];
  longint m2 [3];
  longint m4 [5];

  // One access to the model: returns hit, way, and the pre-access stack;
  // updates tags and stack.
  task automatic access2(input int line, output bit h, output int w, output int st [2]);
    int s, t, pos;
    s = line % NSETS; t = line / NSETS;
    st = stack2[s];
    h = 0; w = 0;
    for (int i = 0; i < 2; i++) if (tags2[s][i] == t) begin h = 1; w = i; end
    if (!h) w = stack2[s][1];             // victim = LRU way
    tags2[s][w] = t;
    pos = 1;
    for (int d = 0; d < 2; d++) if (stack2[s][d] == w) pos = d;
    for (int d = pos; d > 0; d--) stack2[s][d] = stack2[s][d-1];
    stack2[s][0] = w;
  endtask

  task automatic access4(input int line, output bit h, output int w, output int st [4]);
    int s, t, pos;
    s = line % NSETS; t = line / NSETS;
    st = stack4[s];
    h = 0; w = 0;
    for (int i = 0; i < 4; i++) if (tags4[s][i] == t) begin h = 1; w = i; end
    if (!h) w = stack4[s][3];
    tags4[s][w] = t;
    pos = 3;
    for (int d = 0; d < 4; d++) if (stack4[s][d] == w) pos = d;
    for (int d = pos; d > 0; d--) stack4[s][d] = stack4[s][d-1];
    stack4[s][0] = w;
  endtask

  initial begin
    logic [63:0] v;
    bit h; int w; int st2 [2]; int st4 [4];
    for (int s = 0; s < NSETS; s++) begin
      for (int i = 0; i < 2; i++) begin tags2[s][i] = -1; stack2[s][i] = i; end
      for (int i = 0; i < 4; i++) begin tags4[s][i] = -1; stack4[s][i] = i; end
    end
    foreach (m2[k]) m2[k] = 0;
    foreach (m4[k]) m4[k] = 0;
    lru2 = '{default: '0};
    lru4 = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1;

    // latency and bin selection, by hand: hit on the LRU way of a 2-way set
    @(negedge clk);
    acc2 = 1; hit2 = 1; way2 = 1; lru2 = '{1'b0, 1'b1};
    @(posedge clk); #1;
    check("2-way distance 1 counted next edge", 64'(dut2.cnt_q[2]), 1);
    check("2-way distance 0 untouched", 64'(dut2.cnt_q[1]), 0);
    @(negedge clk); acc2 = 0;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    rd_cnt(0, 2, v); check("2-way clear", v, 0);

    // random streams with locality: mostly a few hot lines
    for (int i = 0; i < 6000; i++) begin
      int line;
      @(negedge clk);
      acc2 = ($urandom_range(0, 4) != 0);
      acc4 = acc2;
      line = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 255) : $urandom_range(0, 31);
      if (acc2) begin
        access2(line, h, w, st2);
        hit2 = h; way2 = 1'(w);
        for (int d = 0; d < 2; d++) lru2[d] = 1'(st2[d]);
        if (!h) m2[0]++;
        else for (int d = 0; d < 2; d++) if (st2[d] == w) m2[d+1]++;
        access4(line, h, w, st4);
        hit4 = h; way4 = 2'(w);
        for (int d = 0; d < 4; d++) lru4[d] = 2'(st4[d]);
        if (!h) m4[0]++;
        else for (int d = 0; d < 4; d++) if (st4[d] == w) m4[d+1]++;
      end
    end
    @(negedge clk); acc2 = 0; acc4 = 0;
    for (int k = 0; k < 3; k++) begin
      rd_cnt(0, k, v); check($sformatf("2-way bin %0d", k), v, 64'(m2[k]));
    end
    for (int k = 0; k < 5; k++) begin
      rd_cnt(1, k, v); check($sformatf("4-way bin %0d", k), v, 64'(m4[k]));
    end
    $display("2-way histogram miss=%0d d0=%0d d1=%0d", m2[0], m2[1], m2[2]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
