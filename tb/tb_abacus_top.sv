// tb_abacus_top: end-to-end test of the ABACUS analyzer at its default
// parameters (40-bit counters, 6 code ranges, 6 instruction classes, 2-way
// caches).
// The testbench plays the two sides the analyzer is attached to:
//   * software on the AHB bus: it programs code ranges, loads the
//     instruction-mix table, starts, stops, enables units and clears through
//     the register window, then reads every counter back;
//   * a processor: a synthetic SPARC-like instruction stream (loops through a
//     few functions, with loads and stores) feeding behavioural 2-way LRU
//     instruction (16 KB) and data (8 KB) cache models that report hit, way
//     and LRU stack per access.
// An independent reference model counts what each unit should have seen.
// Mechanisms exercised and counted: stopped analyzer ignores events, run,
// unit disable, clear, run-time table reload, misses and both reuse
// distances in both caches, overlapping code ranges, uncounted opcodes and
// read wait states. Each that never happens counts as a failure.
module tb_abacus_top;
  import abacus_pkg::*;

  localparam int WAYS = 2;
  localparam int NR = 6, NC = 6;

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

  abacus_top dut (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hreadyout, .hresp, .hrdata,
    .instr_valid, .pc, .ir, .ic_acc, .ic_hit, .ic_way, .ic_lru,
    .dc_acc, .dc_hit, .dc_way, .dc_lru);

  initial begin
    repeat (2000000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
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

  // ---------------- behavioural LRU cache (2-way) ----------------
  class lru_cache;
    int sets, line_bytes;
    int tags  [][WAYS];
    int stack [][WAYS];   // stack[s][0] = MRU way
    function new(int sets_i, int line_i);
      sets = sets_i; line_bytes = line_i;
      tags = new[sets]; stack = new[sets];
      for (int s = 0; s < sets; s++)
        for (int w = 0; w < WAYS; w++) begin tags[s][w] = -1; stack[s][w] = w; end
    endfunction
    // returns hit, way, pre-access stack; updates state
    function void access(input logic [31:0] addr, output bit h, output int way, output int st [WAYS]);
      int s, t, pos;
      s = int'((addr / line_bytes) % sets);
      t = int'(addr / (line_bytes * sets));
      st = stack[s];
      h = 0; way = 0;
      for (int w = 0; w < WAYS; w++) if (tags[s][w] == t) begin h = 1; way = w; end
      if (!h) way = stack[s][WAYS-1];
      tags[s][way] = t;
      pos = WAYS - 1;
      for (int d = 0; d < WAYS; d++) if (stack[s][d] == way) pos = d;
      for (int d = pos; d > 0; d--) stack[s][d] = stack[s][d-1];
      stack[s][0] = way;
    endfunction
  endclass

  lru_cache icache, dcache;

  // ---------------- AHB master ----------------
  int read_waits = 0;
  task automatic ahb_write(input int unit, input int word, input logic [31:0] d);
    @(negedge hclk);
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 1;
    haddr = 32'h8000_0000 | 32'((unit << (REG_AW + 2)) | (word << 2));
    @(negedge hclk);
    hsel = 0; htrans = HTRANS_IDLE; hwdata = d;
    while (!hreadyout) @(negedge hclk);
    @(posedge hclk); #1;
  endtask

  task automatic ahb_read(input int unit, input int word, output logic [31:0] d);
    @(negedge hclk);
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 0;
    haddr = 32'h8000_0000 | 32'((unit << (REG_AW + 2)) | (word << 2));
    @(negedge hclk);
    hsel = 0; htrans = HTRANS_IDLE;
    while (!hreadyout) begin read_waits++; @(negedge hclk); end
    d = hrdata;
    @(posedge hclk); #1;
  endtask

  task automatic read_cnt(input int unit, input int k, output logic [63:0] v);
    logic [31:0] lo, hi;
    ahb_read(unit, 2*k, lo);
    ahb_read(unit, 2*k + 1, hi);
    v = {hi, lo};
  endtask

  // ---------------- reference model ----------------
  logic [31:0] rs [NR], re [NR];
  int lut [256];
  longint m_code [NR], m_mix [NC], m_ic [3], m_dc [3];
  bit run_m;
  logic [3:0] en_m;
  // mechanism counters
  int n_stopped_events, n_disabled_events, n_clear, n_reload, n_overlap, n_uncounted;
  int n_ic_bin [3], n_dc_bin [3];

  function automatic void model_clear();
    foreach (m_code[r]) m_code[r] = 0;
    foreach (m_mix[k])  m_mix[k]  = 0;
    foreach (m_ic[k]) begin m_ic[k] = 0; m_dc[k] = 0; end
  endfunction

  // ---------------- processor model ----------------
  logic [31:0] cur_pc;
  logic [31:0] entries [8];

  function automatic logic [31:0] make_ir(int kind);
    logic [31:0] x;
    x = $urandom();
    case (kind)
      0: x[31:30] = 2'b00;                       // branch / sethi
      1: x[31:30] = 2'b01;                       // call
      2: x[31:30] = 2'b10;                       // arithmetic / control
      default: x[31:30] = 2'b11;                 // load / store
    endcase
    return x;
  endfunction

  // n instruction cycles (some idle); events counted in the model only
  // where the analyzer is running and the unit is enabled.
  task automatic run_stream(input int n);
    bit h; int w; int st [WAYS];
    for (int i = 0; i < n; i++) begin
      @(negedge hclk);
      instr_valid = ($urandom_range(0, 5) != 0);
      ic_acc = instr_valid; dc_acc = 0;
      if (instr_valid) begin
        int kind;
        // control flow: mostly sequential, loop back or call a function
        if ($urandom_range(0, 15) == 0) cur_pc = entries[$urandom_range(0, 7)];
        else if ($urandom_range(0, 7) == 0) cur_pc = cur_pc - 32'($urandom_range(1, 16) * 4);
        else cur_pc = cur_pc + 4;
        kind = $urandom_range(0, 9);
        kind = (kind < 2) ? 0 : (kind < 3) ? 1 : (kind < 7) ? 2 : 3;
        pc = cur_pc; ir = make_ir(kind);
        icache.access(pc, h, w, st);
        ic_hit = h; ic_way = 1'(w); ic_lru[0] = 1'(st[0]); ic_lru[1] = 1'(st[1]);
        if (run_m) begin
          int bin, hits;
          bin = h ? ((st[0] == w) ? 1 : 2) : 0;
          if (en_m[1]) begin m_ic[bin]++; n_ic_bin[bin]++; end
          else n_disabled_events++;
          hits = 0;
          for (int r = 0; r < NR; r++)
            if (pc >= rs[r] && pc <= re[r]) begin
              hits++;
              if (en_m[0]) m_code[r]++;
            end
          if (hits > 1) n_overlap++;
          if (lut[sparc_opcode(ir)] < NC) begin
            if (en_m[3]) m_mix[lut[sparc_opcode(ir)]]++;
          end else n_uncounted++;
        end else n_stopped_events++;
        if (kind == 3) begin
          logic [31:0] da;
          // data: a hot stack region and a larger array swept with stride
          da = ($urandom_range(0, 2) == 0) ? 32'h6000_0000 + 32'($urandom_range(0, 16383) & ~3)
                                           : 32'h7fff_f000 + 32'($urandom_range(0, 255) & ~3);
          dcache.access(da, h, w, st);
          dc_acc = 1; dc_hit = h; dc_way = 1'(w); dc_lru[0] = 1'(st[0]); dc_lru[1] = 1'(st[1]);
          if (run_m) begin
            int bin;
            bin = h ? ((st[0] == w) ? 1 : 2) : 0;
            if (en_m[2]) begin m_dc[bin]++; n_dc_bin[bin]++; end
            else n_disabled_events++;
          end
        end
      end
    end
    @(negedge hclk);
    instr_valid = 0; ic_acc = 0; dc_acc = 0;
    repeat (4) @(negedge hclk);   // let the pipeline drain
  endtask

  task automatic set_ctrl(input bit run, input bit clr);
    ahb_write(0, int'(CTRL_REG_CTRL), {30'd0, clr, run});
    run_m = run;
    if (clr) begin model_clear(); n_clear++; end
  endtask

  task automatic set_en(input logic [3:0] en);
    ahb_write(0, int'(CTRL_REG_UNIT_EN), 32'(en));
    en_m = en;
  endtask

  task automatic load_lut(input int scheme);
    for (int i = 0; i < 256; i++) begin
      int op, op3;
      op = i >> 6; op3 = i & 63;
      if (scheme == 0)
        lut[i] = (op == 0 || op == 1) ? 0 :                 // control transfer
                 (op == 3) ? ((op3 & 4) != 0 ? 2 : 1) :     // stores : loads
                 (op3 inside {['h34:'h37]}) ? 7 :          // FP: not counted
                 (op3 inside {'h0a, 'h0b, 'h0e, 'h0f}) ? 4 : 3;
      else
        lut[i] = (i * 5 + 1) % 8;
      ahb_write(int'(UNIT_IMIX), int'(IMIX_LUT_BASE) + i, 32'(lut[i]));
    end
  endtask

  task automatic check_all(input string tag);
    logic [63:0] v;
    for (int r = 0; r < NR; r++) begin
      read_cnt(int'(UNIT_CODE), 2*r + 1, v);  // COUNT r at words 4r+2, 4r+3
      check($sformatf("%s code range %0d", tag, r), v, 64'(m_code[r]));
    end
    for (int k = 0; k < NC; k++) begin
      read_cnt(int'(UNIT_IMIX), k, v);
      check($sformatf("%s mix class %0d", tag, k), v, 64'(m_mix[k]));
    end
    for (int k = 0; k < 3; k++) begin
      read_cnt(int'(UNIT_REUSE_I), k, v);
      check($sformatf("%s icache bin %0d", tag, k), v, 64'(m_ic[k]));
      read_cnt(int'(UNIT_REUSE_D), k, v);
      check($sformatf("%s dcache bin %0d", tag, k), v, 64'(m_dc[k]));
    end
  endtask

  task automatic mech(input string name, input int n);
    checks++;
    $display("mechanism %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
  endtask

  initial begin
    logic [31:0] d;
    icache = new(256, 32);   // 16 KB, 2-way, 32-byte lines
    dcache = new(128, 32);   //  8 KB, 2-way, 32-byte lines
    entries = '{32'h4000_0000, 32'h4000_0400, 32'h4000_0a00, 32'h4000_1000,
                32'h4000_2000, 32'h4000_2400, 32'h4000_4000, 32'h4000_6000};
    cur_pc = entries[0];
    ic_lru = '{default: '0}; dc_lru = '{default: '0};
    rs = '{32'h4000_0000, 32'h4000_0400, 32'h4000_0000, 32'h4000_2000, 32'h4000_4000, 32'h4000_6000};
    re = '{32'h4000_03ff, 32'h4000_0bff, 32'h4000_1fff, 32'h4000_23ff, 32'h4000_5fff, 32'h4000_7fff};
    model_clear();
    run_m = 0; en_m = 4'hf;
    n_stopped_events = 0; n_disabled_events = 0; n_clear = 0; n_reload = 0;
    n_overlap = 0; n_uncounted = 0;
    foreach (n_ic_bin[k]) begin n_ic_bin[k] = 0; n_dc_bin[k] = 0; end
    repeat (3) @(negedge hclk);
    hresetn = 1;

    ahb_read(0, int'(CTRL_REG_INFO), d);
    check("INFO", 64'(d), 64'h0f28_abac);
    for (int r = 0; r < NR; r++) begin
      ahb_write(int'(UNIT_CODE), 4*r, rs[r]);
      ahb_write(int'(UNIT_CODE), 4*r + 1, re[r]);
    end
    ahb_read(int'(UNIT_CODE), 4*3 + 1, d);
    check("END3 readback", 64'(d), 64'(re[3]));
    load_lut(0);
    ahb_read(int'(UNIT_IMIX), int'(IMIX_LUT_BASE) + 'hb5, d);
    check("LUT readback", 64'(d), 64'(lut['hb5]));

    // 1. stopped: nothing counts
    run_stream(500);
    check_all("stopped");
    // 2. running, all units
    set_ctrl(1, 0);
    run_stream(6000);
    set_ctrl(0, 0);
    check_all("run");
    // 3. D-cache reuse unit disabled
    set_en(4'b1011);
    set_ctrl(1, 0);
    run_stream(3000);
    set_ctrl(0, 0);
    check_all("dcache disabled");
    set_en(4'hf);
    // 4. clear, reload the table at run time, run again
    set_ctrl(0, 1);
    check_all("cleared");
    load_lut(1); n_reload++;
    set_ctrl(1, 0);
    run_stream(4000);
    set_ctrl(0, 0);
    check_all("new table");

    mech("events ignored while stopped", n_stopped_events);
    mech("events of a disabled unit", n_disabled_events);
    mech("clear", n_clear);
    mech("table reload", n_reload);
    mech("overlapping code ranges", n_overlap);
    mech("uncounted opcode", n_uncounted);
    mech("icache miss", n_ic_bin[0]);
    mech("icache reuse distance 0", n_ic_bin[1]);
    mech("icache reuse distance 1", n_ic_bin[2]);
    mech("dcache miss", n_dc_bin[0]);
    mech("dcache reuse distance 0", n_dc_bin[1]);
    mech("dcache reuse distance 1", n_dc_bin[2]);
    mech("read wait states", read_waits);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
