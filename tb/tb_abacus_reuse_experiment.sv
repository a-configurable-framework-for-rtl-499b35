// tb_abacus_reuse_experiment: the cache reuse-distance measurement the
// analyzer was built for, on synthetic workloads.
// The processor side is a trace generator feeding behavioural 2-way LRU
// caches of the reference platform's geometry (16 KB instruction cache,
// 8 KB data cache, 32-byte lines). Six workloads differ in code loop size
// and in data working set and access pattern, from cache-resident to
// streaming. For each one, software clears the analyzer, runs it for a fixed
// number of back-to-back instructions (one per clock, no idle cycles), stops
// it and reads the miss / distance-0 / distance-1 histograms of both caches.
// Checks per workload: every bin against an independent reference count,
// the I-cache bins summing to the instructions executed, the D-cache bins
// summing to the loads and stores executed. The histograms are printed in
// the form of a miss/0/1 bar chart.
module tb_abacus_reuse_experiment;
  import abacus_pkg::*;

  localparam int WAYS = 2;
  localparam int N_INSTR = 20000;

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
    repeat (1000000) @(posedge hclk);
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

  class lru_cache;
    int sets, line_bytes;
    int tags  [][WAYS];
    int stack [][WAYS];
    function new(int sets_i, int line_i);
      sets = sets_i; line_bytes = line_i;
      tags = new[sets]; stack = new[sets];
      flush();
    endfunction
    function void flush();
      for (int s = 0; s < sets; s++)
        for (int w = 0; w < WAYS; w++) begin tags[s][w] = -1; stack[s][w] = w; end
    endfunction
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

  // workload shape
  typedef struct {
    string name;
    int    code_bytes;   // loop body size
    int    data_bytes;   // data working set
    int    mem_pct;      // share of loads/stores
    int    stride;       // 0: random in the working set, else sequential stride
  } workload_t;

  workload_t wl [6] = '{
    '{"small loop, 2 KB data",      1024,   2048, 30, 0},
    '{"small loop, 12 KB data",     2048,  12288, 30, 0},
    '{"large code, 6 KB data",     20480,   6144, 25, 0},
    '{"streaming 64 KB, stride 8",  1024,  65536, 35, 8},
    '{"random 256 KB",              4096, 262144, 35, 0},
    '{"sequential 16 KB, stride 4", 3072,  16384, 40, 4}
  };

  initial begin
    longint m_ic [3], m_dc [3];
    longint n_mem;
    logic [63:0] v;
    logic [63:0] s_ic, s_dc;
    bit h; int w; int st [WAYS];
    logic [31:0] cur_pc, base_pc, sweep;
    icache = new(256, 32);
    dcache = new(128, 32);
    ic_lru = '{default: '0}; dc_lru = '{default: '0};
    repeat (3) @(negedge hclk);
    hresetn = 1;

    foreach (wl[i]) begin
      foreach (m_ic[k]) begin m_ic[k] = 0; m_dc[k] = 0; end
      n_mem = 0;
      icache.flush(); dcache.flush();
      base_pc = 32'h4000_0000 + 32'(i) * 32'h0010_0000;
      cur_pc = base_pc; sweep = 0;
      ahb_write(0, int'(CTRL_REG_CTRL), 32'h3);   // clear and run
      for (int n = 0; n < N_INSTR; n++) begin
        @(negedge hclk);
        instr_valid = 1; ic_acc = 1; dc_acc = 0;
        cur_pc = cur_pc + 4;
        if (cur_pc >= base_pc + 32'(wl[i].code_bytes)) cur_pc = base_pc;
        pc = cur_pc; ir = $urandom();
        icache.access(pc, h, w, st);
        ic_hit = h; ic_way = 1'(w); ic_lru[0] = 1'(st[0]); ic_lru[1] = 1'(st[1]);
        m_ic[h ? ((st[0] == w) ? 1 : 2) : 0]++;
        if ($urandom_range(0, 99) < wl[i].mem_pct) begin
          logic [31:0] da;
          if (wl[i].stride == 0) da = 32'h6000_0000 + 32'($urandom_range(0, wl[i].data_bytes - 1) & ~3);
          else begin
            da = 32'h6000_0000 + sweep;
            sweep = (sweep + 32'(wl[i].stride)) % 32'(wl[i].data_bytes);
          end
          dcache.access(da, h, w, st);
          dc_acc = 1; dc_hit = h; dc_way = 1'(w); dc_lru[0] = 1'(st[0]); dc_lru[1] = 1'(st[1]);
          m_dc[h ? ((st[0] == w) ? 1 : 2) : 0]++;
          n_mem++;
        end
      end
      @(negedge hclk); instr_valid = 0; ic_acc = 0; dc_acc = 0;
      repeat (4) @(negedge hclk);
      ahb_write(0, int'(CTRL_REG_CTRL), 32'h0);

      s_ic = 0; s_dc = 0;
      for (int k = 0; k < 3; k++) begin
        read_cnt(int'(UNIT_REUSE_I), k, v);
        check($sformatf("%s icache bin %0d", wl[i].name, k), v, 64'(m_ic[k]));
        s_ic += v;
        read_cnt(int'(UNIT_REUSE_D), k, v);
        check($sformatf("%s dcache bin %0d", wl[i].name, k), v, 64'(m_dc[k]));
        s_dc += v;
      end
      check($sformatf("%s icache bins sum to instructions", wl[i].name), s_ic, 64'(N_INSTR));
      check($sformatf("%s dcache bins sum to memory operations", wl[i].name), s_dc, 64'(n_mem));
      $display("%-28s I$ miss %6d  0 %6d  1 %6d | D$ miss %6d  0 %6d  1 %6d",
               wl[i].name, m_ic[0], m_ic[1], m_ic[2], m_dc[0], m_dc[1], m_dc[2]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
