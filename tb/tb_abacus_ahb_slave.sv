// tb_abacus_ahb_slave: self-checking test of the AHB slave.
// A small AHB master in the testbench issues single and back-to-back
// transfers; a register-file model on the register side answers reads one
// cycle after the request, as the controller does. Checks that every write
// reaches the register side with the right word address and data, that
// reads return the model's data, that writes take no wait state and reads
// exactly one, that HRESP stays OKAY and that unselected or IDLE transfers
// cause no register access.
module tb_abacus_ahb_slave;
  import abacus_pkg::*;

  logic hclk = 0, hresetn = 0;
  logic hsel = 0, hwrite = 0;
  logic [31:0] haddr = '0, hwdata = '0;
  logic [1:0] htrans = HTRANS_IDLE;
  logic [2:0] hsize = 3'b010;
  logic hready, hreadyout;
  logic [1:0] hresp;
  logic [31:0] hrdata;
  reg_req_t req;
  logic [31:0] rdata;
  int checks = 0, failures = 0;
  always #5 hclk = ~hclk;
  assign hready = hreadyout;   // single slave on the bus

  abacus_ahb_slave dut (.hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize,
    .hwdata, .hready, .hreadyout, .hresp, .hrdata, .req, .rdata);

  initial begin
    repeat (100000) @(posedge hclk);
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

  // register-side model
  logic [31:0] regs [2**WIN_AW];
  int n_acc = 0;
  always_ff @(posedge hclk) begin
    if (req.valid) n_acc <= n_acc + 1;
    if (req.valid && req.we) regs[req.addr] <= req.wdata;
    if (req.valid && !req.we) rdata <= regs[req.addr];
  end

  // HRESP is OKAY throughout
  always @(negedge hclk) if (hresetn && hresp != HRESP_OKAY) begin
    failures++; $display("FAIL HRESP not OKAY");
  end

  task automatic ahb_write(input logic [31:0] a, input logic [31:0] d, output int waits);
    @(negedge hclk);
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 1; haddr = a;
    @(negedge hclk);                       // address phase taken at the edge between
    hsel = 0; htrans = HTRANS_IDLE; hwdata = d;
    waits = 0;
    while (!hreadyout) begin waits++; @(negedge hclk); end
    @(posedge hclk); #1;
  endtask

  task automatic ahb_read(input logic [31:0] a, output logic [31:0] d, output int waits);
    @(negedge hclk);
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 0; haddr = a;
    @(negedge hclk);
    hsel = 0; htrans = HTRANS_IDLE;
    waits = 0;
    while (!hreadyout) begin waits++; @(negedge hclk); end
    d = hrdata;
    @(posedge hclk); #1;
  endtask

  initial begin
    logic [31:0] d, a;
    int w, n0;
    logic [31:0] shadow [int];
    for (int i = 0; i < 2**WIN_AW; i++) regs[i] = 32'(i) ^ 32'h5a5a_0000;
    repeat (3) @(negedge hclk);
    hresetn = 1;

    // single writes and reads to random words of the window
    for (int i = 0; i < 200; i++) begin
      a = 32'h8000_0000 | (32'($urandom_range(0, 2**WIN_AW - 1)) << 2);
      d = $urandom();
      ahb_write(a, d, w);
      check("write wait states", 64'(w), 0);
      shadow[int'(a[WIN_AW+1:2])] = d;
      check("write reached register", 64'(regs[a[WIN_AW+1:2]]), 64'(d));
    end
    foreach (shadow[k]) begin
      ahb_read(32'h8000_0000 | (32'(k) << 2), d, w);
      check("read wait states", 64'(w), 1);
      check("read data", 64'(d), 64'(shadow[k]));
    end
    ahb_read(32'h8000_0000 | (32'd77 << 2), d, w);
    check("read untouched word", 64'(d), 64'(shadow.exists(77) ? shadow[77] : (32'd77 ^ 32'h5a5a_0000)));

    // back-to-back: write, write, read, pipelined
    @(negedge hclk);
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 1; haddr = 32'h8000_0010;
    @(negedge hclk);
    hwdata = 32'hcafe_0001; htrans = HTRANS_SEQ; haddr = 32'h8000_0014;
    check("b2b write 1 no wait", 64'(hreadyout), 1);
    @(negedge hclk);
    hwdata = 32'hcafe_0002; htrans = HTRANS_NONSEQ; hwrite = 0; haddr = 32'h8000_0010;
    @(negedge hclk);
    hsel = 0; htrans = HTRANS_IDLE;
    check("b2b read wait state", 64'(hreadyout), 0);
    @(negedge hclk);
    check("b2b read ready", 64'(hreadyout), 1);
    check("b2b read data", 64'(hrdata), 64'h cafe_0001);
    check("b2b write 2", 64'(regs[5]), 64'hcafe_0002);

    // IDLE and unselected transfers do nothing
    @(negedge hclk);
    n0 = n_acc;
    hsel = 1; htrans = HTRANS_IDLE; hwrite = 1; haddr = 32'h8000_0020;
    @(negedge hclk);
    hsel = 0; htrans = HTRANS_NONSEQ; hwdata = 32'hdead_beef;
    @(negedge hclk);
    htrans = HTRANS_IDLE;
    repeat (2) @(negedge hclk);
    check("no access for IDLE / unselected", 64'(n_acc - n0), 0);
    check("register unchanged", 64'(regs[8]), 64'(shadow.exists(8) ? shadow[8] : (32'd8 ^ 32'h5a5a_0000)));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
