// abacus_ahb_slave: AMBA AHB slave that maps the ABACUS register window onto
// the system bus.
//
// The analyzer is reached by software only through memory-mapped registers,
// so its external interface to the bus is a slave that turns AHB transfers
// into the register requests of abacus_pkg::reg_req_t. A transfer is taken in
// its address phase (HSEL, HREADY and an NONSEQ or SEQ HTRANS); the word
// address is the low WIN_AW+2 bits of HADDR shifted down by two.
//
// Timing, a choice of this design:
//   write: no wait state. The request goes out in the data phase, with HWDATA.
//   read:  one wait state. The request goes out in the first data-phase cycle
//          (HREADYOUT low); the register data returns one cycle later and is
//          driven on HRDATA with HREADYOUT high.
// Every access is treated as a 32-bit word access; HRESP is always OKAY.
// The bus protocol is AHB as on the platform the analyzer was shown on; the
// wait-state scheme and word-only access are this design's own.
module abacus_ahb_slave
  import abacus_pkg::*;
(
  input  logic             hclk,
  input  logic             hresetn,
  // AHB slave port
  input  logic             hsel,
  input  logic [31:0]      haddr,
  input  logic [1:0]       htrans,
  input  logic             hwrite,
  input  logic [2:0]       hsize,
  input  logic [31:0]      hwdata,
  input  logic             hready,
  output logic             hreadyout,
  output logic [1:0]       hresp,
  output logic [31:0]      hrdata,
  // register side
  output reg_req_t         req,
  input  logic [BUS_W-1:0] rdata
);

  typedef enum logic [1:0] {
    S_IDLE,     // no data phase pending
    S_WRITE,    // write data phase (single cycle)
    S_RD_REQ,   // read data phase, request issued, wait state
    S_RD_DATA   // read data phase, data on HRDATA
  } state_e;

  state_e            state_q, state_d;
  logic [WIN_AW-1:0] addr_q;
  logic              accept;

  assign accept = hsel && hready && htrans[1];

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_RD_REQ: state_d = S_RD_DATA;
      default:  state_d = accept ? (hwrite ? S_WRITE : S_RD_REQ) : S_IDLE;
    endcase
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state_q <= S_IDLE;
      addr_q  <= '0;
    end else begin
      state_q <= state_d;
      if (accept && state_q != S_RD_REQ) addr_q <= haddr[WIN_AW+1:2];
    end
  end

  always_comb begin
    req.valid = (state_q == S_WRITE) || (state_q == S_RD_REQ);
    req.we    = (state_q == S_WRITE);
    req.addr  = addr_q;
    req.wdata = hwdata;
  end

  assign hreadyout = (state_q != S_RD_REQ);
  assign hresp     = HRESP_OKAY;
  assign hrdata    = (state_q == S_RD_DATA) ? rdata : '0;

  // Only 32-bit accesses are supported.
  a_word_access: assert property (@(posedge hclk) disable iff (!hresetn)
    accept |-> hsize == 3'b010)
    else $error("abacus_ahb_slave: only word accesses are supported");
  // While this slave inserts a wait state the bus must not start a transfer.
  a_no_accept_in_wait: assert property (@(posedge hclk) disable iff (!hresetn)
    state_q == S_RD_REQ |-> !hready)
    else $error("abacus_ahb_slave: HREADY high during a wait state");

endmodule
