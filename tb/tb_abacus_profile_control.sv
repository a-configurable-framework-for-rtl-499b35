// tb_abacus_profile_control: self-checking test of the profile control block.
// Walks every combination of RUN, the four unit enables and the three event
// strobes and checks that each unit's strobe is the AND of RUN, its own
// enable bit and its event, and that CLEAR is forwarded.
module tb_abacus_profile_control;
  logic run, clr;
  logic [3:0] en;
  logic iv, ica, dca;
  logic code_v, ic_v, dc_v, imix_v, clr_o;
  int checks = 0, failures = 0;

  abacus_profile_control #(.N_UNITS(4)) dut (
    .run, .clear_i(clr), .unit_en(en), .instr_valid(iv), .ic_acc(ica), .dc_acc(dca),
    .code_instr_valid(code_v), .ic_acc_valid(ic_v), .dc_acc_valid(dc_v),
    .imix_instr_valid(imix_v), .clear_o(clr_o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      {clr, run, en, iv, ica, dca} = 9'(v);
      #1;
      check("code", code_v, run & en[0] & iv);
      check("icache reuse", ic_v, run & en[1] & ica);
      check("dcache reuse", dc_v, run & en[2] & dca);
      check("instr mix", imix_v, run & en[3] & iv);
      check("clear", clr_o, clr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
