// tb_tx_source_mux: all 32 input combinations of the test multiplexer.
module tb_tx_source_mux;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic sel, cd, cr, ed, er, td, tr;

  tx_source_mux dut (.sel_ext(sel), .ctrl_data(cd), .ctrl_dir(cr), .ext_data(ed),
    .ext_dir(er), .tx_data(td), .tx_dir(tr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {sel, cd, cr, ed, er} = 5'(v);
      #1;
      checks++;
      if ({td, tr} != (sel ? {ed, er} : {cd, cr})) begin
        failures++;
        $display("FAIL input %b gives %b%b", 5'(v), td, tr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
