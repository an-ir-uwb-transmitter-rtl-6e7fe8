// tb_unit_pa: the three output states of the unit PA model.
module tb_unit_pa;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic sel, in, up, down;

  unit_pa dut (.sel(sel), .in(in), .pull_up(up), .pull_down(down));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {sel, in} = 2'(v);
      #1;
      checks++;
      // selected: drive high or low with the input; not selected: high-Z
      if ({up, down} != (sel ? (in ? 2'b10 : 2'b01) : 2'b00)) begin
        failures++;
        $display("FAIL sel=%b in=%b up=%b down=%b", sel, in, up, down);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
