// tb_control_regfile: reset values and writes of the control registers.
//
// After reset: all PA enables 0xFF, standby on, lossless mode, controller
// source, delimiter DATA 3'b111 / DIR 3'b101. Then random writes to random
// addresses (including unused ones and writes with write_enable low) are
// mirrored in a reference copy of the register map and every output is
// compared after each clock.
module tb_control_regfile;
  import gcd_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] addr = 0;
  logic [7:0] wdata = 0;
  logic [7:0] sel [NUM_CH];
  logic standby, src_ext;
  comp_mode_e mode;
  logic [2:0] dd, dr;

  control_regfile dut (.clk(clk), .rst_n(rst_n), .address_in(addr), .data_in(wdata),
    .write_enable(we), .select_reg(sel), .standby(standby), .comp_mode(mode),
    .tx_src_ext(src_ext), .delim_data(dd), .delim_dir(dr));

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [7:0] r_sel [8];
    logic r_sb, r_ext;
    logic [1:0] r_mode;
    logic [2:0] r_dd, r_dr;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 8; i++) check(sel[i] == 8'hFF, "reset PA enable");
    check(standby && mode == COMP_LOSSLESS && !src_ext && dd == 3'b111 && dr == 3'b101, "reset control");
    rst_n = 1;
    for (int i = 0; i < 8; i++) r_sel[i] = 8'hFF;
    r_sb = 1; r_ext = 0; r_mode = 2'd1; r_dd = 3'b111; r_dr = 3'b101;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      addr = 4'($urandom); wdata = 8'($urandom); we = 1'($urandom);
      if (we) begin
        if (addr < 8) r_sel[addr[2:0]] = wdata;
        else if (addr == 8) begin
          r_sb = wdata[0]; r_ext = wdata[3];
          r_mode = (wdata[2:1] == 2'd3) ? 2'd1 : wdata[2:1];
        end else if (addr == 9) begin r_dd = wdata[2:0]; r_dr = wdata[5:3]; end
      end
      @(negedge clk);
      we = 0;
      for (int i = 0; i < 8; i++) check(sel[i] == r_sel[i], "PA enable");
      check(standby == r_sb && src_ext == r_ext && mode == comp_mode_e'(r_mode), "control");
      check(dd == r_dd && dr == r_dr, "delimiter");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
