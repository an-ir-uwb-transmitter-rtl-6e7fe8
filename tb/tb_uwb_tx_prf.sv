// tb_uwb_tx_prf: the chip's transmitter driven from the external DATA/DIR
// pins at the pulse rates used to measure the chip: 20 MHz with a 5 ns PPM
// delay, then the 40 MHz base PRF.
//
// The test multiplexer is switched to the external pins and standby is
// cleared through the register file. Biases are solved from the model
// curves: VCTRL_PPM for a 5 ns late position, VCTRL_DC for 0.25 ns per
// delay-line stage (eight stages span a 2 ns pulse), VCTRL_GG for 125 ps
// sub-pulses. For each rate 200 random bits are sent as return-to-zero
// triggers, one per symbol slot, DIR carrying the bit. A receiver in the
// test bench finds every sub-pulse in rf_drive and decides each bit from the
// position of the pulse within its slot (threshold half the PPM delay). It
// checks that the bit error count is 0, that every slot holds exactly one
// pulse of eight sub-pulses, and that each pulse is about 2 ns long and ends
// well before the next slot. A sweep of VCTRL_PPM from 0.6 V to 1.1 V then
// checks that the late position moves monotonically and follows the model
// curve, and that DELAYLINEOUT trails the trigger by the eight stage delays.
module tb_uwb_tx_prf;
  import gcd_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 0, clk_tgran = 0, rst_n = 0, we = 0;
  logic [3:0] addr = 0;
  logic [7:0] wdata = 0;
  logic ext_data = 0, ext_dir = 0;
  real  vppm;
  real  vdc [NUM_CH];
  real  vgg [NUM_CH];
  int   rf_drive;
  logic dl_out, tx_data, tx_dir, busy, frame_done, overrun;

  uwb_tx_chip dut (.clk_prf(clk), .clk_tgran(clk_tgran), .rst_n(rst_n),
    .lcadc_data_in('0), .lcadc_dir_in('0), .address_in(addr), .data_in(wdata),
    .write_enable(we), .ext_data(ext_data), .ext_dir(ext_dir), .vctrl_ppm(vppm),
    .vctrl_dc(vdc), .vctrl_gg(vgg), .rf_drive(rf_drive), .delay_line_out(dl_out),
    .tx_data(tx_data), .tx_dir(tx_dir), .busy(busy), .frame_done(frame_done),
    .overrun(overrun));

  always #(500.0 / 7.0) clk = !clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // log-linear model curve: delay d_lo at v_lo to d_hi at v_hi; inverse
  function automatic real v_for(real d, real v_lo, real v_hi, real d_lo, real d_hi);
    return v_lo + (v_hi - v_lo) * $ln(d / d_lo) / $ln(d_hi / d_lo);
  endfunction
  function automatic real d_for(real v, real v_lo, real v_hi, real d_lo, real d_hi);
    return d_lo * $exp((v - v_lo) / (v_hi - v_lo) * $ln(d_hi / d_lo));
  endfunction

  // sub-pulse rises and falls of the PA node
  real t_rise [$];
  real t_fall [$];
  int  prev = 0;
  always @(rf_drive) begin
    if (rf_drive > prev) t_rise.push_back($realtime);
    else if (rf_drive < prev) t_fall.push_back($realtime);
    prev = rf_drive;
  end

  task automatic write_reg(input logic [3:0] a, input logic [7:0] v);
    @(negedge clk); addr = a; wdata = v; we = 1;
    @(negedge clk); we = 0;
  endtask

  initial begin
    real ppm, last_d;
    real rates [2] = '{20.0, 40.0};
    vppm = v_for(5.0, 0.6, 1.1, 120.0, 2.0);
    for (int i = 0; i < NUM_CH; i++) begin
      vdc[i] = v_for(0.25, 1.1, 1.8, 0.5, 0.1);
      vgg[i] = v_for(0.125, 1.1, 1.8, 0.2, 0.1);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    write_reg(ADDR_CTRL, {4'b0, 1'b1, 2'(COMP_LOSSLESS), 1'b0});   // external source, active
    #100;
    ppm = d_for(vppm, 0.6, 1.1, 120.0, 2.0);

    foreach (rates[r]) begin
      real slot, t0;
      int errors, npulse, nbits;
      logic bits [$];
      slot = 1000.0 / rates[r];
      errors = 0; npulse = 0; nbits = 200;
      t_rise.delete(); t_fall.delete();
      t0 = $realtime;
      for (int k = 0; k < nbits; k++) begin
        bits.push_back(1'($urandom));
        ext_dir = bits[k]; ext_data = 1;
        #(slot / 2); ext_data = 0;
        #(slot / 2);
      end
      // receiver: pulse position within each slot
      for (int k = 0; k < nbits; k++) begin
        real s0, first, last;
        int n;
        s0 = t0 + k * slot; n = 0; first = -1.0; last = -1.0;
        foreach (t_rise[i])
          if (t_rise[i] >= s0 && t_rise[i] < s0 + slot) begin
            if (n == 0) first = t_rise[i] - s0;
            n++;
          end
        foreach (t_fall[i])
          if (t_fall[i] >= s0 && t_fall[i] < s0 + slot) last = t_fall[i] - s0;
        check(n == 8, "one pulse of eight sub-pulses per slot");
        if (n > 0) begin
          npulse++;
          if ((first > ppm / 2) != bits[k]) errors++;
          check(last - first > 1.6 && last - first < 2.4, "pulse about 2 ns long");
          check(last < slot - 5.0, "pulse ends well before the next slot");
        end
      end
      check(errors == 0, "no bit errors");
      check(npulse == nbits, "every symbol produced a pulse");
      $display("PRF %0.0f MHz: %0d bits in %0.1f ns = %0.1f Mbit/s, %0d errors", rates[r], nbits,
               $realtime - t0, nbits * 1000.0 / ($realtime - t0), errors);
    end

    // VCTRL_PPM sweep with DIR = 1
    last_d = 1.0e9;
    for (int s = 0; s <= 5; s++) begin
      real v, t0, d, tdl;
      v = 0.6 + 0.1 * s;
      vppm = v; #50;
      t_rise.delete();
      ext_dir = 1; t0 = $realtime; ext_data = 1;
      @(posedge dl_out); tdl = $realtime - t0;
      #200; ext_data = 0; #200;
      check(t_rise.size() == 8, "sweep: one pulse");
      if (t_rise.size() > 0) begin
        d = t_rise[0] - t0;
        check(d < last_d, "sweep: delay falls as VCTRL_PPM rises");
        check(d > d_for(v, 0.6, 1.1, 120.0, 2.0) + 0.25 && d < d_for(v, 0.6, 1.1, 120.0, 2.0) + 0.35,
              "sweep: delay follows the PPM curve plus one stage");
        check(tdl > d_for(v, 0.6, 1.1, 120.0, 2.0) + 1.98 && tdl < d_for(v, 0.6, 1.1, 120.0, 2.0) + 2.02,
              "sweep: DELAYLINEOUT after eight stages");
        $display("VCTRL_PPM %0.1f V: pulse %0.3f ns after the trigger", v, d);
        last_d = d;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
