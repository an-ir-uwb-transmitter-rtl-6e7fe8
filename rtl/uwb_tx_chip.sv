// uwb_tx_chip: behavioural model (not synthesizable as a whole) of the chip,
// a compressing digital controller feeding an edge-combination IR-UWB
// transmitter.
//
// Eight LC-ADC channels deliver DATA/DIR bits from off chip. The
// digital_controller samples them once per TGRAN step, compresses each
// 16-step window per channel with the GCD scheme and serializes the
// packets, bracketed by start/stop symbols, at the PRF clock. A test
// multiplexer lets the external DATA/DIR pins drive the transmitter instead.
// The transmitter turns each DATA edge into one UWB pulse whose position
// carries DIR (2-PPM), built from eight sub-pulses whose amplitudes follow
// the PA-enable registers. The register file sets the PA enables, standby,
// compression mode, multiplexer select and start/stop symbol.
//
// The analog bias voltages (VCTRL_PPM, VCTRL_DC<7:0>, VCTRL_GG<7:0>) come from
// off-chip DACs and are inputs here. The high-pass capacitor and antenna are
// off chip: rf_drive is the combined PA output node (unit PAs pulling up
// minus those pulling down) that connects to them. tx_data/tx_dir show the
// symbols entering the transmitter. The transmitter part is a behavioural
// model; the controller and multiplexer are synthesizable.
//
// Timing: clk_prf is the system clock (7 MHz nominal); clk_tgran is sampled
// through a synchroniser and must be much slower (1/190 us nominal).
module uwb_tx_chip
  import gcd_pkg::*;
(
  input  logic              clk_prf,
  input  logic              clk_tgran,
  input  logic              rst_n,
  input  logic [NUM_CH-1:0] lcadc_data_in,
  input  logic [NUM_CH-1:0] lcadc_dir_in,
  input  logic [3:0]        address_in,
  input  logic [7:0]        data_in,
  input  logic              write_enable,
  input  logic              ext_data,
  input  logic              ext_dir,
  input  real               vctrl_ppm,
  input  real               vctrl_dc [NUM_CH],
  input  real               vctrl_gg [NUM_CH],
  output int                rf_drive,
  output logic              delay_line_out,
  output logic              tx_data,
  output logic              tx_dir,
  output logic              busy,
  output logic              frame_done,
  output logic              overrun
);
  timeunit 1ns; timeprecision 1ps;

  logic       ctrl_data, ctrl_dir;
  logic [7:0] select_reg [NUM_CH];
  logic       standby, tx_src_ext;
  logic [NUM_CH-1:0] sub_pulse;

  digital_controller u_ctrl (
    .clk_prf      (clk_prf),
    .clk_tgran    (clk_tgran),
    .rst_n        (rst_n),
    .lcadc_data_in(lcadc_data_in),
    .lcadc_dir_in (lcadc_dir_in),
    .address_in   (address_in),
    .data_in      (data_in),
    .write_enable (write_enable),
    .tx_data      (ctrl_data),
    .tx_dir       (ctrl_dir),
    .select_reg   (select_reg),
    .standby      (standby),
    .tx_src_ext   (tx_src_ext),
    .busy         (busy),
    .frame_done   (frame_done),
    .overrun      (overrun)
  );

  tx_source_mux u_mux (
    .sel_ext  (tx_src_ext),
    .ctrl_data(ctrl_data),
    .ctrl_dir (ctrl_dir),
    .ext_data (ext_data),
    .ext_dir  (ext_dir),
    .tx_data  (tx_data),
    .tx_dir   (tx_dir)
  );

  uwb_transmitter #(.NSUB(NUM_CH), .NUNIT(8)) u_tx (
    .data          (tx_data),
    .dir           (tx_dir),
    .standby       (standby),
    .vctrl_ppm     (vctrl_ppm),
    .vctrl_dc      (vctrl_dc),
    .vctrl_gg      (vctrl_gg),
    .pa_enable     (select_reg),
    .drive         (rf_drive),
    .delay_line_out(delay_line_out),
    .sub_pulse     (sub_pulse)
  );

  // Sub-pulses are observed inside the transmitter's own test.
  logic unused;
  assign unused = ^sub_pulse;
endmodule
