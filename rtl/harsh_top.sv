// harsh_top: the two digital designs side by side.
//
// fftc1 is the FF-LYNX test chip for high-energy-physics detectors
// (radiation-hardened serial transmitter/receiver with built-in test).
// ips_ctrl is the control logic of the automotive Intelligent Power Switch.
// The two share only clock and reset here; they were separate chips.
// All ports are passed straight through; see the two modules for their
// meaning and timing.
module harsh_top #(
  parameter int FIFO_DEPTH = 64,
  parameter int IPS_CW     = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // FF-TC1: I2C
  input  logic        scl,
  input  logic        sda_in,
  output logic        sda_oe,
  // FF-TC1: test pulses
  input  logic        tx_trg_pin,
  input  logic        tx_dav_pin,
  // FF-TC1: parallel port, transmitter direction
  input  logic [15:0] pp_word_in,
  input  logic        pp_dv_in,
  input  logic        pp_label_in,
  input  logic        pp_dt_in,
  output logic        pp_get_data,
  input  logic [5:0]  pp_flf_in,
  input  logic        pp_flf_valid_in,
  output logic        pp_flf_get,
  // FF-TC1: parallel port, receiver direction
  output logic        pp_oe,
  output logic [15:0] pp_word_out,
  output logic        pp_dv_out,
  output logic        pp_first,
  output logic        pp_label_out,
  output logic        pp_dt_out,
  output logic        pp_last_out,
  input  logic        pp_get_in,
  output logic [5:0]  pp_flf_out,
  output logic        pp_flf_valid_out,
  input  logic        pp_flf_get_in,
  output logic        rx_trg_out,
  // FF-TC1: serial pads
  output logic        lvds_tx_dat,
  input  logic        lvds_rx_dat,
  output logic        tx_ref_stb,
  output logic        rx_ref_stb,
  output logic        rx_locked,
  // IPS
  input  logic              ips_tick,
  input  logic              lamp_ctrl,
  input  logic              over_curr,
  input  logic              over_temp,
  input  logic              kid,
  input  logic              lid,
  input  logic [IPS_CW-1:0] oc_time,
  input  logic [IPS_CW-1:0] t_on,
  input  logic [IPS_CW-1:0] t_off,
  output logic              gate_on,
  output logic              soft_start,
  output logic              ot_shutdown,
  output logic [1:0]        ips_diag,
  output logic              lamp_fault
);
  fftc1 #(.DEPTH(FIFO_DEPTH)) u_fftc1 (.*);

  ips_ctrl #(.CW(IPS_CW)) u_ips (.clk(clk), .rst_n(rst_n), .tick(ips_tick), .lamp_ctrl(lamp_ctrl),
    .over_curr(over_curr), .over_temp(over_temp), .kid(kid), .lid(lid), .oc_time(oc_time), .t_on(t_on),
    .t_off(t_off), .gate_on(gate_on), .soft_start(soft_start), .ot_shutdown(ot_shutdown), .diag(ips_diag),
    .lamp_fault(lamp_fault));
endmodule
