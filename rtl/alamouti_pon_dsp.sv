// alamouti_pon_dsp: the digital parts of the Alamouti-coded simplified
// coherent PON link, side by side.
//
//   TX (line terminal): alamouti_encoder maps the serial symbol stream onto
//     the X and Y polarization tributaries, [s1 s2] / [-s2* s1*]. Its outputs
//     would drive the DACs of a dual-polarization IQ modulator.
//   RX (network unit):  alamouti_par_eq equalizes the single digitized
//     tributary of the single-polarization heterodyne receiver, after
//     intermediate-frequency removal and resampling (not part of this RTL).
// The optical link, the lasers, modulator, photodiode and converters lie
// between the two and are outside this design, so the two halves have
// separate ports and share only clock and reset. Parameters L (lanes) and N
// (taps) default to the 32-lane, 120-tap configuration of the experiment.
module alamouti_pon_dsp
  import alamouti_pkg::*;
#(
  parameter int L      = 32,
  parameter int N      = 120,
  parameter int CENTER = N / 2
) (
  input  logic       clk,
  input  logic       rst_n,
  // transmitter
  input  logic       tx_in_valid,
  input  sym_t       tx_s,
  output logic       tx_out_valid,
  output sym_t       tx_x,
  output sym_t       tx_y,
  // receiver
  input  logic       rx_in_valid,
  input  sample_t    rx_x,
  input  sym_t       rx_d_train,
  input  logic       rx_train_en,
  input  mod_e       rx_mod_fmt,
  input  logic [4:0] rx_mu_shift,
  input  logic [4:0] rx_mup_shift,
  output logic       rx_out_valid,
  output sym_t       rx_y,
  output logic       rx_blk_done
);

  alamouti_encoder u_tx (
    .clk(clk), .rst_n(rst_n), .in_valid(tx_in_valid), .s(tx_s),
    .out_valid(tx_out_valid), .tx_x(tx_x), .tx_y(tx_y));

  alamouti_par_eq #(.L(L), .N(N), .CENTER(CENTER)) u_rx (
    .clk(clk), .rst_n(rst_n), .in_valid(rx_in_valid), .x(rx_x),
    .d_train(rx_d_train), .train_en(rx_train_en), .mod_fmt(rx_mod_fmt),
    .mu_shift(rx_mu_shift), .mup_shift(rx_mup_shift),
    .out_valid(rx_out_valid), .y(rx_y), .blk_done(rx_blk_done));

endmodule
