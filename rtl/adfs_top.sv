// All-digital fractional-N frequency synthesizer for the Bluetooth band.
//
// The loop replaces the charge pump and analog loop filter of a classic PLL
// by digital blocks, once per reference period (tick):
//   1. mash3 turns the channel fraction K/F into a divide-ratio sequence
//      ndiv = N + y whose mean is N + K/F (modulus control of the integer
//      part plus the MASH's N+1 division control);
//   2. frac_freq_det counts the feedback cycles of the period and outputs
//      err = ndiv - count;
//   3. amp_detector watches the size of err and var_gain multiplies it by a
//      large gain while the error is large (fast lock) and a small one near
//      lock (low noise);
//   4. loop_accum integrates the result into the oscillator control word;
//   5. its MSB part switches the oscillator's coarse currents directly, its
//      LSB part is smoothed by fir_lp and converted by dac8 into the fine
//      control voltage;
//   6. the oscillator (sc_vco) output is divided by the prescaler into the
//      feedback clock.
// In lock f_out = P * f_ref * (N + K/F); with the defaults (32 MHz crystal,
// reference divider 2, prescaler 4, F = 64) f_out = (64 * N + K) MHz, so
// Bluetooth channel k uses N = (2402 + k) / 64 and K = (2402 + k) mod 64.
// The block structure follows the design's block diagram; sizes, gains and
// the counting detector are this design's own choices, described in each
// module. dac8 and sc_vco are behavioural models of analog parts, so this top
// simulates but does not synthesize as a whole.
//
// Ports: clk_ref (crystal reference), rst_n (asynchronous, active low; the
// oscillator runs while it is high), n_int (integer part N), num (numerator
// K). Observation outputs: f_out (oscillator), f_fb (feedback clock), tick,
// ndiv, err, gain_hi, ctrl (control word), dac_code, v_dac (V), i_dac (A),
// vco_freq (Hz).
module adfs_top
  import adfs_pkg::*;
#(
  parameter int unsigned REF_DIV = 2,
  parameter int unsigned PRE_STAGES = 2,
  parameter int unsigned SH_HI = 10,
  parameter int unsigned SH_LO = 6
) (
  input  logic              clk_ref,
  input  logic              rst_n,
  input  logic [NINT_W-1:0] n_int,
  input  logic [FRAC_W-1:0] num,
  output logic              f_out,
  output logic              f_fb,
  output logic              tick,
  output logic [NDIV_W-1:0] ndiv,
  output err_t              err,
  output logic              gain_hi,
  output ctrl_t             ctrl,
  output logic [LSB_W-1:0]  dac_code,
  output real               v_dac,
  output real               i_dac,
  output real               vco_freq
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned DW = ERR_W + SH_HI;

  mash_y_t                 y;
  logic [FRAC_W-1:0]       e3;
  logic [CNT_W-1:0]        count;
  logic [ERR_W+3:0]        amp;
  logic signed [DW-1:0]    delta;
  logic [MSB_W-1:0]        msb;
  logic [LSB_W-1:0]        lsb;
  logic [14:0]             msb_cells, lsb_cells;

  ref_divider #(.DIV(REF_DIV)) u_div (.clk(clk_ref), .rst_n, .tick);

  mash3 u_mash (.clk(clk_ref), .rst_n, .en(tick), .x(num), .y, .e3);

  // Modulus control of the integer part plus the MASH's N+1 division control.
  assign ndiv = NDIV_W'($signed({1'b0, n_int}) + NDIV_W'(y));

  frac_freq_det u_ffd (
    .clk_fb(f_fb), .clk(clk_ref), .rst_n, .tick, .ndiv, .err, .count
  );

  amp_detector u_amp (.clk(clk_ref), .rst_n, .en(tick), .err, .gain_hi, .amp);

  var_gain #(.SH_HI(SH_HI), .SH_LO(SH_LO), .OW(DW)) u_gain (.err, .gain_hi, .dout(delta));

  loop_accum #(.DW(DW)) u_acc (
    .clk(clk_ref), .rst_n, .en(tick), .delta, .ctrl, .msb, .lsb
  );

  fir_lp u_fir (.clk(clk_ref), .rst_n, .en(tick), .x(lsb), .y(dac_code));

  dac8 u_dac (
    .code(dac_code), .msb_cells, .lsb_cells, .i_out(i_dac), .v_out(v_dac)
  );

  sc_vco #(.CW(MSB_W)) u_vco (
    .en(rst_n), .coarse(msb), .vctrl(v_dac), .clk_out(f_out), .freq_hz(vco_freq)
  );

  prescaler #(.STAGES(PRE_STAGES)) u_pre (.clk_in(f_out), .rst_n, .clk_out(f_fb));
endmodule
