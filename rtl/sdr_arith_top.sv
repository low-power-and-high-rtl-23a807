// sdr_arith_top: the two arithmetic datapaths side by side.
//
// 1. Adaptive-modulation receiver datapath. A received complex sample is
//    rounded by the quantizer to the data word length, filtered by the 32-tap
//    delayed-LMS equalizer, and sliced by the demodulator for the active scheme
//    (QPSK, 16-, 64- or 256-QAM). The error stage compares the equalizer output
//    with the pilot (train = 1) or with the demodulator's decision (train = 0),
//    and the error drives the weight update D = 32 cycles later. The word-length
//    controller sets the precision of every multiplier from the scheme (9, 11,
//    13 or 15 bits) and requests the matching supply voltage on vdd_mv; the
//    regulator that delivers it is outside this design, and vdd_busy tells that
//    a voltage rise is being waited for before the word widens.
//    Timing: eq_y, sym_i/sym_q and decision are combinational from rx_x in the
//    same cycle; the equalizer state moves on each clock edge.
// 2. The 9-bit unsigned array multiplier with its 15 logic stages grouped three
//    to a clock period: one product per cycle, 5 cycles of latency.
//
// Bit 10 of vdd_mv is constant 1 (all supply levels lie between 1024 and
// 2047 mV), which synthesis reports as a constant output.
//
// The composition follows the receiver of the document (quantizer, LMS
// equalizer, adaptive demodulator) and its separate DSP multiplier; the port
// list, the weight-load port and the separation of the two parts into
// independent port groups are this design's own.
module sdr_arith_top
  import sdr_pkg::*;
#(
  parameter int unsigned NTAPS    = 32,
  parameter int unsigned D        = NTAPS,
  parameter int unsigned MU_SHIFT = 7,
  parameter int unsigned SETTLE   = 16,
  parameter int unsigned PHASES   = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // receiver
  input  mod_e                       mod,
  input  logic                       train,
  input  logic                       adapt,
  input  cplx_t                      rx_x,
  input  cplx_t                      pilot,
  input  logic                       load_en,
  input  logic [$clog2(NTAPS)-1:0]   load_idx,
  input  cplx_t                      load_w,
  output cplx_t                      eq_y,
  output cplx_t                      eq_err,
  output logic [3:0]                 sym_i,
  output logic [3:0]                 sym_q,
  output cplx_t                      decision,
  output logic [PREC_W-1:0]          prec,
  output logic [10:0]                vdd_mv,
  output logic                       vdd_busy,
  output logic                       prec_switched,
  // wave-pipelined multiplier
  input  logic                       wm_in_valid,
  input  logic [WM_N-1:0]            wm_x,
  input  logic [WM_N-1:0]            wm_y,
  output logic                       wm_out_valid,
  output logic [2*WM_N-1:0]          wm_p
);

  cplx_t x_q;
  cplx_t w_unused [NTAPS];

  wl_ctrl #(.SETTLE(SETTLE)) u_wl_ctrl (
    .clk(clk), .rst_n(rst_n), .mod(mod), .prec(prec), .vdd_mv(vdd_mv),
    .busy(vdd_busy), .switched(prec_switched)
  );

  quantizer u_quant (.x_in(rx_x), .prec(prec), .x_out(x_q));

  lms_equalizer #(.NTAPS(NTAPS), .D(D), .MU_SHIFT(MU_SHIFT)) u_eq (
    .clk(clk), .rst_n(rst_n), .prec(prec), .x(x_q), .e(eq_err), .adapt(adapt),
    .load_en(load_en), .load_idx(load_idx), .load_w(load_w), .y(eq_y), .w_out(w_unused)
  );

  qam_demod u_demod (.y(eq_y), .mod(mod), .sym_i(sym_i), .sym_q(sym_q), .decision(decision));

  lms_err u_err (.y(eq_y), .pilot(pilot), .decision(decision), .train(train), .e(eq_err));

  wd_mult #(.PHASES(PHASES)) u_wmult (
    .clk(clk), .rst_n(rst_n), .in_valid(wm_in_valid), .x(wm_x), .y(wm_y),
    .out_valid(wm_out_valid), .p(wm_p)
  );

endmodule
