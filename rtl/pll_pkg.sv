// pll_pkg: shared constants and configuration-register types of the
// Delta-Sigma FDC PLL digital.
//
// The configuration structs mirror the register groups of the PLL's
// configuration space (CNR, FDC digital, DLC, DCO digital and the divider).
// Field names and value ranges follow the register tables of the design;
// the bit widths of fields whose range is not printed (user load values,
// divider timing knobs) are this design's choice.
//
// Fixed-point convention used throughout: a signal "N(u,w)" has N bits,
// u integer bits (sign included for signed values) and w fractional bits.
// Some format constants are not referenced by every module; they are kept
// as the single statement of each signal's format.
package pll_pkg;

  // ---------------------------------------------------------------- widths
  localparam int unsigned ADC_W    = 7;   // adc_data 7(2,5)
  localparam int unsigned ADC_FRAC = 5;
  localparam int unsigned GC_W     = 13;  // gc_coeff 13(1,12), range [0,2)
  localparam int unsigned GC_FRAC  = 12;
  localparam int unsigned QNC_W    = 15;  // adc_qnc 15(2,13), range [-2,2)
  localparam int unsigned QNC_FRAC = 13;
  localparam int unsigned RS_W     = 18;  // r[n] 18(5,13), range [-16,16)
  localparam int unsigned PERR_W   = 14;  // perr 14(4,10), range [-8,8)
  localparam int unsigned PERR_FRAC= 10;
  localparam int unsigned FCW_W    = 25;  // fcw = N+alpha, 25(7,18)
  localparam int unsigned FCW_FRAC = 18;
  localparam int unsigned DIV_W    = 7;   // divider modulus, 7(7,0)
  localparam int unsigned FCTRL_W  = 15;  // fctrl 15(7,8), unsigned
  localparam int unsigned FCTRL_FRAC = 8;

  // ------------------------------------------------------------- CNR regs
  typedef struct packed {
    logic       fast_src;       // 1: clk_dig_fast is the fast clock (default 1)
    logic       frc_fast;       // force clk_dig_fast as the fast clock
    logic       reset_all;      // reset everything, registers included
    logic       reset_pll;      // reset FDC, DLC and DCO digital
    logic       reset_fdc;
    logic       reset_dlc;
    logic       reset_dco;
    logic       reset_regs;
    logic [1:0] ref_src;        // 0: clk_xosc, 1: vdiv_ext
    logic       dis_pulse_ext;  // 1: one-fast-cycle clock pulse
    logic       phase_sel;      // 1: retime on the falling fast-clock edge
    logic [2:0] pulse_width;    // clock.fdc_dlc high time in fast cycles (default 2)
    logic       dis_retime;     // use the raw reference event as clock
    logic       fdc_frc_xosc;   // use clk_xosc directly as clock.fdc_dlc
    logic       fdc_dis;        // stop clock.fdc_dlc
    logic       sma_dis;        // stop the gain-calibration enables
    logic [2:0] sma_ds_rate;    // sma enable every ds_rate+1 cycles
    logic [3:0] sma_strobe_rate;// strobe every strobe_rate+1 sma enables
    logic       dco_half_rate;  // clock.dco = fast clock / 2
    logic       dco_frc_xosc;   // clock.dco = clk_xosc
    logic       dco_dis;        // stop clock.dco
    logic       regs_gate;      // gate clock.regs
  } cnr_cfg_t;

  // ------------------------------------------------------ FDC digital regs
  typedef struct packed {
    logic              gc_dis;        // freeze the gain-calibration accumulator
    logic              gc_pol_inv;    // invert the sign reference
    logic [2:0]        gc_gain2x;     // LMS gain K = 2^(gain2x-11) (default 5)
    logic              gc_load_sel;   // load gc_load_value into the loop
    logic [GC_W-1:0]   gc_load_value; // user coefficient (1,12)
    logic              gc_ena;        // 1: use the loop output, 0: coefficient 1.0
    logic              dis_qnc;       // disable quantization-noise cancellation
    logic [1:0]        clip_sel;      // clip QNC output to +/-2^(1-clip_sel) (default 1)
    logic              dis_dsm_dither;// remove the LSB dither of the modulator
  } fdc_cfg_t;

  // -------------------------------------------------------------- DLC regs
  typedef struct packed {
    logic [3:0]        km;            // gain 0.125*km
    logic [2:0]        kp;            // proportional gain 2^kp
    logic [2:0]        ka;            // proportional-path IIR pole 1-2^-ka
    logic [3:0]        ki_kp;         // integral gain 2^(-15+ki_kp)
    logic [2:0]        kr;            // IIR stage pole 1-2^-kr
    logic              byp_perr;      // use user_perr instead of perr
    logic [PERR_W-1:0] user_perr;
    logic              intg_path_byp; // use user_intg as integral-path output
    logic [PERR_W-1:0] user_intg;     // (4,10) in perr units
    logic              ena_snap;      // capture perr and fctrl
  } dlc_cfg_t;

  // ------------------------------------------------------ DCO digital regs
  typedef struct packed {
    logic               byp_fctrl;
    logic [FCTRL_W-1:0] user_fctrl;
    logic               byp_fce;
    logic [6:0]         user_int_therm;
    logic [3:0]         user_int_bin;
    logic [3:0]         user_frac;
    logic               ena_snap;
    logic               dis_lfsr;
    logic               dis_bound_avoid; // no effect: avoider not built
    logic               dis_dsm;         // 1: uniform quantizer instead of the modulator
    logic               dis_dither;
    logic               ena_dem;
    logic               dis_shaping;
  } dco_cfg_t;

  // ------------------------------------------------------- divider (MMD)
  typedef struct packed {
    logic [3:0] oc_width;        // vdiv (u(t)) high time, DCO cycles
    logic       ena_vdiv_ext;
    logic [5:0] vdiv_ext_width;  // vdiv_ext high time, DCO cycles
    logic [4:0] samp_ctrl_delay; // count-to-4 after which new phases are sampled (9 or 10)
    logic [3:0] adc_conv_del;    // pre-scaler counts to vconv rise (5 or 6)
    logic [3:0] adc_conv_width;  // pre-scaler counts of vconv high (5 or 6)
  } mmd_cfg_t;

endpackage
