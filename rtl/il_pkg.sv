// il_pkg - shared widths, types and the run-time configuration of the BPM
// interlock.
//
// The interlock watches the 10 kHz beam position of a beam position monitor
// and the raw ADC samples of its four pickup channels, and opens an
// interlock switch when the beam leaves a window or an ADC saturates.  All
// of its settings are written by software and arrive here as one struct,
// il_cfg_t.  The widths below are this design's choice: the source
// describes the function but gives no word lengths.
package il_pkg;

  // Position in nanometres, two's complement.
  localparam int unsigned POS_W   = 32;
  // ADC sample width.
  localparam int unsigned ADC_W   = 16;
  // Fraction bits of the IIR filter coefficients (K = 2**K_FRAC means 1.0).
  localparam int unsigned K_FRAC  = 15;
  // Number of ADC channels (pickup electrodes A..D).
  localparam int unsigned N_CH    = 4;
  // Attenuator settings that are summed for the gain-dependent mode.
  localparam int unsigned N_ATT   = 2;
  localparam int unsigned ATT_W   = 6;
  localparam int unsigned ATTS_W  = ATT_W + $clog2(N_ATT);
  // Width of the overflow-duration setting, in clocks.
  localparam int unsigned DUR_W   = 16;

  typedef logic signed [POS_W-1:0] pos_t;
  typedef logic signed [ADC_W-1:0] adc_t;
  typedef logic [K_FRAC:0]         coef_t;
  typedef logic [ATT_W-1:0]        att_t;
  typedef logic [ATTS_W-1:0]       att_sum_t;

  // Coefficient value that means "no filtering".
  localparam coef_t COEF_ONE = coef_t'(1) << K_FRAC;

  typedef struct packed {
    logic     il_on;      // interlock on/off switch (IL_ON)
    logic     gs_dep;     // gain-dependent mode (GS_DEP)
    pos_t     x_min;      // X window
    pos_t     x_max;
    pos_t     y_min;      // Y window
    pos_t     y_max;
    coef_t    pos_k;      // position filter coefficient
    coef_t    amp_k;      // amplitude filter coefficient
    logic [ADC_W-2:0] adc_limit;  // ADC amplitude limit (positive counts)
    logic [DUR_W-1:0] ovf_dur;    // overflow duration, clocks
    att_sum_t att_limit;  // gain limit A, compared with the attenuator sum
  } il_cfg_t;

endpackage
